// tb_mlo_xor: checks the binary-multilevel XOR against the sum of binary
// XORs it stands for (eq. 8 form), on the 3-user example sequence and on
// random sets of weighted users.
module tb_mlo_xor;
  localparam int W = 14;
  int checks = 0, failures = 0;
  logic p;
  logic [W-1:0] r, radix_m1, y;

  mlo_xor #(.W(W)) dut (.p, .r, .radix_m1, .y);

  initial begin
    // Three users, unit gains: the outputs must be 2 1 1 1 2 2 2 2 1.
    bit [8:0] v1 = 9'b100110101, v2 = 9'b011001010, v3 = 9'b110101100, pi = 9'b010110010;
    int expect_seq [9] = '{2,1,1,1,2,2,2,2,1};
    for (int t = 0; t < 9; t++) begin
      int b;
      b = 8 - t;
      p = pi[b];
      r = W'(v1[b] + v2[b] + v3[b]);
      radix_m1 = 3;
      #1;
      checks++;
      if (int'(y) != (int'(p ^ v1[b]) + int'(p ^ v2[b]) + int'(p ^ v3[b])) || int'(y) != expect_seq[t]) begin
        failures++;
        $display("example chip %0d: got %0d expected %0d", t, y, expect_seq[t]);
      end
    end
    // Random weighted users: sum G_i (p ^ y_i) == EXOR(p, sum G_i y_i).
    for (int it = 0; it < 2000; it++) begin
      int k, sum_g, sum_gy, ref_v;
      k = 1 + $urandom_range(63);
      sum_g = 0; sum_gy = 0; ref_v = 0;
      p = 1'($urandom);
      for (int i = 0; i < k; i++) begin
        int g;
        bit yi;
        g = $urandom_range(255);
        yi = 1'($urandom);
        sum_g += g;
        sum_gy += yi ? g : 0;
        ref_v += (p ^ yi) ? g : 0;
      end
      r = W'(sum_gy);
      radix_m1 = W'(sum_g);
      #1;
      checks++;
      if (int'(y) != ref_v) begin
        failures++;
        $display("random %0d: got %0d expected %0d", it, y, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
