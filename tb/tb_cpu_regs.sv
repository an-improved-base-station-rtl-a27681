// tb_cpu_regs: writes random values to every slot, card and sector
// register through the write bus, plus writes to addresses outside the
// tables, and checks every register output against a shadow copy.
module tb_cpu_regs;
  import bsm_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cpu_we = 0;
  logic [11:0] cpu_addr = 0;
  logic [31:0] cpu_wdata = 0;
  slot_cfg_t slot_cfg [192];
  card_cfg_t card_cfg [192];
  logic [14:0] pn_offset [3];
  slot_cfg_t slot_ref [192];
  card_cfg_t card_ref [192];
  logic [14:0] off_ref [3];

  cpu_regs dut (.clk, .rst_n, .cpu_we, .cpu_addr, .cpu_wdata, .slot_cfg, .card_cfg, .pn_offset);

  always #5 clk = !clk;

  task automatic wr(input logic [11:0] a, input logic [31:0] d);
    @(negedge clk);
    cpu_we = 1; cpu_addr = a; cpu_wdata = d;
    @(negedge clk);
    cpu_we = 0; cpu_wdata = $urandom;
  endtask

  task automatic compare(input string when);
    for (int i = 0; i < 192; i++) begin
      checks += 2;
      if (slot_cfg[i] != slot_ref[i]) begin failures++; $display("%s: slot %0d", when, i); end
      if (card_cfg[i] != card_ref[i]) begin failures++; $display("%s: card %0d", when, i); end
    end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (pn_offset[i] != off_ref[i]) begin failures++; $display("%s: offset %0d", when, i); end
    end
  endtask

  initial begin
    foreach (slot_ref[i]) slot_ref[i] = '0;
    foreach (card_ref[i]) card_ref[i] = '{rate: RATE_9600, pcb: 1'b0, mask: '0};
    foreach (off_ref[i]) off_ref[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    compare("after reset");
    for (int round = 0; round < 3; round++) begin
      for (int i = 0; i < 192; i++) begin
        logic [31:0] d;
        d = $urandom;
        wr({2'd0, 2'd0, 8'(i)}, d);
        slot_ref[i] = '{en: d[16], card: d[15:8], gain: d[7:0]};
        d = $urandom;
        wr({2'd1, 2'd0, 8'(i)}, d);
        card_ref[i].rate = rate_e'(d[1:0]); card_ref[i].pcb = d[2];
        d = $urandom;
        wr({2'd1, 2'd1, 8'(i)}, d);
        card_ref[i].mask[31:0] = d;
        d = $urandom;
        wr({2'd1, 2'd2, 8'(i)}, d);
        card_ref[i].mask[41:32] = d[9:0];
      end
      for (int s = 0; s < 3; s++) begin
        logic [31:0] d;
        d = $urandom;
        wr({2'd2, 8'd0, 2'(s)}, d);
        off_ref[s] = d[14:0];
      end
      // ignored: beyond the tables, and region 3
      wr({2'd0, 2'd0, 8'd200}, $urandom);
      wr({2'd1, 2'd3, 8'd5}, $urandom);
      wr({2'd1, 2'd0, 8'd250}, $urandom);
      wr({2'd2, 8'd0, 2'd3}, $urandom);
      wr({2'd3, 10'h3ff}, $urandom);
      compare($sformatf("round %0d", round));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
