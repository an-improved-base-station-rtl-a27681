// symbol_repeater: symbol repetition of a traffic channel.
//
// Turns the variable-rate code symbol stream into a fixed 19.2 ksps stream
// by sending each code symbol 2**rate times (repeated 0, 1, 3 or 7 times,
// as the source design gives for 9.6, 4.8, 2.4 and 1.2 kbps). It also paces the
// encoder: every 2*2**rate symbols it pops one information bit (pop) and
// takes the encoder's two symbols, enc_sym0 then enc_sym1.
// Timing: on a cycle with sym_en the symbol for frame position sym_idx is
// chosen; out_sym/out_idx are registered and out_valid is high one cycle
// later. pop is combinational and lines up with sym_en, so the encoder
// outputs used in that cycle belong to the bit being popped. Symbol 0 of a
// frame always pops a bit, because 384 is a multiple of 16.
module symbol_repeater
  import bsm_pkg::*;
#(
  parameter int unsigned SYMS = SYMS_PER_FRAME
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sym_en,
  input  logic [$clog2(SYMS)-1:0]  sym_idx,
  input  rate_e                    rate,
  input  logic                     enc_sym0,
  input  logic                     enc_sym1,
  output logic                     pop,
  output logic                     out_valid,
  output logic                     out_sym,
  output logic [$clog2(SYMS)-1:0]  out_idx
);
  logic [3:0] sub;       // position within the 2*2**rate symbols of one bit
  logic [3:0] half;      // 2**rate
  logic       held0, held1;
  logic       sym;

  always_comb begin
    half = 4'd1 << rate;
    sub  = 4'(sym_idx) & ((half << 1) - 4'd1);
    pop  = sym_en && (sub == 4'd0);
    if (sub == 4'd0)     sym = enc_sym0;
    else if (sub < half) sym = held0;
    else                 sym = held1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held0     <= 1'b0;
      held1     <= 1'b0;
      out_valid <= 1'b0;
      out_sym   <= 1'b0;
      out_idx   <= '0;
    end else begin
      out_valid <= sym_en;
      if (pop) begin
        held0 <= enc_sym0;
        held1 <= enc_sym1;
      end
      if (sym_en) begin
        out_sym <= sym;
        out_idx <= sym_idx;
      end
    end
  end
endmodule
