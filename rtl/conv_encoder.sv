// conv_encoder: rate 1/2 convolutional encoder of a traffic channel.
//
// Each information bit produces two code symbols, sym0 and sym1, so the
// symbol rate is twice the bit rate, as the source design describes. The code is the
// IS-95 forward link code (constraint length 9, generators 753 and 561
// octal); the source design only names the encoder and its rate. The generator MSB
// taps the incoming bit, the LSB the oldest of the eight stored bits.
// sym0/sym1 are combinational in in_bit and the stored bits; on a cycle
// with in_valid the bit is shifted into the register. clear marks the
// first bit of a frame: that bit is encoded as if the register were empty,
// and the register is emptied (or left holding only that bit). The
// vocoder's eight zero tail bits also flush the register at frame end.
module conv_encoder #(
  parameter int unsigned K  = 9,
  parameter logic [8:0]  G0 = 9'o753,
  parameter logic [8:0]  G1 = 9'o561
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clear,
  input  logic in_valid,
  input  logic in_bit,
  output logic sym0,
  output logic sym1
);
  logic [K-2:0] state;   // state[K-2] is the most recent stored bit
  logic [K-2:0] past;    // stored bits as seen by this cycle's bit
  logic [K-1:0] taps;

  always_comb begin
    past = clear ? '0 : state;
    taps = {in_bit, past};
    sym0 = ^(taps & G0[K-1:0]);
    sym1 = ^(taps & G1[K-1:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        state <= '0;
    else if (in_valid) state <= {in_bit, past[K-2:1]};
    else if (clear)    state <= '0;
  end
endmodule
