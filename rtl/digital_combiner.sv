// digital_combiner: sums the weighted chips of the channels of a sector.
//
// Adds N unsigned inputs of W bits each into one multilevel value of
// W + clog2(N) bits (wide enough for N inputs at their maximum). In the
// improved modulator the combiner sits before the spreading and filtering,
// so it adds one gated gain per channel rather than one filtered multi-bit
// sample per channel. The sum is registered: sum is valid one cycle after
// the inputs.
module digital_combiner #(
  parameter int unsigned N  = 64,
  parameter int unsigned W  = 8,
  localparam int unsigned SW = W + $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  in [N],
  output logic [SW-1:0] sum
);
  logic [SW-1:0] acc;

  always_comb begin
    acc = '0;
    for (int i = 0; i < N; i++) acc = acc + SW'(in[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sum <= '0;
    else        sum <= acc;
  end
endmodule
