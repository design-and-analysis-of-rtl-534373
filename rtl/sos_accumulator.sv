// sos_accumulator: adds up the squared magnitudes of one frame of N samples.
//
// Each valid input is added to a running sum. A counter tracks the position in the
// frame. On the N-th valid input, sum_o gives the frame total (the register plus the
// current input) and done_o is high in that same cycle. The register then restarts
// from zero for the next frame. Frames may follow back to back, and gaps between valid
// samples are allowed.
//
// Interface: clk, rst (synchronous, active high), in_valid, in_mag (W bits) ->
// sum_o (W + log2(N) bits), done_o. The block's job (accumulating the squares) follows
// the published Parseval check. The frame counting and the combinational total on the
// last sample are this design's choices.
module sos_accumulator #(
  parameter int unsigned W = 37,
  parameter int unsigned N = 4
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       in_valid,
  input  logic [W-1:0]               in_mag,
  output logic [W+$clog2(N)-1:0]     sum_o,
  output logic                       done_o
);

  localparam int unsigned SW = W + $clog2(N);

  logic [SW-1:0]             acc;
  logic [$clog2(N+1)-1:0]    count;

  assign sum_o  = acc + SW'(in_mag);
  assign done_o = in_valid && (count == ($clog2(N+1))'(N - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      acc   <= '0;
      count <= '0;
    end else if (in_valid) begin
      if (done_o) begin
        acc   <= '0;
        count <= '0;
      end else begin
        acc   <= sum_o;
        count <= count + 1'b1;
      end
    end
  end

endmodule
