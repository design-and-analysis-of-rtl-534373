// parity_encoder: Hamming-code style linear combinations of four complex streams.
//
// For channels v1..v4 it forms
//   v5 = v1 + v2 + v3   (covered by check 1)
//   v6 = v1 + v2 + v4   (check 2)
//   v7 = v1 + v3 + v4   (check 3)
//   v  = v1 + v2 + v3 + v4  (input of the parity FFT)
// The same block codes the time-domain inputs x1..x4 and the FFT outputs X1..X4. Because
// the DFT is linear, FFT(x5) = X5, and so on. The sums are exact: each output is 2 bits
// wider than the inputs.
//
// Interface: re/im of four W-bit signed channels -> re/im of four (W+2)-bit signed sums.
// Combinational. The combinations follow the published coding. The widths are this
// design's choice.
module parity_encoder #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0]   in_re  [4],
  input  logic signed [W-1:0]   in_im  [4],
  output logic signed [W+1:0]   c_re   [3],   // v5, v6, v7
  output logic signed [W+1:0]   c_im   [3],
  output logic signed [W+1:0]   all_re,       // v
  output logic signed [W+1:0]   all_im
);

  localparam int unsigned OW = W + 2;

  // Channels (0-based) that enter each of the three checks.
  localparam int unsigned SEL [3][3] = '{'{0, 1, 2}, '{0, 1, 3}, '{0, 2, 3}};

  always_comb begin
    for (int c = 0; c < 3; c++) begin
      c_re[c] = OW'(in_re[SEL[c][0]]) + OW'(in_re[SEL[c][1]]) + OW'(in_re[SEL[c][2]]);
      c_im[c] = OW'(in_im[SEL[c][0]]) + OW'(in_im[SEL[c][1]]) + OW'(in_im[SEL[c][2]]);
    end
    all_re = OW'(in_re[0]) + OW'(in_re[1]) + OW'(in_re[2]) + OW'(in_re[3]);
    all_im = OW'(in_im[0]) + OW'(in_im[1]) + OW'(in_im[2]) + OW'(in_im[3]);
  end

endmodule
