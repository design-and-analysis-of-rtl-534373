// fft: 4-point radix-2 FFT with sequential (one sample per cycle) input and output.
//
// Samples arrive one per valid cycle in natural order x[0..3]. They are gathered in an
// input buffer. When the fourth sample arrives, the transform is computed in one step by
// two stages of radix-2 decimation-in-time butterflies:
//   a0 = x0 + x2, a1 = x0 - x2, a2 = x1 + x3, a3 = x1 - x3
//   X0 = a0 + a2, X2 = a0 - a2, X1 = a1 - j*a3, X3 = a1 + j*a3
// The result goes into an output buffer and streams out X[0..3], one per cycle, while
// the next frame is gathered. The twiddle factors of a 4-point transform are 1, -1, j
// and -j, so no multiplier is needed and the result is exact: each part grows by 2 bits.
//
// Interface: clk, rst (synchronous, active high); in_valid, in_re, in_im (IW-bit signed);
// out_valid, out_re, out_im (IW+2-bit signed), out_last on X[3].
// Timing: X[0] leaves in the cycle after x[3] arrives, and X[1..3] follow in the next
// three cycles. Throughput is one sample per cycle, so frames can follow back to back.
// The published design treats the FFT as a block with sequential inputs and outputs. It
// gives no size or structure for it. The 4-point size, the butterfly structure and the
// buffering are this design's choices.
module fft #(
  parameter int unsigned IW = 16
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [IW-1:0] in_re,
  input  logic signed [IW-1:0] in_im,
  output logic                 out_valid,
  output logic                 out_last,
  output logic signed [IW+1:0] out_re,
  output logic signed [IW+1:0] out_im
);

  localparam int unsigned OW = IW + 2;
  localparam int unsigned NP = 4;

  logic signed [IW-1:0] xr [NP-1];   // first three samples of the frame being gathered
  logic signed [IW-1:0] xi [NP-1];
  logic signed [OW-1:0] yr [NP];     // transform result being sent
  logic signed [OW-1:0] yi [NP];
  logic signed [OW-1:0] kr [NP];     // transform of the frame just completed
  logic signed [OW-1:0] ki [NP];
  logic [1:0]           in_cnt, out_cnt;
  logic                 sending;

  // Butterflies. x3 is the sample arriving now.
  always_comb begin
    logic signed [OW-1:0] x0r, x1r, x2r, x3r, x0i, x1i, x2i, x3i;
    logic signed [OW-1:0] a0r, a1r, a2r, a3r, a0i, a1i, a2i, a3i;
    x0r = OW'(xr[0]); x1r = OW'(xr[1]); x2r = OW'(xr[2]); x3r = OW'(in_re);
    x0i = OW'(xi[0]); x1i = OW'(xi[1]); x2i = OW'(xi[2]); x3i = OW'(in_im);
    a0r = x0r + x2r;  a0i = x0i + x2i;
    a1r = x0r - x2r;  a1i = x0i - x2i;
    a2r = x1r + x3r;  a2i = x1i + x3i;
    a3r = x1r - x3r;  a3i = x1i - x3i;
    kr[0] = a0r + a2r; ki[0] = a0i + a2i;
    kr[2] = a0r - a2r; ki[2] = a0i - a2i;
    kr[1] = a1r + a3i; ki[1] = a1i - a3r;   // a1 - j*a3
    kr[3] = a1r - a3i; ki[3] = a1i + a3r;   // a1 + j*a3
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt  <= '0;
      out_cnt <= '0;
      sending <= 1'b0;
      for (int n = 0; n < int'(NP) - 1; n++) begin
        xr[n] <= '0;
        xi[n] <= '0;
      end
      for (int k = 0; k < int'(NP); k++) begin
        yr[k] <= '0;
        yi[k] <= '0;
      end
    end else begin
      // output side
      if (sending) begin
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt == 2'd3) sending <= 1'b0;
      end
      // input side
      if (in_valid) begin
        in_cnt <= in_cnt + 1'b1;
        if (in_cnt == 2'd3) begin
          yr      <= kr;
          yi      <= ki;
          sending <= 1'b1;
          out_cnt <= '0;
        end else begin
          xr[in_cnt] <= in_re;
          xi[in_cnt] <= in_im;
        end
      end
    end
  end

  assign out_valid = sending;
  assign out_last  = sending && (out_cnt == 2'd3);
  assign out_re    = yr[out_cnt];
  assign out_im    = yi[out_cnt];

endmodule
