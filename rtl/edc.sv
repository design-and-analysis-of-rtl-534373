// edc: error detection and correction for one output channel.
//
// The three Parseval check results c1 c2 c3 form a Hamming syndrome. It is decoded into
// the module in error: 111 -> channel 1, 110 -> channel 2, 101 -> channel 3,
// 011 -> channel 4. A single failing check means the check path itself is faulty, and
// then the data is passed on unchanged. When this channel (CH, 0-based) is located as
// faulty, its output is rebuilt from the parity FFT, which transforms x1+x2+x3+x4:
//   Y_CH = X - (sum of the other three channels' outputs).
// Otherwise Y_CH = X_CH. One edc instance serves each of the four channels.
//
// Interface: clk, rst (synchronous, active high); in_valid; x_re/x_im of all four
// channels (W-bit signed); xp_re/xp_im, the parity FFT output (W+2-bit signed);
// syndrome {c1,c2,c3} -> out_valid, y_re/y_im (W bits), corrected (high when this sample
// was rebuilt). Output is registered: one cycle of latency.
// Decoding and the correction equation follow the published scheme. The registered
// output and the ports are this design's choices.
module edc
  import fft_ft_pkg::*;
#(
  parameter int unsigned W  = 18,
  parameter int unsigned CH = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_re [4],
  input  logic signed [W-1:0]  x_im [4],
  input  logic signed [W+1:0]  xp_re,
  input  logic signed [W+1:0]  xp_im,
  input  logic [2:0]           syndrome,
  output logic                 out_valid,
  output logic signed [W-1:0]  y_re,
  output logic signed [W-1:0]  y_im,
  output logic                 corrected
);

  localparam int unsigned XW = W + 2;

  err_loc_e             loc;
  logic                 fix;
  logic signed [XW-1:0] rb_re, rb_im;   // rebuilt value

  always_comb begin
    loc   = decode_syndrome(syndrome);
    fix   = (loc == err_loc_e'(CH + 1));
    rb_re = xp_re;
    rb_im = xp_im;
    for (int j = 0; j < 4; j++) begin
      if (j != int'(CH)) begin
        rb_re = rb_re - XW'(x_re[j]);
        rb_im = rb_im - XW'(x_im[j]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      corrected <= 1'b0;
      y_re      <= '0;
      y_im      <= '0;
    end else begin
      out_valid <= in_valid;
      corrected <= in_valid && fix;
      if (in_valid) begin
        y_re <= fix ? W'(rb_re) : x_re[CH];
        y_im <= fix ? W'(rb_im) : x_im[CH];
      end
    end
  end

endmodule
