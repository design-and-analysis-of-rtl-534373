// mag_square: squared magnitude of a complex sample, |z|^2 = re^2 + im^2.
//
// The real and imaginary parts are two's complement. Each is replaced by its absolute
// value and squared by an Urdhva Tiryakbhyam (Vedic) multiplier. The two squares are
// then added. Using Vedic multipliers in the magnitude-square block follows the
// published design. Taking absolute values first, so that an unsigned multiplier can be
// used, is this design's choice.
//
// Interface: re, im (W bits, signed) -> mag (2W+1 bits, unsigned). Combinational.
module mag_square #(
  parameter int unsigned W = 18
) (
  input  logic signed [W-1:0] re,
  input  logic signed [W-1:0] im,
  output logic [2*W:0]        mag
);

  logic [W-1:0]   abs_re, abs_im;
  logic [2*W-1:0] sq_re, sq_im;

  // The absolute value of the most negative number is 2^(W-1), which still fits in
  // W unsigned bits.
  assign abs_re = re[W-1] ? W'(-re) : W'(re);
  assign abs_im = im[W-1] ? W'(-im) : W'(im);

  vedic_mult #(.W(W)) u_sq_re (.a(abs_re), .b(abs_re), .p(sq_re));
  vedic_mult #(.W(W)) u_sq_im (.a(abs_im), .b(abs_im), .p(sq_im));

  assign mag = {1'b0, sq_re} + {1'b0, sq_im};

endmodule
