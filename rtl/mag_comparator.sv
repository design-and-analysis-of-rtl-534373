// mag_comparator: compares the two sums of squares of a Parseval check.
//
// For an unnormalised N-point DFT, Parseval's theorem reads
// sum |X[k]|^2 = N * sum |x[n]|^2. The comparator scales the time-domain sum by N
// (a left shift by LOGN) and raises mismatch when the scaled sum and the frequency-domain
// sum differ by more than TOL. With the exact 4-point transform used here, TOL is 0.
//
// Interface: t_sum (TW bits), f_sum (FW bits) -> mismatch. Combinational.
// The comparison follows the published check. The tolerance parameter and the scaling
// by N are this design's choices.
module mag_comparator #(
  parameter int unsigned TW   = 39,
  parameter int unsigned FW   = 43,
  parameter int unsigned LOGN = 2,
  parameter int unsigned TOL  = 0
) (
  input  logic [TW-1:0] t_sum,
  input  logic [FW-1:0] f_sum,
  output logic          mismatch
);

  localparam int unsigned CW = ((TW + LOGN > FW) ? TW + LOGN : FW) + 1;

  logic [CW-1:0] scaled, freq, diff;

  always_comb begin
    scaled   = CW'(t_sum) << LOGN;
    freq     = CW'(f_sum);
    diff     = (scaled > freq) ? scaled - freq : freq - scaled;
    mismatch = diff > CW'(TOL);
  end

endmodule
