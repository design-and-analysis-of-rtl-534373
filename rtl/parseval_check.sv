// parseval_check: sum-of-squares (Parseval) check of one transform.
//
// Two streams enter: the time-domain samples that went into a transform and the
// frequency-domain samples that came out. Each stream goes through a magnitude-square
// unit (Vedic multipliers) and an accumulator that sums one frame of N values. The
// time-domain total is held until the frequency-domain total of the same frame is
// complete. Then a magnitude comparator checks sum|X|^2 == N * sum|x|^2, and the result
// is registered in p (1 = check failed). p keeps its value until the next frame's
// result, and p_valid pulses for one cycle when p is updated.
//
// Interface: clk, rst (synchronous, active high); t_valid/t_re/t_im (TW-bit signed parts)
// for the time-domain stream; f_valid/f_re/f_im (FW-bit signed parts) for the
// frequency-domain stream; outputs p and p_valid.
// Timing: p is updated on the clock edge that ends the last frequency-domain sample of a
// frame. The frequency frame must finish no later than the end of the next time frame.
// The structure (square, accumulate, compare) follows the published check. The hold
// register and the timing are this design's choices.
module parseval_check #(
  parameter int unsigned TW   = 18,
  parameter int unsigned FW   = 20,
  parameter int unsigned N    = 4,
  parameter int unsigned TOL  = 0
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 t_valid,
  input  logic signed [TW-1:0] t_re,
  input  logic signed [TW-1:0] t_im,
  input  logic                 f_valid,
  input  logic signed [FW-1:0] f_re,
  input  logic signed [FW-1:0] f_im,
  output logic                 p,
  output logic                 p_valid
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned TMW  = 2 * TW + 1;       // |x|^2 width
  localparam int unsigned FMW  = 2 * FW + 1;       // |X|^2 width
  localparam int unsigned TSW  = TMW + LOGN;       // time-domain frame sum width
  localparam int unsigned FSW  = FMW + LOGN;       // frequency-domain frame sum width

  logic [TMW-1:0] t_mag;
  logic [FMW-1:0] f_mag;
  logic [TSW-1:0] t_sum, t_hold;
  logic [FSW-1:0] f_sum;
  logic           t_done, f_done, t_hold_valid, mismatch;

  mag_square #(.W(TW)) u_tsq (.re(t_re), .im(t_im), .mag(t_mag));
  mag_square #(.W(FW)) u_fsq (.re(f_re), .im(f_im), .mag(f_mag));

  sos_accumulator #(.W(TMW), .N(N)) u_tacc (
    .clk(clk), .rst(rst), .in_valid(t_valid), .in_mag(t_mag), .sum_o(t_sum), .done_o(t_done));
  sos_accumulator #(.W(FMW), .N(N)) u_facc (
    .clk(clk), .rst(rst), .in_valid(f_valid), .in_mag(f_mag), .sum_o(f_sum), .done_o(f_done));

  mag_comparator #(.TW(TSW), .FW(FSW), .LOGN(LOGN), .TOL(TOL)) u_cmp (
    .t_sum(t_hold), .f_sum(f_sum), .mismatch(mismatch));

  always_ff @(posedge clk) begin
    if (rst) begin
      t_hold       <= '0;
      t_hold_valid <= 1'b0;
      p            <= 1'b0;
      p_valid      <= 1'b0;
    end else begin
      p_valid <= f_done;
      if (f_done) p <= mismatch;
      if (t_done) begin
        t_hold       <= t_sum;
        t_hold_valid <= 1'b1;
      end else if (f_done) begin
        t_hold_valid <= 1'b0;
      end
    end
  end

  // A frequency-domain frame must have its time-domain frame already held.
  a_time_before_freq: assert property (@(posedge clk) disable iff (rst) f_done |-> t_hold_valid);
  // A held time-domain total must be used before the next one arrives.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst)
                                 (t_done && t_hold_valid) |-> f_done);

endmodule
