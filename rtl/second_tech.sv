// second_tech: four parallel FFTs protected by the parity-SOS-ECC scheme.
//
// Four independent complex streams x1..x4 are transformed by four original FFTs. Instead
// of one sum-of-squares (Parseval) check per FFT, the checks work on Hamming-coded sums
// of the channels. Check 1 compares the energy of x5 = x1+x2+x3 with that of
// X5 = X1+X2+X3, check 2 does the same for x1+x2+x4, and check 3 for x1+x3+x4. Because
// the DFT is linear, X5 is the transform of x5, and Parseval's theorem holds for the
// coded pair exactly when the FFTs involved are correct. A fault in one FFT makes a
// distinct set of checks fail (Hamming syndrome), which locates it. A fifth, parity FFT
// transforms x = x1+x2+x3+x4, and the faulty channel is rebuilt as X minus the other
// three outputs. So three checks and one extra FFT correct any single faulty FFT.
//
// Data path, per frame of N = 4 samples:
//   x1..x4 -> parity_encoder -> x5,x6,x7 (time-domain check inputs) and x (parity FFT)
//   x1..x4 -> fft x4 -> X1..X4 -> parity_encoder -> X5,X6,X7 (frequency-domain inputs)
//   3 x parseval_check -> syndrome c1c2c3
//   X1..X4, X -> frame_delay (one frame) -> 4 x edc -> Y1..Y4
//
// Interface: clk, rst (synchronous, active high). in_valid with x[i] = {re, im}, two
// 16-bit two's complement parts per 32-bit word, one sample per channel per valid
// cycle; every 4 valid cycles form a frame, and idle cycles may fall anywhere.
// out_valid with y[i] = {re, im}, two 18-bit parts, the 4-point DFT of channel i in natural order. Alongside each output sample,
// syndrome gives {c1,c2,c3} for its frame (1 = check failed), err_loc gives the decoded
// meaning and corrected[i] marks samples that were rebuilt. check_valid pulses when the
// three checks of a frame have finished, one cycle before that frame starts to leave.
// fault_inj XORs a pattern into one internal stream. It is only a test hook and is tied
// to INJ_NONE in normal use.
// Timing: a frame's four output samples leave on consecutive cycles, starting 6 cycles
// after its last input sample (9 cycles after the first one when the frame had no idle
// cycles: FFT 4, frame alignment 4, correction 1). Throughput is one sample per channel
// per cycle, with frames back to back.
// The coding, the checks, the syndrome table and the correction equation follow the
// published scheme. The transform size, the widths, the buffering and the fault-injection
// hook are this design's choices.
module second_tech
  import fft_ft_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               in_valid,
  input  logic [2*DW-1:0]    x [NCH],
  input  fault_inj_t         fault_inj,
  output logic               out_valid,
  output logic [2*DW+3:0]    y [NCH],
  output logic [NCHK-1:0]    syndrome,
  output err_loc_e           err_loc,
  output logic               check_valid,
  output logic [NCH-1:0]     corrected
);

  localparam int unsigned XW = DW + 2;   // FFT output part width, also coded-input width
  localparam int unsigned CW = DW + 4;   // coded FFT output / parity FFT output width

  // ---------------------------------------------------------------- input coding
  logic signed [DW-1:0] x_re [NCH], x_im [NCH];
  logic signed [XW-1:0] xc_re [NCHK], xc_im [NCHK];
  logic signed [XW-1:0] xa_re, xa_im;

  always_comb begin
    for (int i = 0; i < int'(NCH); i++) begin
      x_re[i] = x[i][2*DW-1:DW];
      x_im[i] = x[i][DW-1:0];
    end
  end

  parity_encoder #(.W(DW)) u_in_code (
    .in_re(x_re), .in_im(x_im), .c_re(xc_re), .c_im(xc_im), .all_re(xa_re), .all_im(xa_im));

  // ---------------------------------------------------------------- FFTs
  logic [NCH-1:0]       f_valid, f_last;
  logic signed [XW-1:0] fo_re [NCH], fo_im [NCH];   // raw FFT outputs
  logic signed [XW-1:0] X_re [NCH], X_im [NCH];     // after fault injection
  logic                 fp_valid, fp_last;
  logic signed [CW-1:0] fpo_re, fpo_im, XP_re, XP_im;

  for (genvar i = 0; i < int'(NCH); i++) begin : g_fft
    fft #(.IW(DW)) u_fft (
      .clk(clk), .rst(rst), .in_valid(in_valid), .in_re(x_re[i]), .in_im(x_im[i]),
      .out_valid(f_valid[i]), .out_last(f_last[i]), .out_re(fo_re[i]), .out_im(fo_im[i]));
  end

  fft #(.IW(XW)) u_fft_parity (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_re(xa_re), .in_im(xa_im),
    .out_valid(fp_valid), .out_last(fp_last), .out_re(fpo_re), .out_im(fpo_im));

  always_comb begin
    for (int i = 0; i < int'(NCH); i++) begin
      X_re[i] = fo_re[i];
      X_im[i] = fo_im[i];
      if (int'(fault_inj.target) == int'(INJ_FFT1) + i)
        X_re[i] = fo_re[i] ^ fault_inj.pattern;
    end
    XP_re = fpo_re;
    XP_im = fpo_im;
    if (fault_inj.target == INJ_FFTP) XP_re = fpo_re ^ CW'(fault_inj.pattern);
  end

  // ---------------------------------------------------------------- output coding, checks
  logic signed [CW-1:0] Xc_re_raw [NCHK], Xc_im [NCHK], Xc_re [NCHK];
  logic signed [CW-1:0] Xa_re_unused, Xa_im_unused;
  logic [NCHK-1:0]      p, p_valid;

  parity_encoder #(.W(XW)) u_out_code (
    .in_re(X_re), .in_im(X_im), .c_re(Xc_re_raw), .c_im(Xc_im),
    .all_re(Xa_re_unused), .all_im(Xa_im_unused));

  always_comb begin
    for (int c = 0; c < int'(NCHK); c++) begin
      Xc_re[c] = Xc_re_raw[c];
      if (int'(fault_inj.target) == int'(INJ_CHK1) + c)
        Xc_re[c] = Xc_re_raw[c] ^ CW'(fault_inj.pattern);
    end
  end

  for (genvar c = 0; c < int'(NCHK); c++) begin : g_chk
    parseval_check #(.TW(XW), .FW(CW), .N(N), .TOL(0)) u_chk (
      .clk(clk), .rst(rst),
      .t_valid(in_valid), .t_re(xc_re[c]), .t_im(xc_im[c]),
      .f_valid(f_valid[0]), .f_re(Xc_re[c]), .f_im(Xc_im[c]),
      .p(p[c]), .p_valid(p_valid[c]));
  end

  // c1 is the most significant bit, as in the syndrome table.
  logic [NCHK-1:0] syn;

  assign syn         = {p[0], p[1], p[2]};
  assign check_valid = p_valid[0];

  // ---------------------------------------------------------------- frame alignment
  localparam int unsigned DLW = 2 * XW * NCH + 2 * CW;

  logic [DLW-1:0]       dl_in, dl_out;
  logic                 d_valid;
  logic signed [XW-1:0] d_re [NCH], d_im [NCH];
  logic signed [CW-1:0] dp_re, dp_im;

  always_comb begin
    for (int i = 0; i < int'(NCH); i++) begin
      dl_in[2*XW*i +: 2*XW] = {X_re[i], X_im[i]};
      {d_re[i], d_im[i]}    = dl_out[2*XW*i +: 2*XW];
    end
    dl_in[DLW-1 -: 2*CW] = {XP_re, XP_im};
    {dp_re, dp_im}       = dl_out[DLW-1 -: 2*CW];
  end

  frame_delay #(.W(DLW), .DEPTH(N)) u_align (
    .clk(clk), .rst(rst), .in_valid(f_valid[0]), .in_data(dl_in),
    .out_valid(d_valid), .out_data(dl_out));

  // ---------------------------------------------------------------- correction
  logic [NCH-1:0]       e_valid;
  logic signed [XW-1:0] y_re [NCH], y_im [NCH];

  for (genvar i = 0; i < int'(NCH); i++) begin : g_edc
    edc #(.W(XW), .CH(i)) u_edc (
      .clk(clk), .rst(rst), .in_valid(d_valid), .x_re(d_re), .x_im(d_im),
      .xp_re(dp_re), .xp_im(dp_im), .syndrome(syn),
      .out_valid(e_valid[i]), .y_re(y_re[i]), .y_im(y_im[i]), .corrected(corrected[i]));
    assign y[i] = {y_re[i], y_im[i]};
  end

  assign out_valid = e_valid[0];

  // The syndrome reported with each output sample is the one its correction used.
  always_ff @(posedge clk) begin
    if (rst) begin
      syndrome <= '0;
      err_loc  <= LOC_NONE;
    end else if (d_valid) begin
      syndrome <= syn;
      err_loc  <= decode_syndrome(syn);
    end
  end

  // All five FFTs run in lock step, and so do the three checks and the four
  // correction units.
  a_fft_lockstep: assert property (@(posedge clk) disable iff (rst)
                                   (f_valid == {NCH{f_valid[0]}}) && fp_valid == f_valid[0]
                                   && f_last == {NCH{fp_last}});
  a_chk_lockstep: assert property (@(posedge clk) disable iff (rst)
                                   p_valid == {NCHK{p_valid[0]}} && e_valid == {NCH{e_valid[0]}});
  // The syndrome must be stable while a delayed frame is being corrected.
  a_syn_stable: assert property (@(posedge clk) disable iff (rst)
                                 (d_valid && $past(d_valid) && !check_valid) |-> $stable(syn));

endmodule
