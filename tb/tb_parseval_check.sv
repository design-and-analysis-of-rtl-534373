// tb_parseval_check: drives the check the way the FFT bank does. Each time-domain frame
// of four 18-bit complex samples is followed, 4 cycles later, by its 4-point DFT (20-bit
// parts) computed in the testbench. Frames run back to back with occasional idle gaps.
// In about a third of the frames, one frequency-domain sample has 1 added to its real
// part. That changes the frame energy by an odd amount, so the check must flag it.
// Checks: p equals the expected verdict; p_valid pulses exactly in the cycle after the
// last frequency-domain sample; p holds its value in between.
module tb_parseval_check;
  int checks = 0, failures = 0;
  logic               clk = 0, rst = 1;
  logic               t_valid = 0, f_valid = 0;
  logic signed [17:0] t_re = '0, t_im = '0;
  logic signed [19:0] f_re = '0, f_im = '0;
  logic               p, p_valid;

  parseval_check #(.TW(18), .FW(20), .N(4), .TOL(0)) dut (.*);

  always #5 clk = ~clk;

  task automatic dft4(input int xr [4], input int xi [4], output int yr [4], output int yi [4]);
    for (int k = 0; k < 4; k++) begin
      yr[k] = 0; yi[k] = 0;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)
          0: begin yr[k] += xr[n]; yi[k] += xi[n]; end
          1: begin yr[k] += xi[n]; yi[k] -= xr[n]; end
          2: begin yr[k] -= xr[n]; yi[k] -= xi[n]; end
          default: begin yr[k] -= xi[n]; yi[k] += xr[n]; end
        endcase
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-cycle stimulus schedule: the frequency stream is the time stream delayed 4 cycles
  localparam int CYC = 2000;
  logic         sv_t [CYC], sv_f [CYC];
  int           s_tr [CYC], s_ti [CYC], s_fr [CYC], s_fi [CYC];
  logic         s_pv [CYC], s_p [CYC];
  int           n_err = 0, n_ok = 0;

  initial begin
    int c, xr [4], xi [4], yr [4], yi [4], bad, last;
    logic held;
    for (int i = 0; i < CYC; i++) begin
      sv_t[i] = 0; sv_f[i] = 0; s_pv[i] = 0; s_p[i] = 0;
      s_tr[i] = 0; s_ti[i] = 0; s_fr[i] = 0; s_fi[i] = 0;
    end
    c = 0;
    while (c < CYC - 40) begin
      if ($urandom_range(0, 4) == 0) c += $urandom_range(1, 3);   // gap before a frame
      for (int n = 0; n < 4; n++) begin
        xr[n] = $urandom_range(0, 262143) - 131072;
        xi[n] = $urandom_range(0, 262143) - 131072;
      end
      dft4(xr, xi, yr, yi);
      bad = ($urandom_range(0, 2) == 0) ? $urandom_range(0, 3) : -1;
      for (int n = 0; n < 4; n++) begin
        sv_t[c+n] = 1; s_tr[c+n] = xr[n]; s_ti[c+n] = xi[n];
        sv_f[c+n+4] = 1; s_fr[c+n+4] = yr[n] + ((n == bad) ? 1 : 0); s_fi[c+n+4] = yi[n];
      end
      s_pv[c+8] = 1;
      s_p[c+8]  = (bad >= 0);
      if (bad >= 0) n_err++; else n_ok++;
      c += 4;
    end
    // p holds between updates
    held = 0;
    for (int i = 0; i < CYC; i++) begin
      if (s_pv[i]) held = s_p[i];
      s_p[i] = held;
    end

    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < CYC; i++) begin
      t_valid = sv_t[i]; t_re = 18'(s_tr[i]); t_im = 18'(s_ti[i]);
      f_valid = sv_f[i]; f_re = 20'(s_fr[i]); f_im = 20'(s_fi[i]);
      #1;
      checks++;
      if (p_valid != s_pv[i] || p != s_p[i]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d p=%b/%b p_valid=%b/%b", i, p, s_p[i], p_valid, s_pv[i]);
      end
      @(negedge clk);
    end
    checks++;
    if (n_err == 0 || n_ok == 0) failures++;
    $display("frames with error %0d, without %0d", n_err, n_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
