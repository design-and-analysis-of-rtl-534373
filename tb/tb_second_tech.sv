// tb_second_tech: end-to-end test of the protected four-FFT bank at its default size.
//
// Random frames of four complex 16-bit samples per channel are sent, mostly back to back,
// sometimes with idle cycles between frames or inside a frame. For each frame one fault scenario is chosen, in turn:
// none, a fault in original FFT 1, 2, 3 or 4, in the parity FFT, or in the coded output
// sum of check 1, 2 or 3. The fault XORs a random pattern into the real part of that
// stream for one random sample of the frame (a single upset). The pattern always has
// bit 0 set. That changes one value by an odd amount, and so the energy of every coded
// sum that contains it, and the Parseval checks cannot miss it. The whole frame of the
// located channel is rebuilt, so all four of its samples are flagged corrected. Expected results are computed in the testbench by a direct 4-point DFT. For
// every output sample the testbench checks:
//   - y equals the fault-free DFT of the input, whatever the fault;
//   - the syndrome matches the table (111, 110, 101, 011 for FFT 1..4; 100, 010, 001 for
//     checks 1..3; 000 for no fault and for a parity-FFT fault);
//   - corrected flags exactly the faulty channel;
//   - the sample appears 6 + k cycles after the frame's last input sample (k = 0..3),
//     which is 9 cycles after the first input sample when the frame has no idle cycles.
// Each mechanism (every fault scenario, the correction of each channel, back-to-back
// frames, gaps between frames and idle cycles inside frames) is counted, and one that
// never happened counts as a failure.
module tb_second_tech
  import fft_ft_pkg::*;
;
  int checks = 0, failures = 0;
  logic               clk = 0, rst = 1, in_valid = 0;
  logic [31:0]        x [4];
  fault_inj_t         fault_inj;
  logic               out_valid, check_valid;
  logic [35:0]        y [4];
  logic [2:0]         syndrome;
  err_loc_e           err_loc;
  logic [3:0]         corrected;

  second_tech dut (.*);

  always #5 clk = ~clk;

  localparam int NFRAMES = 360;
  localparam int CYC     = NFRAMES * 8 + 40;

  // per-cycle stimulus and expectations, prepared before the run
  logic        s_in_v [CYC];
  logic [31:0] s_x [CYC][4];
  fault_inj_t  s_fault [CYC];
  logic        e_v [CYC];
  int          e_re [CYC][4], e_im [CYC][4];
  logic [2:0]  e_syn [CYC];
  logic [3:0]  e_corr [CYC];

  int n_scen [9];
  int n_fix [4];
  int n_b2b = 0, n_gap = 0, n_chkv = 0, n_inframe = 0;

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

  function automatic logic [2:0] syn_of(input int scen);
    case (scen)
      1: return 3'b111;
      2: return 3'b110;
      3: return 3'b101;
      4: return 3'b011;
      6: return 3'b100;
      7: return 3'b010;
      8: return 3'b001;
      default: return 3'b000;
    endcase
  endfunction

  initial begin
    repeat (CYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c, last, scen, hit, xr [4][4], xi [4][4], yr [4], yi [4], yre [4][4], yim [4][4];
    fault_inj_t f;
    for (int i = 0; i < 9; i++) n_scen[i] = 0;
    for (int i = 0; i < 4; i++) n_fix[i] = 0;
    for (int i = 0; i < CYC; i++) begin
      s_in_v[i] = 0; e_v[i] = 0; e_syn[i] = '0; e_corr[i] = '0;
      s_fault[i] = '{target: INJ_NONE, pattern: '0};
      for (int ch = 0; ch < 4; ch++) begin
        s_x[i][ch] = '0; e_re[i][ch] = 0; e_im[i][ch] = 0;
      end
    end
    c = 0;
    last = -100;
    for (int fr = 0; fr < NFRAMES; fr++) begin
      if ($urandom_range(0, 5) == 0) c += $urandom_range(1, 3);
      if (c == last + 1) n_b2b++; else if (fr > 0) n_gap++;
      scen = fr % 9;
      n_scen[scen]++;
      f.target  = inj_target_e'(scen);
      f.pattern = 18'($urandom) | 18'd1;
      for (int ch = 0; ch < 4; ch++) begin
        for (int n = 0; n < 4; n++) begin
          xr[ch][n] = (fr % 7 == 3) ? ((n[0] ^ ch[0]) ? 32767 : -32768)
                                    : $urandom_range(0, 65535) - 32768;
          xi[ch][n] = (fr % 7 == 3) ? ((n[1] ^ ch[1]) ? -32768 : 32767)
                                    : $urandom_range(0, 65535) - 32768;
        end
        dft4(xr[ch], xi[ch], yr, yi);
        yre[ch] = yr;
        yim[ch] = yi;
      end
      for (int n = 0; n < 4; n++) begin
        if (n > 0 && $urandom_range(0, 19) == 0) begin   // idle cycle inside a frame
          c++;
          n_inframe++;
        end
        s_in_v[c] = 1;
        for (int ch = 0; ch < 4; ch++) s_x[c][ch] = {16'(xr[ch][n]), 16'(xi[ch][n])};
        c++;
      end
      last = c - 1;
      hit = $urandom_range(0, 3);
      s_fault[last+1+hit] = f;      // the frame leaves the FFTs in cycles last+1 .. last+4
      for (int n = 0; n < 4; n++) begin
        e_v[last+6+n]     = 1;
        e_syn[last+6+n]   = syn_of(scen);
        e_corr[last+6+n]  = (scen >= 1 && scen <= 4) ? 4'(1 << (scen - 1)) : 4'b0;
        for (int ch = 0; ch < 4; ch++) begin
          e_re[last+6+n][ch] = yre[ch][n];
          e_im[last+6+n][ch] = yim[ch][n];
        end
      end
    end

    for (int ch = 0; ch < 4; ch++) x[ch] = '0;
    fault_inj = '{target: INJ_NONE, pattern: '0};
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < CYC; i++) begin
      in_valid  = s_in_v[i];
      x         = s_x[i];
      fault_inj = s_fault[i];
      #1;
      if (check_valid) n_chkv++;
      checks++;
      if (out_valid != e_v[i]) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d out_valid=%b exp %b", i, out_valid, e_v[i]);
      end else if (e_v[i]) begin
        if (syndrome != e_syn[i] || corrected != e_corr[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d syndrome=%b exp %b corrected=%b exp %b",
                                      i, syndrome, e_syn[i], corrected, e_corr[i]);
        end
        if (err_loc != decode_syndrome(e_syn[i])) failures++;
        for (int ch = 0; ch < 4; ch++) begin
          checks++;
          if (int'($signed(y[ch][35:18])) != e_re[i][ch] || int'($signed(y[ch][17:0])) != e_im[i][ch]) begin
            failures++;
            if (failures < 10) $display("FAIL cycle %0d ch %0d got %0d,%0d exp %0d,%0d", i, ch,
                                        $signed(y[ch][35:18]), $signed(y[ch][17:0]),
                                        e_re[i][ch], e_im[i][ch]);
          end
          if (corrected[ch]) n_fix[ch]++;
        end
      end
      @(negedge clk);
    end

    $display("scenarios none/fft1/fft2/fft3/fft4/parity/chk1/chk2/chk3: %0d %0d %0d %0d %0d %0d %0d %0d %0d",
             n_scen[0], n_scen[1], n_scen[2], n_scen[3], n_scen[4], n_scen[5], n_scen[6],
             n_scen[7], n_scen[8]);
    $display("corrected samples per channel: %0d %0d %0d %0d; back-to-back frames %0d, gapped %0d, idle cycles inside frames %0d, check results %0d",
             n_fix[0], n_fix[1], n_fix[2], n_fix[3], n_b2b, n_gap, n_inframe, n_chkv);
    for (int i = 0; i < 9; i++) begin checks++; if (n_scen[i] == 0) failures++; end
    for (int i = 0; i < 4; i++) begin checks++; if (n_fix[i] == 0) failures++; end
    checks++; if (n_b2b == 0 || n_gap == 0 || n_inframe == 0) failures++;
    checks++; if (n_chkv != NFRAMES) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
