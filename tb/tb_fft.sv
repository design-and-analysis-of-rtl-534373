// tb_fft: streams 200 random frames of four 16-bit complex samples into the 4-point FFT,
// frames back to back except for random idle gaps, and checks every output sample
// against a direct DFT computed in the testbench: X[k] = sum_n x[n] * (-j)^(n*k). It also
// checks the timing: X[0] must appear in the cycle after x[3] went in, X[1..3] must
// follow on consecutive cycles, and out_last must mark X[3].
module tb_fft;
  int checks = 0, failures = 0;
  logic               clk = 0, rst = 1, in_valid = 0;
  logic signed [15:0] in_re = '0, in_im = '0;
  logic               out_valid, out_last;
  logic signed [17:0] out_re, out_im;

  fft #(.IW(16)) dut (.*);

  always #5 clk = ~clk;

  // expected outputs, and the cycle each must appear in
  int exp_re [$], exp_im [$], exp_cyc [$];
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic dft4(input int xr [4], input int xi [4], output int yr [4], output int yi [4]);
    for (int k = 0; k < 4; k++) begin
      yr[k] = 0; yi[k] = 0;
      for (int n = 0; n < 4; n++) begin
        case ((n * k) % 4)
          0: begin yr[k] += xr[n]; yi[k] += xi[n]; end
          1: begin yr[k] += xi[n]; yi[k] -= xr[n]; end   // * -j
          2: begin yr[k] -= xr[n]; yi[k] -= xi[n]; end   // * -1
          default: begin yr[k] -= xi[n]; yi[k] += xr[n]; end   // * j
        endcase
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  int seen = 0;
  always @(negedge clk) begin
    if (!rst && out_valid) begin
      checks++;
      if (exp_re.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        if (int'(out_re) != exp_re[0] || int'(out_im) != exp_im[0] || cycle != exp_cyc[0]
            || out_last != (seen % 4 == 3)) begin
          failures++;
          if (failures < 10)
            $display("FAIL out %0d: got %0d,%0d @%0d exp %0d,%0d @%0d", seen, out_re, out_im,
                     cycle, exp_re[0], exp_im[0], exp_cyc[0]);
        end
        void'(exp_re.pop_front()); void'(exp_im.pop_front()); void'(exp_cyc.pop_front());
      end
      seen++;
    end
  end

  initial begin
    int xr [4], xi [4], yr [4], yi [4];
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int f = 0; f < 200; f++) begin
      for (int n = 0; n < 4; n++) begin
        if (f < 100) begin
          xr[n] = $urandom_range(0, 65535) - 32768;
          xi[n] = $urandom_range(0, 65535) - 32768;
        end else begin   // extreme values: largest growth
          xr[n] = ($urandom_range(0, 1) != 0) ? 32767 : -32768;
          xi[n] = ($urandom_range(0, 1) != 0) ? 32767 : -32768;
        end
      end
      dft4(xr, xi, yr, yi);
      for (int n = 0; n < 4; n++) begin
        while ($urandom_range(0, 7) == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_re = 16'(xr[n]);
        in_im = 16'(xi[n]);
        if (n == 3) begin
          for (int k = 0; k < 4; k++) begin
            exp_re.push_back(yr[k]);
            exp_im.push_back(yi[k]);
            exp_cyc.push_back(cycle + 1 + k);
          end
        end
        @(negedge clk);
      end
      in_valid = 0;
    end
    repeat (8) @(negedge clk);
    checks++;
    if (exp_re.size() != 0 || seen != 800) begin
      failures++;
      $display("FAIL %0d outputs missing, %0d seen", exp_re.size(), seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
