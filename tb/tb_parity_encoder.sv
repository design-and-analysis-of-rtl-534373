// tb_parity_encoder: checks the three Hamming combinations (1+2+3, 1+2+4, 1+3+4) and the
// all-channel sum against integer sums, for random and extreme 16-bit inputs.
module tb_parity_encoder;
  int checks = 0, failures = 0;
  logic signed [15:0] in_re [4], in_im [4];
  logic signed [17:0] c_re [3], c_im [3], all_re, all_im;

  parity_encoder #(.W(16)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r [4], m [4];
    int er [3], em [3];
    for (int n = 0; n < 5000; n++) begin
      for (int i = 0; i < 4; i++) begin
        if (n == 0)      begin r[i] = -32768; m[i] = 32767; end
        else if (n == 1) begin r[i] = 32767;  m[i] = -32768; end
        else begin r[i] = $urandom_range(0, 65535) - 32768; m[i] = $urandom_range(0, 65535) - 32768; end
        in_re[i] = 16'(r[i]);
        in_im[i] = 16'(m[i]);
      end
      #1;
      er[0] = r[0] + r[1] + r[2]; em[0] = m[0] + m[1] + m[2];
      er[1] = r[0] + r[1] + r[3]; em[1] = m[0] + m[1] + m[3];
      er[2] = r[0] + r[2] + r[3]; em[2] = m[0] + m[2] + m[3];
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (int'(c_re[c]) != er[c] || int'(c_im[c]) != em[c]) begin
          failures++;
          $display("FAIL check %0d", c);
        end
      end
      checks++;
      if (int'(all_re) != r[0] + r[1] + r[2] + r[3] || int'(all_im) != m[0] + m[1] + m[2] + m[3]) begin
        failures++;
        $display("FAIL all");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
