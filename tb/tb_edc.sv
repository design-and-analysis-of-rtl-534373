// tb_edc: four correction units (channels 1..4) share random FFT outputs and a parity
// value equal to the true sum of the four channels. For every syndrome of the three
// checks, the channel that the syndrome names gets a random error, and the testbench
// checks that
//   - the named channel's output is rebuilt to its true value and flagged corrected;
//   - every other channel passes its input unchanged and is not flagged;
//   - outputs appear one cycle after the inputs, with out_valid following in_valid.
module tb_edc;
  int checks = 0, failures = 0;
  logic               clk = 0, rst = 1, in_valid = 0;
  logic signed [17:0] x_re [4], x_im [4];
  logic signed [19:0] xp_re = '0, xp_im = '0;
  logic [2:0]         syndrome = '0;
  logic [3:0]         out_valid, corrected;
  logic signed [17:0] y_re [4], y_im [4];

  for (genvar i = 0; i < 4; i++) begin : g
    edc #(.W(18), .CH(i)) dut (
      .clk(clk), .rst(rst), .in_valid(in_valid), .x_re(x_re), .x_im(x_im),
      .xp_re(xp_re), .xp_im(xp_im), .syndrome(syndrome),
      .out_valid(out_valid[i]), .y_re(y_re[i]), .y_im(y_im[i]), .corrected(corrected[i]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // syndrome {c1,c2,c3} -> channel in error (0..3), or -1 for none / check-only
  function automatic int located(input logic [2:0] s);
    case (s)
      3'b111:  return 0;
      3'b110:  return 1;
      3'b101:  return 2;
      3'b011:  return 3;
      default: return -1;
    endcase
  endfunction

  initial begin
    int tr [4], ti [4], er [4], ei [4], loc;
    logic vld;
    automatic int n_fix [4] = '{0, 0, 0, 0};
    for (int i = 0; i < 4; i++) begin x_re[i] = '0; x_im[i] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      for (int i = 0; i < 4; i++) begin
        tr[i] = $urandom_range(0, 131071) - 65536;
        ti[i] = $urandom_range(0, 131071) - 65536;
        er[i] = tr[i]; ei[i] = ti[i];
      end
      syndrome = 3'(n);
      loc = located(syndrome);
      if (loc >= 0) begin
        er[loc] = $urandom_range(0, 131071) - 65536;
        ei[loc] = $urandom_range(0, 131071) - 65536;
      end
      for (int i = 0; i < 4; i++) begin x_re[i] = 18'(er[i]); x_im[i] = 18'(ei[i]); end
      xp_re = 20'(tr[0] + tr[1] + tr[2] + tr[3]);
      xp_im = 20'(ti[0] + ti[1] + ti[2] + ti[3]);
      vld = ($urandom_range(0, 7) != 0);
      in_valid = vld;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid != {4{vld}}) begin
        failures++;
        $display("FAIL out_valid %b", out_valid);
      end
      if (vld) begin
        for (int i = 0; i < 4; i++) begin
          checks++;
          if (int'(y_re[i]) != tr[i] || int'(y_im[i]) != ti[i] || corrected[i] != (i == loc)) begin
            failures++;
            if (failures < 10)
              $display("FAIL ch %0d syn %b: got %0d,%0d exp %0d,%0d corr %b", i, syndrome,
                       y_re[i], y_im[i], tr[i], ti[i], corrected[i]);
          end
          if (corrected[i]) n_fix[i]++;
        end
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_fix[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
