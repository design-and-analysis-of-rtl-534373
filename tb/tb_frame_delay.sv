// tb_frame_delay: drives a random stream with random valid flags and checks that the
// output equals the input exactly 4 cycles earlier, and that reset clears the valid flags.
module tb_frame_delay;
  int checks = 0, failures = 0;
  logic         clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [179:0] in_data = '0, out_data;
  logic [179:0] hist_d [$];
  logic         hist_v [$];

  frame_delay #(.W(180), .DEPTH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++;
    rst = 0;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      // compare what the line shows now with what went in 4 rising edges ago
      if (hist_v.size() == 4) begin
        checks++;
        if (out_valid != hist_v[0] || (hist_v[0] && out_data != hist_d[0])) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d", c);
        end
        void'(hist_v.pop_front());
        void'(hist_d.pop_front());
      end
      in_valid = 1'($urandom);
      for (int w = 0; w < 6; w++) in_data[30*w +: 30] = 30'($urandom);
      hist_v.push_back(in_valid);
      hist_d.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
