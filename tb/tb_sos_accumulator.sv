// tb_sos_accumulator: feeds frames of 4 random values, with random idle cycles between
// samples, and checks that done_o rises exactly on every 4th valid sample and that sum_o
// then equals the frame total kept by the testbench.
module tb_sos_accumulator;
  int checks = 0, failures = 0;
  logic        clk = 0, rst = 1, in_valid = 0;
  logic [36:0] in_mag = '0;
  logic [38:0] sum_o;
  logic        done_o;

  sos_accumulator #(.W(37), .N(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint total;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 300; f++) begin
      total = 0;
      for (int n = 0; n < 4; n++) begin
        while ($urandom_range(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 0;
          in_mag   = 37'($urandom);
          #1;
          checks++;
          if (done_o) failures++;
        end
        @(negedge clk);
        in_valid = 1;
        in_mag   = {5'($urandom), 32'($urandom)};
        total   += longint'(in_mag);
        #1;
        checks++;
        if (done_o != (n == 3)) begin
          failures++;
          $display("FAIL frame %0d sample %0d done=%b", f, n, done_o);
        end
        if (n == 3) begin
          checks++;
          if (longint'(sum_o) != total) begin
            failures++;
            $display("FAIL frame %0d sum %0d exp %0d", f, sum_o, total);
          end
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
