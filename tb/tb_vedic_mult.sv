// tb_vedic_mult: checks the Urdhva Tiryakbhyam multiplier against the * operator.
// The 8-bit instance is tested exhaustively (all 65536 operand pairs). An 18-bit instance,
// the width used for squaring in the Parseval checks, gets 20000 random pairs and the
// extreme values.
module tb_vedic_mult;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [17:0] a18, b18;
  logic [35:0] p18;

  vedic_mult #(.W(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  vedic_mult #(.W(18)) dut18 (.a(a18), .b(b18), .p(p18));

  task automatic check18(input logic [17:0] a, input logic [17:0] b);
    a18 = a; b18 = b; #1;
    checks++;
    if (p18 !== 36'(a) * 36'(b)) begin
      failures++;
      if (failures < 10) $display("FAIL 18-bit %0d*%0d got %0d", a, b, p18);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j); #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit %0d*%0d got %0d", i, j, p8);
        end
      end
    end
    check18('1, '1);
    check18('1, 18'd1);
    check18(18'h20000, 18'h20000);
    check18('0, '1);
    for (int i = 0; i < 20000; i++) check18(18'($urandom), 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
