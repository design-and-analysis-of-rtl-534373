// tb_mag_square: checks |z|^2 = re^2 + im^2 for 18-bit signed parts against products
// computed with 64-bit integers in the testbench. Covers random values, zero, and the
// most negative and most positive values.
module tb_mag_square;
  int checks = 0, failures = 0;
  logic signed [17:0] re, im;
  logic [36:0]        mag;

  mag_square #(.W(18)) dut (.re(re), .im(im), .mag(mag));

  task automatic check(input logic signed [17:0] r, input logic signed [17:0] i);
    longint expv;
    re = r; im = i; #1;
    expv = longint'(r) * longint'(r) + longint'(i) * longint'(i);
    checks++;
    if (longint'(mag) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL re=%0d im=%0d got %0d exp %0d", r, i, mag, expv);
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
    check(0, 0);
    check(-18'sd131072, -18'sd131072);
    check(18'sd131071, -18'sd131072);
    check(-18'sd1, 18'sd1);
    for (int n = 0; n < 20000; n++) check(18'($urandom), 18'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
