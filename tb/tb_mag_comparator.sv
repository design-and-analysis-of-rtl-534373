// tb_mag_comparator: checks that mismatch is low exactly when f_sum == 4 * t_sum (TOL = 0),
// and for a second instance with TOL = 5 that differences up to 5 are accepted.
module tb_mag_comparator;
  int checks = 0, failures = 0;
  logic [38:0] t_sum;
  logic [42:0] f_sum;
  logic        mm0, mm5;

  mag_comparator #(.TW(39), .FW(43), .LOGN(2), .TOL(0)) dut0 (.t_sum(t_sum), .f_sum(f_sum), .mismatch(mm0));
  mag_comparator #(.TW(39), .FW(43), .LOGN(2), .TOL(5)) dut5 (.t_sum(t_sum), .f_sum(f_sum), .mismatch(mm5));

  task automatic check(input longint t, input longint f);
    longint d;
    t_sum = 39'(t); f_sum = 43'(f); #1;
    d = 4 * t - f;
    if (d < 0) d = -d;
    checks += 2;
    if (mm0 != (d != 0)) begin failures++; $display("FAIL tol0 t=%0d f=%0d", t, f); end
    if (mm5 != (d > 5))  begin failures++; $display("FAIL tol5 t=%0d f=%0d", t, f); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint t;
    check(0, 0);
    check(0, 1);
    check((longint'(1) << 39) - 1, ((longint'(1) << 39) - 1) * 4);
    for (int n = 0; n < 5000; n++) begin
      t = longint'({$urandom} % 32'h7fffffff) * 64 + longint'($urandom_range(0, 63));
      check(t, 4 * t);
      check(t, 4 * t + $urandom_range(1, 7));
      check(t, 4 * t - $urandom_range(1, 7));
      check(t, longint'({$urandom, $urandom}) & ((longint'(1) << 43) - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
