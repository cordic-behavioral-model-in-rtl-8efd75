// tb_cordic_gain: checks the gain-compensation multiplier.
//
// For the default 10 iterations the constant is 1/K(10) = 0.60725332...,
// 32'h136E9E84 at 29 fraction bits (worked out by hand). A second instance
// with N = 40 must use the last of the 33 table entries. Outputs are compared
// with the exact rounded product of the input and that constant, and with
// the real product to within one LSB.
module tb_cordic_gain;
  import cordic_ref_pkg::*;

  logic signed [31:0] v_in, v_out, v_out40;

  int checks = 0;
  int failures = 0;

  cordic_gain dut (.v_in(v_in), .v_out(v_out));
  cordic_gain #(.N(40)) dut40 (.v_in(v_in), .v_out(v_out40));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int exact(input int v, input longint c);
    longint p;
    p = longint'(v) * c + (64'sd1 <<< 28);
    return int'(p >>> 29);
  endfunction

  task automatic one(input int v);
    longint c10, c33;
    c10 = 64'h136E9E84;
    c33 = longint'(to_fix(ref_kprod(33)));
    v_in = v;
    #1;
    check(v_out == exact(v, c10), $sformatf("N=10 in %h got %h expected %h", v, v_out, exact(v, c10)));
    check(v_out40 == exact(v, c33), $sformatf("N=40 in %h got %h expected %h", v, v_out40, exact(v, c33)));
    check(absr(to_real(v_out) - to_real(v) * ref_kprod(10)) <= 1.5 / SCALE,
          $sformatf("N=10 real product off for %h", v));
  endtask

  initial begin
    one(32'h2000_0000);                 // 1.0 -> kprod itself
    check(v_out == 32'h136E9E84, "1.0 * kprod(9)");
    one(-32'sh2000_0000);
    one(32'h3400_0000);
    one(0);
    for (int t = 0; t < 2000; t++) one(int'($urandom_range(0, 32'h7000_0000)) - 32'sh3800_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
