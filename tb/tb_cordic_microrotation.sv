// tb_cordic_microrotation: checks one CORDIC step against the reference.
//
// Random x, y, z (full 32-bit range, including values that wrap) and every
// shift 0..15, in both directions; the expected result is computed with
// plain int arithmetic from the step equations. Directed cases cover z = 0
// (positive direction) and z = -1 LSB (negative direction).
module tb_cordic_microrotation;
  import cordic_ref_pkg::*;

  logic signed [31:0] x_in, y_in, z_in, angle;
  logic        [3:0]  shift;
  logic signed [31:0] x_out, y_out, z_out;

  int checks = 0;
  int failures = 0;

  cordic_microrotation dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic one(input int x, input int y, input int z, input int a, input int k);
    int ex, ey, ez;
    x_in = x; y_in = y; z_in = z; angle = a; shift = 4'(k);
    #1;
    if (z >= 0) begin
      ex = x - (y >>> k); ey = y + (x >>> k); ez = z - a;
    end else begin
      ex = x + (y >>> k); ey = y - (x >>> k); ez = z + a;
    end
    check(x_out == ex && y_out == ey && z_out == ez,
          $sformatf("x=%h y=%h z=%h a=%h k=%0d: got %h %h %h expected %h %h %h",
                    x, y, z, a, k, x_out, y_out, z_out, ex, ey, ez));
  endtask

  initial begin
    one(32'h2000_0000, 32'h0, 32'h0, 32'h1921FB54, 0);
    check(x_out == 32'h2000_0000 && y_out == 32'h2000_0000, "z=0 must rotate positive");
    one(32'h2000_0000, 32'h0, -1, 32'h1921FB54, 0);
    check(x_out == 32'h2000_0000 && y_out == -32'sh2000_0000, "z<0 must rotate negative");
    for (int t = 0; t < 2000; t++)
      one($urandom, $urandom, $urandom, $urandom_range(0, 32'h1921FB54), $urandom_range(0, 15));
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
