// tb_cordic_gaincomp: the CORDIC rotator with gain compensation switched on.
//
// With GAIN_COMP = 1 the unit scales xo and yo by 1/K(N), so x = 1.0, y = 0
// and angle a give (cos a, sin a) without pre-scaling the input. Checks the
// four classic angles against cos/sin, random vectors bit for bit against the
// reference model followed by the rounded multiplication by 32'h136E9E84
// (1/K(10) at 29 fraction bits), and the latency of N clocks.
module tb_cordic_gaincomp;
  import cordic_ref_pkg::*;

  localparam int N = 10;
  localparam real PI = 3.14159265358979323846;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic [31:0] xi = '0, yi = '0, zi = '0;
  logic        ready;
  logic [31:0] xo, yo, zo;

  int checks = 0;
  int failures = 0;

  cordic #(.GAIN_COMP(1'b1)) dut (
    .clk, .rst_n, .load, .xi, .yi, .zi, .ready, .xo, .yo, .zo
  );

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int scale(input int v);
    longint p;
    p = longint'(v) * 64'h136E9E84 + (64'sd1 <<< 28);
    return int'(p >>> 29);
  endfunction

  task automatic run_op(input vec_t v, output vec_t res);
    int cycles;
    vec_t e;
    xi = v.x; yi = v.y; zi = v.z;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    cycles = 0;
    do begin
      @(negedge clk);
      cycles++;
    end while (!ready && cycles < N + 5);
    check(ready && cycles == N, $sformatf("latency %0d", cycles));
    res.x = xo; res.y = yo; res.z = zo;
    e = ref_cordic(v, N);
    check(res.x == scale(e.x) && res.y == scale(e.y) && res.z == e.z,
          $sformatf("in (%h %h %h) got (%h %h %h) expected (%h %h %h)", v.x, v.y, v.z,
                    res.x, res.y, res.z, scale(e.x), scale(e.y), e.z));
  endtask

  initial begin
    vec_t v, r;
    real angs[4];
    angs = '{0.0, PI / 6.0, PI / 4.0, PI / 3.0};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    foreach (angs[i]) begin
      v.x = to_fix(1.0); v.y = 0; v.z = to_fix(angs[i]);
      run_op(v, r);
      check(absr(to_real(r.x) - $cos(angs[i])) < 0.004 &&
            absr(to_real(r.y) - $sin(angs[i])) < 0.004,
            $sformatf("angle %f: (%f, %f)", angs[i], to_real(r.x), to_real(r.y)));
      repeat (2) @(negedge clk);
    end
    for (int t = 0; t < 100; t++) begin
      v.x = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      v.y = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      v.z = to_fix((real'($urandom_range(0, 3400)) - 1700.0) / 1000.0);
      run_op(v, r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
