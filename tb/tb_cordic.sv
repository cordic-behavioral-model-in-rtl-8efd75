// tb_cordic: end-to-end test of the CORDIC rotator at its default size
// (32-bit Q2.29, 10 iterations, no gain compensation).
//
// It runs the four classic vectors (x = 1/K, y = 0, angle 0, pi/6, pi/4,
// pi/3), whose results must be cos and sin of the angle, then a few hundred
// random vectors compared bit for bit with the reference model in
// cordic_ref_pkg. For every operation it checks the latency (ready exactly N
// clocks after the load edge), that ready is a one-clock pulse and that the
// outputs hold afterwards. It also makes each mechanism of the design occur
// and counts it: rotations in the positive and the negative direction, a
// load ignored while busy, and a load accepted in the ready clock (back to
// back operation). A mechanism that never occurs counts as a failure.
module tb_cordic;
  import cordic_ref_pkg::*;

  localparam int N = 10;
  localparam real PI = 3.14159265358979323846;
  localparam real K  = 1.646760258121;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        load = 1'b0;
  logic [31:0] xi = '0, yi = '0, zi = '0;
  logic        ready;
  logic [31:0] xo, yo, zo;

  int checks = 0;
  int failures = 0;
  int n_pos = 0, n_neg = 0, n_ignored = 0, n_b2b = 0;

  cordic dut (
    .clk, .rst_n, .load, .xi, .yi, .zi, .ready, .xo, .yo, .zo
  );

  always #10 clk = ~clk;  // 20 ns period

  // Direction of every micro-rotation performed.
  always @(posedge clk) begin
    if (rst_n && dut.step) begin
      if (dut.zn[31]) n_neg++;
      else            n_pos++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Start one operation and wait for its result. Called right after a
  // falling edge; returns right after the falling edge at which ready is
  // seen high, so a following call loads in the ready clock.
  task automatic run_op(input vec_t v, input bit interfere, output vec_t res);
    int cycles;
    xi = v.x; yi = v.y; zi = v.z;
    load = 1'b1;
    @(posedge clk);
    #1;
    check(dut.step == 1'b1, "load not accepted");
    @(negedge clk);
    load = 1'b0;
    xi = $urandom; yi = $urandom; zi = $urandom;
    cycles = 0;
    while (1) begin
      @(negedge clk);
      cycles++;
      if (interfere && cycles == 3) begin
        load = 1'b1;
        n_ignored++;
      end else begin
        load = 1'b0;
      end
      if (ready || cycles > N + 5) break;
    end
    load = 1'b0;
    check(ready && cycles == N, $sformatf("latency %0d, expected %0d", cycles, N));
    res.x = xo; res.y = yo; res.z = zo;
  endtask

  task automatic expect_bits(input vec_t v, input vec_t got);
    vec_t e;
    e = ref_cordic(v, N);
    check(got.x == e.x && got.y == e.y && got.z == e.z,
          $sformatf("in (%h %h %h) got (%h %h %h) expected (%h %h %h)",
                    v.x, v.y, v.z, got.x, got.y, got.z, e.x, e.y, e.z));
    // The residual angle is bounded by the last elementary angle.
    check(absr(to_real(got.z)) <= 0.0021, $sformatf("residual angle %f", to_real(got.z)));
  endtask

  task automatic idle_check(input vec_t held);
    repeat (3) begin
      @(negedge clk);
      check(!ready, "ready longer than one clock");
      check(xo == held.x && yo == held.y && zo == held.z, "outputs not held");
    end
  endtask

  initial begin
    vec_t v, r;
    real angs[4];
    angs = '{0.0, PI / 6.0, PI / 4.0, PI / 3.0};

    repeat (3) @(negedge clk);
    check(ready == 1'b0 && xo == 0 && yo == 0 && zo == 0, "outputs not cleared by reset");
    rst_n = 1'b1;
    repeat (5) @(negedge clk);

    // The four classic vectors, result must be (cos a, sin a, ~0).
    foreach (angs[i]) begin
      v.x = to_fix(1.0 / K); v.y = 0; v.z = to_fix(angs[i]);
      run_op(v, 1'b0, r);
      expect_bits(v, r);
      check(absr(to_real(r.x) - $cos(angs[i])) < 0.004 &&
            absr(to_real(r.y) - $sin(angs[i])) < 0.004,
            $sformatf("angle %f: (%f, %f) expected (%f, %f)", angs[i],
                      to_real(r.x), to_real(r.y), $cos(angs[i]), $sin(angs[i])));
      $display("angle %f -> xo %f yo %f zo %f", angs[i], to_real(r.x), to_real(r.y), to_real(r.z));
      idle_check(r);
      repeat (4) @(negedge clk);
    end

    // Random vectors; some with an ignored load, some back to back.
    for (int t = 0; t < 300; t++) begin
      bit interfere, chain;
      interfere = ($urandom_range(0, 3) == 0);
      chain = ($urandom_range(0, 2) == 0);
      v.x = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      v.y = to_fix((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      v.z = to_fix((real'($urandom_range(0, 3400)) - 1700.0) / 1000.0);
      run_op(v, interfere, r);
      expect_bits(v, r);
      if (chain) n_b2b++;
      else begin
        idle_check(r);
        repeat ($urandom_range(0, 3)) @(negedge clk);
      end
    end

    $display("mechanisms: positive steps %0d, negative steps %0d, ignored loads %0d, back-to-back %0d",
             n_pos, n_neg, n_ignored, n_b2b);
    check(n_pos > 0, "no positive rotation");
    check(n_neg > 0, "no negative rotation");
    check(n_ignored > 0, "no load while busy");
    check(n_b2b > 0, "no back-to-back load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
