// tb_cordic_ctrl: checks the iteration sequencer.
//
// For each operation: start only in the load clock, step high for exactly N
// clocks with idx counting 0..N-1, last only with idx = N-1, ready high for
// exactly the clock after the last iteration, load ignored while running and
// accepted in the ready clock. Run with the default N = 10 and with N = 3.
module tb_cordic_ctrl;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic load3 = 1'b0;

  logic       start, step, last, ready;
  logic [3:0] idx;
  logic       start3, step3, last3, ready3;
  logic [1:0] idx3;

  int checks = 0;
  int failures = 0;

  cordic_ctrl dut (.clk, .rst_n, .load, .start, .step, .last, .idx, .ready);
  cordic_ctrl #(.N(3)) dut3 (.clk, .rst_n, .load(load3), .start(start3), .step(step3),
                             .last(last3), .idx(idx3), .ready(ready3));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Called after a falling edge with the sequencer idle; returns after the
  // falling edge where ready is high.
  task automatic op10(input bit interfere);
    load = 1'b1;
    #1 check(start && !step, "start must be high in the load clock");
    @(negedge clk);
    for (int k = 0; k < 10; k++) begin
      load = interfere && (k == 4);
      #1;
      check(step && !start && idx == 4'(k) && !ready, $sformatf("iteration %0d: step=%b idx=%0d", k, step, idx));
      check(last == (k == 9), $sformatf("last wrong at %0d", k));
      @(negedge clk);
    end
    load = 1'b0;
    check(ready && !step, "ready must follow the last iteration");
  endtask

  task automatic op3();
    load3 = 1'b1;
    #1 check(start3, "N=3 start");
    @(negedge clk);
    load3 = 1'b0;
    for (int k = 0; k < 3; k++) begin
      check(step3 && idx3 == 2'(k) && last3 == (k == 2), $sformatf("N=3 iteration %0d", k));
      @(negedge clk);
    end
    check(ready3 && !step3, "N=3 ready");
    @(negedge clk);
    check(!ready3, "N=3 ready one clock");
  endtask

  initial begin
    load = 1'b1;  // ignored during reset
    repeat (2) @(negedge clk);
    check(!step && !ready, "idle in reset");
    load = 1'b0;
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!step && !ready && !start, "idle after reset");
    op10(1'b0);
    op10(1'b1);     // load in the ready clock, and a load while busy
    @(negedge clk);
    check(!ready && !step, "back to idle");
    repeat (3) begin
      @(negedge clk);
      check(!ready && !step && !start, "stays idle");
    end
    op3();
    op3();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
