// tb_one_shot - test of the retriggerable delay one-shot.
//
// Directed cases: a single trigger gives exactly `len` active cycles with
// `expire` in the last one; `hold` keeps the output on and the period runs
// out `len` cycles after the last hold; a trigger while active restarts the
// full period; `len` = 0 gives no pulse. In every cycle `active_next` must
// predict the next cycle's `active`.
`timescale 1ns / 1ps
module tb_one_shot;

  localparam int unsigned CNT_W = 8;

  logic             clk = 1'b0;
  logic             rst_n, trig, hold;
  logic [CNT_W-1:0] len;
  logic             active, expire, active_next;
  int               checks = 0, failures = 0;
  logic             pred;

  one_shot #(.CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // Prediction check every cycle.
  always @(posedge clk) begin
    if (rst_n) begin
      pred = active_next;
      #1;
      check(active == pred, "active_next predicts active");
    end
  end

  // Count active cycles until it drops, checking expire in the last one.
  task automatic measure(output int n);
    n = 0;
    while (active) begin
      check(expire == (n_last_hint()), "expire only in the last cycle");
      n++;
      @(posedge clk); #2;
    end
  endtask

  function automatic bit n_last_hint();
    return active && !active_next;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    rst_n = 1'b0; trig = 1'b0; hold = 1'b0; len = 8'd10;
    @(posedge clk); @(posedge clk); #2;
    rst_n = 1'b1;
    check(!active, "idle after reset");
    // Single trigger.
    trig = 1'b1; @(posedge clk); #2; trig = 1'b0;
    measure(n);
    check(n == 10, $sformatf("single pulse length %0d", n));
    // Hold for 25 cycles after the start.
    len = 8'd7;
    trig = 1'b1; @(posedge clk); #2; trig = 1'b0;
    hold = 1'b1;
    repeat (25) @(posedge clk);
    #2;
    hold = 1'b0;
    measure(n);
    check(n == 7, $sformatf("after hold, runs on %0d (expected 7)", n));
    // Retrigger at cycle 4 restarts the period.
    len = 8'd12;
    trig = 1'b1; @(posedge clk); #2; trig = 1'b0;
    repeat (4) @(posedge clk);
    #2;
    trig = 1'b1; @(posedge clk); #2; trig = 1'b0;
    measure(n);
    check(n == 12, $sformatf("after retrigger %0d (expected 12)", n));
    // Zero length.
    len = 8'd0;
    trig = 1'b1; @(posedge clk); #2; trig = 1'b0;
    check(!active, "no pulse for zero length");
    // Hold while idle does nothing.
    hold = 1'b1; repeat (3) @(posedge clk); #2; hold = 1'b0;
    check(!active, "hold alone does not start");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
