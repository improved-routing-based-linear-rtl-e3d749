// tb_route_ctrl: the operation sequencer with CONFIRM = 4.
// 1) all_empty rises after 10 steps: done exactly when it has been high for
//    CONFIRM clocks, step runs t mod 4, no recovery.
// 2) all_empty never rises: at t_max = 20 the mode switches to RING, the
//    step output alternates parity, and completion still ends the
//    operation with recovered set.
// 3) a glitch of all_empty inside the confirm window restarts the count.
module tb_route_ctrl;
  import nfs_pkg::*;
  localparam int unsigned CONFIRM = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start_req = 0, all_empty = 0;
  logic [31:0] t_max = 1000;
  logic start, active, done, recovered;
  mode_t mode;
  logic [1:0] step;
  logic [31:0] steps;

  route_ctrl #(.CONFIRM(CONFIRM)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic kick();
    start_req = 1; #1 check(start, "start pulse"); @(negedge clk); start_req = 0;
  endtask

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!active && !done, "idle after reset");
    // 1) normal completion
    all_empty = 1;            // stale "empty" right after start is ignored
    kick();
    all_empty = 0;
    for (n = 0; n < 10; n++) begin
      check(active && mode == MODE_CTR && step == 2'(n), "ctr step sequence");
      @(negedge clk);
    end
    all_empty = 1;
    n = 0;
    while (active && n < 50) begin n++; @(negedge clk); end
    check(n == CONFIRM, $sformatf("done after CONFIRM empty clocks (%0d)", n));
    check(done && !recovered, "done, no recovery");
    check(steps == 10 + CONFIRM, $sformatf("step count %0d", steps));
    // 2) timeout -> ring
    t_max = 20; all_empty = 0;
    kick();
    n = 0;
    while (mode != MODE_RING && n < 100) begin n++; @(negedge clk); end
    check(n == 20, $sformatf("ring mode after t_max steps (%0d)", n));
    check(recovered && active, "recovered flag");
    for (int k = 0; k < 6; k++) begin
      check(step == 2'(k % 2), "ring parity alternates");
      @(negedge clk);
    end
    all_empty = 1;
    repeat (CONFIRM + 1) @(negedge clk);
    check(done && !active && recovered, "ring mode completes");
    // 3) glitch restarts the confirm window
    t_max = 1000; all_empty = 0;
    kick();
    repeat (8) @(negedge clk);
    all_empty = 1; repeat (CONFIRM - 1) @(negedge clk);
    all_empty = 0; @(negedge clk);
    all_empty = 1; repeat (CONFIRM - 1) @(negedge clk);
    check(active, "not done after a broken window");
    @(negedge clk);
    check(!active && done, "done after a full window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
