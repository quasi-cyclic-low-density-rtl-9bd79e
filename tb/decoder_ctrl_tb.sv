// decoder_ctrl_tb: checks the iteration controller cycle by cycle:
// load for one cycle after start, update every cycle until the parity check
// passes (after at least one iteration) or the limit is reached, a one-cycle
// done pulse, success flag and iteration count; limit 0 behaves as 1; start
// is ignored while busy.
module decoder_ctrl_tb;
  logic clk = 0, rst_n = 0, start = 0, parity_ok = 0;
  logic [5:0] max_iter = '0;
  logic load, update, busy, done, success;
  logic [5:0] iterations;
  int checks = 0, failures = 0;
  int cyc = 0;

  decoder_ctrl #(.ITER_W(6)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    wait (cyc == 5000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL at cycle %0d: %s", cyc, what);
    end
  endtask

  // Run one frame; the parity check passes once pass_after iterations are done
  // (never if pass_after < 0). Checks the whole cycle sequence.
  task automatic run(int limit, int pass_after);
    int eff = (limit == 0) ? 1 : limit;
    int first = (pass_after < 1) ? 1 : pass_after;   // first judged iteration that passes
    bit passes = (pass_after >= 0) && (first <= eff);
    int exp_it = passes ? first : eff;
    int n_upd = 0, n_cyc = 0;
    @(negedge clk);
    max_iter = 6'(limit);
    start = 1;
    @(negedge clk);
    start = 0;
    check(load && busy && !update, "load after start");
    @(negedge clk);
    while (!done) begin
      parity_ok = (pass_after >= 0) && (int'(iterations) >= pass_after);
      #1;
      check(!load, "no load while iterating");
      if (update) n_upd++;
      // a second start while busy must be ignored
      start = (n_cyc == 1);
      @(negedge clk);
      start = 0;
      n_cyc++;
      if (n_cyc > 100) break;
    end
    check(done && busy, "done pulse");
    check(int'(iterations) == exp_it, $sformatf("iterations %0d expected %0d", iterations, exp_it));
    check(n_upd == exp_it, $sformatf("updates %0d expected %0d", n_upd, exp_it));
    check(n_cyc == exp_it + 1, $sformatf("iteration cycles %0d expected %0d", n_cyc, exp_it + 1));
    check(success == passes, "success flag");
    @(negedge clk);
    check(!done && !busy, "back to idle after one done cycle");
    parity_ok = 0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(!busy && !done && !load && !update, "idle after reset");
    run(10, 3);     // early stop after 3 iterations
    run(5, -1);     // never passes: stops at the limit
    run(8, 0);      // parity passes from the start: still one iteration first
    run(0, -1);     // limit 0 acts as 1
    run(63, 40);
    run(4, 4);      // passes exactly at the limit
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
