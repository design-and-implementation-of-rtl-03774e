// tb_index_changing_unit: the testbench plays the four spares of one
// working cell (state bits, grants, ready, fault signals) and walks the ICU
// through the rows of the state-change table: a working-cell fault takes
// the left spare; a fault of the spare in use moves on in the order left,
// down, right, top, skipping spares already taken; a spare taken by a
// neighbour between request and grant (a lost collision) makes the ICU go
// to the next one; with no free spare left the ICU reports failure. Also
// checks isolation of the working cell, the issue selects, readiness and
// the global halt.
module tb_index_changing_unit;
  import ftds_pkg::*;

  logic clk = 0, rst_n = 0;
  logic            halt, wc_fault, on_spare, wc_en, failed, ready, use_wc;
  logic [NDIR-1:0] sc_fault, sc_state, sc_ready, grant, req, use_sc;
  logic [NDIR-1:0] grant_block;
  dir_e            dir;
  func_e           perfect;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  index_changing_unit #(.GENOME(FUNC_SHL)) dut (
    .clk(clk), .rst_n(rst_n), .halt(halt), .wc_fault(wc_fault), .sc_fault(sc_fault),
    .sc_state(sc_state), .sc_ready(sc_ready), .grant(grant), .req(req),
    .on_spare(on_spare), .dir(dir), .wc_en(wc_en), .failed(failed), .perfect(perfect),
    .ready(ready), .use_wc(use_wc), .use_sc(use_sc));

  // Spare model: grant a request to a free spare unless blocked; a granted
  // spare becomes taken and is ready two clocks later.
  assign grant = req & ~sc_state & ~grant_block;
  always_ff @(posedge clk) begin
    for (int d = 0; d < NDIR; d++) begin
      if (grant[d]) sc_state[d] <= 1'b1;
      sc_ready[d] <= sc_state[d];
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Raise a fault and check the request that follows and the switch.
  task automatic fault_and_switch(bit from_wc, int from_dir, int exp_dir);
    @(negedge clk);
    if (from_wc) wc_fault = 1'b1; else sc_fault[from_dir] = 1'b1;
    #1;
    expect_eq("not ready while faulty", int'(ready), 0);
    expect_eq("request", int'(req), 1 << exp_dir);
    @(negedge clk);
    expect_eq("on_spare", int'(on_spare), 1);
    expect_eq("dir", int'(dir), exp_dir);
    expect_eq("wc isolated", int'(wc_en), 0);
    expect_eq("request dropped", int'(req), 0);
    expect_eq("use_sc", int'(use_sc), 1 << exp_dir);
    expect_eq("use_wc", int'(use_wc), 0);
    repeat (2) @(negedge clk);
    expect_eq("ready on spare", int'(ready), 1);
  endtask

  task automatic do_reset(logic [NDIR-1:0] taken);
    @(negedge clk);
    rst_n = 0; wc_fault = 0; sc_fault = '0; halt = 0; grant_block = '0;
    sc_state = taken; sc_ready = taken;
    @(negedge clk);
    rst_n = 1;
    @(negedge clk);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset('0);
    expect_eq("perfect genome", int'(perfect), int'(FUNC_SHL));
    expect_eq("reset on_spare", int'(on_spare), 0);
    expect_eq("reset wc_en", int'(wc_en), 1);
    expect_eq("reset ready", int'(ready), 1);
    expect_eq("reset use_wc", int'(use_wc), 1);
    expect_eq("reset req", int'(req), 0);
    // row 1: working cell fault, left spare free
    fault_and_switch(1, 0, int'(DIR_L));
    // row 3: left spare fails, down spare free
    fault_and_switch(0, int'(DIR_L), int'(DIR_D));
    // down spare fails; right spare is taken by a neighbour before our
    // grant (lost collision): the request must move to the top spare
    @(negedge clk);
    grant_block = 4'b0100;
    sc_fault[DIR_D] = 1'b1;
    #1;
    expect_eq("request right", int'(req), 4);
    @(negedge clk);
    expect_eq("still on down", int'(dir), int'(DIR_D));
    sc_state[DIR_R] = 1'b1;   // the neighbour took it
    grant_block = '0;
    #1;
    expect_eq("request top", int'(req), 8);
    @(negedge clk);
    expect_eq("dir top", int'(dir), int'(DIR_T));
    repeat (2) @(negedge clk);
    expect_eq("ready on top", int'(ready), 1);
    // top fails: no spare left -> failure
    @(negedge clk);
    sc_fault[DIR_T] = 1'b1;
    #1;
    expect_eq("no request", int'(req), 0);
    @(negedge clk);
    expect_eq("failed", int'(failed), 1);
    expect_eq("not ready when failed", int'(ready), 0);
    // row 2: working cell fault with the left spare already taken
    do_reset(4'b0001);
    fault_and_switch(1, 0, int'(DIR_D));
    // row 7: left, down and right taken
    do_reset(4'b0111);
    fault_and_switch(1, 0, int'(DIR_T));
    // halt stops the function
    @(negedge clk);
    halt = 1;
    #1;
    expect_eq("halt", int'(ready), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
