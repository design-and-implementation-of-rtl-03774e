// tb_ftds_top: end-to-end test of the self-repairing system at its default
// size (4 x 4 torus: 8 working cells, 8 spares, 8-bit operands).
//
// Random operations are issued to every function slot whenever it is
// ready, and every result is checked one clock later against an integer
// model of the slot's function. Meanwhile faults are injected:
//   1. a genome upset in working cell 0           -> transient, corrected
//   2. permanent defects in working cells 4 and 7 in the same clock
//                                                  -> parallel repair
//   3. a defect in the spare now serving slot 4    -> repair of a spare
//   4. three successive defects in slot 2          -> left, down, right
//   5. a defect in working cell 1 and in slot 2's spare in the same clock:
//      both want the same spare (collision); slot 1 wins, slot 2 has no
//      spare left                                  -> system failure, halt
// The expected spare of every repair is worked out from the testbench's own
// map of the torus and its own record of which spares are taken, and
// compared with the slot status and the spares' index bits. Each mechanism
// is counted; one that never happens counts as a failure.
module tb_ftds_top;
  import ftds_pkg::*;
  localparam int unsigned ROWS = 4, COLS = 4, W = 8;
  localparam int unsigned N   = 2 * W;
  localparam int unsigned NWC = ROWS * COLS / 2;
  localparam int unsigned NSC = NWC;
  localparam int unsigned LW  = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [W-1:0]  slot_a [NWC];
  logic [W-1:0]  slot_b [NWC];
  logic          slot_valid [NWC];
  logic          slot_ready [NWC];
  logic [N-1:0]  slot_result [NWC];
  logic          slot_result_valid [NWC];
  logic          slot_corrected [NWC];
  logic [LW-1:0] slot_err_loc [NWC];
  logic [1:0]    wc_fi_genome [NWC];
  logic [N-1:0]  wc_fi_stuck [NWC];
  logic [1:0]    sc_fi_genome [NSC];
  logic [N-1:0]  sc_fi_stuck [NSC];
  logic          wc_fault [NWC];
  logic          sc_fault [NSC];
  logic          slot_on_spare [NWC];
  dir_e          slot_dir [NWC];
  logic          slot_failed [NWC];
  sc_index_t     sc_idx [NSC];
  logic          system_failure;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_ops = 0, n_corrected = 0, n_transient = 0, n_repair_wc = 0, n_repair_sc = 0;
  int n_parallel = 0, n_collision = 0, n_sysfail = 0, n_halted = 0;

  always #5 clk = ~clk;

  ftds_top dut (.*);

  // ---------------------------------------------------------------- model
  function automatic logic [N-1:0] model(func_e f, logic [W-1:0] x, logic [W-1:0] z);
    case (f)
      FUNC_ADD: return N'(int'(x) + int'(z));
      FUNC_SUB: return N'(int'(x) - int'(z));
      FUNC_MUL: return N'(int'(x) * int'(z));
      default:  return N'(int'(x) * (1 << (int'(z) % W)));
    endcase
  endfunction

  // Torus map: cells numbered row-major among cells of the same kind.
  int wc_at [ROWS][COLS];
  int sc_at [ROWS][COLS];
  int wc_r [NWC], wc_c [NWC];
  bit taken [NSC];

  function automatic int spare(int k, int d);
    int r, c;
    r = wc_r[k]; c = wc_c[k];
    case (d)
      0: c = (c + COLS - 1) % COLS;
      1: r = (r + 1) % ROWS;
      2: c = (c + 1) % COLS;
      default: r = (r + ROWS - 1) % ROWS;
    endcase
    return sc_at[r][c];
  endfunction

  function automatic int next_free(int k);
    for (int d = 0; d < NDIR; d++) if (!taken[spare(k, d)]) return d;
    return -1;
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // ---------------------------------------------------------------- traffic
  logic         pend [NWC];
  logic [N-1:0] pend_exp [NWC];
  bit           traffic_on = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < NWC; k++) begin
        checks++;
        if (slot_result_valid[k] !== pend[k]) begin
          failures++;
          $display("FAIL slot %0d result_valid %0b expected %0b at %0t", k,
                   slot_result_valid[k], pend[k], $time);
        end else if (pend[k]) begin
          n_ops++;
          if (slot_result[k] !== pend_exp[k]) begin
            failures++;
            $display("FAIL slot %0d result %h expected %h at %0t", k, slot_result[k],
                     pend_exp[k], $time);
          end
          if (slot_corrected[k]) n_corrected++;
          if (slot_corrected[k] && k == 0) n_transient++;
        end
        slot_valid[k] = traffic_on && ($urandom % 4 != 0);
        slot_a[k]     = W'($urandom);
        slot_b[k]     = W'($urandom);
        pend[k]       = slot_valid[k] && slot_ready[k];
        pend_exp[k]   = model(func_e'(k % 4), slot_a[k], slot_b[k]);
      end
      if (system_failure) begin
        int busy;
        busy = 0;
        for (int k = 0; k < NWC; k++) busy += int'(slot_ready[k]);
        checks++;
        if (busy != 0) begin
          failures++;
          $display("FAIL slots still ready after system failure");
        end else n_halted++;
      end
    end
  end

  // collisions: a spare asked by more than one ICU in the same clock
  always @(posedge clk) begin
    if (rst_n) begin
      for (int j = 0; j < NSC; j++) begin
        if ($countones(dut.sc_req[j]) > 1) n_collision++;
      end
    end
  end

  // ---------------------------------------------------------------- faults
  // Inject a permanent defect into whatever cell serves slot k now.
  task automatic break_slot(int k);
    if (!slot_on_spare[k]) wc_fi_stuck[k] = N'(1) << ($urandom % N);
    else sc_fi_stuck[spare(k, int'(slot_dir[k]))] = N'(1) << ($urandom % N);
  endtask

  // Wait until slot k is served by spare direction d and ready again.
  task automatic wait_repaired(int k, int d, bit from_spare, bit halted = 0);
    int t;
    t = 0;
    while (!(slot_on_spare[k] && int'(slot_dir[k]) == d && sc_idx[spare(k, d)].state &&
             !sc_idx[spare(k, d)].diff && (slot_ready[k] || halted)) && t < 100) begin
      @(posedge clk);
      t++;
    end
    expect_eq($sformatf("slot %0d moved to spare %0d", k, d), int'(slot_dir[k]), d);
    expect_eq($sformatf("slot %0d ready after repair", k), int'(slot_ready[k]), halted ? 0 : 1);
    expect_eq("spare index state", int'(sc_idx[spare(k, d)].state), 1);
    expect_eq("spare index dir", int'(sc_idx[spare(k, d)].dir), d);
    expect_eq("spare index diff", int'(sc_idx[spare(k, d)].diff), 0);
    taken[spare(k, d)] = 1;
    if (from_spare) n_repair_sc++; else n_repair_wc++;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw, ns, d4, d7, d2, d1, j0;
    nw = 0; ns = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      if ((r + c) % 2 == 0) begin wc_at[r][c] = nw; wc_r[nw] = r; wc_c[nw] = c; nw++; end
      else begin sc_at[r][c] = ns; ns++; end
    end
    for (int j = 0; j < NSC; j++) begin taken[j] = 0; sc_fi_genome[j] = '0; sc_fi_stuck[j] = '0; end
    for (int k = 0; k < NWC; k++) begin
      wc_fi_genome[k] = '0; wc_fi_stuck[k] = '0; pend[k] = 0; pend_exp[k] = '0;
      slot_valid[k] = 0; slot_a[k] = '0; slot_b[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    traffic_on = 1;
    repeat (40) @(posedge clk);

    // 1. transient: genome upset in working cell 0
    #2 wc_fi_genome[0] = 2'b10;
    @(posedge clk); #2 wc_fi_genome[0] = 2'b00;
    repeat (20) @(posedge clk);
    expect_eq("no fault after transient", int'(wc_fault[0]), 0);
    checks++;
    if (n_transient < 1 || n_transient > 2) begin
      failures++;
      $display("FAIL slot 0 corrected %0d results, expected 1 or 2", n_transient);
    end
    expect_eq("slot 0 still on its working cell", int'(slot_on_spare[0]), 0);

    // 2. parallel permanent faults in working cells 4 and 7
    d4 = next_free(4); d7 = next_free(7);
    #2 break_slot(4); break_slot(7);
    fork
      wait_repaired(4, d4, 0);
      wait_repaired(7, d7, 0);
    join
    if (dut.g_wc[4].u_icu.on_spare && dut.g_wc[7].u_icu.on_spare) n_parallel++;
    repeat (20) @(posedge clk);

    // 3. the spare serving slot 4 fails too
    d4 = next_free(4);
    #2 break_slot(4);
    wait_repaired(4, d4, 1);
    repeat (20) @(posedge clk);

    // 4. slot 2 uses three spares
    for (int i = 0; i < 3; i++) begin
      d2 = next_free(2);
      #2 break_slot(2);
      wait_repaired(2, d2, i > 0);
      repeat (10) @(posedge clk);
    end

    // 5. collision on the last free spare of slot 2, which is also the
    //    first choice of slot 1
    d2 = next_free(2); d1 = next_free(1);
    expect_eq("test setup: same spare", spare(2, d2), spare(1, d1));
    j0 = spare(1, d1);
    #2 break_slot(1); break_slot(2);
    // the spare grants the lowest direction code; the winner is repaired
    // while the loser's failure halts the system, so it is never ready
    if (d1 < d2) begin
      wait_repaired(1, d1, 0, 1);
    end else begin
      wait_repaired(2, d2, 1, 1);
    end
    repeat (5) @(posedge clk);
    expect_eq("loser failed", int'(slot_failed[d1 < d2 ? 2 : 1]), 1);
    expect_eq("system failure", int'(system_failure), 1);
    if (system_failure) n_sysfail++;
    expect_eq("spare taken once", int'(sc_idx[j0].state), 1);
    repeat (10) @(posedge clk);
    traffic_on = 0;
    repeat (3) @(posedge clk);

    $display("mechanisms: ops=%0d corrected=%0d transient=%0d repair_from_wc=%0d repair_from_spare=%0d parallel=%0d collision=%0d system_failure=%0d halted_clocks=%0d",
             n_ops, n_corrected, n_transient, n_repair_wc, n_repair_sc, n_parallel, n_collision, n_sysfail, n_halted);
    checks++; if (n_ops < 100)       begin failures++; $display("FAIL too few operations"); end
    checks++; if (n_transient == 0)  begin failures++; $display("FAIL no transient corrected"); end
    checks++; if (n_repair_wc == 0)  begin failures++; $display("FAIL no working-cell repair"); end
    checks++; if (n_repair_sc == 0)  begin failures++; $display("FAIL no spare repair"); end
    checks++; if (n_parallel == 0)   begin failures++; $display("FAIL no parallel repair"); end
    checks++; if (n_collision == 0)  begin failures++; $display("FAIL no collision"); end
    checks++; if (n_sysfail == 0)    begin failures++; $display("FAIL no system failure"); end
    checks++; if (n_halted == 0)     begin failures++; $display("FAIL no halt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
