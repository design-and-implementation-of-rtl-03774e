// tb_ftds_random_faults: random fault campaign on the default-size system.
// Random traffic runs on every slot while genome upsets (transient) and
// datapath defects (permanent) are injected into random cells, working or
// spare, at random times, until some function runs out of spares. Checked
// throughout: every result equals the integer model of its slot's function,
// no spare serves two slots, every slot that has moved is served by a taken
// spare whose direction bits point back at it, and after the system failure
// no slot accepts work. Six campaigns are run in sequence, with a reset in
// between.
module tb_ftds_random_faults;
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


  int n_runs = 0, n_inject_t = 0, n_inject_p = 0;

  // structural invariants, every clock
  always @(negedge clk) begin
    if (rst_n) begin
      int owner [NSC];
      for (int j = 0; j < NSC; j++) owner[j] = -1;
      for (int k = 0; k < NWC; k++) begin
        if (slot_on_spare[k]) begin
          int j;
          j = spare(k, int'(slot_dir[k]));
          checks++;
          if (owner[j] != -1 || !sc_idx[j].state || int'(sc_idx[j].dir) != int'(slot_dir[k])) begin
            failures++;
            $display("FAIL slot %0d on spare %0d: owner %0d state %0b dir %0d", k, j, owner[j],
                     sc_idx[j].state, sc_idx[j].dir);
          end
          owner[j] = k;
        end
      end
    end
  end

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nw, ns;
    nw = 0; ns = 0;
    for (int r = 0; r < ROWS; r++) for (int c = 0; c < COLS; c++) begin
      if ((r + c) % 2 == 0) begin wc_at[r][c] = nw; wc_r[nw] = r; wc_c[nw] = c; nw++; end
      else begin sc_at[r][c] = ns; ns++; end
    end
    for (int k = 0; k < NWC; k++) begin pend[k] = 0; pend_exp[k] = '0; slot_valid[k] = 0; slot_a[k] = '0; slot_b[k] = '0; end
    for (int run = 0; run < 6; run++) begin
      rst_n = 0;
      traffic_on = 0;
      for (int j = 0; j < NSC; j++) begin sc_fi_genome[j] = '0; sc_fi_stuck[j] = '0; end
      for (int k = 0; k < NWC; k++) begin wc_fi_genome[k] = '0; wc_fi_stuck[k] = '0; pend[k] = 0; end
      repeat (3) @(posedge clk);
      #2 rst_n = 1;
      traffic_on = 1;
      while (!system_failure) begin
        repeat (5 + $urandom % 30) @(posedge clk);
        #2;
        if ($urandom % 3 == 0) begin
          // transient: upset one genome for one clock
          if ($urandom % 2 == 0) wc_fi_genome[$urandom % NWC] = 2'(1 + $urandom % 3);
          else sc_fi_genome[$urandom % NSC] = 2'(1 + $urandom % 3);
          n_inject_t++;
          @(posedge clk); #2;
          for (int j = 0; j < NSC; j++) sc_fi_genome[j] = '0;
          for (int k = 0; k < NWC; k++) wc_fi_genome[k] = '0;
        end else begin
          // permanent: a defect that stays
          if ($urandom % 2 == 0) wc_fi_stuck[$urandom % NWC] = N'(1) << ($urandom % N);
          else sc_fi_stuck[$urandom % NSC] = N'(1) << ($urandom % N);
          n_inject_p++;
        end
      end
      repeat (10) @(posedge clk);
      n_sysfail++;
      n_runs++;
    end
    traffic_on = 0;
    repeat (3) @(posedge clk);
    $display("campaign: runs=%0d ops=%0d corrected=%0d transient_injections=%0d permanent_injections=%0d collisions=%0d halted_clocks=%0d",
             n_runs, n_ops, n_corrected, n_inject_t, n_inject_p, n_collision, n_halted);
    checks++; if (n_ops < 1000)     begin failures++; $display("FAIL too few operations"); end
    checks++; if (n_corrected == 0) begin failures++; $display("FAIL nothing corrected"); end
    checks++; if (n_halted == 0)    begin failures++; $display("FAIL no halt"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
