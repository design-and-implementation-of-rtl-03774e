// ftds_top: self-repairing fault tolerant digital system.
//
// Structural layer: ROWS x COLS cells in a checkerboard on a torus. Cells
// with (row + col) even are working cells, the others spare cells, so every
// working cell has four spare neighbours (left, down, right, top) and every
// spare has four working neighbours. Working cell k performs function slot
// k: its genome is ADD, SUB, MUL or SHL for k mod 4, so the four operations
// of the ALU application each appear NWC/4 times.
//
// Gene control layer: one index_changing_unit per working cell, one
// differentiation_unit inside every spare_cell. A working cell's operands
// are offered to the cell that currently performs its function; a permanent
// fault moves the function to the next free spare, up to four times. The
// result port of a slot takes whichever of its five candidate cells (the
// working cell and its four spares) returned a valid result, so a repair
// changes no routing. Faults in different working cells are repaired in
// parallel; two requests for one spare in the same clock are resolved by the
// spare.
//
// Interface per slot k: present slot_a/slot_b with slot_valid while
// slot_ready is high; the result appears one clock later with
// slot_result_valid (slot_corrected = 1 if the fault detection unit replaced
// it). When any slot has used up its spares, system_failure rises and every
// slot stops accepting operations.
//
// Fault injection: *_fi_genome pulses an XOR mask into a cell's genome
// (transient), *_fi_stuck XORs a mask into a cell's datapath result while
// held (permanent).
//
// Array size and operand width are this implementation's choices; the
// four-spare neighbourhood, the layers and the repair order follow the
// design.
module ftds_top
  import ftds_pkg::*;
#(
  parameter int unsigned ROWS = 4,
  parameter int unsigned COLS = 4,
  parameter int unsigned W    = 8,
  localparam int unsigned NWC = ROWS * COLS / 2,
  localparam int unsigned NSC = ROWS * COLS / 2,
  localparam int unsigned LW  = $clog2(2 * W)
) (
  input  logic                clk,
  input  logic                rst_n,
  // function slots (one per working cell)
  input  logic [W-1:0]        slot_a            [NWC],
  input  logic [W-1:0]        slot_b            [NWC],
  input  logic                slot_valid        [NWC],
  output logic                slot_ready        [NWC],
  output logic [2*W-1:0]      slot_result       [NWC],
  output logic                slot_result_valid [NWC],
  output logic                slot_corrected    [NWC],
  output logic [LW-1:0]       slot_err_loc      [NWC],
  // fault injection
  input  logic [1:0]          wc_fi_genome      [NWC],
  input  logic [2*W-1:0]      wc_fi_stuck       [NWC],
  input  logic [1:0]          sc_fi_genome      [NSC],
  input  logic [2*W-1:0]      sc_fi_stuck       [NSC],
  // repair status
  output logic                wc_fault          [NWC],
  output logic                sc_fault          [NSC],
  output logic                slot_on_spare     [NWC],
  output dir_e                slot_dir          [NWC],
  output logic                slot_failed       [NWC],
  output sc_index_t           sc_idx            [NSC],
  output logic                system_failure
);
  localparam int unsigned HC = COLS / 2;

  // Position of working cell k / spare cell j, and cell index at (r, c).
  function automatic int wc_row(int k); return k / HC; endfunction
  function automatic int wc_col(int k); return 2 * (k % HC) + ((k / HC) % 2); endfunction
  function automatic int sc_row(int j); return j / HC; endfunction
  function automatic int sc_col(int j); return 2 * (j % HC) + 1 - ((j / HC) % 2); endfunction
  function automatic int cell_at(int r, int c);
    return ((r + ROWS) % ROWS) * HC + ((c + COLS) % COLS) / 2;
  endfunction
  // Spare in direction d of working cell k.
  function automatic int spare_of(int k, int d);
    case (d)
      0:       return cell_at(wc_row(k),     wc_col(k) - 1);
      1:       return cell_at(wc_row(k) + 1, wc_col(k));
      2:       return cell_at(wc_row(k),     wc_col(k) + 1);
      default: return cell_at(wc_row(k) - 1, wc_col(k));
    endcase
  endfunction
  // Working cell for which spare j is its d-side spare.
  function automatic int owner_of(int j, int d);
    case (d)
      0:       return cell_at(sc_row(j),     sc_col(j) + 1);
      1:       return cell_at(sc_row(j) - 1, sc_col(j));
      2:       return cell_at(sc_row(j),     sc_col(j) - 1);
      default: return cell_at(sc_row(j) + 1, sc_col(j));
    endcase
  endfunction

  // ICU side
  logic [NDIR-1:0] icu_req    [NWC];
  logic [NDIR-1:0] icu_grant  [NWC];
  logic [NDIR-1:0] icu_use_sc [NWC];
  logic [NDIR-1:0] icu_sc_flt [NWC];
  logic [NDIR-1:0] icu_sc_st  [NWC];
  logic [NDIR-1:0] icu_sc_rdy [NWC];
  logic            icu_use_wc [NWC];
  logic            icu_wc_en  [NWC];
  func_e           icu_perf   [NWC];
  // working cell outputs
  logic            wc_vout    [NWC];
  logic [2*W-1:0]  wc_res     [NWC];
  logic            wc_corr    [NWC];
  logic [LW-1:0]   wc_eloc    [NWC];
  // spare side
  logic [NDIR-1:0] sc_req     [NSC];
  logic [NDIR-1:0] sc_grant   [NSC];
  logic            sc_ready   [NSC];
  logic            sc_vout    [NSC];
  logic [2*W-1:0]  sc_res     [NSC];
  logic            sc_corr    [NSC];
  logic [LW-1:0]   sc_eloc    [NSC];

  logic [NWC-1:0]  failed_vec;
  assign system_failure = |failed_vec;

  for (genvar k = 0; k < NWC; k++) begin : g_wc
    localparam func_e GEN = func_e'(k % 4);

    for (genvar d = 0; d < NDIR; d++) begin : g_nb
      localparam int J = spare_of(k, d);
      assign icu_grant[k][d]  = sc_grant[J][d];
      assign icu_sc_flt[k][d] = sc_fault[J];
      assign icu_sc_st[k][d]  = sc_idx[J].state;
      assign icu_sc_rdy[k][d] = sc_ready[J];
    end

    index_changing_unit #(.GENOME(GEN)) u_icu (
      .clk      (clk),
      .rst_n    (rst_n),
      .halt     (system_failure),
      .wc_fault (wc_fault[k]),
      .sc_fault (icu_sc_flt[k]),
      .sc_state (icu_sc_st[k]),
      .sc_ready (icu_sc_rdy[k]),
      .grant    (icu_grant[k]),
      .req      (icu_req[k]),
      .on_spare (slot_on_spare[k]),
      .dir      (slot_dir[k]),
      .wc_en    (icu_wc_en[k]),
      .failed   (failed_vec[k]),
      .perfect  (icu_perf[k]),
      .ready    (slot_ready[k]),
      .use_wc   (icu_use_wc[k]),
      .use_sc   (icu_use_sc[k])
    );
    assign slot_failed[k] = failed_vec[k];

    working_cell #(.W(W)) u_wc (
      .clk          (clk),
      .rst_n        (rst_n),
      .en           (icu_wc_en[k]),
      .reset_genome (GEN),
      .load_genome  (1'b0),
      .genome_in    (GEN),
      .perfect      (icu_perf[k]),
      .valid_in     (slot_valid[k] & slot_ready[k] & icu_use_wc[k]),
      .a            (slot_a[k]),
      .b            (slot_b[k]),
      .fi_genome    (wc_fi_genome[k]),
      .fi_stuck     (wc_fi_stuck[k]),
      .valid_out    (wc_vout[k]),
      .result       (wc_res[k]),
      .corrected    (wc_corr[k]),
      .err_loc      (wc_eloc[k]),
      .fault        (wc_fault[k]),
      .genome       ()
    );

    // Result of slot k: whichever candidate cell delivered a valid result.
    always_comb begin
      slot_result_valid[k] = wc_vout[k];
      slot_result[k]       = wc_res[k];
      slot_corrected[k]    = wc_corr[k];
      slot_err_loc[k]      = wc_eloc[k];
      for (int d = 0; d < NDIR; d++) begin
        if (sc_vout[spare_of(k, d)] && sc_idx[spare_of(k, d)].state &&
            sc_idx[spare_of(k, d)].dir == dir_e'(d)) begin
          slot_result_valid[k] = 1'b1;
          slot_result[k]       = sc_res[spare_of(k, d)];
          slot_corrected[k]    = sc_corr[spare_of(k, d)];
          slot_err_loc[k]      = sc_eloc[spare_of(k, d)];
        end
      end
    end
  end

  for (genvar j = 0; j < NSC; j++) begin : g_sc
    func_e          perf_nb  [NDIR];
    logic           valid_nb [NDIR];
    logic [W-1:0]   a_nb     [NDIR];
    logic [W-1:0]   b_nb     [NDIR];

    for (genvar d = 0; d < NDIR; d++) begin : g_nb
      localparam int K = owner_of(j, d);
      assign sc_req[j][d] = icu_req[K][d];
      assign perf_nb[d]   = icu_perf[K];
      assign valid_nb[d]  = slot_valid[K] & slot_ready[K] & icu_use_sc[K][d];
      assign a_nb[d]      = slot_a[K];
      assign b_nb[d]      = slot_b[K];
    end

    spare_cell #(.W(W)) u_sc (
      .clk       (clk),
      .rst_n     (rst_n),
      .req       (sc_req[j]),
      .grant     (sc_grant[j]),
      .idx       (sc_idx[j]),
      .ready     (sc_ready[j]),
      .perfect   (perf_nb),
      .valid_in  (valid_nb),
      .a         (a_nb),
      .b         (b_nb),
      .fi_genome (sc_fi_genome[j]),
      .fi_stuck  (sc_fi_stuck[j]),
      .valid_out (sc_vout[j]),
      .result    (sc_res[j]),
      .corrected (sc_corr[j]),
      .err_loc   (sc_eloc[j]),
      .fault     (sc_fault[j])
    );
  end

  initial begin
    assert (ROWS % 2 == 0 && COLS % 2 == 0 && ROWS >= 4 && COLS >= 4)
      else $error("ftds_top: ROWS and COLS must be even and at least 4");
  end

endmodule
