// spare_cell: a spare cell of the structural layer with its part of the gene
// control layer.
//
// A spare sits between four working cells and can replace any one of them.
// Its index bits (sc_index_t) say whether it is taken (state), whether it
// still has to copy its working cell (diff) and which working cell it serves
// (dir, the spare's position relative to that cell). All port arrays are
// indexed by that direction code: entry d belongs to the working cell for
// which this spare is the d-side spare.
//
// Replacement: the index changing unit of a working cell raises req[d].
// While the spare is free it grants exactly one request in a clock - the
// lowest direction code - so two working cells that fail together can never
// both take it; the loser sees the state bit set in the next clock and moves
// on. A grant sets state = 1, diff = 1, dir = d. The differentiation unit
// then loads the genome and clears diff; from then on the spare is `ready`,
// takes operands from working cell `dir` and returns results through its own
// working_cell instance (same one-clock latency, same fault detection).
// A spare is never released: a faulty spare keeps state = 1 and reports
// `fault` to the ICU that owns it.
// The index bits and the replace/differentiate sequence follow the design;
// the fixed-priority grant is this implementation's way of avoiding
// collisions.
module spare_cell
  import ftds_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NDIR-1:0]            req,
  output logic [NDIR-1:0]            grant,
  output sc_index_t                  idx,
  output logic                       ready,
  input  func_e                      perfect [NDIR],
  input  logic                       valid_in [NDIR],
  input  logic [W-1:0]               a [NDIR],
  input  logic [W-1:0]               b [NDIR],
  input  logic [1:0]                 fi_genome,
  input  logic [2*W-1:0]             fi_stuck,
  output logic                       valid_out,
  output logic [2*W-1:0]             result,
  output logic                       corrected,
  output logic [$clog2(2*W)-1:0]     err_loc,
  output logic                       fault
);
  logic  du_load, du_clr;
  func_e du_genome, cell_genome;

  // Fixed-priority grant, only while free.
  always_comb begin
    grant = '0;
    if (!idx.state) begin
      for (int d = NDIR - 1; d >= 0; d--) begin
        if (req[d]) grant = NDIR'(1) << d;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      idx <= '{state: 1'b0, diff: 1'b0, dir: DIR_L};
    end else if (grant != '0) begin
      idx.state <= 1'b1;
      idx.diff  <= 1'b1;
      for (int d = 0; d < NDIR; d++) begin
        if (grant[d]) idx.dir <= dir_e'(d);
      end
    end else if (du_clr) begin
      idx.diff <= 1'b0;
    end
  end

  assign ready = idx.state & ~idx.diff;

  differentiation_unit u_du (
    .clk         (clk),
    .rst_n       (rst_n),
    .diff        (idx.diff),
    .dir         (idx.dir),
    .perfect     (perfect),
    .cell_genome (cell_genome),
    .load        (du_load),
    .genome      (du_genome),
    .diff_clr    (du_clr)
  );

  working_cell #(.W(W)) u_cell (
    .clk          (clk),
    .rst_n        (rst_n),
    .en           (ready),
    .reset_genome (FUNC_ADD),
    .load_genome  (du_load),
    .genome_in    (du_genome),
    .perfect      (perfect[idx.dir]),
    .valid_in     (valid_in[idx.dir]),
    .a            (a[idx.dir]),
    .b            (b[idx.dir]),
    .fi_genome    (fi_genome),
    .fi_stuck     (fi_stuck),
    .valid_out    (valid_out),
    .result       (result),
    .corrected    (corrected),
    .err_loc      (err_loc),
    .fault        (fault),
    .genome       (cell_genome)
  );

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
  assert property (@(posedge clk) disable iff (!rst_n) (grant != '0) |-> !idx.state);

endmodule
