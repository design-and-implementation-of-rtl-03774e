// fault_detection_unit: detects, corrects and classifies faults of one cell.
//
// The cell hands over its registered operands and its datapath result. The
// elementary unit recomputes the result from the same operands under the
// perfect genome; comparator 1 flags a mismatch and comparator 2 locates the
// wrong bits. On a mismatch the unit
//   * substitutes the reference for the cell's result (`corrected` = 1), and
//   * asks the cell to reload its genome from the perfect genome (`refresh`).
// The refresh is requested on the first mismatch only, so the genome is
// replaced once per suspected transient.
// A single mismatch is treated as transient. If the next result computed
// after the refresh is wrong again, the fault is permanent: `fault` is set
// and stays set until reset, telling the gene control layer that the whole
// cell must be replaced. A result marked `stale` was computed in the same
// clock as a refresh, i.e. still with the old genome; it is corrected but
// does not count toward the permanent decision.
//
// Timing: result/corrected/err_loc/refresh are combinational on the inputs
// of the same clock; the classification state and `fault` change at the
// next rising edge. Reset is synchronous, active low.
// The detect / correct / replace-genome / escalate sequence follows the
// design; the stale marking and the one-retry rule are this
// implementation's reading of it.
module fault_detection_unit
  import ftds_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  func_e                      perfect,
  input  logic [W-1:0]               a_q,
  input  logic [W-1:0]               b_q,
  input  logic                       res_valid,
  input  logic [2*W-1:0]             dp_res,
  input  logic                       stale,
  output logic [2*W-1:0]             result,
  output logic                       corrected,
  output logic [$clog2(2*W)-1:0]     err_loc,
  output logic                       refresh,
  output logic                       fault
);
  localparam int unsigned N = 2 * W;

  typedef enum logic [1:0] {FDU_OK, FDU_RETRY, FDU_PERM} fdu_state_e;
  fdu_state_e state_q, state_d;

  logic [N-1:0]          ref_res;
  logic                  flag;
  logic [N-1:0]          syndrome;
  logic [$clog2(N):0]    err_count;

  elementary_unit #(.W(W)) u_eu (
    .func (perfect),
    .a    (a_q),
    .b    (b_q),
    .y    (ref_res)
  );

  comparator_unit1 #(.N(N)) u_cmp1 (
    .valid (res_valid),
    .x     (dp_res),
    .y     (ref_res),
    .flag  (flag)
  );

  comparator_unit2 #(.N(N)) u_cmp2 (
    .x        (dp_res),
    .y        (ref_res),
    .syndrome (syndrome),
    .loc      (err_loc),
    .count    (err_count)
  );

  assign result    = flag ? ref_res : dp_res;
  assign corrected = flag;
  assign refresh   = flag & (state_q == FDU_OK);
  assign fault     = (state_q == FDU_PERM);

  always_comb begin
    state_d = state_q;
    if (res_valid && state_q != FDU_PERM) begin
      if (flag) begin
        if (state_q == FDU_OK)  state_d = FDU_RETRY;
        else if (!stale)        state_d = FDU_PERM;
      end else if (state_q == FDU_RETRY && !stale) begin
        state_d = FDU_OK;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= FDU_OK;
    else        state_q <= state_d;
  end

  // A flagged result always carries at least one wrong bit.
  assert property (@(posedge clk) disable iff (!rst_n)
                  flag |-> (syndrome != '0 && err_count != 0));

endmodule
