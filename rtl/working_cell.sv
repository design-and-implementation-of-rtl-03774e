// working_cell: one cell of the structural layer.
//
// A cell holds a genome (the function it performs), an alu_core that
// executes it, and a fault_detection_unit that checks every result against
// an elementary unit driven by the perfect genome. When `valid_in` is high
// and the cell is enabled, the operands and the datapath result are
// registered; one clock later `valid_out` is high with the (corrected if
// needed) result. A mismatch reloads the genome from `perfect`; a repeated
// mismatch raises the sticky `fault`.
//
// Genome: loaded with `reset_genome` at reset, with `genome_in` when
// `load_genome` is pulsed (differentiation of a spare), and from `perfect`
// on a refresh. `en` = 0 isolates the cell: it accepts no operation.
//
// Fault injection (for test and evaluation): `fi_genome` is XORed into the
// genome register in the clock it is non-zero (an upset of the stored
// genome, a transient fault); `fi_stuck` is XORed into the datapath result
// for as long as it is non-zero (a defect of the cell, a permanent fault).
// Both are this implementation's means of exercising the repair mechanism.
module working_cell
  import ftds_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       en,
  input  func_e                      reset_genome,
  input  logic                       load_genome,
  input  func_e                      genome_in,
  input  func_e                      perfect,
  input  logic                       valid_in,
  input  logic [W-1:0]               a,
  input  logic [W-1:0]               b,
  input  logic [1:0]                 fi_genome,
  input  logic [2*W-1:0]             fi_stuck,
  output logic                       valid_out,
  output logic [2*W-1:0]             result,
  output logic                       corrected,
  output logic [$clog2(2*W)-1:0]     err_loc,
  output logic                       fault,
  output func_e                      genome
);
  logic [W-1:0]   a_q, b_q;
  logic [2*W-1:0] dp_y, dp_q;
  logic           valid_q, stale_q;
  logic           refresh;

  alu_core #(.W(W)) u_alu (
    .func (genome),
    .a    (a),
    .b    (b),
    .y    (dp_y)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      genome <= reset_genome;
    end else if (load_genome) begin
      genome <= genome_in;
    end else if (refresh) begin
      genome <= perfect;
    end else if (fi_genome != 2'b00) begin
      genome <= func_e'(genome ^ fi_genome);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      stale_q <= 1'b0;
      a_q     <= '0;
      b_q     <= '0;
      dp_q    <= '0;
    end else begin
      valid_q <= valid_in & en;
      if (valid_in && en) begin
        a_q     <= a;
        b_q     <= b;
        dp_q    <= dp_y ^ fi_stuck;
        stale_q <= refresh;
      end
    end
  end

  fault_detection_unit #(.W(W)) u_fdu (
    .clk       (clk),
    .rst_n     (rst_n),
    .perfect   (perfect),
    .a_q       (a_q),
    .b_q       (b_q),
    .res_valid (valid_q),
    .dp_res    (dp_q),
    .stale     (stale_q),
    .result    (result),
    .corrected (corrected),
    .err_loc   (err_loc),
    .refresh   (refresh),
    .fault     (fault)
  );

  assign valid_out = valid_q;

endmodule
