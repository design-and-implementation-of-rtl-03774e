// differentiation_unit: the DU of a spare cell.
//
// When the spare's differentiation bit is set, the DU turns the spare into a
// copy of the working cell named by the direction bits: it loads that
// working cell's perfect genome into the spare (LOAD, one clock), then reads
// the spare's genome back and compares it with the perfect genome (CHECK,
// one clock). If they agree, differentiation is over and the DU clears the
// differentiation bit (`diff_clr` pulse); if not, it loads again.
// The DU leaves IDLE at the first edge after `diff` rises, loads at the
// second and clears the bit at the third: the spare is ready three clocks
// after its grant.
//
// `perfect` holds the perfect genomes of the four neighbouring working
// cells, indexed by the direction code of this spare relative to each.
// Loading and clearing the bit follow the design; the read-back check is
// this implementation's addition.
module differentiation_unit
  import ftds_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   diff,
  input  dir_e   dir,
  input  func_e  perfect [NDIR],
  input  func_e  cell_genome,
  output logic   load,
  output func_e  genome,
  output logic   diff_clr
);
  typedef enum logic [1:0] {DU_IDLE, DU_LOAD, DU_CHECK} du_state_e;
  du_state_e state_q;

  assign genome   = perfect[dir];
  assign load     = (state_q == DU_LOAD);
  assign diff_clr = (state_q == DU_CHECK) && (cell_genome == genome);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= DU_IDLE;
    end else begin
      unique case (state_q)
        DU_IDLE:  if (diff) state_q <= DU_LOAD;
        DU_LOAD:  state_q <= DU_CHECK;
        DU_CHECK: state_q <= (cell_genome == genome) ? DU_IDLE : DU_LOAD;
        default:  state_q <= DU_IDLE;
      endcase
    end
  end
endmodule
