// ftds_pkg: types and constants shared by the self-repairing fault tolerant
// system.
//
// * func_e   - the genome of a cell: which of the four ALU operations it
//              performs (addition, subtraction, multiplication, shift).
// * dir_e    - direction bits of a spare cell: where the spare sits relative
//              to the working cell it replaces. The spares of a working cell
//              are tried in the order left, down, right, top, and the codes
//              follow that order (00, 01, 10, 11).
// * sc_index_t - the index bits every spare cell carries in the gene control
//              layer: state (1 = used), differentiation (1 = must copy the
//              genome of its working cell) and direction.
//
// The function set follows the ALU application of the design; the 2-bit
// genome coding and the direction coding of the left spare (00) are this
// implementation's choices.
package ftds_pkg;

  typedef enum logic [1:0] {
    FUNC_ADD = 2'b00,
    FUNC_SUB = 2'b01,
    FUNC_MUL = 2'b10,
    FUNC_SHL = 2'b11
  } func_e;

  typedef enum logic [1:0] {
    DIR_L = 2'b00,
    DIR_D = 2'b01,
    DIR_R = 2'b10,
    DIR_T = 2'b11
  } dir_e;

  typedef struct packed {
    logic state;  // 1: spare is taken (no longer available)
    logic diff;   // 1: differentiation pending
    dir_e dir;    // position of this spare relative to its working cell
  } sc_index_t;

  localparam int unsigned NDIR = 4;

endpackage
