// alu_core: datapath of a cell. Performs the operation named by the cell's
// genome on two W-bit operands and returns a 2W-bit result:
//   FUNC_ADD  a + b            (zero-extended, carry in bit W)
//   FUNC_SUB  a - b            (two's complement, sign-extended to 2W)
//   FUNC_MUL  a * b            (unsigned, full 2W-bit product)
//   FUNC_SHL  a << b[log2 W-1:0] (logical left shift into 2W bits)
// Purely combinational; the cell registers the result. The four operations
// are those of the design's ALU application; the widths and the exact shift
// and sign conventions are this implementation's choices.
module alu_core
  import ftds_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  func_e              func,
  input  logic [W-1:0]       a,
  input  logic [W-1:0]       b,
  output logic [2*W-1:0]     y
);
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1;

  logic [2*W-1:0] a_ext, b_ext;
  assign a_ext = {{W{1'b0}}, a};
  assign b_ext = {{W{1'b0}}, b};

  always_comb begin
    unique case (func)
      FUNC_ADD: y = a_ext + b_ext;
      FUNC_SUB: y = a_ext - b_ext;
      FUNC_MUL: y = a_ext * b_ext;
      FUNC_SHL: y = a_ext << b[SW-1:0];
      default:  y = '0;
    endcase
  end
endmodule
