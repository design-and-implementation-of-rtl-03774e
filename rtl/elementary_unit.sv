// elementary_unit: reference for the fault detection unit. It computes the
// same four operations as alu_core, but from bit-level primitives so that it
// does not share the structure of the cell datapath: a ripple-carry chain of
// full adders (subtraction as a + ~b + 1), an AND-array multiplier whose
// partial products are summed row by row, and a barrel shifter of log2(W)
// mux stages. It is driven by the perfect genome, not by the cell's own
// (possibly corrupted) genome, so its result is the expected value of the
// cell. Combinational; result format as alu_core.
// The design uses an elementary unit as reference for its comparators; the
// particular gate-level structure is this implementation's choice.
module elementary_unit
  import ftds_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  func_e              func,
  input  logic [W-1:0]       a,
  input  logic [W-1:0]       b,
  output logic [2*W-1:0]     y
);
  localparam int unsigned N  = 2 * W;
  localparam int unsigned SW = (W > 1) ? $clog2(W) : 1;

  // Ripple-carry adder over N bits built from full adders.
  function automatic logic [N-1:0] ripple_add(input logic [N-1:0] x,
                                              input logic [N-1:0] z,
                                              input logic         cin);
    logic [N-1:0] s;
    logic         c;
    c = cin;
    for (int i = 0; i < N; i++) begin
      s[i] = x[i] ^ z[i] ^ c;
      c    = (x[i] & z[i]) | (x[i] & c) | (z[i] & c);
    end
    return s;
  endfunction

  logic [N-1:0] a_ext, b_ext;
  logic [N-1:0] sum, diff, prod, shl;

  assign a_ext = {{W{1'b0}}, a};
  assign b_ext = {{W{1'b0}}, b};

  assign sum  = ripple_add(a_ext, b_ext, 1'b0);
  assign diff = ripple_add(a_ext, ~b_ext, 1'b1);

  // Shift-and-add multiplier: row i is (a AND b[i]) shifted left by i.
  always_comb begin
    logic [N-1:0] acc, row;
    acc = '0;
    for (int i = 0; i < W; i++) begin
      row = '0;
      for (int j = 0; j < W; j++) row[i+j] = a[j] & b[i];
      acc = ripple_add(acc, row, 1'b0);
    end
    prod = acc;
  end

  // Logarithmic shifter: stage k shifts by 2**k when b[k] is set.
  always_comb begin
    logic [N-1:0] s;
    s = a_ext;
    for (int k = 0; k < SW; k++) begin
      if (b[k]) s = s << (1 << k);
    end
    shl = s;
  end

  always_comb begin
    unique case (func)
      FUNC_ADD: y = sum;
      FUNC_SUB: y = diff;
      FUNC_MUL: y = prod;
      FUNC_SHL: y = shl;
      default:  y = '0;
    endcase
  end
endmodule
