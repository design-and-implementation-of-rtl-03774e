// comparator_unit1: first comparator of the fault detection unit. It checks
// the cell's result against the elementary unit's reference and raises
// `flag` when a valid result differs in any bit. Combinational; the fault
// detection unit acts on the flag at the next clock edge.
module comparator_unit1 #(
  parameter int unsigned N = 16
) (
  input  logic         valid,
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic         flag
);
  assign flag = valid & (|(x ^ y));
endmodule
