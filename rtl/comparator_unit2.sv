// comparator_unit2: second comparator of the fault detection unit. It finds
// where a result is wrong: `syndrome` marks every differing bit, `loc` is
// the index of the least significant differing bit and `count` the number of
// differing bits (0 when the two words agree, in which case loc is 0).
// Combinational. The design asks this unit to find the faulty data and its
// location; the output format is this implementation's choice.
module comparator_unit2 #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]           x,
  input  logic [N-1:0]           y,
  output logic [N-1:0]           syndrome,
  output logic [$clog2(N)-1:0]   loc,
  output logic [$clog2(N):0]     count
);
  assign syndrome = x ^ y;

  always_comb begin
    loc   = '0;
    count = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (syndrome[i]) loc = ($clog2(N))'(i);
    end
    for (int i = 0; i < N; i++) begin
      count = count + ($clog2(N)+1)'(syndrome[i]);
    end
  end
endmodule
