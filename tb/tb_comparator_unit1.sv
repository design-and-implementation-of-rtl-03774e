// tb_comparator_unit1: checks the mismatch flag on equal words, on words
// that differ in one bit (every position), on random words, and that an
// invalid result never raises the flag.
module tb_comparator_unit1;
  localparam int unsigned N = 16;
  logic         valid;
  logic [N-1:0] x, y;
  logic         flag;
  int checks = 0, failures = 0;

  comparator_unit1 #(.N(N)) dut (.valid(valid), .x(x), .y(y), .flag(flag));

  task automatic check_one(logic v, logic [N-1:0] p, logic [N-1:0] q);
    logic exp;
    valid = v; x = p; y = q;
    #1;
    exp = v && (p != q);
    checks++;
    if (flag !== exp) begin
      failures++;
      $display("FAIL valid=%0b x=%h y=%h flag=%0b", v, p, q, flag);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] r;
    for (int i = 0; i < 200; i++) begin
      r = N'($urandom);
      check_one(1'b1, r, r);
      check_one(1'b1, r, r ^ (N'(1) << (i % N)));
      check_one(1'b0, r, ~r);
      check_one(1'b1, r, N'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
