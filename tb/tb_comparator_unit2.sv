// tb_comparator_unit2: checks syndrome, location of the lowest wrong bit
// and wrong-bit count for equal words, single-bit errors at every position,
// two-bit errors and random pairs. The expected location and count are
// computed bit by bit in the testbench.
module tb_comparator_unit2;
  localparam int unsigned N  = 16;
  localparam int unsigned LW = $clog2(N);
  logic [N-1:0]  x, y, syn;
  logic [LW-1:0] loc;
  logic [LW:0]   cnt;
  int checks = 0, failures = 0;

  comparator_unit2 #(.N(N)) dut (.x(x), .y(y), .syndrome(syn), .loc(loc), .count(cnt));

  task automatic check_one(logic [N-1:0] p, logic [N-1:0] q);
    int exp_loc, exp_cnt;
    x = p; y = q;
    #1;
    exp_loc = 0; exp_cnt = 0;
    for (int i = 0; i < N; i++) if (p[i] != q[i]) exp_cnt++;
    for (int i = 0; i < N; i++) if (p[i] != q[i]) begin exp_loc = i; break; end
    checks++;
    if (syn !== (p ^ q) || int'(loc) != exp_loc || int'(cnt) != exp_cnt) begin
      failures++;
      $display("FAIL x=%h y=%h syn=%h loc=%0d(%0d) cnt=%0d(%0d)", p, q, syn, loc, exp_loc, cnt, exp_cnt);
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
    r = N'($urandom);
    check_one(r, r);
    for (int i = 0; i < N; i++) check_one(r, r ^ (N'(1) << i));
    for (int i = 0; i < N - 3; i++) check_one(r, r ^ (N'(5) << i));
    for (int i = 0; i < 300; i++) check_one(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
