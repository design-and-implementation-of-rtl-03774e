// tb_spare_cell: for every direction it resets the spare, requests it from
// that side alone and checks grant, index bits, the time until ready (three
// clocks after the grant) and that results follow the perfect genome of that
// side while operands offered from the other sides are ignored. It then
// requests the spare from several sides at once (collision: exactly one
// grant, lowest direction code, no later grant once taken) and holds a
// datapath defect to check that the spare reports a permanent fault and
// stays taken.
module tb_spare_cell;
  import ftds_pkg::*;
  localparam int unsigned W  = 8;
  localparam int unsigned N  = 2 * W;
  localparam int unsigned LW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [NDIR-1:0] req, grant;
  sc_index_t       idx;
  logic            ready, valid_out, corrected, fault;
  func_e           perfect  [NDIR];
  logic            valid_in [NDIR];
  logic [W-1:0]    a [NDIR];
  logic [W-1:0]    b [NDIR];
  logic [1:0]      fi_genome;
  logic [N-1:0]    fi_stuck, result;
  logic [LW-1:0]   err_loc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  spare_cell #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .req(req), .grant(grant), .idx(idx), .ready(ready),
    .perfect(perfect), .valid_in(valid_in), .a(a), .b(b), .fi_genome(fi_genome),
    .fi_stuck(fi_stuck), .valid_out(valid_out), .result(result), .corrected(corrected),
    .err_loc(err_loc), .fault(fault));

  function automatic logic [N-1:0] model(func_e f, logic [W-1:0] x, logic [W-1:0] z);
    case (f)
      FUNC_ADD: return N'(int'(x) + int'(z));
      FUNC_SUB: return N'(int'(x) - int'(z));
      FUNC_MUL: return N'(int'(x) * int'(z));
      default:  return N'(int'(x) * (1 << (int'(z) % W)));
    endcase
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 0; req = '0;
    for (int d = 0; d < NDIR; d++) begin valid_in[d] = 0; a[d] = '0; b[d] = '0; end
    @(negedge clk);
    rst_n = 1;
  endtask

  // Request from the sides in r; expect grant g; wait until ready.
  task automatic claim(logic [NDIR-1:0] r, logic [NDIR-1:0] g, int d_exp);
    int clocks;
    @(negedge clk);
    req = r;
    #1;
    expect_eq("grant", int'(grant), int'(g));
    @(negedge clk);
    req = '0;
    expect_eq("state", int'(idx.state), 1);
    expect_eq("diff", int'(idx.diff), 1);
    expect_eq("dir", int'(idx.dir), d_exp);
    clocks = 1;   // clock edges since the one that took the grant, plus one
    while (!ready && clocks < 20) begin @(negedge clk); clocks++; end
    expect_eq("clocks grant to ready", clocks - 1, 3);
    expect_eq("diff cleared", int'(idx.diff), 0);
  endtask

  // Offer operations from every side; only side d may be executed.
  task automatic run_ops(int d, int n, output int n_corr);
    logic         pend;
    logic [N-1:0] exp;
    pend = 0; exp = '0; n_corr = 0;
    for (int i = 0; i <= n; i++) begin
      @(negedge clk);
      expect_eq("valid_out", int'(valid_out), int'(pend));
      if (pend) begin
        checks++;
        if (result !== exp) begin
          failures++;
          $display("FAIL side %0d result %h expected %h", d, result, exp);
        end
        if (corrected) n_corr++;
      end
      for (int s = 0; s < NDIR; s++) begin
        valid_in[s] = (i < n) && ((s == d) || ($urandom % 2 == 1));
        a[s] = W'($urandom); b[s] = W'($urandom);
      end
      pend = valid_in[d] && ready;
      exp  = model(perfect[d], a[d], b[d]);
    end
    for (int s = 0; s < NDIR; s++) valid_in[s] = 0;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nc;
    req = '0; fi_genome = '0; fi_stuck = '0;
    perfect = '{FUNC_SUB, FUNC_MUL, FUNC_SHL, FUNC_ADD};
    for (int d = 0; d < NDIR; d++) begin valid_in[d] = 0; a[d] = '0; b[d] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int d = 0; d < NDIR; d++) begin
      do_reset();
      @(negedge clk);
      expect_eq("free after reset", int'(idx.state), 0);
      expect_eq("not ready after reset", int'(ready), 0);
      run_ops(d, 3, nc);   // not differentiated: nothing may come out
      claim(NDIR'(1) << d, NDIR'(1) << d, d);
      run_ops(d, 12, nc);
      expect_eq("no corrections", nc, 0);
    end
    // collision: down and top request together, down (01) wins
    do_reset();
    claim(4'b1010, 4'b0010, int'(DIR_D));
    @(negedge clk);
    req = 4'b1001;
    #1;
    expect_eq("no grant once taken", int'(grant), 0);
    @(negedge clk);
    req = '0;
    run_ops(int'(DIR_D), 6, nc);
    // permanent defect
    fi_stuck = 16'h0100;
    run_ops(int'(DIR_D), 4, nc);
    @(negedge clk);
    expect_eq("fault", int'(fault), 1);
    expect_eq("still taken", int'(idx.state), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
