// tb_fault_detection_unit: drives the unit with results that are right,
// wrong once (transient), wrong on a stale result, and wrong twice in a row
// (permanent). Checks the corrected result, the correction flag, the error
// location, the genome-refresh request and the timing of the sticky
// permanent-fault signal (one clock after the second wrong result).
module tb_fault_detection_unit;
  import ftds_pkg::*;
  localparam int unsigned W  = 8;
  localparam int unsigned N  = 2 * W;
  localparam int unsigned LW = $clog2(N);

  logic clk = 0, rst_n = 0;
  func_e          perfect;
  logic [W-1:0]   a_q, b_q;
  logic           res_valid, stale;
  logic [N-1:0]   dp_res, result;
  logic           corrected, refresh, fault;
  logic [LW-1:0]  err_loc;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fault_detection_unit #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .perfect(perfect), .a_q(a_q), .b_q(b_q),
    .res_valid(res_valid), .dp_res(dp_res), .stale(stale), .result(result),
    .corrected(corrected), .err_loc(err_loc), .refresh(refresh), .fault(fault));

  function automatic logic [N-1:0] model(func_e f, logic [W-1:0] x, logic [W-1:0] z);
    case (f)
      FUNC_ADD: return N'(int'(x) + int'(z));
      FUNC_SUB: return N'(int'(x) - int'(z));
      FUNC_MUL: return N'(int'(x) * int'(z));
      default:  return N'(int'(x) * (1 << (int'(z) % W)));
    endcase
  endfunction

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Present one result for one clock: err is XORed onto the correct value.
  // Checks the combinational outputs, then advances one clock.
  task automatic present(logic v, logic [N-1:0] err, logic stl,
                         logic exp_corr, logic exp_refresh);
    @(negedge clk);
    perfect   = func_e'($urandom % 4);
    a_q       = W'($urandom);
    b_q       = W'($urandom);
    res_valid = v;
    stale     = stl;
    dp_res    = model(perfect, a_q, b_q) ^ err;
    #1;
    expect_bit("corrected", corrected, exp_corr);
    expect_bit("refresh", refresh, exp_refresh);
    checks++;
    if (v && result !== model(perfect, a_q, b_q)) begin
      failures++;
      $display("FAIL result %h expected %h", result, model(perfect, a_q, b_q));
    end
    if (exp_corr) begin
      int lo;
      lo = 0;
      for (int i = N - 1; i >= 0; i--) if (err[i]) lo = i;
      checks++;
      if (int'(err_loc) != lo) begin
        failures++;
        $display("FAIL err_loc %0d expected %0d", err_loc, lo);
      end
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
    res_valid = 0; stale = 0; dp_res = '0; a_q = '0; b_q = '0; perfect = FUNC_ADD;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clean results
    repeat (10) present(1, '0, 0, 0, 0);
    expect_bit("fault after clean", fault, 0);
    // invalid cycle with garbage: no flag
    present(0, 16'h00f0, 0, 0, 0);
    // transient: one wrong, then right
    present(1, 16'h0010, 0, 1, 1);
    present(1, '0, 0, 0, 0);
    @(negedge clk); expect_bit("fault after transient", fault, 0);
    // wrong, then wrong but stale (computed before refresh), then right
    present(1, 16'h8000, 0, 1, 1);
    present(1, 16'h0300, 1, 1, 0);
    present(1, '0, 0, 0, 0);
    @(negedge clk); expect_bit("fault after stale retry", fault, 0);
    // permanent: wrong, right-but-stale, wrong again after refresh
    present(1, 16'h0001, 0, 1, 1);
    present(1, '0, 1, 0, 0);
    expect_bit("fault not yet", fault, 0);
    present(1, 16'h0404, 0, 1, 0);
    @(negedge clk); expect_bit("fault after second error", fault, 1);
    // permanent state: still corrects, no further refresh, fault sticky
    present(1, 16'h0002, 0, 1, 0);
    present(1, '0, 0, 0, 0);
    @(negedge clk); expect_bit("fault sticky", fault, 1);
    // reset clears
    rst_n = 0;
    @(negedge clk); rst_n = 1;
    @(negedge clk); expect_bit("fault after reset", fault, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
