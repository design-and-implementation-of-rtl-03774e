// tb_working_cell: runs back-to-back operations through a cell and checks
// every result against an integer model one clock after issue. It then
// upsets the genome (transient: one corrected result, genome restored, no
// fault), isolates the cell (no results), loads a new genome as a spare's
// differentiation does, and finally holds a datapath defect (permanent: the
// fault signal rises after the second wrong result, results stay correct).
module tb_working_cell;
  import ftds_pkg::*;
  localparam int unsigned W  = 8;
  localparam int unsigned N  = 2 * W;
  localparam int unsigned LW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic           en, load_genome, valid_in, valid_out, corrected, fault;
  func_e          genome_in, perfect, genome;
  logic [W-1:0]   a, b;
  logic [1:0]     fi_genome;
  logic [N-1:0]   fi_stuck, result;
  logic [LW-1:0]  err_loc;
  int checks = 0, failures = 0;
  int n_corr = 0;

  logic         pend_v;
  logic [N-1:0] pend_exp;

  always #5 clk = ~clk;

  working_cell #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .reset_genome(FUNC_MUL),
    .load_genome(load_genome), .genome_in(genome_in), .perfect(perfect),
    .valid_in(valid_in), .a(a), .b(b), .fi_genome(fi_genome), .fi_stuck(fi_stuck),
    .valid_out(valid_out), .result(result), .corrected(corrected),
    .err_loc(err_loc), .fault(fault), .genome(genome));

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

  // One clock: check what was issued in the previous clock, then drive.
  task automatic step(logic v, logic [W-1:0] x = W'($urandom), logic [W-1:0] z = W'($urandom));
    @(negedge clk);
    expect_bit("valid_out", valid_out, pend_v);
    if (pend_v) begin
      checks++;
      if (result !== pend_exp) begin
        failures++;
        $display("FAIL result %h expected %h at %0t", result, pend_exp, $time);
      end
      if (corrected) n_corr++;
    end
    valid_in = v; a = x; b = z;
    pend_v   = v & en;
    pend_exp = model(perfect, x, z);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; load_genome = 0; genome_in = FUNC_ADD; perfect = FUNC_MUL;
    valid_in = 0; a = '0; b = '0; fi_genome = '0; fi_stuck = '0;
    pend_v = 0; pend_exp = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    checks++; if (genome !== FUNC_MUL) begin failures++; $display("FAIL reset genome"); end
    // clean back-to-back operations
    repeat (20) step(1);
    step(0);
    checks++; if (n_corr != 0) begin failures++; $display("FAIL spurious correction"); end
    // transient: flip the genome, then keep operating
    @(negedge clk); fi_genome = 2'b01; valid_in = 0; pend_v = 0;
    @(negedge clk); fi_genome = 2'b00;
    checks++; if (genome !== FUNC_SHL) begin failures++; $display("FAIL upset not applied"); end
    step(1, 8'd13, 8'd3);   // computed with the upset genome
    step(1, 8'd9, 8'd10);   // computed in the refresh clock (stale)
    repeat (5) step(1);
    step(0);
    checks++; if (n_corr < 1) begin failures++; $display("FAIL transient not corrected"); end
    expect_bit("no fault after transient", fault, 0);
    checks++; if (genome !== FUNC_MUL) begin failures++; $display("FAIL genome not refreshed"); end
    // isolation: en = 0, operations ignored
    en = 0;
    repeat (4) step(1);
    step(0);
    en = 1;
    // differentiation-style load of a new genome
    @(negedge clk); load_genome = 1; genome_in = FUNC_SUB; perfect = FUNC_SUB;
    @(negedge clk); load_genome = 0;
    checks++; if (genome !== FUNC_SUB) begin failures++; $display("FAIL genome load"); end
    n_corr = 0;
    repeat (10) step(1);
    step(0);
    checks++; if (n_corr != 0) begin failures++; $display("FAIL correction after load"); end
    // permanent defect: hold a stuck mask on the datapath
    fi_stuck = 16'h0020;
    step(1);
    step(0);
    step(1);
    step(0);
    @(negedge clk);
    expect_bit("fault after repeated error", fault, 1);
    checks++; if (n_corr != 2) begin failures++; $display("FAIL corrections %0d expected 2", n_corr); end
    checks++; if (err_loc !== LW'(5)) begin failures++; $display("FAIL err_loc %0d", err_loc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
