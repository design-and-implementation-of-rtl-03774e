// tb_differentiation_unit: the testbench plays the spare cell around the
// DU: it holds the differentiation bit (cleared by diff_clr) and the cell's
// genome register (written on load). For each direction code it sets the
// bit and checks that the genome of the right neighbour is loaded and the
// bit reads 0 three clock edges after it was set. A load that the cell
// drops must make the DU load again instead of clearing the bit.
module tb_differentiation_unit;
  import ftds_pkg::*;

  logic  clk = 0, rst_n = 0;
  logic  diff;
  dir_e  dir;
  func_e perfect [NDIR];
  func_e cell_genome, genome;
  logic  load, diff_clr;
  logic  drop_load;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  differentiation_unit dut (
    .clk(clk), .rst_n(rst_n), .diff(diff), .dir(dir), .perfect(perfect),
    .cell_genome(cell_genome), .load(load), .genome(genome), .diff_clr(diff_clr));

  // the spare cell's registers (also set by the stimulus below)
  always @(posedge clk) begin
    if (diff_clr) diff <= 1'b0;
    if (load && !drop_load) cell_genome <= genome;
    if (load && drop_load)  drop_load   <= 1'b0;   // lose one load only
  end

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Differentiate toward direction d; returns the clocks until diff cleared.
  task automatic differentiate(dir_e d, int drops, output int clocks);
    @(negedge clk);
    dir = d; diff = 1'b1; drop_load = (drops > 0);
    clocks = 0;
    while (diff) begin
      @(negedge clk);
      clocks++;
      if (clocks > 20) break;
    end
    checks++;
    if (cell_genome !== perfect[d]) begin
      failures++;
      $display("FAIL dir %0d: genome %s expected %s", d, cell_genome.name(), perfect[d].name());
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
    int clocks;
    diff = 0; dir = DIR_L; drop_load = 0; cell_genome = FUNC_ADD;
    perfect = '{FUNC_SUB, FUNC_MUL, FUNC_SHL, FUNC_ADD};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_bit("idle load", load, 0);
    expect_bit("idle clear", diff_clr, 0);
    for (int r = 0; r < 3; r++) begin
      for (int d = 0; d < NDIR; d++) begin
        perfect[d] = func_e'($urandom % 4);
        if (perfect[d] == cell_genome) perfect[d] = func_e'(cell_genome + 2'd1);
        differentiate(dir_e'(d), 0, clocks);
        checks++;
        if (clocks != 3) begin
          failures++;
          $display("FAIL dir %0d: differentiation took %0d clocks, expected 3", d, clocks);
        end
      end
    end
    // the first load is lost: the read-back check must retry
    perfect[DIR_T] = (cell_genome == FUNC_MUL) ? FUNC_ADD : FUNC_MUL;
    differentiate(DIR_T, 1, clocks);
    checks++;
    if (clocks != 5) begin
      failures++;
      $display("FAIL retried differentiation took %0d clocks, expected 5", clocks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
