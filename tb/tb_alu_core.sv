// tb_alu_core: self-checking test of the cell datapath. Every function is
// applied to corner operands and to random operands; the expected value is
// computed with integer arithmetic in the testbench.
module tb_alu_core;
  import ftds_pkg::*;
  localparam int unsigned W = 8;

  func_e          func;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] y;
  int checks = 0, failures = 0;

  alu_core #(.W(W)) dut (.func(func), .a(a), .b(b), .y(y));

  function automatic logic [2*W-1:0] model(func_e f, logic [W-1:0] x, logic [W-1:0] z);
    case (f)
      FUNC_ADD: return (2*W)'(int'(x) + int'(z));
      FUNC_SUB: return (2*W)'(int'(x) - int'(z));
      FUNC_MUL: return (2*W)'(int'(x) * int'(z));
      default:  return (2*W)'(int'(x) * (1 << (int'(z) % W)));
    endcase
  endfunction

  task automatic check_one(func_e f, logic [W-1:0] x, logic [W-1:0] z);
    func = f; a = x; b = z;
    #1;
    checks++;
    if (y !== model(f, x, z)) begin
      failures++;
      $display("FAIL func=%s a=%0d b=%0d y=%0h exp=%0h", f.name(), x, z, y, model(f, x, z));
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
    for (int f = 0; f < 4; f++) begin
      check_one(func_e'(f), '0, '0);
      check_one(func_e'(f), '1, '1);
      check_one(func_e'(f), '0, '1);
      check_one(func_e'(f), 8'd200, 8'd7);
      for (int i = 0; i < 500; i++) check_one(func_e'(f), W'($urandom), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
