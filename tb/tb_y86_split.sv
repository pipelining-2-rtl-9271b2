// tb_y86_split: builds each instruction form from random fields, places it
// among random bytes and checks icode, ifun, rA, rB, valC, valP and valid;
// invalid icodes must give a one-byte nop.
module tb_y86_split;
  import y86_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [79:0] ib;
  word_t pc, valC, valP;
  icode_t icode;
  logic [3:0] ifun;
  reg_t rA, rB;
  logic valid;

  y86_split dut (.ibytes(ib), .pc, .icode, .ifun, .rA, .rB, .valC, .valP, .valid);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string w, word_t g, word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %0h exp %0h (ib %0h)", w, g, e, ib); end
  endtask

  initial begin
    for (int t = 0; t < 5000; t++) begin
      automatic logic [3:0] ic = 4'($urandom_range(0, 15)), fn = 4'($urandom);
      automatic logic [3:0] a = 4'($urandom), b = 4'($urandom);
      automatic logic [63:0] c = {$urandom, $urandom};
      int len; logic regs, v; logic [63:0] ec;
      ib = {$urandom, $urandom, 16'($urandom)};
      pc = 64'($urandom);
      ib[7:0] = {ic, fn};
      v = 1; regs = 0; ec = 0;
      case (ic)
        4'h0, 4'h1: len = 1;
        4'h2, 4'h6: begin len = 2; regs = 1; ib[15:8] = {a, b}; end
        4'h3, 4'h4, 4'h5: begin len = 10; regs = 1; ib[15:8] = {a, b}; ib[79:16] = c; ec = c; end
        4'h7: begin len = 9; ib[71:8] = c; ec = c; end
        default: begin len = 1; v = 0; end
      endcase
      @(posedge clk); #1;
      check("valid", 64'(valid), 64'(v));
      check("icode", 64'(icode), v ? 64'(ic) : 64'(I_NOP));
      check("ifun", 64'(ifun), v ? 64'(fn) : 0);
      check("rA", 64'(rA), regs ? 64'(a) : 64'hF);
      check("rB", 64'(rB), regs ? 64'(b) : 64'hF);
      check("valC", valC, ec);
      check("valP", valP, pc + 64'(len));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
