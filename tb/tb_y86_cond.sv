// tb_y86_cond: all flag combinations with every jump code, compared with
// the signed comparisons the codes stand for (le, l, e, ne, ge, g), using
// flags produced by a real subtraction of random signed values.
module tb_y86_cond;
  import y86_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  cc_t cc;
  logic [3:0] ifun;
  logic cnd;

  y86_cond dut (.cc, .ifun, .cnd);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      longint x, y; logic [63:0] r; logic e;
      // flags of "subq x, y" (y - x), then the jump asks about y vs x
      x = longint'({$urandom, $urandom}) >>> $urandom_range(0, 62);
      y = ($urandom_range(0, 3) == 0) ? x : longint'({$urandom, $urandom}) >>> $urandom_range(0, 62);
      r = y - x;
      cc.zf = (r == 0); cc.sf = r[63];
      cc.of = (x[63] != y[63]) && (r[63] != y[63]);
      ifun = 4'($urandom_range(0, 7));
      case (ifun)
        0: e = 1;
        1: e = (y <= x);
        2: e = (y < x);
        3: e = (y == x);
        4: e = (y != x);
        5: e = (y >= x);
        6: e = (y > x);
        default: e = 0;
      endcase
      @(posedge clk); #1;
      checks++;
      if (cnd !== e) begin failures++; $display("FAIL ifun %0d y %0d x %0d", ifun, y, x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
