// tb_y86_alu: random and corner operands for add, sub, and, xor; checks
// valE = aluB OP aluA and the ZF, SF, OF flags computed independently (OF
// from the sign of the exact 65-bit signed result).
module tb_y86_alu;
  import y86_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  word_t a, b, e;
  logic [3:0] fun;
  cc_t cc;

  y86_alu dut (.aluA(a), .aluB(b), .fun, .valE(e), .cc_out(cc));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pick();
    case ($urandom_range(0, 5))
      0: return 64'h7FFF_FFFF_FFFF_FFFF;
      1: return 64'h8000_0000_0000_0000;
      2: return 0;
      3: return 64'(-1);
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic signed [64:0] wide;
      word_t r; logic of;
      a = pick(); b = pick(); fun = 4'($urandom_range(0, 3));
      case (fun)
        4'd0: begin r = b + a; wide = $signed({b[63], b}) + $signed({a[63], a}); end
        4'd1: begin r = b - a; wide = $signed({b[63], b}) - $signed({a[63], a}); end
        4'd2: begin r = b & a; wide = $signed({r[63], r}); end
        default: begin r = b ^ a; wide = $signed({r[63], r}); end
      endcase
      of = (wide[64] != wide[63]);
      @(posedge clk); #1;
      checks++;
      if (e !== r || cc.zf !== (r == 0) || cc.sf !== r[63] || cc.of !== of) begin
        failures++;
        $display("FAIL fun %0d a %0h b %0h: got %0h %b%b%b", fun, a, b, e, cc.zf, cc.sf, cc.of);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
