// tb_fwd_mux: random source and destination register numbers; the expected
// value is the first matching destination in priority order, else the
// register-file value; register 0xF never matches.
module tb_fwd_mux;
  import y86_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  reg_t  src;
  word_t reg_val, val;
  reg_t  dst [5];
  word_t dv  [5];
  logic  hit;
  logic [2:0] sel;

  fwd_mux #(.N(5)) dut (.src, .reg_val, .dst, .dst_val(dv), .val, .fwd_hit(hit), .fwd_sel(sel));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      word_t e; logic eh; int es;
      src = reg_t'($urandom_range(0, 15));
      reg_val = {$urandom, $urandom};
      for (int i = 0; i < 5; i++) begin
        dst[i] = ($urandom_range(0, 2) == 0) ? src : reg_t'($urandom_range(0, 15));
        dv[i] = {$urandom, $urandom};
      end
      e = reg_val; eh = 0; es = 0;
      if (src != 4'hF)
        for (int i = 0; i < 5; i++)
          if (!eh && dst[i] == src) begin e = dv[i]; eh = 1; es = i; end
      @(posedge clk); #1;
      checks++;
      if (val !== e || hit !== eh || (eh && sel !== 3'(es))) begin
        failures++;
        $display("FAIL src %0h got %0h/%0b/%0d exp %0h/%0b/%0d", src, val, hit, sel, e, eh, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
