// tb_regfile: random writes through the dstE, dstM and load ports, checked
// against a model array on both read ports and the inspection port; also
// checks that register 0xF reads 0, ignores writes, and that a read in the
// cycle of a write returns the old value.
module tb_regfile;
  import y86_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  reg_t  srcA, srcB, dstE, dstM, ld_addr, dbg_addr;
  word_t rA, rB, wE, wM, ld_data, dbg;
  logic  ld_we;
  word_t model [16];

  regfile dut (.clk, .srcA, .srcB, .rdataA(rA), .rdataB(rB), .dstE, .wdataE(wE),
               .dstM, .wdataM(wM), .ld_we, .ld_addr, .ld_data, .dbg_addr, .dbg_data(dbg));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string w, word_t g, word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s got %0h exp %0h", w, g, e); end
  endtask

  initial begin
    dstE = RNONE; dstM = RNONE; wE = 0; wM = 0; srcA = 0; srcB = 0; dbg_addr = 0;
    ld_we = 1;
    for (int r = 0; r < 15; r++) begin
      ld_addr = reg_t'(r); ld_data = {$urandom, $urandom}; model[r] = ld_data;
      @(posedge clk); #1;
    end
    model[15] = 0;
    ld_we = 0;
    for (int r = 0; r < 16; r++) begin
      srcA = reg_t'(r); srcB = reg_t'(15 - r); dbg_addr = reg_t'(r); #1;
      check("load A", rA, model[r]); check("load B", rB, model[15 - r]);
      check("dbg", dbg, model[r]);
    end
    for (int t = 0; t < 1000; t++) begin
      dstE = reg_t'($urandom_range(0, 15)); dstM = reg_t'($urandom_range(0, 15));
      wE = {$urandom, $urandom}; wM = {$urandom, $urandom};
      srcA = dstE; srcB = reg_t'($urandom_range(0, 15)); #1;
      check("read old value during write", rA, model[srcA]);
      check("read B", rB, model[srcB]);
      @(posedge clk); #1;
      if (dstE != RNONE) model[dstE] = wE;
      if (dstM != RNONE) model[dstM] = wM;
      #1;
      check("after write", rA, model[srcA]);
      check("R15 reads zero", model[15], 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
