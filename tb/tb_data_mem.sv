// tb_data_mem: random mix of instructions in the memory stage; only rmmovq
// may write (eight bytes, little-endian, any alignment), only mrmovq reads
// (other icodes give 0 on rdata), checked against a byte-array model.
module tb_data_mem;
  import y86_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  icode_t icode;
  word_t addr, wdata, rdata, ld_addr, ld_data, dbg_addr, dbg_data;
  logic rd, wr, ld_we;
  logic [7:0] model [256];

  data_mem #(.DEPTH(256)) dut (.clk, .icode, .addr, .wdata, .rdata, .mem_read(rd), .mem_write(wr),
                               .ld_we, .ld_addr, .ld_data, .dbg_addr, .dbg_data);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t rd_model(word_t a);
    word_t v;
    for (int i = 0; i < 8; i++) v[8*i +: 8] = model[8'(a + 64'(i))];
    return v;
  endfunction

  initial begin
    icode = I_NOP; addr = 0; wdata = 0; dbg_addr = 0;
    ld_we = 1;
    for (int a = 0; a < 256; a += 8) begin
      ld_addr = 64'(a); ld_data = {$urandom, $urandom};
      for (int i = 0; i < 8; i++) model[a + i] = ld_data[8*i +: 8];
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int t = 0; t < 3000; t++) begin
      icode = icode_t'($urandom_range(0, 7));
      addr = 64'($urandom_range(0, 255));
      wdata = {$urandom, $urandom};
      dbg_addr = 64'($urandom_range(0, 255));
      #1;
      checks++;
      if (rd !== (icode == I_MRMOVQ) || wr !== (icode == I_RMMOVQ)) begin
        failures++; $display("FAIL enables for icode %0d", icode);
      end
      checks++;
      if (rdata !== (icode == I_MRMOVQ ? rd_model(addr) : 64'd0)) begin
        failures++; $display("FAIL read at %0d", addr);
      end
      checks++;
      if (dbg_data !== rd_model(dbg_addr)) begin failures++; $display("FAIL dbg read"); end
      @(posedge clk); #1;
      if (icode == I_RMMOVQ)
        for (int i = 0; i < 8; i++) model[8'(addr + 64'(i))] = wdata[8*i +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
