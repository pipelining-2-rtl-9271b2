// tb_instr_mem: loads random bytes and checks the ten-byte and two-byte fetch
// windows at every pc, including wrap-around at the end of memory.
module tb_instr_mem;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] pc;
  logic [79:0] b10;
  logic [15:0] b2;
  logic        ld_we;
  logic [7:0]  ld_addr, ld_data;
  logic [7:0]  model [256];

  instr_mem #(.DEPTH(256), .FETCH_BYTES(10)) dut10 (.clk, .pc, .bytes_out(b10), .ld_we, .ld_addr, .ld_data);
  instr_mem #(.DEPTH(256), .FETCH_BYTES(2))  dut2  (.clk, .pc, .bytes_out(b2),  .ld_we, .ld_addr, .ld_data);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc = 0;
    ld_we = 1;
    for (int a = 0; a < 256; a++) begin
      ld_addr = 8'(a); ld_data = 8'($urandom); model[a] = ld_data;
      @(posedge clk); #1;
    end
    ld_we = 0;
    for (int a = 0; a < 256; a++) begin
      pc = 64'(a); #1;
      for (int i = 0; i < 10; i++) begin
        checks++;
        if (b10[8*i +: 8] !== model[(a + i) % 256]) begin
          failures++; $display("FAIL pc %0d byte %0d", a, i);
        end
      end
      checks++;
      if (b2 !== {model[(a + 1) % 256], model[a]}) begin failures++; $display("FAIL 2-byte pc %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
