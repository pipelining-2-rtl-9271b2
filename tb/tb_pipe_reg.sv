// tb_pipe_reg: random stall/bubble/data sequences against a model: reset and
// bubble load the bubble value, stall holds (and wins over bubble), otherwise
// the register follows d one cycle later.
module tb_pipe_reg;
  import y86_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rst, stall, bubble;
  fd_t  d, q, model;

  pipe_reg #(.T(fd_t), .BUBBLE(FD_BUBBLE)) dut (.clk, .rst, .stall, .bubble, .d, .q);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; stall = 0; bubble = 0; d = '0;
    @(posedge clk); #1;
    model = FD_BUBBLE;
    checks++; if (q !== model) begin failures++; $display("FAIL reset"); end
    rst = 0;
    for (int t = 0; t < 3000; t++) begin
      stall = ($urandom_range(0, 3) == 0);
      bubble = ($urandom_range(0, 3) == 0);
      rst = ($urandom_range(0, 50) == 0);
      d.icode = icode_t'($urandom_range(0, 7)); d.ifun = 4'($urandom);
      d.rA = 4'($urandom); d.rB = 4'($urandom);
      d.valC = {$urandom, $urandom};
      @(posedge clk); #1;
      if (rst) model = FD_BUBBLE;
      else if (stall) model = model;
      else if (bubble) model = FD_BUBBLE;
      else model = d;
      checks++;
      if (q !== model) begin failures++; $display("FAIL cycle %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
