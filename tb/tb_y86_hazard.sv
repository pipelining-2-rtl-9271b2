// tb_y86_hazard: random fetch/decode/execute icodes and register numbers;
// the expected controls are derived from the rules (load/use: stall F and D,
// bubble E; jump in fetch with an OPq in decode or execute: hold pc, bubble
// D; jump in fetch otherwise: go; halted: freeze all).
module tb_y86_hazard;
  import y86_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  icode_t Fi, Di, Ei;
  reg_t sA, sB, Em;
  logic halted;
  logic Fs, Ds, Db, Eb, Ms, Ws, pj, lu, cs;

  y86_hazard dut (.f_icode(Fi), .D_icode(Di), .E_icode(Ei), .d_srcA(sA), .d_srcB(sB), .E_dstM(Em), .halted,
                  .F_stall(Fs), .D_stall(Ds), .D_bubble(Db), .E_bubble(Eb), .M_stall(Ms),
                  .W_stall(Ws), .jump_go(pj), .load_use(lu), .ctrl_stall(cs));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10000; t++) begin
      logic elu, ecs;
      logic [8:0] exp_v, got_v;
      Fi = icode_t'($urandom_range(0, 7)); Di = icode_t'($urandom_range(0, 7)); Ei = icode_t'($urandom_range(0, 7));
      Em = reg_t'($urandom_range(0, 15));
      sA = ($urandom_range(0, 2) == 0) ? Em : reg_t'($urandom_range(0, 15));
      sB = ($urandom_range(0, 2) == 0) ? Em : reg_t'($urandom_range(0, 15));
      halted = ($urandom_range(0, 9) == 0);
      elu = (Ei == I_MRMOVQ) && Em != 4'hF && (Em == sA || Em == sB);
      ecs = (Fi == I_JXX) && (Di == I_OPQ || Ei == I_OPQ);
      if (halted)
        exp_v = {1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b0};
      else
        exp_v = {elu || ecs, elu, !elu && ecs, elu, 1'b0, 1'b0,
                 !elu && !ecs && (Fi == I_JXX), elu, ecs};
      @(posedge clk); #1;
      got_v = {Fs, Ds, Db, Eb, Ms, Ws, pj, lu, cs};
      checks++;
      if (got_v !== exp_v) begin
        failures++; $display("FAIL F %0d D %0d E %0d got %b exp %b", Fi, Di, Ei, got_v, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
