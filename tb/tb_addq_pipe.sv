// tb_addq_pipe: cycle-level test of the four-stage addq processor.
//
// Two copies run side by side: one with forwarding, one with stalling.
// Registers start at R[i] = 100*i (so %r8 = 800, %r9 = 900, %rax = 0).
// Three short programs are checked cycle by cycle against hand-worked
// pipeline tables (contents of fD, dE, eW and the pc in each cycle):
//   1. addq %r8,%r9 ; addq %r9,%r8          forwarding from execute
//   2. addq %r8,%r9 ; addq %rax,%rax ; addq %r9,%r10
//                                           forwarding from writeback
//   3. addq %r8,%r9 ; addq %r9,%r8 ; addq %r10,%r11
//                                           stalling: two bubbles
// Then random addq programs run on both copies and the final registers are
// compared with a sequential model; the forwarding copy must finish n
// instructions in n + 3 cycles.
module tb_addq_pipe;
  import y86_pkg::*;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        ld_we;
  logic [7:0]  ld_addr, ld_data;
  logic        rf_we;
  reg_t        rf_addr;
  word_t       rf_data;
  reg_t        dbg_addr;
  word_t       dbg_f, dbg_s;
  word_t       pc_f, pc_s;
  aq_fd_t      D_f, D_s;
  aq_de_t      E_f, E_s;
  aq_ew_t      W_f, W_s;
  logic        st_f, fe_f, fw_f, st_s, fe_s, fw_s;
  int          n_stall = 0, n_fwd_e = 0, n_fwd_w = 0;

  addq_pipe #(.FORWARD(1'b1)) dut_f (
    .clk, .rst, .imem_ld_we(ld_we), .imem_ld_addr(ld_addr), .imem_ld_data(ld_data),
    .rf_ld_we(rf_we), .rf_ld_addr(rf_addr), .rf_ld_data(rf_data),
    .rf_dbg_addr(dbg_addr), .rf_dbg_data(dbg_f),
    .F_pc(pc_f), .D_q(D_f), .E_q(E_f), .W_q(W_f),
    .ev_stall(st_f), .ev_fwd_e(fe_f), .ev_fwd_w(fw_f)
  );

  addq_pipe #(.FORWARD(1'b0)) dut_s (
    .clk, .rst, .imem_ld_we(ld_we), .imem_ld_addr(ld_addr), .imem_ld_data(ld_data),
    .rf_ld_we(rf_we), .rf_ld_addr(rf_addr), .rf_ld_data(rf_data),
    .rf_dbg_addr(dbg_addr), .rf_dbg_data(dbg_s),
    .F_pc(pc_s), .D_q(D_s), .E_q(E_s), .W_q(W_s),
    .ev_stall(st_s), .ev_fwd_e(fe_s), .ev_fwd_w(fw_s)
  );

  always @(posedge clk) begin
    if (st_s) n_stall++;
    if (fe_f) n_fwd_e++;
    if (fw_f) n_fwd_w++;
    if (st_f) begin failures++; $display("FAIL forwarding copy stalled"); end
    if (fe_s || fw_s) begin failures++; $display("FAIL stalling copy forwarded"); end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, got, got, exp, exp);
    end
  endtask

  // program: list of (rA,rB) pairs; the rest of memory is "F,F" (does nothing)
  task automatic load(input logic [7:0] prog [], input int n);
    rst = 1'b1;
    rf_we = 1'b0;
    ld_we = 1'b1;
    for (int a = 0; a < 256; a++) begin
      ld_addr = 8'(a);
      ld_data = (a % 2 == 0) ? 8'h60 : ((a / 2 < n) ? prog[a / 2] : 8'hFF);
      @(posedge clk); #1;
    end
    ld_we = 1'b0;
    rf_we = 1'b1;
    for (int r = 0; r < 15; r++) begin
      rf_addr = reg_t'(r);
      rf_data = 64'(100 * r);
      @(posedge clk); #1;
    end
    rf_we = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;   // now in cycle 0
  endtask

  task automatic next_cycle();
    @(posedge clk); #1;
  endtask

  function automatic logic [7:0] rr(int a, int b);
    return {4'(a), 4'(b)};
  endfunction

  logic [7:0] prog [];
  word_t      model [16];
  int         n;

  initial begin
    rst = 1'b1; ld_we = 1'b0; rf_we = 1'b0; dbg_addr = '0;
    ld_addr = '0; ld_data = '0; rf_addr = '0; rf_data = '0;

    // ---- 1: forwarding from the end of execute ----
    prog = new[2]; prog[0] = rr(8, 9); prog[1] = rr(9, 8);
    load(prog, 2);
    check("t1 c0 pc", pc_f, 0);
    next_cycle();
    check("t1 c1 pc", pc_f, 2);
    check("t1 c1 D.rA", D_f.rA, 8); check("t1 c1 D.rB", D_f.rB, 9);
    next_cycle();
    check("t1 c2 D.rA", D_f.rA, 9); check("t1 c2 D.rB", D_f.rB, 8);
    check("t1 c2 E.valA", E_f.valA, 800); check("t1 c2 E.valB", E_f.valB, 900);
    check("t1 c2 E.dstE", E_f.dstE, 9);
    next_cycle();
    check("t1 c3 E.valA (forwarded)", E_f.valA, 1700);
    check("t1 c3 E.valB", E_f.valB, 800);
    check("t1 c3 E.dstE", E_f.dstE, 8);
    check("t1 c3 W.valE", W_f.valE, 1700); check("t1 c3 W.dstE", W_f.dstE, 9);
    next_cycle();
    check("t1 c4 W.valE", W_f.valE, 2500); check("t1 c4 W.dstE", W_f.dstE, 8);
    next_cycle();
    dbg_addr = 4'd9; #1 check("t1 R9", dbg_f, 1700);
    dbg_addr = 4'd8; #1 check("t1 R8", dbg_f, 2500);

    // ---- 2: forwarding from writeback ----
    prog = new[3]; prog[0] = rr(8, 9); prog[1] = rr(0, 0); prog[2] = rr(9, 10);
    load(prog, 3);
    next_cycle(); next_cycle();
    check("t2 c2 pc", pc_f, 4);
    check("t2 c2 D.rA", D_f.rA, 0);
    next_cycle();
    check("t2 c3 D.rA", D_f.rA, 9); check("t2 c3 D.rB", D_f.rB, 10);
    check("t2 c3 E.dstE", E_f.dstE, 0);
    check("t2 c3 W.valE", W_f.valE, 1700); check("t2 c3 W.dstE", W_f.dstE, 9);
    next_cycle();
    check("t2 c4 E.valA (forwarded)", E_f.valA, 1700);
    check("t2 c4 E.valB", E_f.valB, 1000);
    check("t2 c4 W.valE", W_f.valE, 0); check("t2 c4 W.dstE", W_f.dstE, 0);
    next_cycle();
    check("t2 c5 W.valE", W_f.valE, 2700); check("t2 c5 W.dstE", W_f.dstE, 10);
    next_cycle();
    dbg_addr = 4'd10; #1 check("t2 R10", dbg_f, 2700);

    // ---- 3: stalling ----
    prog = new[3]; prog[0] = rr(8, 9); prog[1] = rr(9, 8); prog[2] = rr(10, 11);
    load(prog, 3);
    check("t3 c0 pc", pc_s, 0);
    next_cycle();
    check("t3 c1 pc", pc_s, 2);
    check("t3 c1 D", D_s, {4'd8, 4'd9});
    next_cycle();
    check("t3 c2 pc", pc_s, 2);
    check("t3 c2 D", D_s, {4'hF, 4'hF});
    check("t3 c2 E.valA", E_s.valA, 800); check("t3 c2 E.valB", E_s.valB, 900);
    check("t3 c2 E.dstE", E_s.dstE, 9);
    next_cycle();
    check("t3 c3 pc", pc_s, 2);
    check("t3 c3 D", D_s, {4'hF, 4'hF});
    check("t3 c3 E.dstE", E_s.dstE, 4'hF);
    check("t3 c3 W.valE", W_s.valE, 1700); check("t3 c3 W.dstE", W_s.dstE, 9);
    next_cycle();
    check("t3 c4 pc", pc_s, 4);
    check("t3 c4 D", D_s, {4'd9, 4'd8});
    check("t3 c4 E.dstE", E_s.dstE, 4'hF); check("t3 c4 W.dstE", W_s.dstE, 4'hF);
    next_cycle();
    check("t3 c5 D", D_s, {4'd10, 4'd11});
    check("t3 c5 E.valA", E_s.valA, 1700); check("t3 c5 E.valB", E_s.valB, 800);
    check("t3 c5 E.dstE", E_s.dstE, 8);
    next_cycle();
    check("t3 c6 E.valA", E_s.valA, 1000); check("t3 c6 E.valB", E_s.valB, 1100);
    check("t3 c6 E.dstE", E_s.dstE, 11);
    check("t3 c6 W.valE", W_s.valE, 2500); check("t3 c6 W.dstE", W_s.dstE, 8);

    // ---- 4: random programs against a sequential model ----
    for (int t = 0; t < 20; t++) begin
      n = 5 + $urandom_range(0, 30);
      prog = new[n];
      for (int i = 0; i < n; i++)
        prog[i] = {4'($urandom_range(0, 15)), 4'($urandom_range(0, 15))};
      for (int r = 0; r < 16; r++) model[r] = 64'(100 * r);
      for (int i = 0; i < n; i++) begin
        logic [3:0] a, b;
        a = prog[i][7:4]; b = prog[i][3:0];
        if (b != 4'hF) model[b] = (a == 4'hF ? 64'd0 : model[a]) + model[b];
      end
      load(prog, n);
      repeat (n + 3) next_cycle();
      for (int r = 0; r < 15; r++) begin
        dbg_addr = reg_t'(r); #1;
        check($sformatf("rand%0d fwd R%0d after n+3 cycles", t, r), dbg_f, model[r]);
      end
      repeat (2 * n + 3) next_cycle();
      for (int r = 0; r < 15; r++) begin
        dbg_addr = reg_t'(r); #1;
        check($sformatf("rand%0d stall R%0d", t, r), dbg_s, model[r]);
      end
    end

    checks++;
    if (n_stall == 0 || n_fwd_e == 0 || n_fwd_w == 0) begin
      failures++;
      $display("FAIL mechanism never seen: stall=%0d fwd_e=%0d fwd_w=%0d", n_stall, n_fwd_e, n_fwd_w);
    end
    $display("stalls=%0d forwards_from_execute=%0d forwards_from_writeback=%0d", n_stall, n_fwd_e, n_fwd_w);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
