// tb_top: end-to-end run of both processors through the top level.
//
// addq processor: "addq %r8,%r9; addq %r9,%r8; addq %rax,%rax; addq %r8,%r10"
// with R[i] = 100*i. With forwarding the results (R9 = 1700, R8 = 2500,
// R10 = 3500) are in place n + 3 = 7 cycles after reset; a second top with
// AQ_FORWARD = 0 stalls three times and needs 10.
// Five-stage processor: a hand-assembled program that forwards from
// execute, memory and writeback, hits a load/use stall, stores and loads,
// and takes a je; results are hand-computed and it must halt in 17 cycles.
// Every mechanism's event counter must be non-zero at the end.
module tb_top;
  import y86_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // shared stimulus
  logic aq_im_we; logic [7:0] aq_im_addr, aq_im_data;
  logic y_im_we;  logic [7:0] y_im_addr, y_im_data;
  logic rf_we;    reg_t rf_addr; word_t rf_data;
  reg_t rdbg;     word_t ddbg;
  logic dm_we;    word_t dm_addr, dm_data;

  // observed
  word_t aq_rd, y_rd, y_dd, aq_pc, y_pc;
  aq_fd_t aq_D; aq_de_t aq_E; aq_ew_t aq_W;
  logic aq_st, aq_fe, aq_fw;
  logic y_halted, y_inv; cc_t y_cc;
  logic y_fe, y_fm, y_fw, y_lu, y_cs, y_jt, y_rt, y_mr, y_mw;

  top dut (
    .clk, .rst,
    .aq_imem_ld_we(aq_im_we), .aq_imem_ld_addr(aq_im_addr), .aq_imem_ld_data(aq_im_data),
    .aq_rf_ld_we(rf_we), .aq_rf_ld_addr(rf_addr), .aq_rf_ld_data(rf_data),
    .aq_rf_dbg_addr(rdbg), .aq_rf_dbg_data(aq_rd),
    .aq_F_pc(aq_pc), .aq_D_q(aq_D), .aq_E_q(aq_E), .aq_W_q(aq_W),
    .aq_ev_stall(aq_st), .aq_ev_fwd_e(aq_fe), .aq_ev_fwd_w(aq_fw),
    .y_imem_ld_we(y_im_we), .y_imem_ld_addr(y_im_addr), .y_imem_ld_data(y_im_data),
    .y_rf_ld_we(rf_we), .y_rf_ld_addr(rf_addr), .y_rf_ld_data(rf_data),
    .y_rf_dbg_addr(rdbg), .y_rf_dbg_data(y_rd),
    .y_dmem_ld_we(dm_we), .y_dmem_ld_addr(dm_addr), .y_dmem_ld_data(dm_data),
    .y_dmem_dbg_addr(ddbg), .y_dmem_dbg_data(y_dd),
    .y_halted, .y_invalid_instr(y_inv), .y_F_pc(y_pc), .y_cc_q(y_cc),
    .y_ev_fwd_e(y_fe), .y_ev_fwd_m(y_fm), .y_ev_fwd_w(y_fw), .y_ev_load_use(y_lu),
    .y_ev_ctrl_stall(y_cs), .y_ev_jump_taken(y_jt), .y_ev_retire(y_rt),
    .y_ev_mem_read(y_mr), .y_ev_mem_write(y_mw)
  );

  word_t s_rd, s_pc, s_unused_rd, s_unused_dd, s_unused_pc;
  aq_fd_t s_D; aq_de_t s_E; aq_ew_t s_W;
  logic s_st, s_fe, s_fw, s_h, s_i; cc_t s_cc;
  logic s_e0, s_e1, s_e2, s_e3, s_e4, s_e5, s_e6, s_e7, s_e8;
  int n_aq_stall = 0;

  top #(.AQ_FORWARD(1'b0)) dut_stall (
    .clk, .rst,
    .aq_imem_ld_we(aq_im_we), .aq_imem_ld_addr(aq_im_addr), .aq_imem_ld_data(aq_im_data),
    .aq_rf_ld_we(rf_we), .aq_rf_ld_addr(rf_addr), .aq_rf_ld_data(rf_data),
    .aq_rf_dbg_addr(rdbg), .aq_rf_dbg_data(s_rd),
    .aq_F_pc(s_pc), .aq_D_q(s_D), .aq_E_q(s_E), .aq_W_q(s_W),
    .aq_ev_stall(s_st), .aq_ev_fwd_e(s_fe), .aq_ev_fwd_w(s_fw),
    .y_imem_ld_we(1'b0), .y_imem_ld_addr(8'd0), .y_imem_ld_data(8'd0),
    .y_rf_ld_we(1'b0), .y_rf_ld_addr(4'd0), .y_rf_ld_data(64'd0),
    .y_rf_dbg_addr(4'd0), .y_rf_dbg_data(s_unused_rd),
    .y_dmem_ld_we(1'b0), .y_dmem_ld_addr(64'd0), .y_dmem_ld_data(64'd0),
    .y_dmem_dbg_addr(64'd0), .y_dmem_dbg_data(s_unused_dd),
    .y_halted(s_h), .y_invalid_instr(s_i), .y_F_pc(s_unused_pc), .y_cc_q(s_cc),
    .y_ev_fwd_e(s_e0), .y_ev_fwd_m(s_e1), .y_ev_fwd_w(s_e2), .y_ev_load_use(s_e3),
    .y_ev_ctrl_stall(s_e4), .y_ev_jump_taken(s_e5), .y_ev_retire(s_e6),
    .y_ev_mem_read(s_e7), .y_ev_mem_write(s_e8)
  );
  always @(posedge clk) n_aq_stall += int'(s_st);

  int n_aq_fe = 0, n_aq_fw = 0, n_fe = 0, n_fm = 0, n_fw = 0, n_lu = 0, n_cs = 0;
  int n_jt = 0, n_mr = 0, n_mw = 0;
  always @(posedge clk) begin
    n_aq_fe += int'(aq_fe); n_aq_fw += int'(aq_fw);
    n_fe += int'(y_fe); n_fm += int'(y_fm); n_fw += int'(y_fw); n_lu += int'(y_lu);
    n_cs += int'(y_cs); n_jt += int'(y_jt); n_mr += int'(y_mr); n_mw += int'(y_mw);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string w, word_t g, word_t e);
    checks++;
    if (g !== e) begin failures++; $display("FAIL %s: got %0d expected %0d", w, $signed(g), $signed(e)); end
  endtask

  logic [7:0] yimg [256];
  int         ylen;

  function automatic void put(logic [7:0] b);
    yimg[ylen] = b; ylen++;
  endfunction
  function automatic void ins_rr(logic [3:0] ic, logic [3:0] fn, logic [3:0] a, logic [3:0] b);
    put({ic, fn}); put({a, b});
  endfunction
  function automatic void ins_c(logic [3:0] ic, logic [3:0] a, logic [3:0] b, logic [63:0] c);
    put({ic, 4'h0}); put({a, b}); for (int i = 0; i < 8; i++) put(c[8*i +: 8]);
  endfunction
  function automatic void ins_j(logic [3:0] fn, logic [63:0] c);
    put({4'h7, fn}); for (int i = 0; i < 8; i++) put(c[8*i +: 8]);
  endfunction

  logic [7:0] aqprog [4] = '{8'h89, 8'h98, 8'h00, 8'h8A};
  int cyc;

  initial begin
    aq_im_we = 0; aq_im_addr = 0; aq_im_data = 0; y_im_we = 0; y_im_addr = 0; y_im_data = 0;
    rf_we = 0; rf_addr = 0; rf_data = 0; rdbg = 0; ddbg = 0; dm_we = 0; dm_addr = 0; dm_data = 0;

    // five-stage program (addresses in comments)
    for (int a = 0; a < 256; a++) yimg[a] = 8'h00;
    ylen = 0;
    ins_c(4'h3, 4'hF, 4'd6, 64'd40);     // 0x00 irmovq $40,%r6
    ins_rr(4'h6, 4'h0, 4'd6, 4'd7);      // 0x0a addq %r6,%r7
    ins_c(4'h4, 4'd7, 4'd6, 64'd0);      // 0x0c rmmovq %r7,0(%r6)
    ins_c(4'h5, 4'd1, 4'd6, 64'd0);      // 0x16 mrmovq 0(%r6),%r1
    ins_rr(4'h6, 4'h1, 4'd1, 4'd2);      // 0x20 subq %r1,%r2
    ins_c(4'h3, 4'hF, 4'd3, 64'd3);      // 0x22 irmovq $3,%r3
    ins_rr(4'h6, 4'h1, 4'd3, 4'd3);      // 0x2c subq %r3,%r3
    ins_j(4'h3, 64'h3F);                 // 0x2e je 0x3f
    ins_c(4'h3, 4'hF, 4'd4, 64'd99);     // 0x37 irmovq $99,%r4 (skipped)
    ins_rr(4'h6, 4'h0, 4'd2, 4'd4);      // 0x41 addq %r2,%r4 -- jump target
    put(8'h00);                          // halt
    // the je target is the addq at 0x41
    yimg[8'h2F] = 8'h41;

    rst = 1;
    aq_im_we = 1; y_im_we = 1;
    for (int a = 0; a < 256; a++) begin
      aq_im_addr = 8'(a); y_im_addr = 8'(a);
      aq_im_data = (a % 2 == 0) ? 8'h60 : (a / 2 < 4 ? aqprog[a / 2] : 8'hFF);
      y_im_data = yimg[a];
      @(posedge clk); #1;
    end
    aq_im_we = 0; y_im_we = 0;
    rf_we = 1;
    for (int r = 0; r < 15; r++) begin
      rf_addr = reg_t'(r); rf_data = 64'(100 * r); @(posedge clk); #1;
    end
    rf_we = 0;
    dm_we = 1;
    for (int a = 0; a < 256; a += 8) begin dm_addr = 64'(a); dm_data = 0; @(posedge clk); #1; end
    dm_we = 0;
    rst = 0;

    cyc = 0;
    while (cyc < 40) begin
      if (cyc == 6) begin rdbg = 4'd10; #1 check("addq fwd: R10 not yet written at cycle 6", aq_rd, 1000); end
      if (cyc == 7) begin
        rdbg = 4'd9;  #1 check("addq fwd: R9", aq_rd, 1700);
        rdbg = 4'd8;  #1 check("addq fwd: R8", aq_rd, 2500);
        rdbg = 4'd10; #1 check("addq fwd: R10 at cycle 7", aq_rd, 3500);
      end
      if (cyc == 9) begin rdbg = 4'd10; #1 check("addq stall: R10 not yet written at cycle 9", s_rd, 1000); end
      if (cyc == 10) begin
        rdbg = 4'd8;  #1 check("addq stall: R8", s_rd, 2500);
        rdbg = 4'd10; #1 check("addq stall: R10 at cycle 10", s_rd, 3500);
      end
      if (cyc == 16) check("y86 not halted at cycle 16", 64'(y_halted), 0);
      if (cyc == 17) check("y86 halted at cycle 17", 64'(y_halted), 1);
      @(posedge clk); #1;
      cyc++;
    end

    rdbg = 4'd6; #1 check("y86 R6", y_rd, 40);
    rdbg = 4'd7; #1 check("y86 R7", y_rd, 740);
    rdbg = 4'd1; #1 check("y86 R1 (loaded)", y_rd, 740);
    rdbg = 4'd2; #1 check("y86 R2", y_rd, -540);
    rdbg = 4'd3; #1 check("y86 R3", y_rd, 0);
    rdbg = 4'd4; #1 check("y86 R4 (jump taken)", y_rd, -140);
    ddbg = 64'd40; #1 check("y86 mem[40]", y_dd, 740);
    check("y86 no invalid instruction", 64'(y_inv), 0);

    checks++;
    if (n_aq_fe == 0 || n_aq_fw == 0 || n_fe == 0 || n_fm == 0 || n_fw == 0 || n_lu == 0 ||
        n_cs == 0 || n_jt == 0 || n_mr == 0 || n_mw == 0) begin
      failures++; $display("FAIL a mechanism never acted");
    end
      checks++;
    if (n_aq_stall != 3) begin failures++; $display("FAIL addq stall cycles %0d, expected 3", n_aq_stall); end
    $display("addq: fwd_e=%0d fwd_w=%0d | y86: fwd_e=%0d fwd_m=%0d fwd_w=%0d load_use=%0d ctrl_stall=%0d taken=%0d mem_rd=%0d mem_wr=%0d",
             n_aq_fe, n_aq_fw, n_fe, n_fm, n_fw, n_lu, n_cs, n_jt, n_mr, n_mw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
