// y86_pipe: five-stage pipelined processor for a Y86-64 subset.
//
// Stages fetch (F), decode (D), execute (E), memory (M), writeback (W),
// separated by the pipeline registers fD, dE, eM and mW; each stage reads
// the register in front of it (D_..., E_..., M_..., W_...) and produces the
// inputs of the next one (d_..., e_..., m_...). Instructions: halt, nop,
// rrmovq, irmovq, rmmovq, mrmovq, OPq (addq, subq, andq, xorq) and jXX.
//
// Destinations are worked out in decode (dstE, dstM) and travel with the
// instruction; valE/valM only carry what is to be written there. That makes
// the hazard logic a set of register-number comparisons:
//   * forwarding: d_valA and d_valB come from a fwd_mux each, trying in
//     order e_dstE:e_valE (end of execute), M_dstM:m_valM (end of memory),
//     M_dstE:M_valE, W_dstM:W_valM, W_dstE:W_valE, and otherwise the register
//     file. The writeback path is needed because the register file is written
//     at the end of the writeback cycle.
//   * load/use: an mrmovq result exists only after memory, so an instruction
//     that uses it right away waits one cycle in decode (bubble into
//     execute) and then takes it from the memory-stage forwarding path.
//   * control: a jXX is decided in fetch from the condition codes. While an
//     OPq (which sets them) is still in decode or execute, fetch waits and
//     sends bubbles; then the pc goes straight to the target or the
//     fall-through address. The jump itself then flows on as a no-op.
//     Nothing is fetched speculatively, so nothing is ever squashed.
// halt stops fetch at its own address; when it reaches writeback, every
// stage freezes and `halted` rises. Memories, register file loading and the
// observation outputs are this design's additions. Data memory is read in
// the same cycle the address is presented (combinational read).
module y86_pipe
  import y86_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           imem_ld_we,
  input  logic [IAW-1:0] imem_ld_addr,
  input  logic [7:0]     imem_ld_data,
  input  logic           rf_ld_we,
  input  reg_t           rf_ld_addr,
  input  word_t          rf_ld_data,
  input  reg_t           rf_dbg_addr,
  output word_t          rf_dbg_data,
  input  logic           dmem_ld_we,
  input  word_t          dmem_ld_addr,
  input  word_t          dmem_ld_data,
  input  word_t          dmem_dbg_addr,
  output word_t          dmem_dbg_data,
  output logic           halted,
  output logic           invalid_instr,
  output word_t          F_pc,
  output cc_t            cc_q,
  // events (one pulse per cycle the mechanism acts)
  output logic           ev_fwd_e,
  output logic           ev_fwd_m,
  output logic           ev_fwd_w,
  output logic           ev_load_use,
  output logic           ev_ctrl_stall,
  output logic           ev_jump_taken,
  output logic           ev_retire,
  output logic           ev_mem_read,
  output logic           ev_mem_write
);

  // condition codes (set by OPq in execute, read by jumps in fetch)
  cc_t cc;

  // pipeline registers
  fd_t D;
  de_t E;
  em_t M;
  mw_t W;

  // hazard control
  logic F_stall, D_stall, D_bubble, E_bubble, M_stall, W_stall;
  logic jump_go, load_use, ctrl_stall;

  // ---------------- fetch ----------------
  word_t       pc;
  logic [79:0] ibytes;
  fd_t         f_out;
  logic        f_valid;
  logic        f_cnd;
  word_t       f_valP;

  instr_mem #(.DEPTH(IMEM_DEPTH), .FETCH_BYTES(10)) u_imem (
    .clk, .pc, .bytes_out(ibytes),
    .ld_we(imem_ld_we), .ld_addr(imem_ld_addr), .ld_data(imem_ld_data)
  );

  y86_split u_split (
    .ibytes, .pc,
    .icode(f_out.icode), .ifun(f_out.ifun), .rA(f_out.rA), .rB(f_out.rB),
    .valC(f_out.valC), .valP(f_valP), .valid(f_valid)
  );

  y86_cond u_cond (.cc, .ifun(f_out.ifun), .cnd(f_cnd));

  always_ff @(posedge clk) begin
    if (rst)                         pc <= '0;
    else if (F_stall)                pc <= pc;
    else if (jump_go)                pc <= f_cnd ? f_out.valC : f_valP;
    else if (f_out.icode != I_HALT)  pc <= f_valP;
  end

  // ---------------- decode ----------------
  reg_t  d_srcA, d_srcB;
  de_t   d_out;
  word_t rf_a, rf_b;
  reg_t  fdst [5];
  word_t fval [5];
  logic  hitA, hitB;
  logic [2:0] selA, selB;
  word_t e_valE, m_valM;
  reg_t  e_dstE;

  pipe_reg #(.T(fd_t), .BUBBLE(FD_BUBBLE)) u_fD (
    .clk, .rst, .stall(D_stall), .bubble(D_bubble), .d(f_out), .q(D)
  );

  always_comb begin
    d_srcA = RNONE;
    d_srcB = RNONE;
    d_out.dstE = RNONE;
    d_out.dstM = RNONE;
    unique case (D.icode)
      I_RRMOVQ: begin d_srcA = D.rA; d_out.dstE = D.rB; end
      I_IRMOVQ: begin d_out.dstE = D.rB; end
      I_RMMOVQ: begin d_srcA = D.rA; d_srcB = D.rB; end
      I_MRMOVQ: begin d_srcB = D.rB; d_out.dstM = D.rA; end
      I_OPQ:    begin d_srcA = D.rA; d_srcB = D.rB; d_out.dstE = D.rB; end
      default: ;
    endcase
  end

  regfile u_rf (
    .clk,
    .srcA(d_srcA), .srcB(d_srcB), .rdataA(rf_a), .rdataB(rf_b),
    .dstE(W.dstE), .wdataE(W.valE), .dstM(W.dstM), .wdataM(W.valM),
    .ld_we(rf_ld_we), .ld_addr(rf_ld_addr), .ld_data(rf_ld_data),
    .dbg_addr(rf_dbg_addr), .dbg_data(rf_dbg_data)
  );

  // forwarding sources, youngest first
  assign fdst[0] = e_dstE;  assign fval[0] = e_valE;
  assign fdst[1] = M.dstM;  assign fval[1] = m_valM;
  assign fdst[2] = M.dstE;  assign fval[2] = M.valE;
  assign fdst[3] = W.dstM;  assign fval[3] = W.valM;
  assign fdst[4] = W.dstE;  assign fval[4] = W.valE;

  fwd_mux #(.N(5)) u_fwdA (
    .src(d_srcA), .reg_val(rf_a), .dst(fdst), .dst_val(fval),
    .val(d_out.valA), .fwd_hit(hitA), .fwd_sel(selA)
  );
  fwd_mux #(.N(5)) u_fwdB (
    .src(d_srcB), .reg_val(rf_b), .dst(fdst), .dst_val(fval),
    .val(d_out.valB), .fwd_hit(hitB), .fwd_sel(selB)
  );

  assign d_out.icode = D.icode;
  assign d_out.ifun  = D.ifun;
  assign d_out.valC  = D.valC;

  y86_hazard u_hazard (
    .f_icode(f_out.icode), .D_icode(D.icode), .E_icode(E.icode), .d_srcA, .d_srcB, .E_dstM(E.dstM),
    .halted, .F_stall, .D_stall, .D_bubble, .E_bubble, .M_stall, .W_stall,
    .jump_go, .load_use, .ctrl_stall
  );

  // ---------------- execute ----------------
  word_t      aluA, aluB;
  logic [3:0] alufun;
  cc_t        e_cc;

  pipe_reg #(.T(de_t), .BUBBLE(DE_BUBBLE)) u_dE (
    .clk, .rst, .stall(halted), .bubble(E_bubble), .d(d_out), .q(E)
  );

  always_comb begin
    aluA   = E.valA;
    aluB   = '0;
    alufun = A_ADD;
    unique case (E.icode)
      I_OPQ:    begin aluB = E.valB; alufun = E.ifun; end
      I_IRMOVQ: aluA = E.valC;
      I_RMMOVQ,
      I_MRMOVQ: begin aluA = E.valC; aluB = E.valB; end
      default: ;
    endcase
  end

  y86_alu u_alu (.aluA, .aluB, .fun(alufun), .valE(e_valE), .cc_out(e_cc));

  always_ff @(posedge clk) begin
    if (rst)                                cc <= '{zf: 1'b1, sf: 1'b0, of: 1'b0};
    else if (!halted && E.icode == I_OPQ)   cc <= e_cc;
  end

  assign e_dstE = E.dstE;

  // ---------------- memory ----------------
  logic m_read, m_write;

  pipe_reg #(.T(em_t), .BUBBLE(EM_BUBBLE)) u_eM (
    .clk, .rst, .stall(M_stall), .bubble(1'b0),
    .d('{icode: E.icode, valE: e_valE, valA: E.valA, dstE: e_dstE, dstM: E.dstM}),
    .q(M)
  );

  data_mem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk, .icode(halted ? I_NOP : M.icode), .addr(M.valE), .wdata(M.valA),
    .rdata(m_valM), .mem_read(m_read), .mem_write(m_write),
    .ld_we(dmem_ld_we), .ld_addr(dmem_ld_addr), .ld_data(dmem_ld_data),
    .dbg_addr(dmem_dbg_addr), .dbg_data(dmem_dbg_data)
  );

  // ---------------- writeback ----------------
  pipe_reg #(.T(mw_t), .BUBBLE(MW_BUBBLE)) u_mW (
    .clk, .rst, .stall(W_stall), .bubble(1'b0),
    .d('{icode: M.icode, valE: M.valE, valM: m_valM, dstE: M.dstE, dstM: M.dstM}),
    .q(W)
  );

  always_ff @(posedge clk) begin
    if (rst)                   halted <= 1'b0;
    else if (W.icode == I_HALT) halted <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst)                            invalid_instr <= 1'b0;
    else if (!F_stall && !f_valid) invalid_instr <= 1'b1;
  end

  assign F_pc          = pc;
  assign cc_q          = cc;
  assign ev_fwd_e      = !rst && !halted && ((hitA && selA == 3'd0) || (hitB && selB == 3'd0));
  assign ev_fwd_m      = !rst && !halted && ((hitA && (selA == 3'd1 || selA == 3'd2)) ||
                                             (hitB && (selB == 3'd1 || selB == 3'd2)));
  assign ev_fwd_w      = !rst && !halted && ((hitA && selA >= 3'd3) || (hitB && selB >= 3'd3));
  assign ev_load_use   = !rst && load_use;
  assign ev_ctrl_stall = !rst && ctrl_stall;
  assign ev_jump_taken = !rst && jump_go && f_cnd;
  assign ev_retire     = !rst && !halted && W.icode != I_NOP;
  assign ev_mem_read   = !rst && m_read;
  assign ev_mem_write  = !rst && m_write;

endmodule
