// addq_pipe: four-stage pipelined processor that only executes addq.
//
// Every instruction is two bytes, "addq %rA, %rB" (byte 1 = rA:rB; byte 0 is
// not looked at), and does R[rB] <= R[rA] + R[rB]. Register 0xF means none,
// so "addq %r15,%r15"-style words with both fields 0xF do nothing.
//   fetch:     pc, instruction memory, split into rA/rB, pc + 2
//   decode:    register file read (srcA = rA, srcB = rB), dstE = rB
//   execute:   the adder
//   writeback: R[dstE] written at the end of the cycle
// Pipeline registers fD {rA,rB}, dE {valA,valB,dstE}, eW {valE,dstE}.
//
// A data hazard arises when an instruction reads a register one of the two
// instructions ahead of it still has to write. Parameter FORWARD selects the
// remedy:
//   FORWARD = 1 (default): two multiplexers in decode pick valA/valB from
//     the adder output (e_dstE, e_valE: the instruction one ahead) or from
//     the writeback register (W_dstE, W_valE: two ahead) before the register
//     file, so dependent addqs run back to back.
//   FORWARD = 0: the fetch stage compares the fetched rA/rB with the
//     destinations of the instructions in decode and execute; on a match it
//     holds the pc and puts a bubble into fD. A dependent addq thus waits
//     two cycles and reads the register file after the write has landed.
// Both behaviours and their cycle timing follow the document's worked
// examples; the debug/observation ports, the load ports and the event
// outputs are this design's additions.
module addq_pipe
  import y86_pkg::*;
#(
  parameter bit          FORWARD    = 1'b1,
  parameter int unsigned IMEM_DEPTH = 256,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  // program and register loading, inspection
  input  logic           imem_ld_we,
  input  logic [IAW-1:0] imem_ld_addr,
  input  logic [7:0]     imem_ld_data,
  input  logic           rf_ld_we,
  input  reg_t           rf_ld_addr,
  input  word_t          rf_ld_data,
  input  reg_t           rf_dbg_addr,
  output word_t          rf_dbg_data,
  // pipeline state, for observation
  output word_t          F_pc,
  output aq_fd_t         D_q,
  output aq_de_t         E_q,
  output aq_ew_t         W_q,
  // events
  output logic           ev_stall,
  output logic           ev_fwd_e,
  output logic           ev_fwd_w
);

  // ---------------- fetch ----------------
  word_t       pc;
  logic [15:0] ibytes;
  aq_fd_t      f_out;
  logic        f_stall;

  instr_mem #(.DEPTH(IMEM_DEPTH), .FETCH_BYTES(2)) u_imem (
    .clk, .pc, .bytes_out(ibytes),
    .ld_we(imem_ld_we), .ld_addr(imem_ld_addr), .ld_data(imem_ld_data)
  );

  assign f_out.rA = ibytes[15:12];
  assign f_out.rB = ibytes[11:8];

  always_ff @(posedge clk) begin
    if (rst)           pc <= '0;
    else if (!f_stall) pc <= pc + 64'd2;
  end

  // ---------------- decode ----------------
  aq_fd_t D;
  aq_de_t d_out;
  aq_de_t E;
  aq_ew_t W;
  reg_t   e_dstE;
  word_t  e_valE;
  word_t  rf_a, rf_b;
  logic   hitA, hitB;
  logic [1:0] selA, selB;
  reg_t   fdst [2];
  word_t  fval [2];

  pipe_reg #(.T(aq_fd_t), .BUBBLE(AQ_FD_BUBBLE)) u_fD (
    .clk, .rst, .stall(1'b0), .bubble(f_stall), .d(f_out), .q(D)
  );

  regfile u_rf (
    .clk,
    .srcA(D.rA), .srcB(D.rB), .rdataA(rf_a), .rdataB(rf_b),
    .dstE(W.dstE), .wdataE(W.valE), .dstM(RNONE), .wdataM('0),
    .ld_we(rf_ld_we), .ld_addr(rf_ld_addr), .ld_data(rf_ld_data),
    .dbg_addr(rf_dbg_addr), .dbg_data(rf_dbg_data)
  );

  // forwarding sources: 0 = end of execute (younger), 1 = writeback
  assign fdst[0] = FORWARD ? e_dstE : RNONE;
  assign fval[0] = e_valE;
  assign fdst[1] = FORWARD ? W.dstE : RNONE;
  assign fval[1] = W.valE;

  fwd_mux #(.N(2)) u_fwdA (
    .src(D.rA), .reg_val(rf_a), .dst(fdst), .dst_val(fval),
    .val(d_out.valA), .fwd_hit(hitA), .fwd_sel(selA)
  );
  fwd_mux #(.N(2)) u_fwdB (
    .src(D.rB), .reg_val(rf_b), .dst(fdst), .dst_val(fval),
    .val(d_out.valB), .fwd_hit(hitB), .fwd_sel(selB)
  );

  assign d_out.dstE = D.rB;

  // stall logic (FORWARD = 0): fetched instruction against the
  // destinations of decode (d_dstE) and execute (E_dstE)
  function automatic logic reads(reg_t r, aq_fd_t f);
    return (r != RNONE) && (f.rA == r || f.rB == r);
  endfunction

  assign f_stall = !FORWARD && (reads(d_out.dstE, f_out) || reads(E.dstE, f_out));

  // ---------------- execute ----------------
  pipe_reg #(.T(aq_de_t), .BUBBLE(AQ_DE_BUBBLE)) u_dE (
    .clk, .rst, .stall(1'b0), .bubble(1'b0), .d(d_out), .q(E)
  );

  assign e_valE = E.valA + E.valB;
  assign e_dstE = E.dstE;

  // ---------------- writeback ----------------
  pipe_reg #(.T(aq_ew_t), .BUBBLE(AQ_EW_BUBBLE)) u_eW (
    .clk, .rst, .stall(1'b0), .bubble(1'b0),
    .d('{valE: e_valE, dstE: e_dstE}), .q(W)
  );

  assign F_pc     = pc;
  assign D_q      = D;
  assign E_q      = E;
  assign W_q      = W;
  assign ev_stall = !rst && f_stall;
  assign ev_fwd_e = !rst && ((hitA && selA == 2'd0) || (hitB && selB == 2'd0));
  assign ev_fwd_w = !rst && ((hitA && selA == 2'd1) || (hitB && selB == 2'd1));

endmodule
