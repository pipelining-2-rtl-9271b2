// top: the two pipelined processors, side by side.
//
// aq_*: the four-stage addq processor (fetch, decode, execute, writeback),
//       whose data hazards are resolved by forwarding (AQ_FORWARD = 1) or by
//       stalling in fetch (AQ_FORWARD = 0).
// y_*:  the five-stage Y86-64-subset processor (adds a memory stage, loads
//       and stores, subq/andq/xorq and conditional jumps) with five-way
//       forwarding, a one-cycle load/use stall, and jumps decided in fetch once
//       the condition codes are final.
// The two share nothing but clock and reset. Each brings out its program
// and register load ports, its inspection ports and its event pulses; see
// addq_pipe and y86_pipe for the timing.
module top
  import y86_pkg::*;
#(
  parameter bit          AQ_FORWARD = 1'b1,
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_DEPTH = 256,
  localparam int unsigned IAW       = $clog2(IMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  // addq processor
  input  logic           aq_imem_ld_we,
  input  logic [IAW-1:0] aq_imem_ld_addr,
  input  logic [7:0]     aq_imem_ld_data,
  input  logic           aq_rf_ld_we,
  input  reg_t           aq_rf_ld_addr,
  input  word_t          aq_rf_ld_data,
  input  reg_t           aq_rf_dbg_addr,
  output word_t          aq_rf_dbg_data,
  output word_t          aq_F_pc,
  output aq_fd_t         aq_D_q,
  output aq_de_t         aq_E_q,
  output aq_ew_t         aq_W_q,
  output logic           aq_ev_stall,
  output logic           aq_ev_fwd_e,
  output logic           aq_ev_fwd_w,
  // five-stage processor
  input  logic           y_imem_ld_we,
  input  logic [IAW-1:0] y_imem_ld_addr,
  input  logic [7:0]     y_imem_ld_data,
  input  logic           y_rf_ld_we,
  input  reg_t           y_rf_ld_addr,
  input  word_t          y_rf_ld_data,
  input  reg_t           y_rf_dbg_addr,
  output word_t          y_rf_dbg_data,
  input  logic           y_dmem_ld_we,
  input  word_t          y_dmem_ld_addr,
  input  word_t          y_dmem_ld_data,
  input  word_t          y_dmem_dbg_addr,
  output word_t          y_dmem_dbg_data,
  output logic           y_halted,
  output logic           y_invalid_instr,
  output word_t          y_F_pc,
  output cc_t            y_cc_q,
  output logic           y_ev_fwd_e,
  output logic           y_ev_fwd_m,
  output logic           y_ev_fwd_w,
  output logic           y_ev_load_use,
  output logic           y_ev_ctrl_stall,
  output logic           y_ev_jump_taken,
  output logic           y_ev_retire,
  output logic           y_ev_mem_read,
  output logic           y_ev_mem_write
);

  addq_pipe #(.FORWARD(AQ_FORWARD), .IMEM_DEPTH(IMEM_DEPTH)) u_addq (
    .clk, .rst,
    .imem_ld_we(aq_imem_ld_we), .imem_ld_addr(aq_imem_ld_addr), .imem_ld_data(aq_imem_ld_data),
    .rf_ld_we(aq_rf_ld_we), .rf_ld_addr(aq_rf_ld_addr), .rf_ld_data(aq_rf_ld_data),
    .rf_dbg_addr(aq_rf_dbg_addr), .rf_dbg_data(aq_rf_dbg_data),
    .F_pc(aq_F_pc), .D_q(aq_D_q), .E_q(aq_E_q), .W_q(aq_W_q),
    .ev_stall(aq_ev_stall), .ev_fwd_e(aq_ev_fwd_e), .ev_fwd_w(aq_ev_fwd_w)
  );

  y86_pipe #(.IMEM_DEPTH(IMEM_DEPTH), .DMEM_DEPTH(DMEM_DEPTH)) u_y86 (
    .clk, .rst,
    .imem_ld_we(y_imem_ld_we), .imem_ld_addr(y_imem_ld_addr), .imem_ld_data(y_imem_ld_data),
    .rf_ld_we(y_rf_ld_we), .rf_ld_addr(y_rf_ld_addr), .rf_ld_data(y_rf_ld_data),
    .rf_dbg_addr(y_rf_dbg_addr), .rf_dbg_data(y_rf_dbg_data),
    .dmem_ld_we(y_dmem_ld_we), .dmem_ld_addr(y_dmem_ld_addr), .dmem_ld_data(y_dmem_ld_data),
    .dmem_dbg_addr(y_dmem_dbg_addr), .dmem_dbg_data(y_dmem_dbg_data),
    .halted(y_halted), .invalid_instr(y_invalid_instr), .F_pc(y_F_pc), .cc_q(y_cc_q),
    .ev_fwd_e(y_ev_fwd_e), .ev_fwd_m(y_ev_fwd_m), .ev_fwd_w(y_ev_fwd_w),
    .ev_load_use(y_ev_load_use), .ev_ctrl_stall(y_ev_ctrl_stall),
    .ev_jump_taken(y_ev_jump_taken), .ev_retire(y_ev_retire),
    .ev_mem_read(y_ev_mem_read), .ev_mem_write(y_ev_mem_write)
  );

endmodule
