// y86_hazard: stall and bubble control of the five-stage pipeline.
//
// Two hazards cannot be solved by forwarding alone.
//  * Load/use: an mrmovq in execute whose destination (E_dstM) is a source of
//    the instruction in decode. Its value only exists after the memory stage,
//    so the decode-stage instruction waits one cycle: fetch and decode stall,
//    a bubble enters execute, and next cycle the value is forwarded from
//    memory (the "combine stalling and forwarding" case, detected in decode).
//  * Control: a jXX is decided in fetch from the condition codes, which an
//    OPq sets at the end of its execute cycle. While an OPq is still in
//    decode or execute the flags are not final, so fetch holds the pc and
//    sends a bubble into decode (two cycles when the OPq is right before the
//    jump, one when it is two ahead, none otherwise). When no OPq is pending
//    the jump goes through and the pc is loaded with the target or the
//    fall-through address in the same cycle (jump_go).
// Once the processor has halted every stage stalls. Combinational.
// Detecting the load/use case in decode and the jump case in fetch follows
// the lecture design; the exact signal set is this design's own.
module y86_hazard
  import y86_pkg::*;
(
  input  icode_t f_icode,
  input  icode_t D_icode,
  input  icode_t E_icode,
  input  reg_t   d_srcA,
  input  reg_t   d_srcB,
  input  reg_t   E_dstM,
  input  logic   halted,
  output logic   F_stall,
  output logic   D_stall,
  output logic   D_bubble,
  output logic   E_bubble,
  output logic   M_stall,
  output logic   W_stall,
  output logic   jump_go,
  output logic   load_use,
  output logic   ctrl_stall
);

  logic lu, cs;

  always_comb begin
    lu = (E_icode == I_MRMOVQ) && (E_dstM != RNONE) &&
         ((E_dstM == d_srcA) || (E_dstM == d_srcB));
    cs = (f_icode == I_JXX) && ((D_icode == I_OPQ) || (E_icode == I_OPQ));

    F_stall    = halted || lu || cs;
    D_stall    = halted || lu;
    D_bubble   = !halted && !lu && cs;
    E_bubble   = !halted && lu;
    M_stall    = halted;
    W_stall    = halted;
    jump_go    = !F_stall && (f_icode == I_JXX);
    load_use   = !halted && lu;
    ctrl_stall = !halted && cs;
  end

endmodule
