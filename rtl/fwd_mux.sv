// fwd_mux: forwarding multiplexer in front of one decode-stage operand.
//
// Compares the register number being read (src) with the destination
// register of each of N later pipeline stages. The first (lowest index)
// stage whose destination matches supplies the value; with no match the
// register-file output passes through. Index 0 must be the youngest
// instruction, so that the most recent write wins, as in
//   valA = [ srcA == e_dstE : e_valE; srcA == m_dstE : m_valE; 1 : regA ];
// Register 0xF never matches. Purely combinational. fwd_hit and fwd_sel tell
// whether and from which source a value was forwarded.
module fwd_mux
  import y86_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  reg_t  src,
  input  word_t reg_val,
  input  reg_t  dst     [N],
  input  word_t dst_val [N],
  output word_t val,
  output logic  fwd_hit,
  output logic [$clog2(N+1)-1:0] fwd_sel
);

  always_comb begin
    val     = reg_val;
    fwd_hit = 1'b0;
    fwd_sel = '0;
    if (src != RNONE) begin
      for (int i = N - 1; i >= 0; i--) begin
        if (dst[i] == src) begin
          val     = dst_val[i];
          fwd_hit = 1'b1;
          fwd_sel = ($clog2(N+1))'(i);
        end
      end
    end
  end

endmodule
