// tb_y86_pipe: end-to-end test of the five-stage Y86-64-subset pipeline.
//
// Programs are assembled in the bench, run until halt, and the final
// registers, data memory and cycle count are compared with a sequential
// instruction-set model written here. The expected cycle count comes from a
// small timing model: instruction i reaches execute one cycle after i-1, two
// after it if i-1 is a load whose result i uses, and a jump reaches execute
// no earlier than three cycles after the last OPq before it (its flags must
// be final before the jump is decided in fetch); halt is seen three cycles
// after the halt instruction's execute cycle. Directed programs cover the
// hazard cases one by one (forward from execute, memory and writeback;
// load/use; taken and not-taken je); then random programs with forward jumps
// mix them.
module tb_y86_pipe;
  import y86_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic        im_we;  logic [7:0] im_addr, im_data;
  logic        rf_we;  reg_t rf_addr;  word_t rf_data;
  reg_t        rdbg;   word_t rdbg_data;
  logic        dm_we;  word_t dm_addr, dm_data;
  word_t       ddbg;   word_t ddbg_data;
  logic        halted, invalid;
  word_t       pc;     cc_t cc;
  logic        fe, fm, fw, lu, cs, jt, rt, mr, mw;
  int          n_fe, n_fm, n_fw, n_lu, n_cs, n_jt, n_mr, n_mw;

  y86_pipe dut (
    .clk, .rst,
    .imem_ld_we(im_we), .imem_ld_addr(im_addr), .imem_ld_data(im_data),
    .rf_ld_we(rf_we), .rf_ld_addr(rf_addr), .rf_ld_data(rf_data),
    .rf_dbg_addr(rdbg), .rf_dbg_data(rdbg_data),
    .dmem_ld_we(dm_we), .dmem_ld_addr(dm_addr), .dmem_ld_data(dm_data),
    .dmem_dbg_addr(ddbg), .dmem_dbg_data(ddbg_data),
    .halted, .invalid_instr(invalid), .F_pc(pc), .cc_q(cc),
    .ev_fwd_e(fe), .ev_fwd_m(fm), .ev_fwd_w(fw), .ev_load_use(lu),
    .ev_ctrl_stall(cs), .ev_jump_taken(jt), .ev_retire(rt),
    .ev_mem_read(mr), .ev_mem_write(mw)
  );

  always @(posedge clk) begin
    n_fe += int'(fe); n_fm += int'(fm); n_fw += int'(fw); n_lu += int'(lu);
    n_cs += int'(cs); n_jt += int'(jt); n_mr += int'(mr); n_mw += int'(mw);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d (0x%0h) expected %0d (0x%0h)", what, $signed(got), got, $signed(exp), exp);
    end
  endtask

  // ---------------- assembler ----------------
  typedef struct {
    logic [3:0] icode, ifun, rA, rB;
    logic [63:0] valC;
    int target;        // jXX: index of target instruction
  } ins_t;

  ins_t prog [$];

  function automatic ins_t mk(logic [3:0] ic, logic [3:0] fn, logic [3:0] a, logic [3:0] b,
                               logic [63:0] c, int tgt = -1);
    ins_t i; i.icode = ic; i.ifun = fn; i.rA = a; i.rB = b; i.valC = c; i.target = tgt;
    return i;
  endfunction

  function automatic int ilen(logic [3:0] ic);
    case (ic)
      4'h0, 4'h1: return 1;
      4'h2, 4'h6: return 2;
      4'h7:       return 9;
      default:    return 10;
    endcase
  endfunction

  int addr_of [$];
  logic [7:0] image [256];

  function automatic void assemble();
    int a = 0;
    addr_of = {};
    foreach (prog[k]) begin addr_of.push_back(a); a += ilen(prog[k].icode); end
    for (int k = 0; k < 256; k++) image[k] = 8'h00;   // halt everywhere else
    foreach (prog[k]) begin
      int p = addr_of[k];
      logic [63:0] c = prog[k].valC;
      if (prog[k].icode == 4'h7) c = 64'(addr_of[prog[k].target]);
      image[p] = {prog[k].icode, prog[k].ifun};
      case (ilen(prog[k].icode))
        2:  image[p+1] = {prog[k].rA, prog[k].rB};
        9:  for (int b = 0; b < 8; b++) image[p+1+b] = c[8*b +: 8];
        10: begin
              image[p+1] = {prog[k].rA, prog[k].rB};
              for (int b = 0; b < 8; b++) image[p+2+b] = c[8*b +: 8];
            end
        default: ;
      endcase
    end
  endfunction

  // ---------------- reference model ----------------
  logic [63:0] mreg [16];
  logic [7:0]  mmem [256];
  logic [63:0] init_reg [15];
  logic [7:0]  init_mem [256];

  function automatic logic [63:0] rd(logic [3:0] r);
    return (r == 4'hF) ? 64'd0 : mreg[r];
  endfunction

  // returns expected cycles from reset release until halted is seen
  function automatic int run_model();
    int k = 0, e_prev = 1, e_lastop = -100, e;
    logic zf = 1'b1, sf = 1'b0, of = 1'b0;
    logic [3:0] last_load = 4'hF;
    for (int r = 0; r < 15; r++) mreg[r] = init_reg[r];
    mreg[15] = '0;
    for (int a = 0; a < 256; a++) mmem[a] = init_mem[a];
    while (k < prog.size() && prog[k].icode != 4'h0) begin
      ins_t i = prog[k];
      logic [3:0] sA = 4'hF, sB = 4'hF;
      logic [63:0] va, vb, r, ad;
      logic lt, t;
      case (i.icode)
        4'h2: sA = i.rA;
        4'h4, 4'h6: begin sA = i.rA; sB = i.rB; end
        4'h5: sB = i.rB;
        default: ;
      endcase
      e = e_prev + 1;
      if (last_load != 4'hF && (last_load == sA || last_load == sB)) e = e_prev + 2;
      if (i.icode == 4'h7 && e < e_lastop + 3) e = e_lastop + 3;
      if (i.icode == 4'h6) e_lastop = e;
      e_prev = e;
      last_load = 4'hF;
      va = rd(i.rA); vb = rd(i.rB);
      k++;
      case (i.icode)
        4'h2: if (i.rB != 4'hF) mreg[i.rB] = va;
        4'h3: if (i.rB != 4'hF) mreg[i.rB] = i.valC;
        4'h4: begin ad = i.valC + (i.rB == 4'hF ? 64'd0 : vb);
                for (int b = 0; b < 8; b++) mmem[8'(ad + 64'(b))] = va[8*b +: 8]; end
        4'h5: begin ad = i.valC + (i.rB == 4'hF ? 64'd0 : vb);
                for (int b = 0; b < 8; b++) r[8*b +: 8] = mmem[8'(ad + 64'(b))];
                if (i.rA != 4'hF) mreg[i.rA] = r;
                last_load = i.rA; end
        4'h6: begin
                case (i.ifun)
                  4'h1: r = vb - va;
                  4'h2: r = vb & va;
                  4'h3: r = vb ^ va;
                  default: r = vb + va;
                endcase
                zf = (r == 0); sf = r[63];
                of = (i.ifun == 0) ? (va[63] == vb[63] && r[63] != vb[63]) :
                     (i.ifun == 1) ? (va[63] != vb[63] && r[63] != vb[63]) : 1'b0;
                if (i.rB != 4'hF) mreg[i.rB] = r;
              end
        4'h7: begin
                lt = sf ^ of;
                case (i.ifun)
                  4'h0: t = 1; 4'h1: t = lt | zf; 4'h2: t = lt; 4'h3: t = zf;
                  4'h4: t = !zf; 4'h5: t = !lt; 4'h6: t = !lt && !zf; default: t = 0;
                endcase
                if (t) k = i.target;
              end
        default: ;
      endcase
    end
    return e_prev + 1 + 3;
  endfunction

  // ---------------- run one program ----------------
  task automatic run(string name);
    int exp_cycles, cycles;
    assemble();
    exp_cycles = run_model();
    rst = 1'b1;
    im_we = 1'b1;
    for (int a = 0; a < 256; a++) begin
      im_addr = 8'(a); im_data = image[a]; @(posedge clk); #1;
    end
    im_we = 1'b0;
    rf_we = 1'b1;
    for (int r = 0; r < 15; r++) begin
      rf_addr = reg_t'(r); rf_data = init_reg[r]; @(posedge clk); #1;
    end
    rf_we = 1'b0;
    dm_we = 1'b1;
    for (int a = 0; a < 256; a += 8) begin
      dm_addr = 64'(a);
      for (int b = 0; b < 8; b++) dm_data[8*b +: 8] = init_mem[a + b];
      @(posedge clk); #1;
    end
    dm_we = 1'b0;
    @(posedge clk); #1;
    rst = 1'b0;
    cycles = 0;
    while (!halted && cycles < 2000) begin @(posedge clk); #1; cycles++; end
    check({name, ": cycles to halt"}, 64'(cycles), 64'(exp_cycles));
    check({name, ": no invalid instruction"}, 64'(invalid), 0);
    for (int r = 0; r < 15; r++) begin
      rdbg = reg_t'(r); #1;
      check($sformatf("%s: R%0d", name, r), rdbg_data, mreg[r]);
    end
    for (int a = 0; a < 256; a += 8) begin
      logic [63:0] e;
      for (int b = 0; b < 8; b++) e[8*b +: 8] = mmem[a + b];
      ddbg = 64'(a); #1;
      check($sformatf("%s: mem[%0d]", name, a), ddbg_data, e);
    end
  endtask

  localparam logic [3:0] HALT = 4'h0, NOP = 4'h1, RRM = 4'h2, IRM = 4'h3,
                         RMM = 4'h4, MRM = 4'h5, OPQ = 4'h6, JXX = 4'h7, F = 4'hF;

  function automatic void default_state();
    for (int r = 0; r < 15; r++) init_reg[r] = 64'(100 * r);
    for (int a = 0; a < 256; a++) init_mem[a] = 8'(a * 7 + 3);
  endfunction

  initial begin
    im_we = 0; im_addr = 0; im_data = 0; rf_we = 0; rf_addr = 0; rf_data = 0;
    dm_we = 0; dm_addr = 0; dm_data = 0; rdbg = 0; ddbg = 0;
    n_fe = 0; n_fm = 0; n_fw = 0; n_lu = 0; n_cs = 0; n_jt = 0; n_mr = 0; n_mw = 0;
    default_state();

    // forwarding paths: execute, memory and writeback
    init_reg[11] = 64'd1800;
    prog = {};
    prog.push_back(mk(OPQ, 0, 8, 9, 0));     // addq %r8,%r9
    prog.push_back(mk(OPQ, 1, 9, 11, 0));    // subq %r9,%r11   (r9 from execute)
    prog.push_back(mk(MRM, 0, 10, 11, 4));   // mrmovq 4(%r11),%r10 (r11 from execute)
    prog.push_back(mk(RMM, 0, 9, 11, 8));    // rmmovq %r9,8(%r11) (r9 from writeback)
    prog.push_back(mk(OPQ, 3, 10, 9, 0));    // xorq %r10,%r9  (r10 from memory)
    prog.push_back(mk(HALT, 0, F, F, 0));
    run("paths");
    default_state();

    // three writes to one register: the youngest must win
    prog = {};
    prog.push_back(mk(OPQ, 0, 10, 8, 0));
    prog.push_back(mk(OPQ, 0, 11, 8, 0));
    prog.push_back(mk(OPQ, 0, 12, 8, 0));
    prog.push_back(mk(OPQ, 0, 8, 13, 0));
    prog.push_back(mk(HALT, 0, F, F, 0));
    run("youngest");

    // one write from execute, the other source from memory
    prog = {};
    prog.push_back(mk(OPQ, 0, 10, 8, 0));    // addq %r10,%r8
    prog.push_back(mk(OPQ, 0, 11, 12, 0));   // addq %r11,%r12
    prog.push_back(mk(OPQ, 0, 12, 8, 0));    // addq %r12,%r8
    prog.push_back(mk(HALT, 0, F, F, 0));
    run("two_sources");

    // add, sub, xor, and on shared registers
    prog = {};
    prog.push_back(mk(OPQ, 0, 8, 9, 0));     // addq %r8,%r9
    prog.push_back(mk(OPQ, 1, 8, 10, 0));    // subq %r8,%r10
    prog.push_back(mk(OPQ, 3, 8, 9, 0));     // xorq %r8,%r9
    prog.push_back(mk(OPQ, 2, 9, 8, 0));     // andq %r9,%r8
    prog.push_back(mk(HALT, 0, F, F, 0));
    run("four_ops");

    // load/use: mrmovq 0(%rax),%rbx ; subq %rbx,%rcx
    prog = {};
    prog.push_back(mk(MRM, 0, 3, 0, 0));
    prog.push_back(mk(OPQ, 1, 3, 1, 0));
    prog.push_back(mk(HALT, 0, F, F, 0));
    run("load_use");

    // je taken (R8 == R9) and not taken
    for (int taken = 0; taken < 2; taken++) begin
      if (taken) init_reg[9] = init_reg[8];
      prog = {};
      prog.push_back(mk(OPQ, 1, 8, 9, 0));       // subq %r8,%r9
      prog.push_back(mk(JXX, 3, F, F, 0, 4));    // je -> index 4
      prog.push_back(mk(OPQ, 0, 10, 11, 0));     // addq %r10,%r11
      prog.push_back(mk(HALT, 0, F, F, 0));
      prog.push_back(mk(OPQ, 0, 12, 13, 0));     // target: addq %r12,%r13
      prog.push_back(mk(HALT, 0, F, F, 0));
      run(taken ? "je_taken" : "je_not_taken");
      default_state();
    end

    // random programs
    for (int t = 0; t < 150; t++) begin
      automatic int cnt = 6 + $urandom_range(0, 14);
      default_state();
      init_reg[14] = 64'(8 * $urandom_range(0, 8));
      if ($urandom_range(0, 1) == 1) init_reg[9] = init_reg[8];
      prog = {};
      for (int k = 0; k < cnt; k++) begin
        automatic logic [3:0] a = 4'($urandom_range(0, 13)), b = 4'($urandom_range(0, 13));
        automatic logic [3:0] base = ($urandom_range(0, 1) == 1) ? 4'd14 : F;
        automatic logic [63:0] off = 64'(8 * $urandom_range(0, 20));
        case ($urandom_range(0, 9))
          0:    prog.push_back(mk(NOP, 0, F, F, 0));
          1:    prog.push_back(mk(RRM, 0, a, b, 0));
          2:    prog.push_back(mk(IRM, 0, F, b, 64'($urandom)));
          3, 4: prog.push_back(mk(MRM, 0, a, base, off));
          5:    prog.push_back(mk(RMM, 0, a, base, off));
          6:    prog.push_back(mk(JXX, 4'($urandom_range(0, 6)), F, F, 0,
                                  k + 1 + $urandom_range(0, 3)));
          default: prog.push_back(mk(OPQ, 4'($urandom_range(0, 3)), a, b, 0));
        endcase
      end
      foreach (prog[k]) if (prog[k].icode == JXX && prog[k].target > cnt) prog[k].target = cnt;
      prog.push_back(mk(HALT, 0, F, F, 0));
      run($sformatf("rand%0d", t));
    end

    checks++;
    if (n_fe == 0 || n_fm == 0 || n_fw == 0 || n_lu == 0 || n_cs == 0 || n_jt == 0 ||
        n_mr == 0 || n_mw == 0) begin
      failures++;
      $display("FAIL a mechanism never acted");
    end
    $display("fwd_e=%0d fwd_m=%0d fwd_w=%0d load_use=%0d ctrl_stall=%0d taken=%0d mem_rd=%0d mem_wr=%0d",
             n_fe, n_fm, n_fw, n_lu, n_cs, n_jt, n_mr, n_mw);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
