// y86_pkg: types and constants shared by the two pipelined processors.
//
// Instruction codes follow the Y86-64 encoding: the first instruction byte
// holds icode in bits 7:4 and ifun in bits 3:0. Register number 0xF means
// "no register": it never matches a forwarding comparison, reads as 0 and is
// never written. The pipeline-register structs carry the fields each stage
// needs; a bubble is a NOP with every register field set to 0xF.
// Word width 64 follows Y86-64; the structs are this design's own grouping.
package y86_pkg;

  localparam int unsigned XLEN = 64;

  typedef logic [XLEN-1:0] word_t;
  typedef logic [3:0]      reg_t;

  localparam reg_t RNONE = 4'hF;

  typedef enum logic [3:0] {
    I_HALT   = 4'h0,
    I_NOP    = 4'h1,
    I_RRMOVQ = 4'h2,
    I_IRMOVQ = 4'h3,
    I_RMMOVQ = 4'h4,
    I_MRMOVQ = 4'h5,
    I_OPQ    = 4'h6,
    I_JXX    = 4'h7
  } icode_t;

  // ALU functions (ifun of OPq)
  localparam logic [3:0] A_ADD = 4'h0;
  localparam logic [3:0] A_SUB = 4'h1;
  localparam logic [3:0] A_AND = 4'h2;
  localparam logic [3:0] A_XOR = 4'h3;

  // jump conditions (ifun of jXX)
  localparam logic [3:0] C_ALWAYS = 4'h0;
  localparam logic [3:0] C_LE     = 4'h1;
  localparam logic [3:0] C_L      = 4'h2;
  localparam logic [3:0] C_E      = 4'h3;
  localparam logic [3:0] C_NE     = 4'h4;
  localparam logic [3:0] C_GE     = 4'h5;
  localparam logic [3:0] C_G      = 4'h6;

  typedef struct packed {
    logic zf;
    logic sf;
    logic of;
  } cc_t;

  // ---- addq processor pipeline registers ----
  typedef struct packed {   // fetch -> decode
    reg_t rA;
    reg_t rB;
  } aq_fd_t;

  typedef struct packed {   // decode -> execute
    word_t valA;
    word_t valB;
    reg_t  dstE;
  } aq_de_t;

  typedef struct packed {   // execute -> writeback
    word_t valE;
    reg_t  dstE;
  } aq_ew_t;

  localparam aq_fd_t AQ_FD_BUBBLE = '{rA: RNONE, rB: RNONE};
  localparam aq_de_t AQ_DE_BUBBLE = '{valA: '0, valB: '0, dstE: RNONE};
  localparam aq_ew_t AQ_EW_BUBBLE = '{valE: '0, dstE: RNONE};

  // ---- five-stage pipeline registers ----
  typedef struct packed {   // fetch -> decode
    icode_t     icode;
    logic [3:0] ifun;
    reg_t       rA;
    reg_t       rB;
    word_t      valC;
  } fd_t;

  typedef struct packed {   // decode -> execute
    icode_t     icode;
    logic [3:0] ifun;
    word_t      valC;
    word_t      valA;
    word_t      valB;
    reg_t       dstE;
    reg_t       dstM;
  } de_t;

  typedef struct packed {   // execute -> memory
    icode_t icode;
    word_t  valE;
    word_t  valA;
    reg_t   dstE;
    reg_t   dstM;
  } em_t;

  typedef struct packed {   // memory -> writeback
    icode_t icode;
    word_t  valE;
    word_t  valM;
    reg_t   dstE;
    reg_t   dstM;
  } mw_t;

  localparam fd_t FD_BUBBLE = '{icode: I_NOP, ifun: 4'h0, rA: RNONE, rB: RNONE,
                                valC: '0};
  localparam de_t DE_BUBBLE = '{icode: I_NOP, ifun: 4'h0, valC: '0,
                                valA: '0, valB: '0, dstE: RNONE, dstM: RNONE};
  localparam em_t EM_BUBBLE = '{icode: I_NOP, valE: '0, valA: '0,
                                dstE: RNONE, dstM: RNONE};
  localparam mw_t MW_BUBBLE = '{icode: I_NOP, valE: '0, valM: '0,
                                dstE: RNONE, dstM: RNONE};

endpackage
