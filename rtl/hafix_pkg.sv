// hafix_pkg: types and constants shared by the HAFIX backward-edge CFI units.
//
// HAFIX confines every function return to a call site of a function that is
// currently active. Four instructions carry a label: CFIBR activates the
// label of the function it starts, CFIREC does the same for a recursive
// function, CFIDEL deactivates a label just before (or, on SPARC, in the delay
// slot of) the return, and CFIRET, placed at every call site, checks that its
// label is active. Calls and returns themselves are ordinary instructions that
// the CFI units only observe.
//
// The instruction classes below follow the original HAFIX design. The SPARC encoding of the
// CFI instructions is this design's own choice: the original HAFIX design adds them to the
// SPARC V8 instruction set without giving their bit patterns. They use the
// format-3 opcode space op=2'b10, op3=6'h09, which SPARC V8 leaves unused;
// rd[1:0] selects the CFI function, i must be 1 and simm13 holds the 13-bit
// label (matching the 13-bit width of the LEON3 label LIFO).
package hafix_pkg;

  // Decoded instruction class seen by the CFI units.
  typedef enum logic [2:0] {
    OP_OTHER  = 3'd0,  // any instruction without CFI meaning
    OP_CALL   = 3'd1,  // direct or indirect call
    OP_RET    = 3'd2,  // function return
    OP_CFIBR  = 3'd3,  // activate label at function entry
    OP_CFIREC = 3'd4,  // activate label at entry of a recursive function
    OP_CFIDEL = 3'd5,  // deactivate label at function exit
    OP_CFIRET = 3'd6,  // check label at a call site (return target)
    OP_CTI    = 3'd7   // other control transfer (branch, jump, trap return)
  } cfi_op_e;

  // Reason reported with a CFI violation.
  typedef enum logic [2:0] {
    CAUSE_NONE       = 3'd0,
    CAUSE_NO_CFIBR   = 3'd1,  // a call did not land on CFIBR/CFIREC
    CAUSE_NO_CFIRET  = 3'd2,  // a return did not land on CFIRET
    CAUSE_LABEL      = 3'd3,  // CFIRET label not active (not on top on SPARC)
    CAUSE_OVERFLOW   = 3'd4,  // label LIFO or recursion counter full
    CAUSE_UNDERFLOW  = 3'd5,  // CFIDEL with no active label
    CAUSE_DELAY_SLOT = 3'd6   // control transfer in a call/return delay slot
  } cfi_cause_e;

  // Siskiyou Peak: label width that indexes the 16384x1 label state memory.
  localparam int unsigned SP_LABEL_W = 14;
  // LEON3: label width and depth of the label LIFO (1024x13).
  localparam int unsigned SPARC_LABEL_W    = 13;
  localparam int unsigned SPARC_LIFO_DEPTH = 1024;

  // SPARC V8 fields used by the decoder.
  localparam logic [1:0] SPARC_OP_CALL  = 2'b01;
  localparam logic [1:0] SPARC_OP_FMT3  = 2'b10;
  localparam logic [1:0] SPARC_OP_FMT2  = 2'b00;
  localparam logic [5:0] SPARC_OP3_JMPL = 6'h38;
  localparam logic [5:0] SPARC_OP3_RETT = 6'h39;
  localparam logic [5:0] SPARC_OP3_TICC = 6'h3A;
  localparam logic [5:0] SPARC_OP3_CFI  = 6'h09;  // this design's choice
  localparam logic [4:0] SPARC_REG_O7   = 5'd15;
  localparam logic [4:0] SPARC_REG_I7   = 5'd31;
  localparam logic [4:0] SPARC_REG_G0   = 5'd0;

  // rd[1:0] function codes of the CFI instruction (this design's choice).
  localparam logic [1:0] CFI_FN_BR  = 2'd0;
  localparam logic [1:0] CFI_FN_DEL = 2'd1;
  localparam logic [1:0] CFI_FN_RET = 2'd2;
  localparam logic [1:0] CFI_FN_REC = 2'd3;

  // Builds a SPARC CFI instruction word in the encoding above.
  function automatic logic [31:0] sparc_cfi_word(logic [1:0] fn,
                                                 logic [SPARC_LABEL_W-1:0] label);
    return {SPARC_OP_FMT3, 3'b000, fn, SPARC_OP3_CFI, 5'd0, 1'b1, label};
  endfunction

endpackage
