// sparc_cfi_decode: classifies SPARC V8 instruction words for the HAFIX-FSM.
//
// Purely combinational. Each fetched 32-bit word is sorted into the classes
// the HAFIX-FSM reacts to:
//  - call: CALL (op=01) and JMPL that writes %o7 (indirect call);
//  - return: JMPL %o7+8 or %i7+8 (also +12) into %g0, i.e. retl and ret;
//  - the four CFI instructions, with their 13-bit label;
//  - other control transfers: Bicc, FBfcc, CBccc, other JMPLs, RETT, Ticc;
//  - everything else.
// The SPARC V8 fields come from the SPARC V8 architecture. The CFI encoding
// is this design's own (see hafix_pkg): op=10, op3=0x09, i=1, rd[4:2]=0,
// rd[1:0] = function (0 CFIBR, 1 CFIDEL, 2 CFIRET, 3 CFIREC), simm13 = label.
// A word in that opcode space that breaks the other field rules is "other".
module sparc_cfi_decode
  import hafix_pkg::*;
(
  input  logic [31:0]              inst_i,
  output cfi_op_e                  op_o,
  output logic [SPARC_LABEL_W-1:0] label_o
);

  logic [1:0]  op;
  logic [2:0]  op2;
  logic [5:0]  op3;
  logic [4:0]  rd, rs1;
  logic        imm;
  logic [12:0] simm13;

  assign op     = inst_i[31:30];
  assign rd     = inst_i[29:25];
  assign op2    = inst_i[24:22];
  assign op3    = inst_i[24:19];
  assign rs1    = inst_i[18:14];
  assign imm    = inst_i[13];
  assign simm13 = inst_i[12:0];

  assign label_o = simm13;

  always_comb begin
    op_o = OP_OTHER;
    unique case (op)
      SPARC_OP_CALL: op_o = OP_CALL;
      SPARC_OP_FMT2: begin
        // Bicc (010), FBfcc (110), CBccc (111) are branches.
        if (op2 == 3'b010 || op2 == 3'b110 || op2 == 3'b111) op_o = OP_CTI;
      end
      SPARC_OP_FMT3: begin
        if (op3 == SPARC_OP3_JMPL) begin
          if (rd == SPARC_REG_O7)
            op_o = OP_CALL;
          else if (rd == SPARC_REG_G0 && imm &&
                   (rs1 == SPARC_REG_O7 || rs1 == SPARC_REG_I7) &&
                   (simm13 == 13'd8 || simm13 == 13'd12))
            op_o = OP_RET;
          else
            op_o = OP_CTI;
        end else if (op3 == SPARC_OP3_RETT || op3 == SPARC_OP3_TICC) begin
          op_o = OP_CTI;
        end else if (op3 == SPARC_OP3_CFI && imm && rd[4:2] == 3'b000 &&
                     rs1 == 5'd0) begin
          unique case (rd[1:0])
            CFI_FN_BR:  op_o = OP_CFIBR;
            CFI_FN_DEL: op_o = OP_CFIDEL;
            CFI_FN_RET: op_o = OP_CFIRET;
            CFI_FN_REC: op_o = OP_CFIREC;
          endcase
        end
      end
      default: ;  // op=11: loads and stores
    endcase
  end

endmodule
