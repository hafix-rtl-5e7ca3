// tb_sparc_cfi_decode: self-checking test of the SPARC instruction classifier.
//
// Builds instruction words field by field (call, jmpl variants, retl/ret,
// branches, traps, CFI words in all four functions, near-miss CFI words,
// loads/stores, arithmetic, sethi) and compares the class and label with the
// expected ones, followed by random words checked against an independent
// rule table written in the testbench.
module tb_sparc_cfi_decode;
  import hafix_pkg::*;

  logic [31:0]              inst_i;
  cfi_op_e                  op_o;
  logic [SPARC_LABEL_W-1:0] label_o;

  int checks = 0, failures = 0;

  sparc_cfi_decode dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] f3(logic [4:0] rd, logic [5:0] op3, logic [4:0] rs1,
                                     logic i, logic [12:0] low);
    return {2'b10, rd, op3, rs1, i, low};
  endfunction

  task automatic expect_op(logic [31:0] w, cfi_op_e exp, string what);
    inst_i = w;
    #1;
    checks++;
    if (op_o != exp) begin
      failures++;
      $display("TB: FAIL %s: word %h class %0d expected %0d", what, w, op_o, exp);
    end
  endtask

  // Independent reference: the class by the SPARC V8 field rules.
  function automatic cfi_op_e ref_class(logic [31:0] w);
    logic [1:0] op = w[31:30];
    if (op == 2'b01) return OP_CALL;
    if (op == 2'b00) return (w[24:22] inside {3'b010, 3'b110, 3'b111}) ? OP_CTI : OP_OTHER;
    if (op == 2'b11) return OP_OTHER;
    if (w[24:19] == 6'h38) begin
      if (w[29:25] == 5'd15) return OP_CALL;
      if (w[29:25] == 5'd0 && w[13] && (w[18:14] == 5'd15 || w[18:14] == 5'd31) &&
          (w[12:0] == 13'd8 || w[12:0] == 13'd12)) return OP_RET;
      return OP_CTI;
    end
    if (w[24:19] == 6'h39 || w[24:19] == 6'h3A) return OP_CTI;
    if (w[24:19] == 6'h09 && w[13] && w[29:27] == 3'b000 && w[18:14] == 5'd0) begin
      case (w[26:25])
        2'd0: return OP_CFIBR;
        2'd1: return OP_CFIDEL;
        2'd2: return OP_CFIRET;
        default: return OP_CFIREC;
      endcase
    end
    return OP_OTHER;
  endfunction

  initial begin
    expect_op({2'b01, 30'h0000_1234}, OP_CALL, "call");
    expect_op(f3(5'd15, 6'h38, 5'd3, 1'b1, 13'd0), OP_CALL, "jmpl into %o7");
    expect_op(f3(5'd0, 6'h38, 5'd15, 1'b1, 13'd8), OP_RET, "retl");
    expect_op(f3(5'd0, 6'h38, 5'd31, 1'b1, 13'd8), OP_RET, "ret");
    expect_op(f3(5'd0, 6'h38, 5'd31, 1'b1, 13'd12), OP_RET, "ret +12");
    expect_op(f3(5'd0, 6'h38, 5'd5, 1'b1, 13'd8), OP_CTI, "jmpl %g5+8");
    expect_op(f3(5'd0, 6'h38, 5'd15, 1'b1, 13'd4), OP_CTI, "jmpl %o7+4");
    expect_op(f3(5'd0, 6'h38, 5'd15, 1'b0, 13'd8), OP_CTI, "jmpl reg+reg");
    expect_op(f3(5'd0, 6'h39, 5'd17, 1'b1, 13'd0), OP_CTI, "rett");
    expect_op(f3(5'd8, 6'h3A, 5'd0, 1'b1, 13'd3), OP_CTI, "ta 3");
    expect_op({2'b00, 5'b01000, 3'b010, 22'h3}, OP_CTI, "ba");
    expect_op({2'b00, 5'b01000, 3'b110, 22'h3}, OP_CTI, "fba");
    expect_op({2'b00, 5'b00001, 3'b100, 22'h3}, OP_OTHER, "sethi");
    expect_op(32'h0100_0000, OP_OTHER, "nop");
    expect_op(f3(5'd14, 6'h3C, 5'd14, 1'b1, 13'h1FA0), OP_OTHER, "save");
    expect_op(f3(5'd0, 6'h3D, 5'd0, 1'b0, 13'd0), OP_OTHER, "restore");
    expect_op({2'b11, 5'd1, 6'h00, 5'd2, 1'b1, 13'd4}, OP_OTHER, "ld");
    expect_op(f3(5'd1, 6'h02, 5'd0, 1'b1, 13'd5), OP_OTHER, "or");

    expect_op(sparc_cfi_word(CFI_FN_BR, 13'h15), OP_CFIBR, "cfibr 0x15");
    checks++; if (label_o != 13'h15) begin failures++; $display("TB: FAIL cfibr label"); end
    expect_op(sparc_cfi_word(CFI_FN_DEL, 13'h16), OP_CFIDEL, "cfidel 0x16");
    checks++; if (label_o != 13'h16) begin failures++; $display("TB: FAIL cfidel label"); end
    expect_op(sparc_cfi_word(CFI_FN_RET, 13'h1FFF), OP_CFIRET, "cfiret 0x1fff");
    checks++; if (label_o != 13'h1FFF) begin failures++; $display("TB: FAIL cfiret label"); end
    expect_op(sparc_cfi_word(CFI_FN_REC, 13'h0), OP_CFIREC, "cfirec 0");
    expect_op(f3(5'd4, 6'h09, 5'd0, 1'b1, 13'h15), OP_OTHER, "cfi word with rd[2] set");
    expect_op(f3(5'd0, 6'h09, 5'd0, 1'b0, 13'h15), OP_OTHER, "cfi word with i=0");
    expect_op(f3(5'd0, 6'h09, 5'd1, 1'b1, 13'h15), OP_OTHER, "cfi word with rs1!=0");

    for (int i = 0; i < 20000; i++) begin
      logic [31:0] w;
      w = $urandom;
      // Steer a share of the words into the interesting opcode spaces.
      case (i % 4)
        0: w[31:19] = {2'b10, w[29:25], 6'h38};
        1: begin w[31:30] = 2'b10; w[24:19] = 6'h09; w[18:14] = 5'd0; w[13] = 1'b1; w[29:27] = (i % 8 == 1) ? 3'b000 : w[29:27]; end
        2: begin w[31:30] = 2'b10; w[29:25] = 5'd0; w[24:19] = 6'h38; w[13] = 1'b1; w[12:0] = (i % 8 == 2) ? 13'd8 : 13'd12; w[18:14] = (i % 16 < 8) ? 5'd15 : 5'd31; end
        default: ;
      endcase
      expect_op(w, ref_class(w), "random word");
      checks++;
      if (label_o != w[12:0]) begin failures++; $display("TB: FAIL label field"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
