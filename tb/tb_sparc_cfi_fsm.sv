// tb_sparc_cfi_fsm: self-checking test of the LEON3 HAFIX-FSM with its label LIFO.
//
// First a directed run of the two functions funct_a/funct_b (labels 0x15 and
// 0x16) in the SPARC instruction order of the HAFIX example: cfibr, call, nop,
// cfibr, ..., retl, cfidel (delay slot), cfiret. Then a long random stream
// whose choices are biased towards legal programs, with stall bubbles,
// flushes, recursion, LIFO overflow and deliberate violations. Every cycle the
// fault, cause, halt and LIFO depth outputs are compared with a model of the
// rules kept in this testbench. After each halt the CPU is reset.
module tb_sparc_cfi_fsm;
  import hafix_pkg::*;

  localparam int unsigned DEPTH   = 16;
  localparam int unsigned LABEL_W = 13;
  localparam int unsigned CNT_W   = 3;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               valid_i = 1'b0, flush_i = 1'b0;
  cfi_op_e            op_i = OP_OTHER;
  logic [LABEL_W-1:0] label_i = '0;
  logic               fault_o, halt_o;
  cfi_cause_e         cause_o;
  logic [$clog2(DEPTH):0] depth_o;

  sparc_cfi_fsm #(.DEPTH(DEPTH), .LABEL_W(LABEL_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [cfi_cause_e];
  int n_incr = 0, n_push = 0, n_pop = 0, n_decr = 0, n_flush = 0, n_bubble = 0, n_halt_cycles = 0;

  // Model state.
  typedef enum {M_RUN, M_CALL_DS, M_EXP_BR, M_RET_DS, M_EXP_RET, M_HALT} m_state_e;
  m_state_e           m_state;
  logic [LABEL_W-1:0] m_lab[$];
  int                 m_cnt[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("TB: FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit is_cti(cfi_op_e op);
    return op inside {OP_CALL, OP_RET, OP_CTI};
  endfunction

  // Expected cause of one issued instruction in the model's state; updates the
  // model when apply is set.
  function automatic cfi_cause_e model_step(cfi_op_e op, logic [LABEL_W-1:0] lab, bit apply);
    cfi_cause_e c = CAUSE_NONE;
    bit top_eq = (m_lab.size() != 0) && (m_lab[$] == lab);
    if ((m_state == M_CALL_DS || m_state == M_RET_DS) && is_cti(op)) c = CAUSE_DELAY_SLOT;
    else if (m_state == M_EXP_BR && !(op inside {OP_CFIBR, OP_CFIREC})) c = CAUSE_NO_CFIBR;
    else if (m_state == M_EXP_RET && op != OP_CFIRET) c = CAUSE_NO_CFIRET;
    else if (op inside {OP_CFIBR, OP_CFIREC}) begin
      if (top_eq) begin
        if (m_cnt[$] == 2 ** CNT_W - 1) c = CAUSE_OVERFLOW;
        else if (apply) begin m_cnt[$] = m_cnt[$] + 1; n_incr++; end
      end else begin
        if (m_lab.size() == DEPTH) c = CAUSE_OVERFLOW;
        else if (apply) begin m_lab.push_back(lab); m_cnt.push_back(0); n_push++; end
      end
    end else if (op == OP_CFIDEL) begin
      if (m_lab.size() == 0) c = CAUSE_UNDERFLOW;
      else if (apply) begin
        if (m_cnt[$] != 0) begin m_cnt[$] = m_cnt[$] - 1; n_decr++; end
        else begin void'(m_lab.pop_back()); void'(m_cnt.pop_back()); n_pop++; end
      end
    end else if (op == OP_CFIRET) begin
      if (!top_eq) c = CAUSE_LABEL;
    end
    if (apply) begin
      if (c != CAUSE_NONE) m_state = M_HALT;
      else case (m_state)
        M_CALL_DS: m_state = M_EXP_BR;
        M_RET_DS:  m_state = M_EXP_RET;
        default:   m_state = (op == OP_CALL) ? M_CALL_DS : (op == OP_RET) ? M_RET_DS : M_RUN;
      endcase
    end
    return c;
  endfunction

  task automatic do_reset();
    @(posedge clk); #1;
    valid_i = 1'b0; flush_i = 1'b0; rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    m_state = M_RUN;
    m_lab.delete();
    m_cnt.delete();
  endtask

  // Drives one cycle and checks the outputs against the model.
  task automatic issue(bit v, cfi_op_e op, logic [LABEL_W-1:0] lab, bit fl = 1'b0);
    cfi_cause_e exp;
    @(posedge clk); #1;
    valid_i = v; op_i = op; label_i = lab; flush_i = fl;
    #1;
    check(int'(depth_o) == m_lab.size(), $sformatf("depth %0d expected %0d", depth_o, m_lab.size()));
    check(halt_o == (m_state == M_HALT), "halt");
    if (m_state == M_HALT) begin
      n_halt_cycles++;
      check(!fault_o, "no fault while halted");
    end else if (fl) begin
      n_flush++;
      check(!fault_o, "no fault on flush");
      m_state = M_RUN;
    end else if (!v) begin
      n_bubble++;
      check(!fault_o, "no fault on bubble");
    end else begin
      exp = model_step(op, lab, 1'b0);
      check(cause_o == exp, $sformatf("cause %0d expected %0d (op %0d state %0d)", cause_o, exp, op, m_state));
      check(fault_o == (exp != CAUSE_NONE), "fault");
      void'(model_step(op, lab, 1'b1));
      if (exp != CAUSE_NONE) seen[exp]++;
    end
  endtask

  initial begin
    int cycles;
    m_state = M_RUN;
    do_reset();

    // funct_a calls funct_b, as in the SPARC listing of the example.
    issue(1, OP_CFIBR, 13'h15);   // funct_a entry
    issue(1, OP_OTHER, 0);        // save
    issue(1, OP_CALL, 0);         // call funct_b
    issue(1, OP_OTHER, 0);        // nop (delay slot)
    issue(1, OP_CFIBR, 13'h16);   // funct_b entry
    issue(1, OP_OTHER, 0);        // save
    check(depth_o == 2, "two labels active inside funct_b");
    issue(0, OP_OTHER, 0);        // stall bubble
    issue(1, OP_OTHER, 0);        // restore
    issue(1, OP_RET, 0);          // retl
    issue(1, OP_CFIDEL, 13'h16);  // delay slot
    issue(1, OP_CFIRET, 13'h15);  // back in funct_a
    check(depth_o == 1 && !halt_o, "back in funct_a without fault");
    // A forged return into funct_a's call site with a wrong label halts.
    issue(1, OP_CALL, 0);
    issue(1, OP_OTHER, 0);
    issue(1, OP_CFIBR, 13'h16);
    issue(1, OP_RET, 0);
    issue(1, OP_CFIDEL, 13'h16);
    issue(1, OP_CFIRET, 13'h99);
    issue(1, OP_OTHER, 0);
    check(halt_o, "forged return halts");
    do_reset();

    // Random streams.
    cycles = 0;
    for (int i = 0; i < 60000; i++) begin
      int r, grow;
      cfi_op_e op;
      logic [LABEL_W-1:0] lab;
      bit v, fl;
      r = $urandom_range(0, 999);
      lab = LABEL_W'($urandom_range(1, 6));
      v = r >= 30;
      fl = (r < 5) && (m_state == M_RUN);
      if (m_state == M_HALT) begin
        repeat ($urandom_range(1, 3)) issue(1, OP_OTHER, 0);
        do_reset();
        continue;
      end
      case (m_state)
        M_EXP_BR:  op = (r < 990) ? (r % 3 == 0 ? OP_CFIREC : OP_CFIBR) : OP_OTHER;
        M_EXP_RET: begin
          op = (r < 995) ? OP_CFIRET : OP_CFIDEL;
          if (m_lab.size() != 0 && r < 985) lab = m_lab[$];
        end
        M_RET_DS:  op = (r < 995) ? OP_CFIDEL : OP_CTI;
        M_CALL_DS: op = (r < 995) ? OP_OTHER : OP_CALL;
        default: begin
          // Grow the stack in some phases, unwind it in others.
          grow = ((i / 500) % 2 == 0) ? 40 : 20;
          if (r % 100 < 40)           op = OP_OTHER;
          else if (r % 100 < 40 + grow) op = OP_CALL;
          else if (m_lab.size() != 0) op = OP_RET;
          else                        op = OP_OTHER;
          if (r == 999) op = OP_CFIDEL;
          if (r == 998) op = OP_CTI;
          // Recursion: call the same function again.
          if (op == OP_CALL && m_lab.size() != 0 && r % 3 == 0) lab = m_lab[$];
        end
      endcase
      if (m_state == M_EXP_BR && m_lab.size() != 0 && r % 2 == 0) lab = m_lab[$];
      issue(v, op, lab, fl);
    end

    foreach (seen[c]) $display("TB: cause %s seen %0d times", c.name(), seen[c]);
    $display("TB: push %0d incr %0d decr %0d pop %0d flush %0d bubble %0d",
             n_push, n_incr, n_decr, n_pop, n_flush, n_bubble);
    check(seen.exists(CAUSE_LABEL) && seen.exists(CAUSE_OVERFLOW) &&
          seen.exists(CAUSE_NO_CFIBR) && seen.exists(CAUSE_NO_CFIRET) &&
          seen.exists(CAUSE_DELAY_SLOT) && seen.exists(CAUSE_UNDERFLOW),
          "every fault cause exercised");
    check(n_incr > 0 && n_decr > 0 && n_push > 0 && n_pop > 0 && n_flush > 0,
          "every LIFO operation and flush exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
