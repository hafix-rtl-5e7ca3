// tb_sp_cfi_ctrl: self-checking test of the Siskiyou Peak CFI control unit.
//
// Covers: the stall while the label memory clears after reset (instructions
// offered then must have no effect); the funct_a/funct_b example in the x86
// instruction order (cfibr, push, mov, call, cfibr, ..., cfidel, ret, cfiret);
// a recursive function entered four times through CFIREC, with the counter
// and the label checked on the way down and up; forged returns. Then a long
// random stream biased towards legal programs, compared every cycle with a
// model (a label bitmap, the recursion counter and the sequencing state).
// Inputs change just after the rising edge; the exception is checked in the
// same cycle, before the next rising edge, which is the single-cycle timing.
module tb_sp_cfi_ctrl;
  import hafix_pkg::*;

  localparam int unsigned LABEL_W = 14;
  localparam int unsigned CNT_W   = 4;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               valid_i = 1'b0;
  cfi_op_e            op_i = OP_OTHER;
  logic [LABEL_W-1:0] label_i = '0;
  logic               stall_o, exception_o;
  cfi_cause_e         cause_o;
  logic [CNT_W-1:0]   rec_cnt_o;
  logic [LABEL_W-1:0] rec_label_o;

  sp_cfi_ctrl #(.LABEL_W(LABEL_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int seen [cfi_cause_e];
  int n_rec_inc = 0, n_rec_last = 0, n_ret_ok = 0;

  typedef enum {M_NORMAL, M_EXP_BR, M_EXP_RET} m_state_e;
  m_state_e           m_state;
  bit                 m_active [logic [LABEL_W-1:0]];
  int                 m_cnt;
  logic [LABEL_W-1:0] m_cnt_label;

  initial begin
    repeat (400000) @(posedge clk);
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

  function automatic bit act(logic [LABEL_W-1:0] l);
    return m_active.exists(l) && m_active[l];
  endfunction

  function automatic cfi_cause_e model_step(cfi_op_e op, logic [LABEL_W-1:0] l, bit apply);
    cfi_cause_e c = CAUSE_NONE;
    bit match = (m_cnt != 0) && (m_cnt_label == l);
    if (m_state == M_EXP_BR && !(op inside {OP_CFIBR, OP_CFIREC})) c = CAUSE_NO_CFIBR;
    else if (m_state == M_EXP_RET && op != OP_CFIRET) c = CAUSE_NO_CFIRET;
    else if (op == OP_CFIRET && !act(l)) c = CAUSE_LABEL;
    else if (op == OP_CFIREC && (m_cnt == 0 || match) && m_cnt == 2 ** CNT_W - 1) c = CAUSE_OVERFLOW;
    if (apply) begin
      if (c == CAUSE_NONE) begin
        case (op)
          OP_CFIBR: m_active[l] = 1'b1;
          OP_CFIREC:
            if (m_cnt == 0) begin m_active[l] = 1'b1; m_cnt = 1; m_cnt_label = l; n_rec_inc++; end
            else if (match) begin m_cnt++; n_rec_inc++; end
            else m_active[l] = 1'b1;
          OP_CFIDEL:
            if (match) begin
              m_cnt--;
              if (m_cnt == 0) begin m_active[l] = 1'b0; n_rec_last++; end
            end else m_active[l] = 1'b0;
          OP_CFIRET: n_ret_ok++;
          default: ;
        endcase
        m_state = (op == OP_CALL) ? M_EXP_BR : (op == OP_RET) ? M_EXP_RET : M_NORMAL;
      end else m_state = M_NORMAL;
    end
    return c;
  endfunction

  task automatic do_reset();
    int n = 0;
    @(posedge clk); #1;
    valid_i = 1'b0; rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    m_state = M_NORMAL; m_active.delete(); m_cnt = 0; m_cnt_label = '0;
    // Offer instructions during the clearing stall; they must be ignored.
    while (stall_o) begin
      @(posedge clk); #1;
      valid_i = 1'b1; op_i = (n % 2 == 0) ? OP_CALL : OP_CFIRET; label_i = LABEL_W'(n);
      #7 check(!exception_o, "no exception while stalled");
      n++;
    end
    check(n >= 2 ** LABEL_W - 1 && n <= 2 ** LABEL_W + 1, $sformatf("stall lasted %0d cycles", n));
    valid_i = 1'b0;
  endtask

  task automatic issue(bit v, cfi_op_e op, logic [LABEL_W-1:0] l);
    cfi_cause_e exp;
    @(posedge clk); #1;
    valid_i = v; op_i = op; label_i = l;
    #7;  // after the falling edge, before the next rising edge
    check(!stall_o, "no stall after clearing");
    check(int'(rec_cnt_o) == m_cnt, $sformatf("recursion count %0d expected %0d", rec_cnt_o, m_cnt));
    if (!v) begin
      check(!exception_o, "no exception on bubble");
    end else begin
      exp = model_step(op, l, 1'b0);
      check(cause_o == exp, $sformatf("cause %0d expected %0d (op %0d label %0h)", cause_o, exp, op, l));
      check(exception_o == (exp != CAUSE_NONE), "exception");
      void'(model_step(op, l, 1'b1));
      if (exp != CAUSE_NONE) seen[exp]++;
    end
  endtask

  initial begin
    do_reset();

    // funct_a calls funct_b (x86 order of the example).
    issue(1, OP_CFIBR, 14'h15);
    issue(1, OP_OTHER, 0);        // push %ebp
    issue(1, OP_OTHER, 0);        // mov
    issue(1, OP_CALL, 0);         // call funct_b
    issue(1, OP_CFIBR, 14'h16);
    issue(1, OP_OTHER, 0);
    issue(1, OP_CFIDEL, 14'h16);
    issue(1, OP_RET, 0);
    issue(1, OP_CFIRET, 14'h15);  // back in funct_a
    check(!exception_o, "legal return accepted");
    // Return to funct_b's call site after funct_b was deactivated.
    issue(1, OP_CALL, 0);
    issue(1, OP_CFIBR, 14'h16);
    issue(1, OP_CFIDEL, 14'h16);
    issue(1, OP_RET, 0);
    issue(1, OP_CFIRET, 14'h16);
    check(exception_o && cause_o == CAUSE_LABEL, "return to inactive call site caught");
    // Return into the middle of a function (no CFIRET).
    issue(1, OP_RET, 0);
    issue(1, OP_OTHER, 0);
    check(exception_o && cause_o == CAUSE_NO_CFIRET, "return to non-CFIRET caught");
    // Call that does not land on CFIBR.
    issue(1, OP_CALL, 0);
    issue(1, OP_OTHER, 0);
    check(exception_o && cause_o == CAUSE_NO_CFIBR, "call to non-CFIBR caught");

    // Recursion: rec (label 0x40) called from funct_a, depth 4.
    for (int d = 1; d <= 4; d++) begin
      issue(1, OP_CALL, 0);
      issue(1, OP_CFIREC, 14'h40);
      check(rec_cnt_o == CNT_W'(d - 1), "count before update");
    end
    issue(1, OP_OTHER, 0);
    check(rec_cnt_o == 4, "counter at depth 4");
    check(rec_label_o == 14'h40, "counter bound to the recursive label");
    for (int d = 4; d >= 1; d--) begin
      issue(1, OP_CFIDEL, 14'h40);
      issue(1, OP_RET, 0);
      issue(1, OP_CFIRET, (d > 1) ? 14'h40 : 14'h15);
      check(!exception_o, "recursive return accepted");
    end
    issue(1, OP_CFIRET, 14'h40);
    check(exception_o && cause_o == CAUSE_LABEL, "recursive label gone after last instance");

    // Recursion deeper than the counter can hold.
    for (int d = 1; d < 2 ** CNT_W; d++) issue(1, OP_CFIREC, 14'h50);
    issue(1, OP_CFIREC, 14'h50);
    check(exception_o && cause_o == CAUSE_OVERFLOW, "counter overflow caught");

    do_reset();

    for (int i = 0; i < 80000; i++) begin
      int r;
      cfi_op_e op;
      logic [LABEL_W-1:0] l;
      logic [LABEL_W-1:0] known[$];
      r = $urandom_range(0, 999);
      l = LABEL_W'($urandom_range(1, 8) * 1000);
      known.delete();
      foreach (m_active[k]) if (m_active[k]) known.push_back(k);
      case (m_state)
        M_EXP_BR: begin
          op = (r < 985) ? ((r % 3 == 0) ? OP_CFIREC : OP_CFIBR) : OP_OTHER;
          if (r % 4 == 0) l = LABEL_W'(1000);  // a recursive function
        end
        M_EXP_RET: begin
          op = (r < 990) ? OP_CFIRET : OP_CFIBR;
          if (known.size() != 0 && r < 970) l = known[$urandom_range(0, known.size() - 1)];
        end
        default: begin
          if (r < 350)      op = OP_OTHER;
          else if (r < 600) op = OP_CALL;
          else if (r < 800) op = OP_CFIDEL;
          else if (r < 950) op = OP_RET;
          else if (r < 975) op = OP_CFIRET;
          else              op = OP_CFIBR;
          if (op == OP_CFIDEL && known.size() != 0 && r % 5 != 0)
            l = known[$urandom_range(0, known.size() - 1)];
          if (op == OP_CFIDEL && r % 7 == 0) l = LABEL_W'(1000);
        end
      endcase
      issue(r >= 20, op, l);
    end

    foreach (seen[c]) $display("TB: cause %s seen %0d times", c.name(), seen[c]);
    $display("TB: recursion increments %0d, last-instance deletes %0d, good returns %0d",
             n_rec_inc, n_rec_last, n_ret_ok);
    check(seen.exists(CAUSE_LABEL) && seen.exists(CAUSE_OVERFLOW) &&
          seen.exists(CAUSE_NO_CFIBR) && seen.exists(CAUSE_NO_CFIRET),
          "every exception cause exercised");
    check(n_rec_inc > 0 && n_rec_last > 0 && n_ret_ok > 0, "recursion and legal returns exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
