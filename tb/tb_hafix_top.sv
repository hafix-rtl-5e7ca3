// tb_hafix_top: end-to-end test of both HAFIX units at their full default sizes.
//
// Phase 1 runs one instrumented program on both cores at once: a call tree of
// ordinary functions and one recursive function, entered with CFIBR/CFIREC,
// left with CFIDEL and returning to CFIRET call sites, with random pipeline
// bubbles and (on SPARC) trap flushes. Siskiyou Peak gets decoded instruction
// classes in x86 order (CFIDEL before ret); LEON3 gets real 32-bit SPARC words
// in SPARC order (call, delay-slot nop, ..., retl, CFIDEL in the delay slot).
// No violation may occur; the recursion counter and the LIFO depth are
// checked against the program's own bookkeeping.
// Phase 2 attacks: a return redirected to the call site of a function that is
// active but is not the caller (Siskiyou Peak accepts it, LEON3 halts), a
// return to an inactive call site, a return into non-CFIRET code, a call into
// a function body, a control transfer in a delay slot, CFIDEL with nothing
// active, 1025 nested functions for the 1024-entry LIFO, recursion past the
// LIFO counter and past the 16-bit CFIREC_CNTR.
// Each mechanism is counted and must occur at least once.
module tb_hafix_top;
  import hafix_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        sp_valid_i = 1'b0;
  cfi_op_e     sp_op_i = OP_OTHER;
  logic [13:0] sp_label_i = '0;
  logic        sp_stall_o, sp_exception_o;
  cfi_cause_e  sp_cause_o;
  logic [15:0] sp_rec_cnt_o;
  logic [13:0] sp_rec_label_o;
  logic        sparc_valid_i = 1'b0, sparc_flush_i = 1'b0;
  logic [31:0] sparc_inst_i = 32'h0100_0000;
  logic        sparc_fault_o, sparc_halt_o;
  cfi_cause_e  sparc_cause_o;
  logic [10:0] sparc_depth_o;

  hafix_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt [string];

  localparam logic [31:0] NOP  = 32'h0100_0000;
  localparam logic [31:0] SAVE = {2'b10, 5'd14, 6'h3C, 5'd14, 1'b1, 13'h1FA0};
  localparam logic [31:0] REST = {2'b10, 5'd0, 6'h3D, 5'd0, 1'b0, 13'd0};
  localparam logic [31:0] RETL = {2'b10, 5'd0, 6'h38, 5'd15, 1'b1, 13'd8};
  localparam logic [31:0] BA   = {2'b00, 5'b01000, 3'b010, 22'h10};
  localparam logic [31:0] ADD  = {2'b10, 5'd1, 6'h00, 5'd2, 1'b1, 13'd4};

  function automatic logic [31:0] call_w(int disp);
    return {2'b01, 30'(disp)};
  endfunction

  // Program: function f has label 'h10 + f; function REC is recursive and
  // calls only itself. Children of f are chosen among higher-numbered ones.
  localparam int NFUNC = 8;
  localparam int REC   = 7;
  int children [NFUNC][$];

  function automatic logic [12:0] lab(int f);
    return 13'(16 + f);
  endfunction

  initial begin
    repeat (3000000) @(posedge clk);
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

  function automatic void count(string m);
    if (cnt.exists(m)) cnt[m]++;
    else cnt[m] = 1;
  endfunction

  task automatic do_reset();
    int n = 0;
    @(posedge clk); #1;
    sp_valid_i = 1'b0; sparc_valid_i = 1'b0; sparc_flush_i = 1'b0; rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    #7;
    while (sp_stall_o) begin
      count("sp_stall_cycle");
      @(posedge clk); #8;
      n++;
    end
    check(n >= 16383 && n <= 16385, $sformatf("label memory clear took %0d cycles", n));
    check(!sparc_halt_o && sparc_depth_o == 0, "LEON3 unit clean after reset");
  endtask

  // ---------------- Siskiyou Peak side ----------------
  int sp_rec_level = 0;

  // One executed instruction; checks the exception in the same cycle.
  task automatic sp_exec(cfi_op_e op, logic [13:0] l, cfi_cause_e expect_cause = CAUSE_NONE);
    if ($urandom_range(0, 9) == 0) begin
      @(posedge clk); #1 sp_valid_i = 1'b0;
      count("sp_bubble");
      #7 check(!sp_exception_o, "SP: no exception on bubble");
    end
    @(posedge clk); #1;
    sp_valid_i = 1'b1; sp_op_i = op; sp_label_i = l;
    #7;
    check(!sp_stall_o, "SP: no stall");
    check(sp_cause_o == expect_cause,
          $sformatf("SP: cause %s expected %s (op %s label %0h)", sp_cause_o.name(), expect_cause.name(), op.name(), l));
    check(sp_exception_o == (expect_cause != CAUSE_NONE), "SP: exception flag");
    if (expect_cause != CAUSE_NONE) count({"sp_exception_", expect_cause.name()});
    @(posedge clk); #1 sp_valid_i = 1'b0; #7;
  endtask

  task automatic sp_func(int f, int rec_left);
    if (f == REC) begin
      sp_exec(OP_CFIREC, 14'(lab(f)));
      sp_rec_level++;
      count("sp_cfirec");
    end else begin
      sp_exec(OP_CFIBR, 14'(lab(f)));
      count("sp_cfibr");
    end
    repeat ($urandom_range(0, 3)) sp_exec(OP_OTHER, 0);
    foreach (children[f][i]) begin
      sp_exec(OP_CALL, 0);
      sp_func(children[f][i], $urandom_range(1, 6));
      sp_exec(OP_CFIRET, 14'(lab(f)));
      count("sp_cfiret_ok");
    end
    if (f == REC && rec_left > 0) begin
      sp_exec(OP_CALL, 0);
      sp_func(f, rec_left - 1);
      sp_exec(OP_CFIRET, 14'(lab(f)));
      count("sp_cfiret_recursive");
    end
    if (f == REC) begin
      check(int'(sp_rec_cnt_o) == sp_rec_level, "SP: CFIREC_CNTR equals recursion depth");
      check(sp_rec_label_o == 14'(lab(REC)), "SP: CFIREC_CNTR bound to the recursive label");
      sp_rec_level--;
      if (sp_rec_level > 0) count("sp_cfidel_counter_only");
      else                  count("sp_cfidel_last_instance");
    end
    sp_exec(OP_CFIDEL, 14'(lab(f)));
    sp_exec(OP_RET, 0);
  endtask

  // ---------------- LEON3 side ----------------
  logic [12:0] m_lab[$];
  int          m_cnt[$];

  task automatic sparc_exec(logic [31:0] w, cfi_cause_e expect_cause = CAUSE_NONE);
    int r = $urandom_range(0, 19);
    if (r == 0) begin
      @(posedge clk); #1 sparc_valid_i = 1'b0;
      count("sparc_bubble");
      #7 check(!sparc_fault_o, "SPARC: no fault on bubble");
    end
    @(posedge clk); #1;
    sparc_valid_i = 1'b1; sparc_inst_i = w;
    #7;
    check(sparc_cause_o == expect_cause,
          $sformatf("SPARC: cause %s expected %s (word %h)", sparc_cause_o.name(), expect_cause.name(), w));
    check(sparc_fault_o == (expect_cause != CAUSE_NONE), "SPARC: fault flag");
    if (expect_cause != CAUSE_NONE) count({"sparc_fault_", expect_cause.name()});
    @(posedge clk); #1 sparc_valid_i = 1'b0; #7;
    if (expect_cause != CAUSE_NONE) check(sparc_halt_o, "SPARC: CPU halted after fault");
  endtask

  task automatic sparc_flush();
    @(posedge clk); #1;
    sparc_valid_i = 1'b0; sparc_flush_i = 1'b1;
    #7 check(!sparc_fault_o, "SPARC: no fault on flush");
    count("sparc_flush");
    @(posedge clk); #1 sparc_flush_i = 1'b0;
  endtask

  // Entry label bookkeeping for the LIFO depth check.
  function automatic void m_enter(logic [12:0] l);
    if (m_lab.size() != 0 && m_lab[$] == l) begin m_cnt[$]++; count("sparc_lifo_counter_inc"); end
    else begin m_lab.push_back(l); m_cnt.push_back(0); count("sparc_lifo_push"); end
  endfunction
  function automatic void m_leave();
    if (m_cnt[$] != 0) begin m_cnt[$]--; count("sparc_lifo_counter_dec"); end
    else begin void'(m_lab.pop_back()); void'(m_cnt.pop_back()); count("sparc_lifo_pop"); end
  endfunction

  task automatic sparc_func(int f, int rec_left);
    sparc_exec(sparc_cfi_word((f == REC) ? CFI_FN_REC : CFI_FN_BR, lab(f)));
    m_enter(lab(f));
    sparc_exec(SAVE);
    check(int'(sparc_depth_o) == m_lab.size(), $sformatf("SPARC: LIFO depth %0d expected %0d", sparc_depth_o, m_lab.size()));
    if ($urandom_range(0, 3) == 0) sparc_flush();
    repeat ($urandom_range(0, 3)) sparc_exec(ADD);
    foreach (children[f][i]) begin
      sparc_exec(call_w(64 * children[f][i]));
      sparc_exec(NOP);
      sparc_func(children[f][i], $urandom_range(1, 6));
      sparc_exec(sparc_cfi_word(CFI_FN_RET, lab(f)));
      count("sparc_cfiret_ok");
    end
    if (f == REC && rec_left > 0) begin
      sparc_exec(call_w(0));
      sparc_exec(NOP);
      sparc_func(f, rec_left - 1);
      sparc_exec(sparc_cfi_word(CFI_FN_RET, lab(f)));
      count("sparc_cfiret_recursive");
    end
    sparc_exec(REST);
    sparc_exec(RETL);
    sparc_exec(sparc_cfi_word(CFI_FN_DEL, lab(f)));
    m_leave();
  endtask

  initial begin
    // Call tree: 0 -> {1,2,REC}, 1 -> {3,4}, 2 -> {5,REC}, 3 -> {6}, 4 -> {REC}.
    children[0] = '{1, 2, REC};
    children[1] = '{3, 4};
    children[2] = '{5, REC};
    children[3] = '{6};
    children[4] = '{REC};

    do_reset();

    // ---- Phase 1: a legal program, several runs, both cores at once ----
    // The start-up code (label 'h0F) calls main (function 0) repeatedly.
    fork
      sp_exec(OP_CFIBR, 14'h0F);
      begin
        sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'h0F));
        m_enter(13'h0F);
      end
    join
    for (int run = 0; run < 20; run++) begin
      fork
        begin
          sp_exec(OP_CALL, 0);
          sp_func(0, 0);
          sp_exec(OP_CFIRET, 14'h0F);
        end
        begin
          sparc_exec(call_w(4)); sparc_exec(NOP);
          sparc_func(0, 0);
          sparc_exec(sparc_cfi_word(CFI_FN_RET, 13'h0F));
          check(sparc_depth_o == 1, "SPARC: only the start-up label left after main returns");
        end
      join
      check(!sparc_halt_o, "SPARC: legal program not halted");
    end
    do_reset();

    // ---- Phase 2: attacks ----
    // Stack: main(0x10) -> funct_a(0x15) -> funct_b(0x16); funct_b's return
    // address is redirected to main's call site.
    fork
      begin
        sp_exec(OP_CFIBR, 14'h10);
        sp_exec(OP_CALL, 0);
        sp_exec(OP_CFIBR, 14'h15);
        sp_exec(OP_CALL, 0);
        sp_exec(OP_CFIBR, 14'h16);
        sp_exec(OP_CFIDEL, 14'h16);
        sp_exec(OP_RET, 0);
        sp_exec(OP_CFIRET, 14'h10);   // main is active: allowed by the policy
        count("sp_return_to_active_non_caller_allowed");
        sp_exec(OP_RET, 0);
        sp_exec(OP_CFIRET, 14'h16, CAUSE_LABEL);   // funct_b no longer active
        sp_exec(OP_RET, 0);
        sp_exec(OP_CFIRET, 14'h77, CAUSE_LABEL);   // never active
        sp_exec(OP_RET, 0);
        sp_exec(OP_OTHER, 0, CAUSE_NO_CFIRET);     // gadget without CFIRET
        sp_exec(OP_CALL, 0);
        sp_exec(OP_OTHER, 0, CAUSE_NO_CFIBR);      // call into a function body
        sp_exec(OP_RET, 0);
        sp_exec(OP_CFIRET, 14'h15);                // execution continues normally
      end
      begin
        sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'h10));
        sparc_exec(call_w(8)); sparc_exec(NOP);
        sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'h15));
        sparc_exec(call_w(8)); sparc_exec(NOP);
        sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'h16));
        check(sparc_depth_o == 3, "SPARC: three labels stacked");
        sparc_exec(RETL);
        sparc_exec(sparc_cfi_word(CFI_FN_DEL, 13'h16));
        sparc_exec(sparc_cfi_word(CFI_FN_RET, 13'h10), CAUSE_LABEL);
        count("sparc_return_to_active_non_caller_refused");
        repeat (5) sparc_exec(ADD);
        check(sparc_halt_o && !sparc_fault_o, "SPARC: stays halted");
      end
    join

    // Siskiyou Peak: recursion beyond the 16-bit CFIREC_CNTR.
    for (int i = 0; i < 65535; i++) begin
      @(posedge clk); #1 sp_valid_i = 1'b1; sp_op_i = OP_CFIREC; sp_label_i = 14'h200;
    end
    #7 check(!sp_exception_o, "SP: 65535 instances fit");
    @(posedge clk); #1 sp_valid_i = 1'b0; #7;
    check(sp_rec_cnt_o == 16'hFFFF, "SP: counter at maximum");
    sp_exec(OP_CFIREC, 14'h200, CAUSE_OVERFLOW);

    // LEON3: control transfer in a return delay slot.
    do_reset();
    sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'h10));
    sparc_exec(RETL);
    sparc_exec(BA, CAUSE_DELAY_SLOT);

    // LEON3: call that does not land on CFIBR.
    do_reset();
    sparc_exec(call_w(8)); sparc_exec(NOP);
    sparc_exec(SAVE, CAUSE_NO_CFIBR);

    // LEON3: return that does not land on CFIRET.
    do_reset();
    sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'h10));
    sparc_exec(call_w(8)); sparc_exec(NOP);
    sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'h11));
    sparc_exec(RETL);
    sparc_exec(sparc_cfi_word(CFI_FN_DEL, 13'h11));
    sparc_exec(ADD, CAUSE_NO_CFIRET);

    // LEON3: CFIDEL with an empty LIFO.
    do_reset();
    sparc_exec(RETL);
    sparc_exec(sparc_cfi_word(CFI_FN_DEL, 13'h10), CAUSE_UNDERFLOW);

    // LEON3: 1024 nested functions fill the LIFO; the 1025th overflows.
    do_reset();
    for (int i = 0; i < 1024; i++) begin
      if (i != 0) begin sparc_exec(call_w(8)); sparc_exec(NOP); end
      sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'(100 + i)));
    end
    @(posedge clk); #8;
    check(sparc_depth_o == 1024, "SPARC: LIFO full at 1024");
    sparc_exec(call_w(8)); sparc_exec(NOP);
    sparc_exec(sparc_cfi_word(CFI_FN_BR, 13'h1FFF), CAUSE_OVERFLOW);
    count("sparc_lifo_full");

    // LEON3: 256 instances of one recursive function fit in one entry.
    do_reset();
    for (int i = 0; i < 256; i++) begin
      if (i != 0) begin sparc_exec(call_w(0)); sparc_exec(NOP); end
      sparc_exec(sparc_cfi_word(CFI_FN_REC, 13'h40));
    end
    @(posedge clk); #8;
    check(sparc_depth_o == 1, "SPARC: deep recursion uses one entry");
    sparc_exec(call_w(0)); sparc_exec(NOP);
    sparc_exec(sparc_cfi_word(CFI_FN_REC, 13'h40), CAUSE_OVERFLOW);
    do_reset();

    foreach (cnt[m]) $display("TB: %-45s %0d", m, cnt[m]);
    begin
      automatic string need[] = '{"sp_stall_cycle", "sp_bubble", "sp_cfibr", "sp_cfirec", "sp_cfiret_ok",
        "sp_cfiret_recursive", "sp_cfidel_counter_only", "sp_cfidel_last_instance",
        "sp_return_to_active_non_caller_allowed", "sp_exception_CAUSE_LABEL",
        "sp_exception_CAUSE_NO_CFIRET", "sp_exception_CAUSE_NO_CFIBR", "sp_exception_CAUSE_OVERFLOW",
        "sparc_bubble", "sparc_flush", "sparc_lifo_push", "sparc_lifo_pop",
        "sparc_lifo_counter_inc", "sparc_lifo_counter_dec", "sparc_cfiret_ok", "sparc_cfiret_recursive",
        "sparc_return_to_active_non_caller_refused", "sparc_lifo_full",
        "sparc_fault_CAUSE_LABEL", "sparc_fault_CAUSE_NO_CFIBR", "sparc_fault_CAUSE_NO_CFIRET",
        "sparc_fault_CAUSE_DELAY_SLOT", "sparc_fault_CAUSE_UNDERFLOW", "sparc_fault_CAUSE_OVERFLOW"};
      foreach (need[i]) check(cnt.exists(need[i]), {"mechanism never happened: ", need[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
