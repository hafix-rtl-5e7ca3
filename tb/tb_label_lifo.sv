// tb_label_lifo: self-checking test of the LEON3 label LIFO.
//
// Random push/pop/incr/decr commands, compared after every edge with a queue
// model of labels and per-entry counters. The LIFO is made small (16 entries,
// 3-bit counters) so that full, empty and counter saturation all occur; the
// commands the LIFO must ignore in those conditions are issued on purpose.
module tb_label_lifo;

  localparam int unsigned DEPTH   = 16;
  localparam int unsigned LABEL_W = 13;
  localparam int unsigned CNT_W   = 3;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               push = 1'b0, pop = 1'b0, incr = 1'b0, decr = 1'b0;
  logic [LABEL_W-1:0] label_i = '0;
  logic [LABEL_W-1:0] top_label;
  logic [CNT_W-1:0]   top_cnt;
  logic               empty, full, cnt_max;
  logic [$clog2(DEPTH):0] level;

  int checks = 0, failures = 0;
  int n_full = 0, n_empty = 0, n_sat = 0;
  logic [LABEL_W-1:0] m_lab[$];
  int                 m_cnt[$];

  label_lifo #(.DEPTH(DEPTH), .LABEL_W(LABEL_W), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  task automatic compare();
    check(empty == (m_lab.size() == 0), "empty");
    check(full == (m_lab.size() == DEPTH), "full");
    check(int'(level) == m_lab.size(), $sformatf("level %0d expected %0d", level, m_lab.size()));
    if (m_lab.size() != 0) begin
      check(top_label == m_lab[$], $sformatf("top label %0h expected %0h", top_label, m_lab[$]));
      check(int'(top_cnt) == m_cnt[$], $sformatf("top count %0d expected %0d", top_cnt, m_cnt[$]));
      check(cnt_max == (m_cnt[$] == 2 ** CNT_W - 1), "cnt_max");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 compare();
    for (int i = 0; i < 20000; i++) begin
      int r, phase;
      @(posedge clk); #1;
      push = 0; pop = 0; incr = 0; decr = 0;
      r = $urandom_range(0, 99);
      phase = (i / 200) % 3;   // fill, drain, mixed
      if (phase == 0)      begin push = r < 60; incr = r >= 60 && r < 85; decr = r >= 85; end
      else if (phase == 1) begin pop = r < 60; decr = r >= 60 && r < 80; incr = r >= 80; end
      else                 begin push = r < 30; pop = r >= 30 && r < 55; incr = r >= 55 && r < 80; decr = r >= 80; end
      label_i = LABEL_W'($urandom);
      // Model update for this edge.
      if (push) begin
        if (m_lab.size() < DEPTH) begin m_lab.push_back(label_i); m_cnt.push_back(0); end
        else n_full++;
      end else if (pop) begin
        if (m_lab.size() != 0) begin void'(m_lab.pop_back()); void'(m_cnt.pop_back()); end
        else n_empty++;
      end else if (incr && m_lab.size() != 0) begin
        if (m_cnt[$] < 2 ** CNT_W - 1) m_cnt[$] = m_cnt[$] + 1;
        else n_sat++;
      end else if (decr && m_lab.size() != 0) begin
        if (m_cnt[$] > 0) m_cnt[$] = m_cnt[$] - 1;
      end
      @(posedge clk); #1;
      push = 0; pop = 0; incr = 0; decr = 0;
      #1 compare();
    end
    check(n_full > 0, "push on full exercised");
    check(n_empty > 0, "pop on empty exercised");
    check(n_sat > 0, "counter saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
