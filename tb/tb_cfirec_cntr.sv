// tb_cfirec_cntr: self-checking test of the CFIREC_CNTR recursion counter.
//
// Random increment/decrement traffic with a handful of labels, compared each
// cycle with a reference model: the first increment binds the label, match is
// true only for the bound label while the count is non-zero, the count never
// wraps and never goes below zero. A narrow counter makes saturation reachable.
module tb_cfirec_cntr;

  localparam int unsigned LABEL_W = 14;
  localparam int unsigned CNT_W   = 4;

  logic               clk = 1'b0, rst_n = 1'b0;
  logic               inc = 1'b0, dec = 1'b0;
  logic [LABEL_W-1:0] label_i = '0;
  logic [CNT_W-1:0]   cnt;
  logic [LABEL_W-1:0] cnt_label;
  logic               match, full;

  int checks = 0, failures = 0;
  int m_cnt = 0;
  logic [LABEL_W-1:0] m_label = '0;
  int n_full = 0, n_bind = 0;

  cfirec_cntr #(.LABEL_W(LABEL_W), .CNT_W(CNT_W)) dut (.*);

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

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    #1 check(cnt == '0, "count zero after reset");
    for (int i = 0; i < 20000; i++) begin
      int r;
      bit exp_match;
      @(posedge clk); #1;
      r = $urandom_range(0, 99);
      // Phases bias towards deep counts or towards unwinding.
      inc = ((i / 300) % 2 == 0) ? (r < 65) : (r < 30);
      dec = !inc && (r < 95);
      label_i = LABEL_W'($urandom_range(0, 2) + 100 * (i % 2));
      #1;
      exp_match = (m_cnt != 0) && (m_label == label_i);
      check(match == exp_match, "match");
      check(full == (m_cnt == 2 ** CNT_W - 1), "full");
      check(int'(cnt) == m_cnt, $sformatf("count %0d expected %0d", cnt, m_cnt));
      if (m_cnt != 0) check(cnt_label == m_label, "bound label");
      if (inc && m_cnt < 2 ** CNT_W - 1) begin
        if (m_cnt == 0) begin
          m_label = label_i;
          n_bind++;
        end
        m_cnt++;
      end else if (inc) n_full++;
      else if (dec && m_cnt > 0) m_cnt--;
    end
    check(n_full > 0, "saturation reached");
    check(n_bind > 1, "label rebinding reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
