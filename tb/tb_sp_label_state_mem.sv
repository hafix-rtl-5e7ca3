// tb_sp_label_state_mem: self-checking test of the Siskiyou Peak label state memory.
//
// Checks that the clearing sweep after reset takes exactly 2**LABEL_W cycles
// and leaves every label inactive, then runs random set/clear/read traffic on
// a small group of labels against a bit-array model. Inputs change just after
// the rising edge and the read bit is checked before the next rising edge, so
// the test also proves the half-cycle (falling-edge) read of the design.
module tb_sp_label_state_mem;

  localparam int unsigned LABEL_W = 14;
  localparam int unsigned DEPTH   = 2 ** LABEL_W;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  logic               req = 1'b0, we = 1'b0, wdata = 1'b0;
  logic [LABEL_W-1:0] addr = '0;
  logic               rdata, ready;

  int checks = 0, failures = 0;
  bit model [DEPTH];

  sp_label_state_mem #(.LABEL_W(LABEL_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (4 * DEPTH + 20000) @(posedge clk);
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
    int n;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    n = 0;
    while (!ready) begin
      @(posedge clk);
      n++;
    end
    // rst_n released at posedge+1; sweep runs on DEPTH falling edges.
    check(n == DEPTH, $sformatf("clear sweep took %0d cycles, expected %0d", n, DEPTH));
    foreach (model[i]) model[i] = 1'b0;

    // Every label reads inactive after the sweep (sampled).
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      req = 1'b1; we = 1'b0; addr = LABEL_W'($urandom_range(0, DEPTH - 1));
      #7 check(rdata == 1'b0, "label active after clear");
    end
    // Highest and lowest label too.
    @(posedge clk); #1 addr = '1; #7 check(rdata == 1'b0, "top label after clear");
    @(posedge clk); #1 addr = '0; #7 check(rdata == 1'b0, "label 0 after clear");

    // Random traffic: read-first in the same cycle, write visible next cycle.
    for (int i = 0; i < 20000; i++) begin
      logic [LABEL_W-1:0] a;
      bit w, d;
      a = (i % 2 == 0) ? LABEL_W'($urandom_range(0, 31))
                       : LABEL_W'(DEPTH - 1 - $urandom_range(0, 31));
      w = $urandom_range(0, 1) == 1;
      d = $urandom_range(0, 1) == 1;
      @(posedge clk); #1;
      req = 1'b1; we = w; wdata = d; addr = a;
      #7 check(rdata == model[a], $sformatf("read label %0d", a));
      if (w) model[a] = d;
    end

    // Back-to-back set then test of the same label (CFIBR then CFIRET).
    @(posedge clk); #1 req = 1'b1; we = 1'b1; wdata = 1'b1; addr = LABEL_W'(77);
    @(posedge clk); #1 we = 1'b0;
    #7 check(rdata == 1'b1, "set visible in next cycle");
    @(posedge clk); #1 we = 1'b1; wdata = 1'b0;
    @(posedge clk); #1 we = 1'b0;
    #7 check(rdata == 1'b0, "clear visible in next cycle");

    // req low blocks a write.
    @(posedge clk); #1 req = 1'b0; we = 1'b1; wdata = 1'b1; addr = LABEL_W'(78);
    @(posedge clk); #1 req = 1'b1; we = 1'b0;
    #7 check(rdata == 1'b0, "write without req ignored");

    // A new reset clears everything written.
    @(posedge clk); #1 req = 1'b1; we = 1'b1; wdata = 1'b1; addr = LABEL_W'(5);
    @(posedge clk); #1 we = 1'b0; rst_n = 1'b0;
    @(posedge clk); #1 rst_n = 1'b1;
    check(ready == 1'b0, "ready low after reset");
    while (!ready) @(posedge clk);
    #1 addr = LABEL_W'(5);
    #7 check(rdata == 1'b0, "reset clears set label");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
