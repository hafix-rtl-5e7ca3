// label_lifo: the LEON3 HAFIX label memory, a last-in-first-out stack of labels.
//
// Holds DEPTH labels of LABEL_W bits (1024 x 13 by default, as in the
// original HAFIX design) with a repeat counter next to each entry. A repeated activation
// of the label already on top increments the top counter instead of pushing
// again, so a recursive function occupies one entry however deep it recurses.
// The arrays have an asynchronous read port, as distributed (LUT) RAM does, so
// the top entry is visible in the same cycle as the instruction that uses it.
//
// Interface: one command per cycle, taking effect at the rising edge:
// push (label_i, counter 0), pop, incr or decr (the top counter). top_label /
// top_cnt show the top entry, valid when empty is low. A push when full, a pop
// or counter change when empty, an incr at the counter's maximum (cnt_max)
// and a decr of a zero counter are ignored; the HAFIX-FSM checks for them
// first and faults instead. Commands are mutually exclusive (asserted).
//
// Own choices: the counter width CNT_W (the original HAFIX design gives none) and keeping
// the counters in a second array beside the labels.
module label_lifo #(
  parameter int unsigned DEPTH   = hafix_pkg::SPARC_LIFO_DEPTH,
  parameter int unsigned LABEL_W = hafix_pkg::SPARC_LABEL_W,
  parameter int unsigned CNT_W   = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               push,
  input  logic               pop,
  input  logic               incr,
  input  logic               decr,
  input  logic [LABEL_W-1:0] label_i,
  output logic [LABEL_W-1:0] top_label,
  output logic [CNT_W-1:0]   top_cnt,
  output logic               empty,
  output logic               full,
  output logic               cnt_max,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [LABEL_W-1:0] labels [DEPTH];
  logic [CNT_W-1:0]   cnts   [DEPTH];
  logic [AW:0]        sp;      // number of entries held
  logic [AW-1:0]      top_idx;

  assign top_idx   = AW'(sp - 1'b1);
  assign empty     = (sp == '0);
  assign full      = (sp == (AW+1)'(DEPTH));
  assign top_label = labels[top_idx];
  assign top_cnt   = cnts[top_idx];
  assign cnt_max   = &top_cnt;
  assign level     = sp;

  always_ff @(posedge clk) begin
    if (!rst_n) sp <= '0;
    else if (push && !full) sp <= sp + 1'b1;
    else if (pop && !empty) sp <= sp - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (push && !full) begin
      labels[AW'(sp)] <= label_i;
      cnts[AW'(sp)]   <= '0;
    end else if (incr && !empty && !cnt_max) begin
      cnts[top_idx] <= top_cnt + 1'b1;
    end else if (decr && !empty && top_cnt != '0) begin
      cnts[top_idx] <= top_cnt - 1'b1;
    end
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
                              $onehot0({push, pop, incr, decr}))
    else $error("label_lifo: more than one command in a cycle");

endmodule
