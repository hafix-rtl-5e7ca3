// cfirec_cntr: the hidden CFIREC_CNTR register of the Siskiyou Peak CFI unit.
//
// Counts how many instances of one recursive function are active, so that the
// function's label is written to the label state memory only once. The first
// CFIREC (count zero) associates the register with its label; every CFIREC
// increments the count and every CFIDEL of the associated label decrements it.
// The control unit clears the label state bit when the count drops from 1 to
// 0. As in the original HAFIX design, only one recursive function is tracked at a time
// (non-nested recursion).
//
// Interface: inc/dec with the instruction label, one operation per cycle,
// taking effect at the rising edge. cnt/cnt_label show the state; match says
// the register is in use and associated with label_i; full says one more
// increment would wrap. Counter width CNT_W is this design's choice (the
// original HAFIX design gives none); the control unit raises an exception instead of
// letting it wrap.
module cfirec_cntr #(
  parameter int unsigned LABEL_W = hafix_pkg::SP_LABEL_W,
  parameter int unsigned CNT_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               inc,
  input  logic               dec,
  input  logic [LABEL_W-1:0] label_i,
  output logic [CNT_W-1:0]   cnt,
  output logic [LABEL_W-1:0] cnt_label,
  output logic               match,
  output logic               full
);

  assign match = (cnt != '0) && (cnt_label == label_i);
  assign full  = &cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      cnt_label <= '0;
    end else if (inc && !full) begin
      if (cnt == '0) cnt_label <= label_i;
      cnt <= cnt + 1'b1;
    end else if (dec && cnt != '0) begin
      cnt <= cnt - 1'b1;
    end
  end

endmodule
