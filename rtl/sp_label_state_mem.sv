// sp_label_state_mem: Siskiyou Peak label state memory, one bit per label.
//
// A 2**LABEL_W x 1 memory indexed directly by the CFI label (16384 x 1 by
// default, as in the original HAFIX design, which maps it onto two 16Kx1 block RAMs). A set
// bit means the function owning that label is active. Following the original HAFIX design,
// the memory is clocked on the falling edge: the execute stage presents the
// label at the rising edge, the memory reads (and, for CFIBR/CFIDEL, writes)
// it at the falling edge in the middle of the same cycle, and the read bit is
// valid before the next rising edge. Every CFI instruction thus takes one
// cycle and a CFIRET sees the write of the instruction right before it.
//
// Interface: req/we/wdata/addr from the CFI control unit; rdata is the bit at
// addr as it was before this cycle's write (read-first), valid from the
// falling edge on. ready is low while the memory clears itself after reset.
//
// Own choices (the original HAFIX design does not cover them): after reset a sweep clears
// one entry per cycle, 2**LABEL_W cycles in all, during which ready is low and
// requests are ignored; rst_n is synchronous and sampled on the falling edge.
module sp_label_state_mem #(
  parameter int unsigned LABEL_W = hafix_pkg::SP_LABEL_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req,
  input  logic               we,
  input  logic               wdata,
  input  logic [LABEL_W-1:0] addr,
  output logic               rdata,
  output logic               ready
);

  localparam int unsigned DEPTH = 2 ** LABEL_W;

  logic             mem [DEPTH];
  logic [LABEL_W:0] clr_idx;   // MSB set once the clearing sweep is done

  assign ready = clr_idx[LABEL_W];

  always_ff @(negedge clk) begin
    if (!rst_n) clr_idx <= '0;
    else if (!ready) clr_idx <= clr_idx + 1'b1;
  end

  always_ff @(negedge clk) begin
    if (!ready) mem[clr_idx[LABEL_W-1:0]] <= 1'b0;
    else if (req && we) mem[addr] <= wdata;
  end

  always_ff @(negedge clk) begin
    rdata <= mem[addr];
  end

endmodule
