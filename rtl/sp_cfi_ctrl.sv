// sp_cfi_ctrl: HAFIX CFI control unit for the Siskiyou Peak execute stage.
//
// Watches the instructions that the execute stage completes and enforces the
// HAFIX backward-edge policy: a return may only land on a CFIRET whose label
// belongs to a function that is currently active.
//  - A call must be followed by CFIBR or CFIREC, a return by CFIRET; any other
//    instruction in those positions is a violation (the state model of the
//    original HAFIX design).
//  - CFIBR sets the label's bit in the label state memory, CFIDEL clears it,
//    CFIRET reads it and raises an exception if it is clear.
//  - CFIREC sets the bit only when the recursion counter is zero and then
//    increments the counter; CFIDEL of the counted label decrements the
//    counter and clears the bit only when the count goes from 1 to 0.
// The label goes straight to the memory address, and the memory works on the
// falling edge, so every CFI instruction finishes in one cycle with no stall.
//
// Interface: valid_i/op_i/label_i carry one executed instruction per cycle
// (op_i is the decoded class, label_i its 14-bit label). exception_o and
// cause_o are combinational and valid in the same cycle as the offending
// instruction, for the pipeline to take the exception at the rising edge; the
// offending instruction has no effect on the label state. stall_o is high
// while the label state memory clears itself after reset; instructions
// presented then are ignored. rec_cnt_o and rec_label_o show CFIREC_CNTR
// and the label bound to it.
//
// Follows the original HAFIX design: the policy, the 16384 x 1 label memory indexed by the
// label, single-cycle operation, CFIREC/CFIREC_CNTR. Own choices: the x86
// encodings are left to the core's decoder (op_i is already decoded); CFIDEL
// of an inactive label simply clears it; a CFIREC whose label differs from the
// one being counted acts as a CFIBR (nested recursion is outside the scheme);
// an increment that would wrap the counter is a violation; after a violation
// the sequencing state returns to normal for the exception handler.
module sp_cfi_ctrl
  import hafix_pkg::*;
#(
  parameter int unsigned LABEL_W = SP_LABEL_W,
  parameter int unsigned CNT_W   = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               valid_i,
  input  cfi_op_e            op_i,
  input  logic [LABEL_W-1:0] label_i,
  output logic               stall_o,
  output logic               exception_o,
  output cfi_cause_e         cause_o,
  output logic [CNT_W-1:0]   rec_cnt_o,
  output logic [LABEL_W-1:0] rec_label_o
);

  typedef enum logic [1:0] {
    ST_NORMAL,   // any instruction accepted
    ST_EXP_BR,   // after a call: only CFIBR/CFIREC accepted
    ST_EXP_RET   // after a return: only CFIRET accepted
  } sp_state_e;

  sp_state_e state_q, state_d;

  logic mem_ready, mem_rdata, mem_req, mem_we, mem_wdata;
  logic cnt_inc, cnt_dec, cnt_match, cnt_full;
  logic [CNT_W-1:0]   cnt;
  logic               go;

  assign go      = valid_i && mem_ready;
  assign stall_o = !mem_ready;

  sp_label_state_mem #(.LABEL_W(LABEL_W)) u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (mem_req),
    .we    (mem_we),
    .wdata (mem_wdata),
    .addr  (label_i),
    .rdata (mem_rdata),
    .ready (mem_ready)
  );

  cfirec_cntr #(.LABEL_W(LABEL_W), .CNT_W(CNT_W)) u_cntr (
    .clk       (clk),
    .rst_n     (rst_n),
    .inc       (cnt_inc),
    .dec       (cnt_dec),
    .label_i   (label_i),
    .cnt       (cnt),
    .cnt_label (rec_label_o),
    .match     (cnt_match),
    .full      (cnt_full)
  );

  assign rec_cnt_o = cnt;

  always_comb begin
    state_d   = state_q;
    cause_o   = CAUSE_NONE;
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_wdata = 1'b0;
    cnt_inc   = 1'b0;
    cnt_dec   = 1'b0;

    if (go) begin
      // Sequencing rules of the state model.
      if (state_q == ST_EXP_BR && op_i != OP_CFIBR && op_i != OP_CFIREC)
        cause_o = CAUSE_NO_CFIBR;
      else if (state_q == ST_EXP_RET && op_i != OP_CFIRET)
        cause_o = CAUSE_NO_CFIRET;
      else begin
        unique case (op_i)
          OP_CFIBR: begin
            mem_req = 1'b1; mem_we = 1'b1; mem_wdata = 1'b1;
          end
          OP_CFIREC: begin
            if (cnt == '0 || cnt_match) begin
              if (cnt_full) cause_o = CAUSE_OVERFLOW;
              else begin
                cnt_inc = 1'b1;
                if (cnt == '0) begin
                  mem_req = 1'b1; mem_we = 1'b1; mem_wdata = 1'b1;
                end
              end
            end else begin
              mem_req = 1'b1; mem_we = 1'b1; mem_wdata = 1'b1;
            end
          end
          OP_CFIDEL: begin
            if (cnt_match) begin
              cnt_dec = 1'b1;
              if (cnt == CNT_W'(1)) begin
                mem_req = 1'b1; mem_we = 1'b1; mem_wdata = 1'b0;
              end
            end else begin
              mem_req = 1'b1; mem_we = 1'b1; mem_wdata = 1'b0;
            end
          end
          OP_CFIRET: begin
            mem_req = 1'b1;
            if (!mem_rdata) cause_o = CAUSE_LABEL;
          end
          default: ;
        endcase
      end

      if (cause_o != CAUSE_NONE) begin
        state_d = ST_NORMAL;
        mem_req = 1'b0;
        mem_we  = 1'b0;
        cnt_inc = 1'b0;
        cnt_dec = 1'b0;
      end else if (op_i == OP_CALL) state_d = ST_EXP_BR;
      else if (op_i == OP_RET)      state_d = ST_EXP_RET;
      else                          state_d = ST_NORMAL;
    end
  end

  assign exception_o = (cause_o != CAUSE_NONE);

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= ST_NORMAL;
    else        state_q <= state_d;
  end

endmodule
