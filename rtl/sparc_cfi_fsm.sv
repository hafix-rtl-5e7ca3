// sparc_cfi_fsm: the HAFIX-FSM of the LEON3 (SPARC V8) implementation.
//
// Sits beside the fetch unit and watches the decoded instruction stream. It
// keeps the label LIFO (label_lifo) and enforces:
//  - after a call and its delay slot, the next instruction must be CFIBR or
//    CFIREC; that label is pushed, or, if it equals the top label, the top
//    counter is incremented (recursion);
//  - CFIDEL decrements the top counter if it is non-zero, else pops the top;
//  - after a return and its delay slot (where the compiler places CFIDEL), the
//    next instruction must be CFIRET, and its label must equal the top label.
// Any violation raises fault_o for one cycle and sets halt_o, which stops the
// CPU until reset. SPARC delayed control transfer is why the FSM has the
// delay-slot states CALL_DS and RET_DS in addition to EXP_BR and EXP_RET.
//
// Interface: valid_i marks a cycle whose instruction (op_i, label_i from
// sparc_cfi_decode) will really execute; a stalled or annulled slot has
// valid_i low and leaves the state unchanged. flush_i (pipeline flush for a
// trap) returns the sequencing state to RUN without touching the LIFO. Label
// and counter updates take effect at the rising edge; fault_o/cause_o are
// combinational in the cycle of the offending instruction.
//
// Follows the original HAFIX design: the LIFO rules for CFIBR, CFIDEL and CFIRET, the
// fault that halts the CPU, the extra states for the pipeline. Own choices:
// how stalls, annulled slots and flushes are signalled; that CFIREC behaves
// as CFIBR here; faults for a full LIFO, a saturated counter, a CFIDEL with an
// empty LIFO and a control transfer in a delay slot; CFI instructions found
// outside the expected slots act on the LIFO in the same way.
module sparc_cfi_fsm
  import hafix_pkg::*;
#(
  parameter int unsigned DEPTH   = SPARC_LIFO_DEPTH,
  parameter int unsigned LABEL_W = SPARC_LABEL_W,
  parameter int unsigned CNT_W   = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               valid_i,
  input  cfi_op_e            op_i,
  input  logic [LABEL_W-1:0] label_i,
  input  logic               flush_i,
  output logic               fault_o,
  output cfi_cause_e         cause_o,
  output logic               halt_o,
  output logic [$clog2(DEPTH):0] depth_o
);

  typedef enum logic [2:0] {
    S_RUN,      // normal execution
    S_CALL_DS,  // delay slot of a call
    S_EXP_BR,   // call target: CFIBR/CFIREC required
    S_RET_DS,   // delay slot of a return
    S_EXP_RET,  // return target: CFIRET required
    S_HALT      // fault seen, CPU halted
  } fsm_state_e;

  fsm_state_e state_q, state_d;

  logic               push, pop, incr, decr;
  logic [LABEL_W-1:0] top_label;
  logic [CNT_W-1:0]   top_cnt;
  logic               empty, full, cnt_max;
  logic               is_cti, is_cfi;

  label_lifo #(.DEPTH(DEPTH), .LABEL_W(LABEL_W), .CNT_W(CNT_W)) u_lifo (
    .clk       (clk),
    .rst_n     (rst_n),
    .push      (push),
    .pop       (pop),
    .incr      (incr),
    .decr      (decr),
    .label_i   (label_i),
    .top_label (top_label),
    .top_cnt   (top_cnt),
    .empty     (empty),
    .full      (full),
    .cnt_max   (cnt_max),
    .level     (depth_o)
  );

  assign is_cti = (op_i == OP_CALL) || (op_i == OP_RET) || (op_i == OP_CTI);
  assign is_cfi = (op_i == OP_CFIBR) || (op_i == OP_CFIREC) ||
                  (op_i == OP_CFIDEL) || (op_i == OP_CFIRET);

  always_comb begin
    state_d = state_q;
    cause_o = CAUSE_NONE;
    push    = 1'b0;
    pop     = 1'b0;
    incr    = 1'b0;
    decr    = 1'b0;

    if (state_q == S_HALT) begin
      state_d = S_HALT;
    end else if (flush_i) begin
      state_d = S_RUN;
    end else if (valid_i) begin
      // Sequencing.
      unique case (state_q)
        S_CALL_DS, S_RET_DS: if (is_cti) cause_o = CAUSE_DELAY_SLOT;
        S_EXP_BR:  if (op_i != OP_CFIBR && op_i != OP_CFIREC) cause_o = CAUSE_NO_CFIBR;
        S_EXP_RET: if (op_i != OP_CFIRET) cause_o = CAUSE_NO_CFIRET;
        default: ;
      endcase

      // Label LIFO.
      if (cause_o == CAUSE_NONE && is_cfi) begin
        unique case (op_i)
          OP_CFIBR, OP_CFIREC: begin
            if (!empty && top_label == label_i) begin
              if (cnt_max) cause_o = CAUSE_OVERFLOW;
              else         incr    = 1'b1;
            end else begin
              if (full) cause_o = CAUSE_OVERFLOW;
              else      push    = 1'b1;
            end
          end
          OP_CFIDEL: begin
            if (empty)               cause_o = CAUSE_UNDERFLOW;
            else if (top_cnt != '0)  decr    = 1'b1;
            else                     pop     = 1'b1;
          end
          OP_CFIRET: begin
            if (empty || top_label != label_i) cause_o = CAUSE_LABEL;
          end
          default: ;
        endcase
      end

      // Next state.
      if (cause_o != CAUSE_NONE) state_d = S_HALT;
      else begin
        unique case (state_q)
          S_CALL_DS: state_d = S_EXP_BR;
          S_RET_DS:  state_d = S_EXP_RET;
          default:   state_d = (op_i == OP_CALL) ? S_CALL_DS :
                               (op_i == OP_RET)  ? S_RET_DS  : S_RUN;
        endcase
      end
    end
  end

  assign fault_o = (cause_o != CAUSE_NONE);
  assign halt_o  = (state_q == S_HALT);

  always_ff @(posedge clk) begin
    if (!rst_n) state_q <= S_RUN;
    else        state_q <= state_d;
  end

  a_halt_sticky: assert property (@(posedge clk) disable iff (!rst_n)
                                  halt_o |=> halt_o)
    else $error("sparc_cfi_fsm: halt released without reset");

endmodule
