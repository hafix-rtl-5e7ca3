// hafix_top: the two HAFIX backward-edge CFI implementations side by side.
//
// HAFIX stops return-oriented attacks by allowing a function return to land
// only on a CFIRET call site of a function that is still active. The design
// exists for two host cores, which do not share hardware:
//  - Siskiyou Peak (32-bit x86-subset, 5 stages): a CFI control unit in the
//    execute stage with a 16384 x 1 label state memory (one bit per label)
//    and the CFIREC_CNTR recursion counter. Any active label is a valid
//    return target. Violations raise an exception.
//  - LEON3 (SPARC V8, 7 stages): a HAFIX-FSM next to the fetch stage with a
//    1024 x 13 label LIFO. Only the label on top of the LIFO is a valid return
//    target. Violations halt the CPU.
// The cores themselves are not part of this RTL; their interfaces to the CFI
// units are this module's ports.
//
// Siskiyou Peak side: sp_valid_i, sp_op_i (decoded instruction class),
// sp_label_i (14 bits) per executed instruction; sp_stall_o while the label
// memory clears after reset; sp_exception_o / sp_cause_o in the same cycle;
// sp_rec_cnt_o / sp_rec_label_o show the recursion counter.
// LEON3 side: sparc_valid_i with the 32-bit instruction word sparc_inst_i,
// sparc_flush_i; sparc_fault_o / sparc_cause_o in the same cycle,
// sparc_halt_o held until reset, sparc_depth_o the LIFO fill level.
// One clock and a synchronous active-low reset serve both units, a choice of
// this design.
module hafix_top
  import hafix_pkg::*;
#(
  parameter int unsigned SP_LABEL_BITS = SP_LABEL_W,       // 16384 labels
  parameter int unsigned SP_REC_CNT_W  = 16,
  parameter int unsigned LIFO_DEPTH    = SPARC_LIFO_DEPTH, // 1024 entries
  parameter int unsigned LIFO_CNT_W    = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // Siskiyou Peak execute stage
  input  logic                     sp_valid_i,
  input  cfi_op_e                  sp_op_i,
  input  logic [SP_LABEL_BITS-1:0] sp_label_i,
  output logic                     sp_stall_o,
  output logic                     sp_exception_o,
  output cfi_cause_e               sp_cause_o,
  output logic [SP_REC_CNT_W-1:0]  sp_rec_cnt_o,
  output logic [SP_LABEL_BITS-1:0] sp_rec_label_o,
  // LEON3 fetch stage
  input  logic                     sparc_valid_i,
  input  logic [31:0]              sparc_inst_i,
  input  logic                     sparc_flush_i,
  output logic                     sparc_fault_o,
  output cfi_cause_e               sparc_cause_o,
  output logic                     sparc_halt_o,
  output logic [$clog2(LIFO_DEPTH):0] sparc_depth_o
);

  sp_cfi_ctrl #(.LABEL_W(SP_LABEL_BITS), .CNT_W(SP_REC_CNT_W)) u_sp_cfi (
    .clk         (clk),
    .rst_n       (rst_n),
    .valid_i     (sp_valid_i),
    .op_i        (sp_op_i),
    .label_i     (sp_label_i),
    .stall_o     (sp_stall_o),
    .exception_o (sp_exception_o),
    .cause_o     (sp_cause_o),
    .rec_cnt_o   (sp_rec_cnt_o),
    .rec_label_o (sp_rec_label_o)
  );

  cfi_op_e                  sparc_op;
  logic [SPARC_LABEL_W-1:0] sparc_label;

  sparc_cfi_decode u_sparc_dec (
    .inst_i  (sparc_inst_i),
    .op_o    (sparc_op),
    .label_o (sparc_label)
  );

  sparc_cfi_fsm #(.DEPTH(LIFO_DEPTH), .LABEL_W(SPARC_LABEL_W), .CNT_W(LIFO_CNT_W)) u_sparc_fsm (
    .clk     (clk),
    .rst_n   (rst_n),
    .valid_i (sparc_valid_i),
    .op_i    (sparc_op),
    .label_i (sparc_label),
    .flush_i (sparc_flush_i),
    .fault_o (sparc_fault_o),
    .cause_o (sparc_cause_o),
    .halt_o  (sparc_halt_o),
    .depth_o (sparc_depth_o)
  );

endmodule
