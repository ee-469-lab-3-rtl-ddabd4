// hazard_unit: the pipeline's hazard control, purely combinational.
//
// Forwarding (data hazards on the two ALU operands in Execute): an operand
// whose register address in Execute (ra1_e/ra2_e) matches the destination of a
// register-writing instruction in Memory takes that instruction's ALU result
// (FWD_MEM); failing that, a match with a register-writing instruction in
// Writeback takes the Writeback result (FWD_WB); otherwise the value read in
// Decode is used (FWD_NONE). Memory has priority because it is younger.
//
// Load-use stall: when the instruction in Decode reads the register that a
// load in Execute will write, its data is not ready until Writeback, so Fetch
// and Decode hold for one cycle and Execute receives a bubble.
//
// Control hazards: while an instruction that writes R15 through Writeback is in
// Decode, Execute or Memory (pc_wr_pending), Fetch stalls and Decode is flushed;
// when it reaches Writeback the PC is loaded from its result and Decode is
// flushed once more. A taken branch in Execute flushes Decode and Execute (the
// two instructions fetched behind it) while the PC loads the branch target.
//
// These equations follow the processor's description, with one change of this
// design: a taken branch overrides the fetch stall, so that the branch target
// is loaded even when an R15 write sits behind the branch in Decode.
module hazard_unit
  import arm_pkg::*;
(
  input  logic [RBITS-1:0] ra1_d, ra2_d,    // source registers in Decode
  input  logic [RBITS-1:0] ra1_e, ra2_e,    // source registers in Execute
  input  logic [RBITS-1:0] wa3_e, wa3_m, wa3_w,
  input  logic             mem_to_reg_e,    // load in Execute
  input  logic             reg_write_m, reg_write_w,
  input  logic             pc_src_d, pc_src_e, pc_src_m, pc_src_w,
  input  logic             branch_taken_e,
  output fwd_sel_t         fwd_a_e, fwd_b_e,
  output logic             ldr_stall,
  output logic             pc_wr_pending,
  output logic             stall_f, stall_d,
  output logic             flush_d, flush_e
);

  always_comb begin
    if      (reg_write_m && ra1_e == wa3_m) fwd_a_e = FWD_MEM;
    else if (reg_write_w && ra1_e == wa3_w) fwd_a_e = FWD_WB;
    else                                    fwd_a_e = FWD_NONE;

    if      (reg_write_m && ra2_e == wa3_m) fwd_b_e = FWD_MEM;
    else if (reg_write_w && ra2_e == wa3_w) fwd_b_e = FWD_WB;
    else                                    fwd_b_e = FWD_NONE;

    ldr_stall     = mem_to_reg_e && (ra1_d == wa3_e || ra2_d == wa3_e);
    pc_wr_pending = pc_src_d || pc_src_e || pc_src_m;
    stall_f       = (ldr_stall || pc_wr_pending) && !branch_taken_e;
    stall_d       = ldr_stall;
    flush_d       = pc_wr_pending || pc_src_w || branch_taken_e;
    flush_e       = ldr_stall || branch_taken_e;
  end

endmodule
