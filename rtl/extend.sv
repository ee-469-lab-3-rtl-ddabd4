// extend: immediate extender of the Decode stage.
//
// From the low 24 bits of the instruction it forms the 32-bit immediate chosen
// by imm_src (combinational):
//   IMM_DP  (00): Instr[7:0] sign-extended (data-processing immediate, no rotate)
//   IMM_MEM (01): Instr[11:0] zero-extended (load/store offset)
//   IMM_BR  (10, and 11): Instr[23:0] sign-extended and shifted left by two
//                (branch word offset)
// All three forms, including the sign extension of the 8-bit data-processing
// immediate, follow the processor's description; ARM's rotate field
// (Instr[11:8]) is not applied.
module extend
  import arm_pkg::*;
(
  input  logic [23:0]     instr,
  input  imm_src_t        imm_src,
  output logic [XLEN-1:0] ext_imm
);

  always_comb begin
    unique case (imm_src)
      IMM_DP:  ext_imm = {{24{instr[7]}}, instr[7:0]};
      IMM_MEM: ext_imm = {20'b0, instr[11:0]};
      default: ext_imm = {{6{instr[23]}}, instr[23:0], 2'b00};
    endcase
  end

endmodule
