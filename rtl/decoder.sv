// decoder: main control decoder of the Decode stage, purely combinational.
//
// It looks at Instr[27:20] (op, I, cmd/PUBWL, S) and produces the control word
// (arm_pkg::ctrl_t) for the instruction:
//   ADD  00I 0100 0   Rd = Rn + Src2        SUB  00I 0010 0   Rd = Rn - Src2
//   SUBS 00I 0010 1   Rd = Rn - Src2, flags CMP  00I 1010 1   flags of Rn - Src2
//   AND  000 0000 0   Rd = Rn & Rm          ORR  000 1100 0   Rd = Rn | Rm
//   LDR  010 1100 1   Rd = mem[Rn + imm12]  STR  010 1100 0   mem[Rn + imm12] = Rd
//   B    1010 xxxx    PC = PC + 8 + imm24*4
// Src2 is Rm, or the sign-extended 8-bit immediate when I (Instr[25]) is set.
// Register operands are used unshifted. Every other encoding is decoded as a
// no-operation (all control bits 0), as is a bubble (valid = 0).
// pc_src marks an instruction whose register write targets R15; its result is
// sent to the PC from Writeback.
// The instruction set, the encodings and the control values follow the
// processor's description. This design's own choices: only SUBS and CMP set
// flag_write; the true CMP encoding is decoded too and writes no register; a
// branch selects the 24-bit immediate and is resolved in Execute, without
// pc_src; and pc_src is raised for any register write to R15.
module decoder
  import arm_pkg::*;
(
  input  logic [31:0] instr,
  input  logic        valid,
  output ctrl_t       ctrl
);

  // Control word of a data-processing instruction.
  function automatic ctrl_t dp(input logic imm, input alu_op_t op,
                               input logic wr, input logic fl);
    ctrl_t c;
    c            = '0;
    c.alu_src    = imm;
    c.reg_write  = wr;
    c.flag_write = fl;
    c.imm_src    = IMM_DP;
    c.alu_op     = op;
    return c;
  endfunction

  always_comb begin
    ctrl = '0;
    if (valid) begin
      casez (instr[27:20])
        8'b00?_0100_0: ctrl = dp(instr[25], ALU_ADD, 1'b1, 1'b0);  // ADD
        8'b00?_0010_0: ctrl = dp(instr[25], ALU_SUB, 1'b1, 1'b0);  // SUB
        8'b00?_0010_1: ctrl = dp(instr[25], ALU_SUB, 1'b1, 1'b1);  // SUBS
        8'b00?_1010_1: ctrl = dp(instr[25], ALU_SUB, 1'b0, 1'b1);  // CMP
        8'b000_0000_0: ctrl = dp(1'b0,      ALU_AND, 1'b1, 1'b0);  // AND
        8'b000_1100_0: ctrl = dp(1'b0,      ALU_ORR, 1'b1, 1'b0);  // ORR
        8'b010_1100_1: begin                                       // LDR
          ctrl.mem_to_reg = 1'b1;
          ctrl.alu_src    = 1'b1;
          ctrl.reg_write  = 1'b1;
          ctrl.reg_src    = 2'b10;
          ctrl.imm_src    = IMM_MEM;
          ctrl.alu_op     = ALU_ADD;
        end
        8'b010_1100_0: begin                                       // STR
          ctrl.mem_write  = 1'b1;
          ctrl.alu_src    = 1'b1;
          ctrl.reg_src    = 2'b10;
          ctrl.imm_src    = IMM_MEM;
          ctrl.alu_op     = ALU_ADD;
        end
        8'b1010_????: begin                                        // B
          ctrl.branch     = 1'b1;
          ctrl.alu_src    = 1'b1;
          ctrl.reg_src    = 2'b01;
          ctrl.imm_src    = IMM_BR;
          ctrl.alu_op     = ALU_ADD;
        end
        default: ctrl = '0;
      endcase
      ctrl.pc_src = ctrl.reg_write && (instr[15:12] == PC_REG);
    end
  end

endmodule
