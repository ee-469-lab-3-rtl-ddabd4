// cond_unit: flag register and condition check of the Execute stage.
//
// cond_ex is 1 when the instruction in Execute may take effect, judged from its
// condition field (Instr[31:28]) and the stored flags {N, Z, C, V}:
//   EQ 0000: Z        NE 0001: !Z       GE 1010: !N       LT 1011: N & !Z
//   GT 1100: !N & !Z  LE 1101: N | Z    AL 1110: always
// Any other code never executes. These tests, which look only at N and Z
// (never at V), follow the processor's flag table; they equal the ARM
// conditions whenever the comparison did not overflow.
// The flag register loads alu_flags on the rising edge when the instruction
// in Execute sets flags (flag_write) and its condition passes, so an instruction
// one cycle behind a compare already sees the new flags. Synchronous reset
// clears the flags. Gating the update with the condition is this design's
// choice.
module cond_unit
  import arm_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [3:0] cond,
  input  flags_t     alu_flags,
  input  logic       flag_write,
  output logic       cond_ex,
  output flags_t     flags
);

  always_comb begin
    unique case (cond)
      COND_EQ: cond_ex = flags.z;
      COND_NE: cond_ex = !flags.z;
      COND_GE: cond_ex = !flags.n;
      COND_LT: cond_ex = flags.n && !flags.z;
      COND_GT: cond_ex = !flags.n && !flags.z;
      COND_LE: cond_ex = flags.n || flags.z;
      COND_AL: cond_ex = 1'b1;
      default: cond_ex = 1'b0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)                        flags <= '0;
    else if (flag_write && cond_ex) flags <= alu_flags;
  end

endmodule
