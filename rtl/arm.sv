// arm: five-stage pipelined processor for a subset of the 32-bit ARM
// instruction set (ADD, SUB, SUBS, CMP, AND, ORR, LDR, STR, B, all conditional).
//
// Stages: Fetch (PC, instruction memory outside), Decode (decoder, register
// file, immediate extender), Execute (forwarding muxes, ALU, flag register and
// condition check, branch resolution), Memory (data memory outside) and
// Writeback (result select, register write). Four pipeline_register columns
// separate them. The hazard_unit forwards results from Memory and Writeback to
// Execute, stalls Fetch/Decode for one cycle on a load-use dependence, flushes
// the two younger instructions when a branch is taken in Execute, and holds
// Fetch while an instruction that writes R15 is in flight, loading the PC from
// its Writeback result.
//
// Interface: Instr_Fetch must be the word at PC_Fetch in the same cycle
// (combinational instruction memory). ALUResult_Mem is the data address,
// WriteData_Mem the store data and MemWrite_Mem the write enable of the
// instruction in Memory; ReadData_Mem must be the word at ALUResult_Mem in the
// same cycle and is registered into Writeback. rst is synchronous and active
// high; the PC restarts at 0.
//
// Timing: one instruction per cycle when no hazard occurs; a load followed by a
// user of its result costs one bubble; a taken branch costs two; a write to R15
// costs four. Reading R15 gives the instruction's address plus 8.
//
// The stage split, the datapath multiplexers, the control values and the
// hazard equations follow the processor's description. This design's own
// choices are noted in the blocks it instantiates; in this module they are a
// valid bit that marks Decode bubbles (a flushed Decode stage decodes as a
// no-operation rather than as the all-zero instruction) and structs that
// bundle each pipeline column.
//
// ldr_stall, pc_wr_pending and the stored flags (flags_q) drive no output;
// they are kept as named signals for observation in simulation.
module arm
  import arm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] Instr_Fetch,
  input  logic [31:0] ReadData_Mem,
  output logic [31:0] WriteData_Mem,
  output logic [31:0] PC_Fetch,
  output logic [31:0] ALUResult_Mem,
  output logic        MemWrite_Mem
);

  // ---------------------------------------------------------------- hazards
  fwd_sel_t fwd_a_e, fwd_b_e;
  logic     ldr_stall, pc_wr_pending;
  logic     stall_f, stall_d, flush_d, flush_e;

  // ---------------------------------------------------------------- Fetch
  logic [31:0] pc_plus4_f, pc_next_f;
  logic [31:0] alu_result_e, result_w;
  logic        branch_taken_e;
  mw_t         mw;

  assign pc_plus4_f = PC_Fetch + 32'd4;

  always_comb begin
    if (branch_taken_e)  pc_next_f = alu_result_e;
    else if (mw.pc_src)  pc_next_f = result_w;
    else                 pc_next_f = pc_plus4_f;
  end

  always_ff @(posedge clk) begin
    if (rst)           PC_Fetch <= '0;
    else if (!stall_f) PC_Fetch <= pc_next_f;
  end

  // Fetch -> Decode column: instruction and a valid bit.
  logic [31:0] instr_d;
  logic        valid_d;

  pipeline_register #(.WIDTH(33)) u_fd (
    .clk, .rst, .f(flush_d), .s(stall_d),
    .d({1'b1, Instr_Fetch}),
    .q({valid_d, instr_d})
  );

  // ---------------------------------------------------------------- Decode
  ctrl_t       ctrl_d;
  logic [3:0]  ra1_d, ra2_d;
  logic [31:0] rf_rd1, rf_rd2, ext_imm_d;
  de_t         de_d, de;

  decoder u_decoder (.instr(instr_d), .valid(valid_d), .ctrl(ctrl_d));

  assign ra1_d = ctrl_d.reg_src[0] ? PC_REG : instr_d[19:16];
  assign ra2_d = ctrl_d.reg_src[1] ? instr_d[15:12] : instr_d[3:0];

  reg_file u_reg_file (
    .clk,
    .wr_en      (mw.reg_write),
    .write_data (result_w),
    .write_addr (mw.wa3),
    .read_addr1 (ra1_d),
    .read_addr2 (ra2_d),
    .read_data1 (rf_rd1),
    .read_data2 (rf_rd2)
  );

  extend u_extend (.instr(instr_d[23:0]), .imm_src(ctrl_d.imm_src), .ext_imm(ext_imm_d));

  always_comb begin
    de_d.pc_src     = ctrl_d.pc_src;
    de_d.branch     = ctrl_d.branch;
    de_d.mem_to_reg = ctrl_d.mem_to_reg;
    de_d.mem_write  = ctrl_d.mem_write;
    de_d.alu_src    = ctrl_d.alu_src;
    de_d.reg_write  = ctrl_d.reg_write;
    de_d.flag_write = ctrl_d.flag_write;
    de_d.alu_op     = ctrl_d.alu_op;
    de_d.cond       = instr_d[31:28];
    de_d.wa3        = instr_d[15:12];
    de_d.ra1        = ra1_d;
    de_d.ra2        = ra2_d;
    // R15 reads as the address of this instruction plus 8, which is the
    // fetch PC plus 4 while the instruction sits in Decode.
    de_d.rd1        = (ra1_d == PC_REG) ? pc_plus4_f : rf_rd1;
    de_d.rd2        = (ra2_d == PC_REG) ? pc_plus4_f : rf_rd2;
    de_d.ext_imm    = ext_imm_d;
  end

  pipeline_register #(.WIDTH($bits(de_t))) u_de (
    .clk, .rst, .f(flush_e), .s(1'b0), .d(de_d), .q(de)
  );

  // ---------------------------------------------------------------- Execute
  logic [31:0] alu_out_m;
  logic [31:0] src_a_e, write_data_e, src_b_e;
  flags_t      alu_flags_e, flags_q;
  logic        cond_ex_e;
  em_t         em_d, em;

  always_comb begin
    unique case (fwd_a_e)
      FWD_MEM: src_a_e = alu_out_m;
      FWD_WB:  src_a_e = result_w;
      default: src_a_e = de.rd1;
    endcase
    unique case (fwd_b_e)
      FWD_MEM: write_data_e = alu_out_m;
      FWD_WB:  write_data_e = result_w;
      default: write_data_e = de.rd2;
    endcase
    src_b_e = de.alu_src ? de.ext_imm : write_data_e;
  end

  alu u_alu (
    .A(src_a_e), .B(src_b_e), .control(de.alu_op),
    .result(alu_result_e), .flags(alu_flags_e)
  );

  cond_unit u_cond_unit (
    .clk, .rst,
    .cond       (de.cond),
    .alu_flags  (alu_flags_e),
    .flag_write (de.flag_write),
    .cond_ex    (cond_ex_e),
    .flags      (flags_q)
  );

  assign branch_taken_e = de.branch && cond_ex_e;

  always_comb begin
    em_d.pc_src     = de.pc_src    && cond_ex_e;
    em_d.reg_write  = de.reg_write && cond_ex_e;
    em_d.mem_write  = de.mem_write && cond_ex_e;
    em_d.mem_to_reg = de.mem_to_reg;
    em_d.wa3        = de.wa3;
    em_d.alu_result = alu_result_e;
    em_d.write_data = write_data_e;
  end

  pipeline_register #(.WIDTH($bits(em_t))) u_em (
    .clk, .rst, .f(1'b0), .s(1'b0), .d(em_d), .q(em)
  );

  // ---------------------------------------------------------------- Memory
  mw_t mw_d;

  assign alu_out_m     = em.alu_result;
  assign ALUResult_Mem = em.alu_result;
  assign WriteData_Mem = em.write_data;
  assign MemWrite_Mem  = em.mem_write;

  always_comb begin
    mw_d.pc_src     = em.pc_src;
    mw_d.reg_write  = em.reg_write;
    mw_d.mem_to_reg = em.mem_to_reg;
    mw_d.wa3        = em.wa3;
    mw_d.alu_out    = em.alu_result;
    mw_d.read_data  = ReadData_Mem;
  end

  pipeline_register #(.WIDTH($bits(mw_t))) u_mw (
    .clk, .rst, .f(1'b0), .s(1'b0), .d(mw_d), .q(mw)
  );

  // ---------------------------------------------------------------- Writeback
  assign result_w = mw.mem_to_reg ? mw.read_data : mw.alu_out;

  // ---------------------------------------------------------------- hazards
  hazard_unit u_hazard_unit (
    .ra1_d, .ra2_d,
    .ra1_e          (de.ra1),
    .ra2_e          (de.ra2),
    .wa3_e          (de.wa3),
    .wa3_m          (em.wa3),
    .wa3_w          (mw.wa3),
    .mem_to_reg_e   (de.mem_to_reg),
    .reg_write_m    (em.reg_write),
    .reg_write_w    (mw.reg_write),
    .pc_src_d       (ctrl_d.pc_src),
    .pc_src_e       (de.pc_src),
    .pc_src_m       (em.pc_src),
    .pc_src_w       (mw.pc_src),
    .branch_taken_e,
    .fwd_a_e, .fwd_b_e,
    .ldr_stall, .pc_wr_pending,
    .stall_f, .stall_d, .flush_d, .flush_e
  );

endmodule
