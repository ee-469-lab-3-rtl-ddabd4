// decoder_tb: self-checking test of the main decoder. Each supported
// instruction is encoded here from its fields (with random registers,
// immediates and condition) and the control word is compared with the
// expected one, written out field by field. Unsupported encodings and bubbles
// must decode as all-zero controls, and a register write to R15 must raise
// pc_src.
module decoder_tb;
  import arm_pkg::*;

  logic [31:0] instr;
  logic        valid;
  ctrl_t       ctrl;
  int          checks = 0, failures = 0;

  decoder dut (.*);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected control word: pc_src, branch, mem_to_reg, mem_write, alu_src,
  // reg_write, flag_write, reg_src, imm_src, alu_op.
  task automatic expect_ctrl(input string name, input logic [31:0] i,
                             input logic pcs, br, m2r, mw, as, rw, fw,
                             input logic [1:0] rs, input logic [1:0] is, input logic [1:0] op);
    instr = i; valid = 1'b1; #1ns;
    checks++;
    if (ctrl.pc_src !== pcs || ctrl.branch !== br || ctrl.mem_to_reg !== m2r ||
        ctrl.mem_write !== mw || ctrl.alu_src !== as || ctrl.reg_write !== rw ||
        ctrl.flag_write !== fw || ctrl.reg_src !== rs || ctrl.imm_src !== is ||
        ctrl.alu_op !== op) begin
      failures++;
      $display("FAIL %s instr=%h ctrl=%b", name, i, ctrl);
    end
  endtask

  function automatic logic [31:0] dp_enc(logic [3:0] c, logic i, logic [3:0] cmd, logic s,
                                         logic [3:0] rn, logic [3:0] rd, logic [11:0] op2);
    return {c, 2'b00, i, cmd, s, rn, rd, op2};
  endfunction

  initial begin
    logic [3:0]  c, rn, rd;
    logic [11:0] op2;
    logic        im;
    for (int n = 0; n < 500; n++) begin
      c = 4'($urandom); rn = 4'($urandom); rd = 4'($urandom_range(0, 14));
      op2 = 12'($urandom); im = 1'($urandom);
      expect_ctrl("ADD",  dp_enc(c, im, 4'b0100, 1'b0, rn, rd, op2), 0,0,0,0, im,1,0, 2'b00, 2'b00, 2'b00);
      expect_ctrl("SUB",  dp_enc(c, im, 4'b0010, 1'b0, rn, rd, op2), 0,0,0,0, im,1,0, 2'b00, 2'b00, 2'b01);
      expect_ctrl("SUBS", dp_enc(c, im, 4'b0010, 1'b1, rn, rd, op2), 0,0,0,0, im,1,1, 2'b00, 2'b00, 2'b01);
      expect_ctrl("CMP",  dp_enc(c, im, 4'b1010, 1'b1, rn, rd, op2), 0,0,0,0, im,0,1, 2'b00, 2'b00, 2'b01);
      expect_ctrl("AND",  dp_enc(c, 0, 4'b0000, 1'b0, rn, rd, op2),  0,0,0,0, 0,1,0,  2'b00, 2'b00, 2'b10);
      expect_ctrl("ORR",  dp_enc(c, 0, 4'b1100, 1'b0, rn, rd, op2),  0,0,0,0, 0,1,0,  2'b00, 2'b00, 2'b11);
      expect_ctrl("LDR",  {c, 8'b0101_1001, rn, rd, op2},            0,0,1,0, 1,1,0,  2'b10, 2'b01, 2'b00);
      expect_ctrl("STR",  {c, 8'b0101_1000, rn, rd, op2},            0,0,0,1, 1,0,0,  2'b10, 2'b01, 2'b00);
      expect_ctrl("B",    {c, 4'b1010, 24'($urandom)},                0,1,0,0, 1,0,0,  2'b01, 2'b10, 2'b00);
      // Writes to R15 go through Writeback to the PC.
      expect_ctrl("ADDpc", dp_enc(c, im, 4'b0100, 1'b0, rn, 4'd15, op2), 1,0,0,0, im,1,0, 2'b00, 2'b00, 2'b00);
      expect_ctrl("LDRpc", {c, 8'b0101_1001, rn, 4'd15, op2},            1,0,1,0, 1,1,0,  2'b10, 2'b01, 2'b00);
      // Not decoded: EOR, MOV, LDRB, BL, register AND with I set, and a bubble.
      expect_ctrl("EOR",  dp_enc(c, im, 4'b0001, 1'b0, rn, rd, op2), 0,0,0,0, 0,0,0, 2'b00, 2'b00, 2'b00);
      expect_ctrl("MOV",  dp_enc(c, im, 4'b1101, 1'b0, rn, rd, op2), 0,0,0,0, 0,0,0, 2'b00, 2'b00, 2'b00);
      expect_ctrl("LDRB", {c, 8'b0101_1101, rn, rd, op2},            0,0,0,0, 0,0,0, 2'b00, 2'b00, 2'b00);
      expect_ctrl("BL",   {c, 4'b1011, 24'($urandom)},                0,0,0,0, 0,0,0, 2'b00, 2'b00, 2'b00);
      expect_ctrl("ANDi", dp_enc(c, 1, 4'b0000, 1'b0, rn, rd, op2),  0,0,0,0, 0,0,0, 2'b00, 2'b00, 2'b00);
      instr = dp_enc(c, im, 4'b0100, 1'b0, rn, rd, op2); valid = 1'b0; #1ns;
      checks++;
      if (ctrl !== '0) begin failures++; $display("FAIL bubble ctrl=%b", ctrl); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
