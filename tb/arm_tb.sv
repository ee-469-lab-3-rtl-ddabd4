// arm_tb: end-to-end test of the pipelined processor at its default
// parameters. The testbench holds a 64-word instruction memory and a 64-word
// data memory, both read combinationally as the processor expects, and loads
// a program assembled here by encoding functions. The program computes
// 5+4+3+2+1 in a loop closed by a conditional branch, reloads the sum and
// adds it to the register holding it (a load-use stall that would go wrong if
// the waiting instruction ran twice), runs conditional ADDs after CMP, uses AND/ORR and a
// negative immediate, jumps by writing R15 with ADD and with LDR, and takes
// and skips conditional branches. Each result is stored to data memory and
// compared with values worked out by hand. The cycle in which the last store
// reaches the Memory stage is compared with the count predicted from one
// instruction per cycle plus the hazard penalties (load-use 1, taken branch 2,
// R15 write 4). Every pipeline mechanism (forwarding from Memory and from
// Writeback, load-use stall, taken and not-taken branch, skipped conditional
// instruction, flag update, R15 write) is counted and must occur.
module arm_tb;
  import arm_pkg::*;

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] instr_f, read_data_m, write_data_m, pc_f, alu_result_m;
  logic        mem_write_m;
  logic [31:0] imem [64];
  logic [31:0] dmem [64];
  int          checks = 0, failures = 0, cycle = -1, last_store_cycle = -1;

  arm dut (
    .clk, .rst,
    .Instr_Fetch   (instr_f),
    .ReadData_Mem  (read_data_m),
    .WriteData_Mem (write_data_m),
    .PC_Fetch      (pc_f),
    .ALUResult_Mem (alu_result_m),
    .MemWrite_Mem  (mem_write_m)
  );

  always #5ns clk = ~clk;

  // Word-addressed memories; addresses beyond 64 words wrap.
  assign instr_f     = imem[pc_f[7:2]];
  assign read_data_m = dmem[alu_result_m[7:2]];

  always_ff @(posedge clk) if (mem_write_m) dmem[alu_result_m[7:2]] <= write_data_m;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- assembler
  localparam logic [3:0] EQ = 4'h0, NE = 4'h1, GE = 4'ha, LT = 4'hb, AL = 4'he;
  localparam logic [3:0] C_AND = 4'b0000, C_SUB = 4'b0010, C_ADD = 4'b0100,
                         C_CMP = 4'b1010, C_ORR = 4'b1100;

  function automatic logic [31:0] dpi(logic [3:0] c, logic [3:0] cmd, logic s,
                                      int rd, int rn, int imm8);
    return {c, 2'b00, 1'b1, cmd, s, 4'(rn), 4'(rd), 4'h0, 8'(imm8)};
  endfunction
  function automatic logic [31:0] dpr(logic [3:0] c, logic [3:0] cmd, logic s,
                                      int rd, int rn, int rm);
    return {c, 2'b00, 1'b0, cmd, s, 4'(rn), 4'(rd), 8'h00, 4'(rm)};
  endfunction
  function automatic logic [31:0] ldr(int rd, int rn, int off);
    return {AL, 8'b0101_1001, 4'(rn), 4'(rd), 12'(off)};
  endfunction
  function automatic logic [31:0] str(int rd, int rn, int off);
    return {AL, 8'b0101_1000, 4'(rn), 4'(rd), 12'(off)};
  endfunction
  // Branch from word address 'from' to word address 'to'.
  function automatic logic [31:0] br(logic [3:0] c, int from, int to);
    return {c, 4'b1010, 24'(to - from - 2)};
  endfunction

  // ---------------------------------------------------------------- mechanisms
  int n_fwd_mem = 0, n_fwd_wb = 0, n_ldr_stall = 0, n_br_taken = 0, n_br_not = 0;
  int n_skipped = 0, n_flag_wr = 0, n_pc_wr = 0;

  always @(posedge clk) if (!rst) begin
    cycle <= cycle + 1;
    n_fwd_mem   += int'(dut.fwd_a_e == FWD_MEM) + int'(dut.fwd_b_e == FWD_MEM);
    n_fwd_wb    += int'(dut.fwd_a_e == FWD_WB)  + int'(dut.fwd_b_e == FWD_WB);
    n_ldr_stall += int'(dut.ldr_stall);
    n_br_taken  += int'(dut.branch_taken_e);
    n_br_not    += int'(dut.de.branch && !dut.cond_ex_e);
    n_skipped   += int'(dut.de.reg_write && !dut.cond_ex_e);
    n_flag_wr   += int'(dut.de.flag_write && dut.cond_ex_e);
    n_pc_wr     += int'(dut.mw.pc_src);
    if (mem_write_m && alu_result_m == 32'd100) last_store_cycle = cycle + 1;
  end

  task automatic check_mem(input int addr, input logic [31:0] want, input string what);
    checks++;
    if (dmem[addr / 4] !== want) begin
      failures++;
      $display("FAIL %s: mem[%0d] = %h, want %h", what, addr, dmem[addr / 4], want);
    end
  endtask

  task automatic check_count(input string what, input int n);
    checks++;
    $display("%-24s %0d", what, n);
    if (n == 0) begin failures++; $display("FAIL %s never happened", what); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin imem[i] = 32'h0; dmem[i] = 32'h0; end
    imem[0]  = dpr(AL, C_SUB, 0, 0, 15, 15);     // R0 = PC - PC = 0
    imem[1]  = dpi(AL, C_ADD, 0, 1, 0, 5);       // R1 = 5
    imem[2]  = dpi(AL, C_ADD, 0, 2, 0, 0);       // R2 = 0
    imem[3]  = dpi(AL, C_ADD, 0, 3, 0, 64);      // R3 = 64 (data base)
    imem[4]  = dpr(AL, C_ADD, 0, 2, 2, 1);       // loop: R2 += R1
    imem[5]  = dpi(AL, C_SUB, 1, 1, 1, 1);       // SUBS R1, R1, #1
    imem[6]  = br(NE, 6, 4);                     // BNE loop
    imem[7]  = str(2, 3, 0);                     // [64] = 15
    imem[8]  = ldr(4, 3, 0);                     // R4 = 15
    imem[9]  = dpr(AL, C_ADD, 0, 2, 2, 4);       // R2 = 15 + 15 = 30 (load-use)
    imem[10] = str(2, 3, 4);                     // [68] = 30
    imem[11] = dpi(AL, C_CMP, 1, 0, 2, 30);      // CMP R2, #30 -> Z
    imem[12] = dpi(EQ, C_ADD, 0, 6, 0, 7);       // ADDEQ R6 = 7 (runs)
    imem[13] = dpi(NE, C_ADD, 0, 6, 0, 9);       // ADDNE R6 = 9 (skipped)
    imem[14] = str(6, 3, 8);                     // [72] = 7
    imem[15] = dpr(AL, C_AND, 0, 7, 2, 4);       // R7 = 30 & 15 = 14
    imem[16] = dpr(AL, C_ORR, 0, 8, 2, 4);       // R8 = 30 | 15 = 31
    imem[17] = str(7, 3, 12);                    // [76] = 14
    imem[18] = str(8, 3, 16);                    // [80] = 31
    imem[19] = dpi(AL, C_ADD, 0, 9, 0, -1);      // R9 = -1 (sign-extended imm8)
    imem[20] = str(9, 3, 20);                    // [84] = ffffffff
    imem[21] = dpi(AL, C_ADD, 0, 15, 0, 100);    // PC = 100 (word 25)
    imem[22] = dpi(AL, C_ADD, 0, 10, 0, 1);      // skipped by the jump
    imem[23] = str(10, 3, 24);                   // skipped by the jump
    imem[25] = dpi(AL, C_ADD, 0, 10, 0, 2);      // R10 = 2
    imem[26] = str(10, 3, 24);                   // [88] = 2
    imem[27] = dpi(AL, C_CMP, 1, 0, 0, 1);       // CMP R0, #1 -> N
    imem[28] = br(LT, 28, 30);                   // BLT taken
    imem[29] = str(0, 3, 28);                    // skipped by the branch
    imem[30] = br(GE, 30, 33);                   // BGE not taken
    imem[31] = dpi(AL, C_ADD, 0, 11, 0, 3);      // R11 = 3
    imem[32] = str(11, 3, 28);                   // [92] = 3
    imem[33] = dpi(AL, C_ADD, 0, 12, 3, 84);     // R12 = 148 (word 37)
    imem[34] = str(12, 3, 32);                   // [96] = 148
    imem[35] = ldr(15, 3, 32);                   // PC = [96] = 148
    imem[36] = dpi(AL, C_ADD, 0, 13, 0, 1);      // skipped by the jump
    imem[37] = dpi(AL, C_ADD, 0, 13, 0, 4);      // R13 = 4
    imem[38] = str(13, 3, 36);                   // [100] = 4 (last store)
    imem[39] = br(AL, 39, 39);                   // halt: branch to self

    repeat (3) @(posedge clk);
    #1ns rst = 1'b0;
    wait (last_store_cycle >= 0);
    repeat (10) @(posedge clk);
    #1ns;

    check_mem(64,  32'd15,       "loop sum");
    check_mem(68,  32'd30,       "load-use add");
    check_mem(72,  32'd7,        "conditional ADD");
    check_mem(76,  32'd14,       "AND");
    check_mem(80,  32'd31,       "ORR");
    check_mem(84,  32'hffffffff, "negative immediate");
    check_mem(88,  32'd2,        "ADD to R15 jump");
    check_mem(92,  32'd3,        "BLT / BGE");
    check_mem(96,  32'd148,      "jump address");
    check_mem(100, 32'd4,        "LDR to R15 jump");

    // 46 instructions issue; the 46th is in Memory at cycle 45 + 3, plus
    // 5 taken branches x 2, 2 R15 writes x 4 and one load-use bubble.
    checks++;
    $display("last store in Memory at cycle %0d (expected %0d)", last_store_cycle, 67);
    if (last_store_cycle != 67) failures++;

    check_count("forward from Memory",    n_fwd_mem);
    check_count("forward from Writeback", n_fwd_wb);
    check_count("load-use stall",         n_ldr_stall);
    check_count("branch taken",           n_br_taken);
    check_count("branch not taken",       n_br_not);
    check_count("skipped conditional",    n_skipped);
    check_count("flag update",            n_flag_wr);
    check_count("R15 write",              n_pc_wr);
    checks++;
    if (n_ldr_stall != 1) begin failures++; $display("FAIL load-use stalls %0d, want 1", n_ldr_stall); end
    checks++;
    if (n_pc_wr != 2) begin failures++; $display("FAIL R15 writes %0d, want 2", n_pc_wr); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
