// arm_random_tb: randomised end-to-end test of the pipelined processor at its
// default parameters. For each of NPROG programs it generates a random
// instruction sequence (ADD, SUB, SUBS, CMP, AND, ORR with random conditions
// and register or immediate operands, LDR/STR to a 64-word data area,
// conditional branches up to four words forward or back, and forward jumps by
// ADD R15), runs it on the
// processor, and runs it on an instruction-level reference model written here
// that knows nothing of the pipeline; a program that the model does not see
// finish within MAXSTEP instructions (an endless loop) is replaced by a new
// one before it is run. At the end registers R0..R8 and the
// whole data memory must agree. Dense register reuse makes forwarding,
// load-use stalls and flushes frequent; their occurrence is counted and each
// must happen at least once. Instruction and data memories are testbench
// arrays read combinationally.
module arm_random_tb;
  import arm_pkg::*;

  localparam int NPROG = 150;  // programs
  localparam int NBODY = 80;   // random instructions per program
  localparam int NINIT = 9;    // register set-up instructions
  localparam int HALT  = NINIT + NBODY;  // first of 5 branch-to-self words
  localparam int MAXSTEP = 400;          // instructions the model may execute

  logic        clk = 1'b0, rst = 1'b1;
  logic [31:0] instr_f, read_data_m, write_data_m, pc_f, alu_result_m;
  logic        mem_write_m;
  logic [31:0] imem [128];
  logic [31:0] dmem [64];
  int          checks = 0, failures = 0;
  int          n_fwd = 0, n_ldr_stall = 0, n_br_taken = 0, n_pc_wr = 0, n_skipped = 0;
  int          n_stall_flush = 0;  // Decode asked to stall and flush at once

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

  assign instr_f     = imem[pc_f[8:2]];
  assign read_data_m = dmem[alu_result_m[7:2]];

  always_ff @(posedge clk) if (mem_write_m) dmem[alu_result_m[7:2]] <= write_data_m;

  always @(posedge clk) if (!rst) begin
    n_fwd       += int'(dut.fwd_a_e != FWD_NONE) + int'(dut.fwd_b_e != FWD_NONE);
    n_ldr_stall += int'(dut.ldr_stall);
    n_br_taken  += int'(dut.branch_taken_e);
    n_pc_wr     += int'(dut.mw.pc_src);
    n_skipped   += int'((dut.de.reg_write || dut.de.mem_write) && !dut.cond_ex_e);
    n_stall_flush += int'(dut.stall_d && dut.flush_d);
  end

  initial begin : watchdog
    repeat (NPROG * (MAXSTEP * 5 + 30)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- generator
  localparam logic [3:0] AL = 4'he;
  localparam logic [3:0] CONDS [7] = '{4'h0, 4'h1, 4'ha, 4'hb, 4'hc, 4'hd, 4'he};
  localparam logic [3:0] CMDS  [6] = '{4'b0100, 4'b0010, 4'b0010, 4'b1010, 4'b0000, 4'b1100};
  localparam logic       SBIT  [6] = '{1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0};

  function automatic logic [3:0] rand_cond();
    return ($urandom_range(0, 2) == 0) ? CONDS[$urandom_range(0, 6)] : AL;
  endfunction

  function automatic logic [31:0] rand_instr(int at);
    int          k;
    logic [3:0]  c, rn;
    logic        imm;
    c = rand_cond();
    k = $urandom_range(0, 19);
    if (k < 11) begin                       // data processing
      int op;
      op  = $urandom_range(0, 5);
      imm = (op < 4) ? 1'($urandom) : 1'b0; // AND/ORR are register-only
      rn  = ($urandom_range(0, 15) == 0) ? 4'd15 : 4'($urandom_range(0, 7));
      return {c, 2'b00, imm, CMDS[op], SBIT[op], rn, 4'($urandom_range(0, 7)),
              imm ? {4'h0, 8'($urandom)} : {8'h00, 4'($urandom_range(0, 7))}};
    end else if (k < 14)                    // LDR Rd, [R8, #off]
      return {c, 8'b0101_1001, 4'd8, 4'($urandom_range(0, 7)), 12'($urandom_range(0, 63) * 4)};
    else if (k < 17)                        // STR Rd, [R8, #off]
      return {c, 8'b0101_1000, 4'd8, 4'($urandom_range(0, 7)), 12'($urandom_range(0, 63) * 4)};
    else if (k < 19) begin                  // branch by -4..+4 words
      int to;
      to = at + (($urandom_range(0, 2) == 0) ? -int'($urandom_range(0, 4))
                                             : int'($urandom_range(1, 4)));
      if (to < NINIT) to = NINIT;
      return {c, 4'b1010, 24'(to - at - 2)};
    end else                                // ADD R15, R15, #(0..12): skip 1..4
      return {c, 2'b00, 1'b1, 4'b0100, 1'b0, 4'd15, 4'd15, 4'h0, 8'($urandom_range(0, 3) * 4)};
  endfunction

  // ---------------------------------------------------------------- reference
  logic [31:0] ref_r   [16];
  logic [31:0] ref_mem [64];

  function automatic logic passes(logic [3:0] c, logic n, logic z);
    case (c)
      4'h0: return z;
      4'h1: return !z;
      4'ha: return !n;
      4'hb: return n && !z;
      4'hc: return !n && !z;
      4'hd: return n || z;
      4'he: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  task automatic run_reference(output int steps);
    int          pc;
    logic        n, z;
    logic [31:0] w, a, b, res;
    n = 1'b0; z = 1'b0; pc = 0; steps = 0;
    for (int i = 0; i < 64; i++) ref_mem[i] = 32'h0;
    while (pc / 4 < HALT && steps < MAXSTEP) begin
      int rd, rn, rm, nextpc;
      w = imem[pc / 4];
      rd = int'(w[15:12]); rn = int'(w[19:16]); rm = int'(w[3:0]);
      nextpc = pc + 4;
      steps++;
      a = (rn == 15) ? 32'(pc + 8) : ref_r[rn];
      if (passes(w[31:28], n, z)) begin
        if (w[27:26] == 2'b10) begin                      // B
          nextpc = pc + 8 + 4 * int'($signed(w[23:0]));
        end else if (w[27:26] == 2'b01) begin             // LDR / STR
          if (w[20]) begin
            res = ref_mem[(a + 32'(w[11:0])) / 4 % 64];
            if (rd == 15) nextpc = int'(res); else ref_r[rd] = res;
          end else
            ref_mem[(a + 32'(w[11:0])) / 4 % 64] = (rd == 15) ? 32'(pc + 8) : ref_r[rd];
        end else begin                                    // data processing
          b = w[25] ? 32'($signed(w[7:0])) : ((rm == 15) ? 32'(pc + 8) : ref_r[rm]);
          case (w[24:21])
            4'b0100: res = a + b;
            4'b0010: res = a - b;
            4'b1010: res = a - b;
            4'b0000: res = a & b;
            default: res = a | b;
          endcase
          if (w[20]) begin n = res[31]; z = (res == 32'h0); end
          if (w[24:21] != 4'b1010) begin
            if (rd == 15) nextpc = int'(res); else ref_r[rd] = res;
          end
        end
      end
      pc = nextpc;
    end
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    int steps;
    for (int p = 0; p < NPROG; p++) begin
      rst = 1'b1;
      for (int i = 0; i < 128; i++) imem[i] = {AL, 4'b1010, 24'hfffffe};  // B . (halt)
      for (int i = 0; i < 64; i++)  dmem[i] = 32'h0;
      imem[0] = {AL, 8'b0000_0100, 4'd15, 4'd8, 8'h00, 4'd15};           // SUB R8, PC, PC
      for (int r = 0; r < 8; r++)                                         // ADD Rr, R8, #imm
        imem[1 + r] = {AL, 8'b0010_1000, 4'd8, 4'(r), 4'h0, 8'($urandom)};
      do begin
        for (int i = NINIT; i < HALT; i++) imem[i] = rand_instr(i);
        run_reference(steps);
      end while (steps >= MAXSTEP);
      repeat (2) @(posedge clk);
      #1ns rst = 1'b0;
      repeat (steps * 5 + 20) @(posedge clk);
      #1ns;
      for (int r = 0; r < 9; r++) begin
        checks++;
        if (dut.u_reg_file.regs[r] !== ref_r[r]) begin
          failures++;
          $display("FAIL program %0d: R%0d = %h, want %h", p, r, dut.u_reg_file.regs[r], ref_r[r]);
        end
      end
      for (int i = 0; i < 64; i++) begin
        checks++;
        if (dmem[i] !== ref_mem[i]) begin
          failures++;
          $display("FAIL program %0d: mem[%0d] = %h, want %h", p, 4 * i, dmem[i], ref_mem[i]);
        end
      end
    end
    $display("forwards %0d, load-use stalls %0d, taken branches %0d, R15 writes %0d, cancelled %0d",
             n_fwd, n_ldr_stall, n_br_taken, n_pc_wr, n_skipped);
    $display("Decode stall and flush in the same cycle: %0d", n_stall_flush);
    checks++;
    if (n_fwd == 0 || n_ldr_stall == 0 || n_br_taken == 0 || n_pc_wr == 0 || n_skipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
