// alu_tb: self-checking test of the ALU. Applies corner-case and random
// operands for each of the four operations and compares the result and the
// {N,Z,C,V} flags with a reference computed here from 33-bit and signed
// arithmetic. The ALU is combinational; each vector is checked 1 ns after it
// is applied.
module alu_tb;
  import arm_pkg::*;

  logic [31:0] a, b, result;
  alu_op_t     op;
  flags_t      flags;
  int          checks = 0, failures = 0;

  alu dut (.A(a), .B(b), .control(op), .result(result), .flags(flags));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [31:0] ta, input logic [31:0] tb_, input alu_op_t top);
    logic [32:0] wide;
    logic [31:0] exp_r;
    logic        exp_c, exp_v;
    longint      sa, sb, sr;
    a = ta; b = tb_; op = top;
    #1ns;
    sa = longint'($signed(ta));
    sb = longint'($signed(tb_));
    exp_c = 1'b0; exp_v = 1'b0;
    case (top)
      ALU_ADD: begin
        wide  = {1'b0, ta} + {1'b0, tb_};
        exp_r = wide[31:0]; exp_c = wide[32];
        sr = sa + sb; exp_v = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
      end
      ALU_SUB: begin
        exp_r = ta - tb_; exp_c = (ta >= tb_);
        sr = sa - sb; exp_v = (sr > 64'sd2147483647) || (sr < -64'sd2147483648);
      end
      ALU_AND: exp_r = ta & tb_;
      default: exp_r = ta | tb_;
    endcase
    checks++;
    if (result !== exp_r || flags.n !== exp_r[31] || flags.z !== (exp_r == 0) ||
        flags.c !== exp_c || flags.v !== exp_v) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h: got %h nzcv=%b, want %h nzcv=%b%b%b%b",
               top, ta, tb_, result, flags, exp_r, exp_r[31], exp_r == 0, exp_c, exp_v);
    end
  endtask

  localparam logic [31:0] CORNER [6] = '{32'h0, 32'h1, 32'h7fffffff, 32'h80000000,
                                         32'hffffffff, 32'h12345678};

  initial begin
    for (int o = 0; o < 4; o++)
      foreach (CORNER[i])
        foreach (CORNER[j])
          check_one(CORNER[i], CORNER[j], alu_op_t'(o));
    for (int n = 0; n < 4000; n++)
      check_one($urandom, (n % 3 == 0) ? 32'($urandom_range(0, 7)) : $urandom,
                alu_op_t'($urandom_range(0, 3)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
