// extend_tb: self-checking test of the immediate extender. Random instruction
// words are applied with each ImmSrc value; the expected immediate is built
// here from arithmetic (signed conversion, masking, multiplication by 4)
// rather than from bit concatenation.
module extend_tb;
  import arm_pkg::*;

  logic [23:0] instr;
  imm_src_t    src;
  logic [31:0] ext;
  int          checks = 0, failures = 0;

  extend dut (.instr(instr), .imm_src(src), .ext_imm(ext));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    int          s8, s24;
    for (int n = 0; n < 3000; n++) begin
      instr = 24'($urandom);
      if (n < 4) instr = (n[0]) ? 24'hffffff : 24'h000000;
      src = imm_src_t'(n % 4);
      #1ns;
      s8  = int'(instr[7:0]);  if (s8 > 127) s8 -= 256;
      s24 = int'(instr);       if (s24 >= 8388608) s24 -= 16777216;
      case (n % 4)
        0:       exp = 32'(s8);
        1:       exp = 32'(instr & 24'hfff);
        default: exp = 32'(s24 * 4);
      endcase
      checks++;
      if (ext !== exp) begin
        failures++;
        $display("FAIL src=%0d instr=%h got %h want %h", n % 4, instr, ext, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
