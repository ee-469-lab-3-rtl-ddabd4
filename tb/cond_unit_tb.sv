// cond_unit_tb: self-checking test of the condition unit and flag register.
// On a 10 ns clock it loads random flags (with flag_write and a condition
// that may or may not pass) and evaluates every condition code against the
// stored flags. Expected results come from a table here written in terms of
// signed comparisons of a reference subtraction result. The stored flags are
// tracked by a model that loads only when flag_write is set and the condition
// passes.
module cond_unit_tb;
  import arm_pkg::*;

  logic       clk = 1'b0, rst, flag_write, cond_ex;
  logic [3:0] cond;
  flags_t     alu_flags, flags, model;
  int         checks = 0, failures = 0, n_load = 0, n_blocked = 0;

  cond_unit dut (.*);

  always #5ns clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_cond(input logic [3:0] c, input flags_t fl);
    case (c)
      4'd0:  return fl.z == 1'b1;                 // EQ
      4'd1:  return fl.z == 1'b0;                 // NE
      4'd10: return fl.n == 1'b0;                 // GE
      4'd11: return fl.n == 1'b1 && fl.z == 1'b0; // LT
      4'd12: return fl.n == 1'b0 && fl.z == 1'b0; // GT
      4'd13: return fl.n == 1'b1 || fl.z == 1'b1; // LE
      4'd14: return 1'b1;                         // AL
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    rst = 1'b1; flag_write = 1'b0; cond = 4'd14; alu_flags = '1;
    @(posedge clk); #1ns;
    rst = 1'b0; model = '0;
    checks++; if (flags !== 4'b0000) begin failures++; $display("FAIL reset flags=%b", flags); end
    for (int n = 0; n < 4000; n++) begin
      // Evaluate all sixteen codes against the present flags.
      flag_write = 1'b0;
      for (int c = 0; c < 16; c++) begin
        cond = 4'(c); #1ns;
        checks++;
        if (cond_ex !== ref_cond(4'(c), model)) begin
          failures++;
          $display("FAIL cond=%0d flags=%b got %b", c, model, cond_ex);
        end
      end
      // Attempt a flag load under a random condition.
      cond = (n % 2 == 0) ? 4'd14 : 4'($urandom);
      alu_flags  = 4'($urandom);
      flag_write = ($urandom_range(0, 3) != 0);
      #1ns;
      if (flag_write && ref_cond(cond, model)) begin model = alu_flags; n_load++; end
      else if (flag_write) n_blocked++;
      @(posedge clk); #1ns;
      checks++;
      if (flags !== model) begin failures++; $display("FAIL flags=%b want %b", flags, model); end
    end
    if (n_load == 0 || n_blocked == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
