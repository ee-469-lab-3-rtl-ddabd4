// pipeline_register_tb: self-checking test of the pipeline register at an
// 8-bit width. Random d, flush, stall and reset patterns are applied on a
// 10 ns clock; a reference register kept here predicts q after every edge
// (reset clears, stall holds, flush clears, otherwise load with one-cycle
// latency; stall has priority over flush).
module pipeline_register_tb;
  logic       clk = 1'b0, rst, f, s;
  logic [7:0] d, q, model;
  int         checks = 0, failures = 0, cycles = 0;
  int         n_flush = 0, n_stall = 0;

  pipeline_register #(.WIDTH(8)) dut (.clk, .rst, .f, .s, .d, .q);

  always #5ns clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; f = 1'b0; s = 1'b0; d = 8'h5a;
    @(posedge clk); #1ns;
    model = 8'h00;
    checks++; if (q !== 8'h00) begin failures++; $display("FAIL reset: q=%h", q); end
    rst = 1'b0;
    for (int n = 0; n < 2000; n++) begin
      d   = 8'($urandom);
      f   = ($urandom_range(0, 7) == 0);
      s   = ($urandom_range(0, 3) == 0);
      rst = ($urandom_range(0, 63) == 0);
      n_flush += int'(f && !s); n_stall += int'(s && f);
      if (rst)    model = 8'h00;
      else if (s) model = model;
      else if (f) model = 8'h00;
      else        model = d;
      @(posedge clk); #1ns;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL n=%0d rst=%b f=%b s=%b d=%h: q=%h want %h", n, rst, f, s, d, q, model);
      end
    end
    if (n_flush == 0 || n_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
