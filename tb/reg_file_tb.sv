// reg_file_tb: self-checking test of the 16 x 32 register file. All registers
// are first written with known values, then random writes (enabled or not) and
// random reads on both ports are applied every 10 ns cycle and compared with a
// shadow array kept here, including the same-cycle write-to-read bypass.
module reg_file_tb;
  logic        clk = 1'b0, we;
  logic [31:0] wd, rd1, rd2;
  logic [3:0]  wa, ra1, ra2;
  logic [31:0] shadow [16];
  int          checks = 0, failures = 0, n_bypass = 0;

  reg_file dut (.clk, .wr_en(we), .write_data(wd), .write_addr(wa),
                .read_addr1(ra1), .read_addr2(ra2), .read_data1(rd1), .read_data2(rd2));

  always #5ns clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    logic [31:0] e1, e2;
    #1ns;
    e1 = (we && ra1 == wa) ? wd : shadow[ra1];
    e2 = (we && ra2 == wa) ? wd : shadow[ra2];
    n_bypass += int'(we && (ra1 == wa || ra2 == wa));
    checks += 2;
    if (rd1 !== e1) begin failures++; $display("FAIL rd1[%0d]=%h want %h", ra1, rd1, e1); end
    if (rd2 !== e2) begin failures++; $display("FAIL rd2[%0d]=%h want %h", ra2, rd2, e2); end
  endtask

  initial begin
    @(negedge clk);
    for (int r = 0; r < 16; r++) begin
      we = 1'b1; wa = 4'(r); wd = 32'h1000_0000 + 32'(r) * 32'h0101_0101;
      ra1 = 4'(r); ra2 = 4'(15 - r);
      @(posedge clk); shadow[r] = wd; @(negedge clk);
    end
    for (int n = 0; n < 3000; n++) begin
      we  = ($urandom_range(0, 2) != 0);
      wa  = 4'($urandom); wd = $urandom;
      ra1 = 4'($urandom); ra2 = (n % 4 == 0) ? wa : 4'($urandom);
      check_reads();
      @(posedge clk);
      if (we) shadow[wa] = wd;
      @(negedge clk);
    end
    if (n_bypass == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
