// reg_file: the processor's general-purpose register file, 2^ADDR_WIDTH words of
// DATA_WIDTH bits (16 x 32 by default, R0..R15).
//
// Two combinational read ports (read_addr1/read_data1, read_addr2/read_data2)
// and one synchronous write port (wr_en, write_addr, write_data) written on the
// rising clock edge. A read of the address being written in the same cycle
// returns write_data ("write-first" bypass), so the Writeback stage can hand a
// result to an instruction in Decode in the same cycle; this takes the place of
// a register file written on the falling edge. R15 is stored like any other
// word here: the processor substitutes PC+8 for reads of R15 and routes writes
// to R15 to the PC, so the stored copy is never used. The registers have no
// reset; software writes a register before reading it. The port names follow
// the processor's description, the internal bypass is this design's choice.
module reg_file #(
  parameter int unsigned DATA_WIDTH = 32,
  parameter int unsigned ADDR_WIDTH = 4
) (
  input  logic                  clk,
  input  logic                  wr_en,
  input  logic [DATA_WIDTH-1:0] write_data,
  input  logic [ADDR_WIDTH-1:0] write_addr,
  input  logic [ADDR_WIDTH-1:0] read_addr1,
  input  logic [ADDR_WIDTH-1:0] read_addr2,
  output logic [DATA_WIDTH-1:0] read_data1,
  output logic [DATA_WIDTH-1:0] read_data2
);

  logic [DATA_WIDTH-1:0] regs [2**ADDR_WIDTH];

  always_ff @(posedge clk) begin
    if (wr_en) regs[write_addr] <= write_data;
  end

  always_comb begin
    read_data1 = (wr_en && read_addr1 == write_addr) ? write_data : regs[read_addr1];
    read_data2 = (wr_en && read_addr2 == write_addr) ? write_data : regs[read_addr2];
  end

endmodule
