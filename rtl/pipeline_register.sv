// pipeline_register: one column of the pipeline, WIDTH flip-flops that move a
// stage's signals to the next stage on the rising clock edge.
//
// Priority on each edge: rst (synchronous) clears the register; otherwise s
// (stall) holds the current value; otherwise f (flush) clears it, turning the
// next stage's instruction into a bubble whose control bits are all zero;
// otherwise q takes d. Latency is one cycle. A stall wins over a flush: the
// Decode register can be asked to do both when an instruction that writes R15
// waits in Decode on a load, and it must keep that instruction. The processor's description builds
// its columns from one-bit registers with exactly these four controls
// (rst, f, s, d); here the width is a parameter (default 1, as there) so that a
// whole column is one instance. The stall-over-flush priority is this design's
// choice.
module pipeline_register #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             f,
  input  logic             s,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (s)  q <= q;
    else if (f)  q <= '0;
    else         q <= d;
  end

endmodule
