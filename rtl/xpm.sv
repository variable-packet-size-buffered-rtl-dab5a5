// xpm: crosspoint memory -- a 2-port SRAM with one write port and one read
// port, each in its own clock domain.
//
// One crosspoint of the buffered crossbar holds a FIFO of whole packets in
// this memory. The write port is clocked by the clock of the input link that
// feeds the crosspoint row, the read port by the clock of the output link of
// the crosspoint column, so every payload word is written once and read once
// while it crosses the clock boundary (no elastic buffers elsewhere).
//
// Interface and timing: a write (wr = 1) stores wr_data at wr_addr on the
// rising edge of wr_clk. A read (rd = 1) on a rising edge of rd_clk presents
// the word at rd_addr on rd_data after that edge (one-cycle read latency);
// rd_data holds its value while rd = 0. The paper gives the memory as a
// 2-port SRAM of 2 KByte per crosspoint; the one-cycle synchronous read is this
// design's choice. The array is written for synthesis to infer a two-clock
// memory macro.
module xpm #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wr,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_clk,
  input  logic             rd,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wr_clk) begin
    if (wr) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge rd_clk) begin
    if (rd) rd_data <= mem[rd_addr];
  end

endmodule
