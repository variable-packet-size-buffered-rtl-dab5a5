// xpd: crosspoint datapath -- the logic around one crosspoint buffer.
//
// Input clock domain: the crosspoint watches the row's input bus. When the
// enqueue controller asserts sop and this crosspoint's bit of the multicast
// bitmap (word 0 of the packet) is set, the crosspoint starts writing words
// into its buffer, one per cycle, at addresses from a wrapping write counter;
// writing stops after the word marked eop. Because the input link only sends
// a packet when it holds credits for it, the buffer is never checked for
// overflow. At the start of every enqueued packet the newPacket flag toggles.
//
// Output clock domain: the newPacket flag passes through a two-flip-flop
// synchronizer to new_pkt (one synchronization delay); the output scheduler
// counts each change as one packet arrival. The output scheduler raises deq
// for every word it wants; each deq reads the word at the wrapping read
// counter, which then advances. rd_data appears one output clock after deq.
//
// Follows the paper: the enqueue enable (sop and bitmap bit), the
// write-enable flag set at sop and cleared by eop, the single write counter,
// the read counter advanced by deq, a 2-port SRAM between the two clocks, and
// a synchronized newPacket notification. This design's choice: newPacket is a
// toggle (two-phase) signal, so the output needs no acknowledge back into the
// input domain and two back-to-back minimum-size packets cannot be merged
// into one notification; resets are asynchronous, active low, one per domain.
module xpd #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  // input (write) clock domain
  input  logic             clk_in,
  input  logic             rst_in_n,
  input  logic             sop,       // first word of a packet on in_data
  input  logic             eop,       // last word of a packet on in_data
  input  logic             sel_bit,   // this crosspoint's bitmap bit (valid with sop)
  input  logic [WIDTH-1:0] in_data,
  // output (read) clock domain
  input  logic             clk_out,
  input  logic             rst_out_n,
  input  logic             deq,       // read one word of the head packet
  output logic             new_pkt,   // synchronized newPacket toggle
  output logic [WIDTH-1:0] rd_data    // word read by the previous deq
);

  // Addresses wrap after DEPTH - 1, so DEPTH need not be a power of two
  // (1.5 KByte and 3 KByte buffers are 384 and 768 words).
  function automatic logic [AW-1:0] next_addr(input logic [AW-1:0] a);
    return (a == AW'(DEPTH - 1)) ? '0 : a + 1'b1;
  endfunction

  // ---------------- input clock domain ----------------
  logic          start;      // enqueue of a packet begins this cycle
  logic          active;     // inside a packet being enqueued (after its first word)
  logic          wr;
  logic [AW-1:0] wr_addr;
  logic          new_pkt_flag;

  assign start = sop & sel_bit;
  assign wr    = start | active;

  always_ff @(posedge clk_in or negedge rst_in_n) begin
    if (!rst_in_n) begin
      active       <= 1'b0;
      wr_addr      <= '0;
      new_pkt_flag <= 1'b0;
    end else begin
      if (start)    active <= ~eop;
      else if (eop) active <= 1'b0;
      if (wr)    wr_addr      <= next_addr(wr_addr);
      if (start) new_pkt_flag <= ~new_pkt_flag;
    end
  end

  // ---------------- output clock domain ----------------
  logic          sync1;
  logic [AW-1:0] rd_addr;

  always_ff @(posedge clk_out or negedge rst_out_n) begin
    if (!rst_out_n) begin
      sync1   <= 1'b0;
      new_pkt <= 1'b0;
      rd_addr <= '0;
    end else begin
      sync1   <= new_pkt_flag;
      new_pkt <= sync1;
      if (deq) rd_addr <= next_addr(rd_addr);
    end
  end

  xpm #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_xpm (
    .wr_clk  (clk_in),
    .wr      (wr),
    .wr_addr (wr_addr),
    .wr_data (in_data),
    .rd_clk  (clk_out),
    .rd      (deq),
    .rd_addr (rd_addr),
    .rd_data (rd_data)
  );

endmodule
