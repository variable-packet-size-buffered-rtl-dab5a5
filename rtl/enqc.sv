// enqc: enqueue controller of one input port.
//
// It receives the word stream of the input link (after the link receiver)
// and marks packet boundaries for the crosspoints of its row: sop on word 0
// (the multicast bitmap) and eop on the last word. The length is taken from
// the IP total-length field, bits [15:0] of word 1, so a packet of L bytes
// ends on word 1 + ceil(L/4) - 1 (see vcb_pkg). The first valid word after a
// packet's last word starts the next packet.
//
// Interface and timing: link_valid/link_data carry one word per clock; all
// outputs are registered, one clock after the word arrives. The words of a
// packet must arrive on consecutive clocks (link_valid high from the bitmap
// word to the last word): the crosspoints write one word every clock between
// sop and eop. An assertion checks this rule. Packets shorter than
// MIN_PKT_BYTES are not supported (the output scheduler needs the length
// word before it runs out of words to read).
//
// The paper names this block and says it generates sop and eop; how it
// finds the packet end (length field, word layout) is this design's choice.
module enqc
  import vcb_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             link_valid,
  input  logic [WIDTH-1:0] link_data,
  output logic             valid,
  output logic             sop,
  output logic             eop,
  output logic [WIDTH-1:0] data
);

  logic        in_pkt;     // a packet is in progress (bitmap word seen)
  logic        len_next;   // the next word is word 1 (holds the length)
  logic [15:0] rem;        // words still to come after the current one
  logic        is_sop, is_eop;
  logic [15:0] words_total;

  always_comb begin
    words_total = 16'(pkt_words(link_data[LEN_W-1:0]));
    is_sop = link_valid && !in_pkt;
    is_eop = 1'b0;
    if (link_valid && in_pkt) begin
      if (len_next) is_eop = (words_total <= 16'd2);
      else          is_eop = (rem == 16'd1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt   <= 1'b0;
      len_next <= 1'b0;
      rem      <= '0;
      valid    <= 1'b0;
      sop      <= 1'b0;
      eop      <= 1'b0;
      data     <= '0;
    end else begin
      valid <= link_valid;
      sop   <= is_sop;
      eop   <= is_eop;
      data  <= link_data;
      if (is_sop) begin
        in_pkt   <= 1'b1;
        len_next <= 1'b1;
      end else if (link_valid && in_pkt) begin
        len_next <= 1'b0;
        if (len_next) rem <= words_total - 16'd2;
        else          rem <= rem - 16'd1;
        if (is_eop) in_pkt <= 1'b0;
      end
    end
  end

  // The words of a packet arrive back to back.
  a_contiguous: assert property (@(posedge clk) disable iff (!rst_n)
    in_pkt |-> link_valid)
    else $error("enqc: link_valid dropped inside a packet");

endmodule
