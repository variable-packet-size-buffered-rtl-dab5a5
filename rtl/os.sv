// os: output scheduler of one output port (one crosspoint column).
//
// For each of the N crosspoints of its column it keeps a packet counter: the
// number of whole or partly written packets waiting there. A change of the
// crosspoint's synchronized newPacket toggle adds one; starting to send a
// packet from it subtracts one. Scheduling is plain round robin, oblivious of
// packet size: when the output is free (idle, or issuing the last read of the
// current packet) it picks the first crosspoint with a non-zero count after
// the last one served, in circular order. It then raises that crosspoint's
// deq for as many clocks as the packet has words: word 1 (read second) holds
// the IP length, from which the remaining number of reads is computed. A new
// packet can start on the clock after the last read of the previous one, so
// packets leave back to back. Because a crosspoint is counted one
// synchronization delay after its first word is written, a packet may start
// leaving while it is still arriving (cut-through).
//
// Each packet start also toggles cred_tgl[i] of the chosen crosspoint i: the
// credit sequencer of input i turns that into a credit for this output.
// Because the credit leaves at the start of the packet, the line card may
// refill the buffer while the packet is still being read; that is safe while
// the input clock is not faster than this output's clock by more than the
// credit round trip over the maximum packet duration.
//
// Interface and timing: deq[i] to crosspoint i; rd_data[i] is the word read
// by the previous clock's deq. The selected word passes through the output
// multiplexer and a register: out_valid/out_sop/out_eop/out_data appear two
// clocks after the matching deq. All in the output clock domain.
//
// Follows the paper: packet counters per crosspoint, round robin from the
// last served crosspoint, deq held for the packet length read from the
// buffer, credit generated when a packet starts to leave. This design's
// choice: counter width, the two-clock output pipeline, the toggle interface.
module os
  import vcb_pkg::*;
#(
  parameter int unsigned N     = 32,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned CNT_W = 6,   // packet counter width per crosspoint
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         new_pkt,   // synchronized newPacket toggles
  input  logic [WIDTH-1:0]     rd_data [N],
  output logic [N-1:0]         deq,
  output logic [N-1:0]         cred_tgl,  // one toggle per departing packet
  output logic                 out_valid,
  output logic                 out_sop,
  output logic                 out_eop,
  output logic [WIDTH-1:0]     out_data
);

  typedef enum logic [1:0] {IDLE, HEAD0, HEAD1, BODY} state_t;

  state_t            state;
  logic [IW-1:0]     cur;        // crosspoint being served
  logic [IW-1:0]     last;       // last crosspoint served
  logic [15:0]       rem;        // reads still to issue after this clock (BODY)
  logic [N-1:0]      seen;       // last value of new_pkt taken into the counters
  logic [CNT_W-1:0]  cnt [N];

  // read-out pipeline: clock after deq (rd_data valid)
  logic              p_valid, p_sop, p_eop;
  logic [IW-1:0]     p_idx;

  logic              issue;      // a deq is raised this clock
  logic              is_head0;
  logic              last_read;  // this clock's read is the packet's last
  logic              free;       // a new packet may be chosen this clock
  logic              found;
  logic [IW-1:0]     sel;
  logic [15:0]       words_total;

  // Length of the packet under way, from word 1 (on rd_data in state BODY's
  // first clock, i.e. the clock after HEAD1).
  logic              len_now;    // rd_data[cur] is word 1 this clock
  logic              len_q;

  always_comb begin
    words_total = 16'(pkt_words(rd_data[cur][LEN_W-1:0]));
    issue     = (state != IDLE);
    is_head0  = (state == HEAD0);
    len_now   = len_q;
    last_read = 1'b0;
    if (state == BODY) begin
      if (len_now) last_read = (words_total <= 16'd3);
      else         last_read = (rem == 16'd1);
    end
    free = (state == IDLE) || last_read;

    // round robin: first non-zero count after the last served crosspoint
    found = 1'b0;
    sel   = last;
    for (int k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last) + k) % N);
      if (!found && cnt[idx] != '0) begin
        found = 1'b1;
        sel   = idx;
      end
    end

    deq = '0;
    if (issue) deq[cur] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      cur      <= '0;
      last     <= IW'(N - 1);
      rem      <= '0;
      len_q    <= 1'b0;
      seen     <= '0;
      cred_tgl <= '0;
      for (int i = 0; i < N; i++) cnt[i] <= '0;
    end else begin
      seen <= new_pkt;
      for (int i = 0; i < N; i++) begin
        cnt[i] <= cnt[i] + CNT_W'(new_pkt[i] ^ seen[i])
                         - CNT_W'(free && found && sel == IW'(i));
      end

      len_q <= (state == HEAD1);
      case (state)
        IDLE:  ;
        HEAD0: state <= HEAD1;
        HEAD1: state <= BODY;
        BODY: begin
          if (len_now) rem <= words_total - 16'd3;
          else         rem <= rem - 16'd1;
        end
        default: state <= IDLE;
      endcase

      if (free) begin
        if (found) begin
          state         <= HEAD0;
          cur           <= sel;
          last          <= sel;
          cred_tgl[sel] <= ~cred_tgl[sel];
        end else begin
          state <= IDLE;
        end
      end
    end
  end

  // output multiplexer and output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid   <= 1'b0;
      p_sop     <= 1'b0;
      p_eop     <= 1'b0;
      p_idx     <= '0;
      out_valid <= 1'b0;
      out_sop   <= 1'b0;
      out_eop   <= 1'b0;
      out_data  <= '0;
    end else begin
      p_valid   <= issue;
      p_sop     <= is_head0;
      p_eop     <= last_read;
      p_idx     <= cur;
      out_valid <= p_valid;
      out_sop   <= p_sop;
      out_eop   <= p_eop;
      out_data  <= p_valid ? rd_data[p_idx] : '0;
    end
  end

  // A packet is only chosen from a crosspoint that holds one.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (free && found) |-> cnt[sel] != '0);

  // A full counter may not see another arrival unless a packet leaves in the
  // same clock; CNT_W must cover XP_BYTES / 44 packets.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
      (cnt[i] == '1 && (new_pkt[i] ^ seen[i])) |-> (free && found && sel == IW'(i)));
  end

endmodule
