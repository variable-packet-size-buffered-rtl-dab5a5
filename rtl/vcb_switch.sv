// vcb_switch: N x N variable-packet-size buffered crossbar (CICQ) switch core.
//
// Each input link feeds one row of N crosspoints; each crosspoint has a small
// buffer (2 KByte by default) that holds whole variable-size packets, so
// packets are switched without segmentation into cells and without speedup.
// Word 0 of a packet is a multicast bitmap naming the outputs; the packet is
// written into the buffer of every named crosspoint of its row. Each output
// runs its own round-robin scheduler over the packet counts of its column and
// reads packets out whole, starting as soon as a packet is counted
// (cut-through). Each departure returns a credit, naming the output, to the
// ingress line card of the packet's input over that input's serial credit
// line; the line card sends a packet to an output only while it holds enough
// credit, which is what keeps the crosspoint buffers from overflowing.
//
// Clock domains: every input j has its own clock in_clk[j] (enqueue
// controller, crosspoint write side, credit sequencer of row j) and every
// output k its own clock out_clk[k] (crosspoint read side and output
// scheduler of column k). The only crossings are inside the crosspoints (the
// 2-port buffers and the newPacket synchronizers) and the credit toggles
// synchronized in the credit sequencers. Cut-through is safe while an output
// clock is not faster than the input clock by more than the synchronization
// delay over the maximum packet duration.
//
// Interface (per port, each in its own clock domain, active-low async resets):
//   in_valid[j]/in_data[j]  input link words; a packet's words back to back
//   cred_line[j]            serial credits to ingress line card j (see crs)
//   out_valid/out_sop/out_eop/out_data[k]  output link k, packets back to back
// The link serializers, pads and line cards are outside this module.
//
// Structure and block split (enqC, crosspoint datapath and memory, output
// scheduler, credit sequencer) follow the paper; the defaults are its
// 32 x 32 ports, 32-bit datapath and 2 KByte crosspoint buffers.
module vcb_switch
  import vcb_pkg::*;
#(
  parameter int unsigned N        = vcb_pkg::N_PORTS,
  parameter int unsigned WIDTH    = vcb_pkg::WORD_W,
  parameter int unsigned XP_BYTES = vcb_pkg::XP_BUF_BYTES,
  parameter int unsigned CNT_W    = 6,
  localparam int unsigned DEPTH = XP_BYTES / (WIDTH / 8)
) (
  input  logic             in_clk    [N],
  input  logic             in_rst_n  [N],
  input  logic             in_valid  [N],
  input  logic [WIDTH-1:0] in_data   [N],
  output logic             cred_line [N],

  input  logic             out_clk   [N],
  input  logic             out_rst_n [N],
  output logic             out_valid [N],
  output logic             out_sop   [N],
  output logic             out_eop   [N],
  output logic [WIDTH-1:0] out_data  [N]
);

  // row-side signals, index [input]
  logic             e_sop  [N];
  logic             e_eop  [N];
  logic [WIDTH-1:0] e_data [N];
  // crosspoint signals, index [input][output]
  logic             new_pkt [N][N];
  logic [WIDTH-1:0] rd_data [N][N];
  logic             deq     [N][N];
  logic             cred_t  [N][N];

  for (genvar j = 0; j < N; j++) begin : g_in
    logic       unused_valid;
    logic [N-1:0] row_cred;

    enqc #(.WIDTH(WIDTH)) u_enqc (
      .clk        (in_clk[j]),
      .rst_n      (in_rst_n[j]),
      .link_valid (in_valid[j]),
      .link_data  (in_data[j]),
      .valid      (unused_valid),
      .sop        (e_sop[j]),
      .eop        (e_eop[j]),
      .data       (e_data[j])
    );

    for (genvar k = 0; k < N; k++) begin : g_xp
      assign row_cred[k] = cred_t[j][k];

      xpd #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_xpd (
        .clk_in    (in_clk[j]),
        .rst_in_n  (in_rst_n[j]),
        .sop       (e_sop[j]),
        .eop       (e_eop[j]),
        .sel_bit   (e_data[j][k]),
        .in_data   (e_data[j]),
        .clk_out   (out_clk[k]),
        .rst_out_n (out_rst_n[k]),
        .deq       (deq[j][k]),
        .new_pkt   (new_pkt[j][k]),
        .rd_data   (rd_data[j][k])
      );
    end

    crs #(.N(N), .CNT_W(CNT_W)) u_crs (
      .clk       (in_clk[j]),
      .rst_n     (in_rst_n[j]),
      .cred_tgl  (row_cred),
      .cred_line (cred_line[j])
    );
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    logic [N-1:0]     col_new;
    logic [N-1:0]     col_deq;
    logic [N-1:0]     col_cred;
    logic [WIDTH-1:0] col_data [N];

    for (genvar j = 0; j < N; j++) begin : g_col
      assign col_new[j]   = new_pkt[j][k];
      assign col_data[j]  = rd_data[j][k];
      assign deq[j][k]    = col_deq[j];
      assign cred_t[j][k] = col_cred[j];
    end

    os #(.N(N), .WIDTH(WIDTH), .CNT_W(CNT_W)) u_os (
      .clk       (out_clk[k]),
      .rst_n     (out_rst_n[k]),
      .new_pkt   (col_new),
      .rd_data   (col_data),
      .deq       (col_deq),
      .cred_tgl  (col_cred),
      .out_valid (out_valid[k]),
      .out_sop   (out_sop[k]),
      .out_eop   (out_eop[k]),
      .out_data  (out_data[k])
    );
  end

  // The multicast bitmap must fit in word 0.
  initial assert (N <= WIDTH) else $fatal(1, "vcb_switch: N must not exceed WIDTH");

endmodule
