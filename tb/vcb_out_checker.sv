// vcb_out_checker: testbench monitor of one switch output (output K).
//
// It parses every packet leaving output K and checks it against the packet
// format the line-card model sends: word 0 bitmap with bit K set, word 1 the
// length, word 2 {source, sequence}, payload words a fixed function of
// source, sequence and word index, the number of words between out_sop and
// out_eop equal to 1 + ceil(length/4), out_valid unbroken inside a packet,
// and, per source, strictly increasing sequence numbers (no reordering, no
// duplicates; the end-of-test count comparison catches losses). It also
// counts the switch mechanisms it sees: cut-through (the packet started
// leaving while its source was still sending it), back-to-back packets,
// consecutive packets from different sources, and multicast copies.
module vcb_out_checker #(
  parameter int unsigned N     = 4,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned K     = 0
) (
  input  logic             clk,
  input  logic             out_valid,
  input  logic             out_sop,
  input  logic             out_eop,
  input  logic [WIDTH-1:0] out_data,
  input  logic             lc_busy [N],
  input  int unsigned      lc_seq  [N],
  output int unsigned      checks,
  output int unsigned      failures,
  output int unsigned      rx_from [N],
  output int unsigned      cut_through,
  output int unsigned      back_to_back,
  output int unsigned      src_switch,
  output int unsigned      multicast,
  output int unsigned      busy_cycles,   // clocks with out_valid
  output int unsigned      span_cycles    // clocks from the first sop to the last eop
);

  int unsigned last_seq [N];
  int unsigned widx, len, src, seq, exp_words;
  logic [N-1:0] map;
  logic         in_pkt, prev_eop;
  int unsigned  prev_src;
  logic         busy_snap [N];
  int unsigned  seq_snap  [N];

  function automatic logic [WIDTH-1:0] payload(int unsigned s, int unsigned q, int unsigned k);
    return WIDTH'((s * 32'h9E3779B1) ^ (q * 32'h85EBCA6B) ^ (k * 32'hC2B2AE35));
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("output %0d: %s (src %0d seq %0d word %0d)", K, what, src, seq, widx);
    end
  endtask

  initial begin
    checks = 0; failures = 0; cut_through = 0; back_to_back = 0;
    src_switch = 0; multicast = 0; busy_cycles = 0; span_cycles = 0; in_pkt = 0; prev_eop = 0; prev_src = N;
    widx = 0; len = 0; src = 0; seq = 0; exp_words = 0; map = '0;
    for (int i = 0; i < N; i++) begin
      last_seq[i] = 0;
      rx_from[i]  = 0;
    end
  end

  int unsigned cyc = 0, first_sop = 0, last_eop = 0;
  logic        any_sop = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (out_valid) busy_cycles++;
    if (out_valid && out_sop && !any_sop) begin any_sop = 1; first_sop = cyc; end
    if (out_valid && out_eop) begin last_eop = cyc; span_cycles = last_eop - first_sop + 1; end
    prev_eop <= out_valid && out_eop;
    if (out_valid) begin
      if (out_sop) begin
        if (in_pkt) check(0, "sop inside a packet");
        in_pkt = 1;
        widx   = 0;
        map    = N'(out_data);
        if (prev_eop) back_to_back++;
        busy_snap = lc_busy;
        seq_snap  = lc_seq;
        check(map[K] == 1'b1, "bitmap bit of this output not set");
        if ($countones(map) > 1) multicast++;
      end else if (!in_pkt) begin
        check(0, "word outside a packet");
      end else begin
        widx++;
        if (widx == 1) begin
          len       = int'(out_data[15:0]);
          exp_words = 1 + (len + 3) / 4;
          check(out_data[31:16] == 16'h4500 && len >= 40 && len <= 1500, "bad length word");
        end else if (widx == 2) begin
          src = int'(out_data[31:24]);
          seq = int'(out_data[23:0]);
          check(src < N, "bad source");
          if (src < N) begin
            check(seq > last_seq[src], "sequence out of order");
            last_seq[src] = seq;
            rx_from[src]++;
            if (busy_snap[src] && seq_snap[src] == seq) cut_through++;
            if (prev_src != N && prev_src != src) src_switch++;
            prev_src = src;
          end
        end else begin
          check(out_data == payload(src, seq, widx), "payload mismatch");
        end
        if (out_eop) begin
          check(widx + 1 == exp_words, "packet length mismatch");
          in_pkt = 0;
        end
      end
    end else if (in_pkt) begin
      check(0, "gap inside a packet");
    end
  end

endmodule
