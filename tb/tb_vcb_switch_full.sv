// tb_vcb_switch_full: end-to-end test of the buffered crossbar at its default
// size, 32 x 32 ports with 2 KByte crosspoint buffers (no parameter overrides).
//
// Four line-card models send generated traffic (random unicast with 40- and
// 1500-byte extremes, a hot spot on output 0, multicast) under credit flow
// control, each input and each output on its own clock, outputs slightly
// slower than inputs so that cut-through is safe. Output monitors check
// every packet word by word and the order per source; at the end every packet
// copy sent must have arrived and every credit must have returned. The test
// counts each mechanism of the switch and fails if one never happened:
// multicast, cut-through, back-to-back output packets, round robin between
// inputs, credit backpressure stalling a line card, crosspoint buffer
// wrap-around, credits returned.
module tb_vcb_switch_full;
  localparam int unsigned N     = vcb_pkg::N_PORTS;
  localparam int unsigned WIDTH = vcb_pkg::WORD_W;
  localparam int unsigned XPB   = vcb_pkg::XP_BUF_BYTES;
  localparam int unsigned DEPTH = XPB / 4;
  localparam int unsigned NPKT  = 24;

  logic             in_clk [N], in_rst_n [N], in_valid [N], cred_line [N];
  logic [WIDTH-1:0] in_data [N];
  logic             out_clk [N], out_rst_n [N], out_valid [N], out_sop [N], out_eop [N];
  logic [WIDTH-1:0] out_data [N];

  logic             lc_done [N], lc_busy [N];
  int unsigned      lc_seq [N], stall [N], cred_rx [N], lc_err [N];
  int unsigned      sent [N][N], words [N][N];
  int unsigned      ck [N], fl [N], rx [N][N], ct [N], b2b [N], sw [N], mc [N];

  int unsigned checks, failures;

  vcb_switch dut (.*);

  for (genvar j = 0; j < N; j++) begin : g_in
    initial begin
      in_clk[j] = 1'b0;
      #(j * 1.3);
      forever #(5.0 + 0.001 * j) in_clk[j] = ~in_clk[j];
    end
    initial begin
      in_rst_n[j] = 1'b0;
      #40 in_rst_n[j] = 1'b1;
    end
    vcb_line_card #(.N(N), .WIDTH(WIDTH), .J(j), .CREDIT_WORDS(DEPTH), .NPKT(NPKT),
                    .MODE(j % 4 == 1 ? 1 : j % 2 == 0 ? 2 : 0)) u_lc (
      .clk(in_clk[j]), .rst_n(in_rst_n[j]), .cred_line(cred_line[j]),
      .link_valid(in_valid[j]), .link_data(in_data[j]), .done(lc_done[j]),
      .sent_cnt(sent[j]), .stall_cycles(stall[j]), .credits_rx(cred_rx[j]), .consumed(words[j]),
      .tx_busy(lc_busy[j]), .tx_seq(lc_seq[j]), .errors(lc_err[j]));
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    initial begin
      out_clk[k] = 1'b0;
      #(k * 0.7);
      forever #(5.04 + 0.001 * k) out_clk[k] = ~out_clk[k];
    end
    initial begin
      out_rst_n[k] = 1'b0;
      #40 out_rst_n[k] = 1'b1;
    end
    vcb_out_checker #(.N(N), .WIDTH(WIDTH), .K(k)) u_chk (
      .clk(out_clk[k]), .out_valid(out_valid[k]), .out_sop(out_sop[k]),
      .out_eop(out_eop[k]), .out_data(out_data[k]), .lc_busy(lc_busy), .lc_seq(lc_seq),
      .checks(ck[k]), .failures(fl[k]), .rx_from(rx[k]), .cut_through(ct[k]),
      .back_to_back(b2b[k]), .src_switch(sw[k]), .multicast(mc[k]), .busy_cycles(), .span_cycles());
  end

  task automatic mech(string name, int unsigned n);
    checks++;
    $display("mechanism %-26s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism %s never happened", name);
    end
  endtask

  function automatic bit all_done();
    for (int j = 0; j < N; j++) if (!lc_done[j]) return 0;
    return 1;
  endfunction

  initial begin : main
    int unsigned s_ct, s_b2b, s_sw, s_mc, s_stall, s_cred;
    checks = 0; failures = 0;
    #100;
    while (!all_done()) @(posedge in_clk[0]);
    repeat (500) @(posedge out_clk[0]);
    for (int k = 0; k < N; k++) begin
      checks += ck[k];
      failures += fl[k];
      for (int j = 0; j < N; j++) begin
        checks++;
        if (rx[k][j] != sent[j][k]) begin
          failures++;
          $display("FAIL: output %0d got %0d packets from input %0d, %0d sent", k, rx[k][j], j, sent[j][k]);
        end
      end
    end
    s_ct = 0; s_b2b = 0; s_sw = 0; s_mc = 0; s_stall = 0; s_cred = 0;
    for (int k = 0; k < N; k++) begin
      s_ct += ct[k]; s_b2b += b2b[k]; s_sw += sw[k]; s_mc += mc[k];
    end
    for (int j = 0; j < N; j++) begin
      s_stall += stall[j];
      checks++;
      failures += (lc_err[j] != 0);
      s_cred  += cred_rx[j];
    end
    // Buffer wrap-around: more words written into the hot-spot crosspoint (1,0) than it holds.
    mech("multicast copies", s_mc);
    mech("cut-through", s_ct);
    mech("back-to-back out", s_b2b);
    mech("round-robin source switch", s_sw);
    mech("credit backpressure stall", s_stall);
    mech("credits returned", s_cred);
    mech("buffer wrap-around", (words[1][0] > DEPTH) ? words[1][0] / DEPTH : 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (400000) @(posedge in_clk[0]);
    $display("FAIL: watchdog expired");
    for (int j = 0; j < N; j++) failures += lc_err[j];
    for (int k = 0; k < N; k++) begin checks += ck[k]; failures += fl[k]; end
    for (int j = 0; j < N; j++) $display("input %0d done=%b credits=%0d stall=%0d", j, lc_done[j], cred_rx[j], stall[j]);
    for (int k = 0; k < N; k++) for (int j = 0; j < N; j++) $display("out %0d from %0d: rx %0d sent %0d", k, j, rx[k][j], sent[j][k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end

endmodule
