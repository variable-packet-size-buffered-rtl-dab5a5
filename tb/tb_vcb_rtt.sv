// tb_vcb_rtt: buffer size against credit round trip, worst case.
//
// A single persistent flow from input 0 to output 0 alternates 1500-byte
// packets with packets of max(B - 1499, 40) bytes, B being the crosspoint
// buffer size: the short packet is the smallest one that, together with a
// long one, no longer fits in the buffer, so the long packet after it must
// wait for credit. Line cards add CRED_DELAY clocks to the credit loop, which
// with the switch's own credit path makes a round trip of roughly 120 words
// (about 480 bytes). Four 2 x 2 switches run side by side with B = 1536,
// 1792, 2048 and 2400 bytes. The output stays fully used (at least 99 % of
// the clocks between first and last packet) once B is at least one maximum
// packet plus one round-trip window; the 1536-byte buffer, well below that,
// must show the under-use (below 97 %). All packets are checked word by word.
module tb_vcb_rtt;
  localparam int unsigned N = 2, WIDTH = 32, NCFG = 4, NPKT = 60, CRED_DELAY = 100;
  localparam int unsigned BSZ [NCFG] = '{1536, 1792, 2048, 2400};

  int unsigned checks = 0, failures = 0;
  logic        cfg_done [NCFG];
  real         util [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned XPB   = BSZ[c];
    localparam int unsigned SMALL = (XPB > 1499 + 40) ? XPB - 1499 : 40;

    logic             in_clk [N], in_rst_n [N], in_valid [N], cred_line [N];
    logic [WIDTH-1:0] in_data [N];
    logic             out_clk [N], out_rst_n [N], out_valid [N], out_sop [N], out_eop [N];
    logic [WIDTH-1:0] out_data [N];
    logic             lc_done [N], lc_busy [N];
    int unsigned      lc_seq [N], stall [N], cred_rx [N], lc_err [N];
    int unsigned      sent [N][N], words [N][N];
    int unsigned      ck [N], fl [N], rx [N][N], ct [N], b2b [N], sw [N], mc [N], busy [N], span [N];

    vcb_switch #(.N(N), .WIDTH(WIDTH), .XP_BYTES(XPB)) dut (.*);

    for (genvar j = 0; j < N; j++) begin : g_in
      initial begin
        in_clk[j] = 1'b0;
        forever #5.0 in_clk[j] = ~in_clk[j];
      end
      initial begin
        in_rst_n[j] = 1'b0;
        #40 in_rst_n[j] = 1'b1;
      end
      vcb_line_card #(.N(N), .WIDTH(WIDTH), .J(j), .CREDIT_WORDS(XPB / 4),
                      .NPKT(j == 0 ? NPKT : 0), .MODE(3), .SMALL(SMALL),
                      .CRED_DELAY(CRED_DELAY)) u_lc (
        .clk(in_clk[j]), .rst_n(in_rst_n[j]), .cred_line(cred_line[j]),
        .link_valid(in_valid[j]), .link_data(in_data[j]), .done(lc_done[j]),
        .sent_cnt(sent[j]), .stall_cycles(stall[j]), .credits_rx(cred_rx[j]), .consumed(words[j]),
        .tx_busy(lc_busy[j]), .tx_seq(lc_seq[j]), .errors(lc_err[j]));
    end

    for (genvar k = 0; k < N; k++) begin : g_out
      initial begin
        out_clk[k] = 1'b0;
        #1.3;
        forever #5.02 out_clk[k] = ~out_clk[k];
      end
      initial begin
        out_rst_n[k] = 1'b0;
        #40 out_rst_n[k] = 1'b1;
      end
      vcb_out_checker #(.N(N), .WIDTH(WIDTH), .K(k)) u_chk (
        .clk(out_clk[k]), .out_valid(out_valid[k]), .out_sop(out_sop[k]),
        .out_eop(out_eop[k]), .out_data(out_data[k]), .lc_busy(lc_busy), .lc_seq(lc_seq),
        .checks(ck[k]), .failures(fl[k]), .rx_from(rx[k]), .cut_through(ct[k]),
        .back_to_back(b2b[k]), .src_switch(sw[k]), .multicast(mc[k]),
        .busy_cycles(busy[k]), .span_cycles(span[k]));
    end

    initial begin
      cfg_done[c] = 0;
      #100;
      while (!(lc_done[0] && lc_done[1])) @(posedge in_clk[0]);
      repeat (500) @(posedge out_clk[0]);
      for (int k = 0; k < N; k++) begin
        checks += ck[k];
        failures += fl[k];
      end
      checks++;
      if (rx[0][0] != NPKT) begin
        failures++;
        $display("FAIL B=%0d: %0d packets delivered, %0d sent", XPB, rx[0][0], NPKT);
      end
      checks++;
      failures += (lc_err[0] != 0);
      util[c] = real'(busy[0]) / real'(span[0]);
      $display("B = %0d bytes, short packet %0d bytes: output utilization %0.3f", XPB, SMALL, util[c]);
      cfg_done[c] = 1;
    end
  end

  initial begin : main
    bit all;
    all = 0;
    while (!all) begin
      #1000;
      all = 1;
      for (int c = 0; c < NCFG; c++) if (cfg_done[c] !== 1'b1) all = 0;
    end
    checks++;
    if (util[NCFG-1] < 0.99) begin
      failures++;
      $display("FAIL: a buffer of one maximum packet plus the round trip is not fully used");
    end
    checks++;
    if (util[0] >= 0.97) begin
      failures++;
      $display("FAIL: the 1536-byte buffer shows no under-use in the worst case");
    end
    for (int c = 1; c < NCFG; c++) begin
      checks++;
      if (util[c] + 0.005 < util[c-1]) begin
        failures++;
        $display("FAIL: utilization falls as the buffer grows");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge g_cfg[0].in_clk[0]);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
