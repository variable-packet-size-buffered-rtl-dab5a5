// tb_vcb_throughput: switch throughput under unbalanced traffic.
//
// Every input is saturated (its VOQs hold far more packets than the run can
// send). Input i sends to output i with probability f + (1-f)/N and to each
// other output with probability (1-f)/N; sizes follow a bounded Pareto law
// from 40 to 1500 bytes with mean 370. Six 8 x 8 switches run side by side:
// f = 0.5 with crosspoint buffers of 1.5, 2, 3 and 8 KByte, and f = 0 and
// f = 1 with 2 KByte. Throughput is the fraction of output clocks carrying
// a word (bitmap words included) over a window in which every input still
// has packets queued. Line cards add 100 clocks to the credit loop. Checks:
// every packet intact and in order; f = 1 gives full throughput (each input
// owns its output); every case sustains at least 90 % of the line rate; and
// with f = 0.5 the buffer size moves throughput by no more than 0.03. With
// inputs that never run dry, an output nearly always finds some crosspoint
// of its column holding a packet, so the buffer size matters little here;
// measured values are about 0.97 to 0.99 for f = 0.5.
module tb_vcb_throughput;
  localparam int unsigned N = 8, WIDTH = 32, NCFG = 6, NPKT = 1200;
  localparam int unsigned W0 = 3000, W1 = 33000;    // measurement window, output clocks
  localparam int unsigned BSZ [NCFG] = '{1536, 2048, 3072, 8192, 2048, 2048};
  localparam int unsigned FPM [NCFG] = '{500, 500, 500, 500, 0, 1000};

  int unsigned checks = 0, failures = 0;
  logic        cfg_done [NCFG];
  real         thr [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned XPB = BSZ[c];

    logic             in_clk [N], in_rst_n [N], in_valid [N], cred_line [N];
    logic [WIDTH-1:0] in_data [N];
    logic             out_clk [N], out_rst_n [N], out_valid [N], out_sop [N], out_eop [N];
    logic [WIDTH-1:0] out_data [N];
    logic             lc_done [N], lc_busy [N];
    int unsigned      lc_seq [N], stall [N], cred_rx [N], lc_err [N];
    int unsigned      sent [N][N], words [N][N];
    int unsigned      ck [N], fl [N], rx [N][N], ct [N], b2b [N], sw [N], mc [N], busy [N], span [N];

    vcb_switch #(.N(N), .WIDTH(WIDTH), .XP_BYTES(XPB), .CNT_W(8)) dut (.*);

    for (genvar j = 0; j < N; j++) begin : g_in
      initial begin
        in_clk[j] = 1'b0;
        #(j * 0.9);
        forever #(5.0 + 0.005 * j) in_clk[j] = ~in_clk[j];
      end
      initial begin
        in_rst_n[j] = 1'b0;
        #40 in_rst_n[j] = 1'b1;
      end
      vcb_line_card #(.N(N), .WIDTH(WIDTH), .J(j), .CREDIT_WORDS(XPB / 4), .NPKT(NPKT),
                      .MODE(4), .SIZES(4), .F_PM(FPM[c]), .CRED_DELAY(100)) u_lc (
        .clk(in_clk[j]), .rst_n(in_rst_n[j]), .cred_line(cred_line[j]),
        .link_valid(in_valid[j]), .link_data(in_data[j]), .done(lc_done[j]),
        .sent_cnt(sent[j]), .stall_cycles(stall[j]), .credits_rx(cred_rx[j]), .consumed(words[j]),
        .tx_busy(lc_busy[j]), .tx_seq(lc_seq[j]), .errors(lc_err[j]));
    end

    for (genvar k = 0; k < N; k++) begin : g_out
      initial begin
        out_clk[k] = 1'b0;
        #(k * 0.7);
        forever #(5.05 + 0.005 * k) out_clk[k] = ~out_clk[k];
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
      int unsigned b0, b1, total;
      cfg_done[c] = 0;
      repeat (W0) @(posedge out_clk[0]);
      b0 = 0;
      for (int k = 0; k < N; k++) b0 += busy[k];
      repeat (W1 - W0) @(posedge out_clk[0]);
      b1 = 0;
      for (int k = 0; k < N; k++) b1 += busy[k];
      thr[c] = real'(b1 - b0) / real'(N * (W1 - W0));
      for (int j = 0; j < N; j++) begin
        total = 0;
        for (int k = 0; k < N; k++) total += sent[j][k];
        checks++;
        if (total >= NPKT) begin
          failures++;
          $display("FAIL case %0d: input %0d ran out of packets inside the window", c, j);
        end
        checks++;
        failures += (lc_err[j] != 0);
      end
      for (int k = 0; k < N; k++) begin
        checks += ck[k];
        failures += fl[k];
      end
      $display("f = %0.1f, buffer %0d bytes: throughput %0.3f", real'(FPM[c]) / 1000.0, XPB, thr[c]);
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
    if (thr[5] < 0.98) begin
      failures++;
      $display("FAIL: f = 1 does not reach full throughput");
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (thr[c] > thr[1] + 0.03 || thr[c] + 0.03 < thr[1]) begin
        failures++;
        $display("FAIL: case %0d differs from the 2 KByte case by more than 0.03", c);
      end
    end
    for (int c = 0; c < NCFG; c++) begin
      checks++;
      if (thr[c] < 0.9) begin
        failures++;
        $display("FAIL: case %0d throughput below 90 %%", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (60000) @(posedge g_cfg[0].in_clk[0]);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
