// tb_vcb_workloads: the switch under the verification traffic classes of its
// design: every input sending back to back either to random outputs or all
// to one output (output 0), each with only 40-byte packets, only 1500-byte
// packets, or random sizes. The six cases run side by side on six 4 x 4
// switches with 2 KByte buffers, each port on its own clock. Every packet is
// checked word by word, in order per source, and all must arrive. When all
// inputs send to one output, that output must be busy at least 99 % of the
// time between its first and last packet: the output scheduler keeps packets
// back to back even though each crosspoint holds only a few of them.
// Packets per input: 3000 of 40 bytes, 200 of 1500 bytes, 400 of random size.
module tb_vcb_workloads;
  localparam int unsigned N = 4, WIDTH = 32, XPB = 2048, DEPTH = XPB / 4;
  localparam int unsigned NCFG = 6;

  int unsigned checks = 0, failures = 0;
  logic        cfg_done [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned HOT   = c / 3;          // 0 random outputs, 1 all to output 0
    localparam int unsigned SIZES = (c % 3) + 1;    // 1 min, 2 max, 3 random
    localparam int unsigned NPKT  = SIZES == 1 ? 3000 : SIZES == 2 ? 200 : 400;

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
        #(j * 1.1 + c * 0.3);
        forever #(5.0 + 0.01 * j) in_clk[j] = ~in_clk[j];
      end
      initial begin
        in_rst_n[j] = 1'b0;
        #40 in_rst_n[j] = 1'b1;
      end
      vcb_line_card #(.N(N), .WIDTH(WIDTH), .J(j), .CREDIT_WORDS(DEPTH), .NPKT(NPKT),
                      .MODE(HOT), .SIZES(SIZES)) u_lc (
        .clk(in_clk[j]), .rst_n(in_rst_n[j]), .cred_line(cred_line[j]),
        .link_valid(in_valid[j]), .link_data(in_data[j]), .done(lc_done[j]),
        .sent_cnt(sent[j]), .stall_cycles(stall[j]), .credits_rx(cred_rx[j]), .consumed(words[j]),
        .tx_busy(lc_busy[j]), .tx_seq(lc_seq[j]), .errors(lc_err[j]));
    end

    for (genvar k = 0; k < N; k++) begin : g_out
      initial begin
        out_clk[k] = 1'b0;
        #(k * 0.9);
        forever #(5.05 + 0.01 * k) out_clk[k] = ~out_clk[k];
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

    function automatic bit all_done();
      for (int j = 0; j < N; j++) if (!lc_done[j]) return 0;
      return 1;
    endfunction

    initial begin
      int unsigned npk;
      cfg_done[c] = 0;
      #100;
      while (!all_done()) @(posedge in_clk[0]);
      repeat (500) @(posedge out_clk[0]);
      npk = 0;
      for (int k = 0; k < N; k++) begin
        checks += ck[k];
        failures += fl[k];
        for (int j = 0; j < N; j++) begin
          checks++;
          npk += rx[k][j];
          if (rx[k][j] != sent[j][k]) begin
            failures++;
            $display("FAIL case %0d: output %0d got %0d packets from input %0d, %0d sent", c, k, rx[k][j], j, sent[j][k]);
          end
        end
      end
      for (int j = 0; j < N; j++) begin
        checks++;
        failures += (lc_err[j] != 0);
      end
      checks++;
      if (npk != N * NPKT) begin
        failures++;
        $display("FAIL case %0d: %0d packets delivered, %0d expected", c, npk, N * NPKT);
      end
      if (HOT == 1) begin
        checks++;
        if (real'(busy[0]) < 0.99 * real'(span[0])) begin
          failures++;
          $display("FAIL case %0d: output 0 busy %0d of %0d clocks", c, busy[0], span[0]);
        end
      end
      $display("case %0d (%s, sizes %0d): %0d packets, output 0 busy %0d of %0d clocks, %0d stall clocks at input 0",
               c, HOT ? "all to output 0" : "random outputs", SIZES, npk, busy[0], span[0], stall[0]);
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (3000000) @(posedge g_cfg[0].in_clk[0]);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
