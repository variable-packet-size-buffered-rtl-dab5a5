// tb_os: output scheduler test at N = 4 with a model of the crosspoints.
//
// The model holds a packet FIFO per crosspoint, answers deq[i] with the next
// word on rd_data[i] one clock later, and toggles new_pkt[i] for each packet
// it announces. Phase 1 announces all packets at once (crosspoint 2 gets
// none) and checks the exact round-robin order 0,1,3,0,1,3,..., worked out
// here from the counts; phase 2 adds packets while the output is busy.
// Checks: every output word, sop/eop, deq held exactly the packet's number of
// words, packets back to back (no idle clock between them while packets
// wait), out_sop two clocks after the first deq, and one credit toggle per
// packet for the right crosspoint.
module tb_os;
  localparam int unsigned N = 4, WIDTH = 32;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] new_pkt = '0, deq, cred_tgl;
  logic [WIDTH-1:0] rd_data [N];
  logic out_valid, out_sop, out_eop;
  logic [WIDTH-1:0] out_data;
  int checks = 0, failures = 0;

  logic [WIDTH-1:0] mem [N][$];      // words not yet read, per crosspoint
  logic [WIDTH-1:0] hist [N][$];     // every word ever added, per crosspoint
  int               plen [N][$];     // word counts
  int               exp_src [$];     // expected order of crosspoints
  logic [WIDTH-1:0] exp_words [$];   // expected output words
  int               deq_cnt [N];
  int               pkts_out = 0, cred_cnt [N];
  logic [N-1:0]     cred_prev = '0;
  logic             prev_eop = 0;
  int               gaps = 0, first_deq_cycle = -1, first_sop_cycle = -1, cyc = 0;

  os #(.N(N), .WIDTH(WIDTH), .CNT_W(6)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  function automatic void add_pkt(int i, int len);
    int nw;
    nw = 1 + (len + 3) / 4;
    plen[i].push_back(nw);
    for (int w = 0; w < nw; w++) begin
      logic [WIDTH-1:0] d;
      d = w == 0 ? WIDTH'(1 << i) : w == 1 ? {16'h4500, 16'(len)} : {4'(i), 28'($urandom)};
      mem[i].push_back(d);
      hist[i].push_back(d);
    end
  endfunction

  // crosspoint read model: one-clock read latency
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    for (int i = 0; i < N; i++) if (deq[i]) begin
      deq_cnt[i]++;
      if (first_deq_cycle < 0) first_deq_cycle = cyc;
      if (mem[i].size() == 0) check(0, "deq on empty crosspoint");
      else rd_data[i] <= mem[i].pop_front();
    end
  end

  // output monitor
  always @(posedge clk) if (rst_n) begin
    cred_prev <= cred_tgl;
    for (int i = 0; i < N; i++) if (cred_tgl[i] != cred_prev[i]) cred_cnt[i]++;
    if (out_valid) begin
      if (out_sop && first_sop_cycle < 0) first_sop_cycle = cyc;
      if (exp_words.size() > 0 && out_data != exp_words[0]) $display("got %h expected %h", out_data, exp_words[0]);
      check(exp_words.size() > 0 && out_data == exp_words.pop_front(), "output word");
      if (out_eop) pkts_out++;
    end else if (exp_words.size() > 0 && prev_eop) gaps++;
    prev_eop <= out_valid && out_eop;
  end

  task automatic announce(int i);
    new_pkt[i] = ~new_pkt[i];
  endtask

  initial begin
    int cnt [N];
    int last, total;
    for (int i = 0; i < N; i++) begin deq_cnt[i] = 0; cred_cnt[i] = 0; rd_data[i] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // phase 1: 3 packets on 0, 2 on 1, none on 2, 3 on 3
    cnt = '{3, 2, 0, 3};
    for (int i = 0; i < N; i++) for (int p = 0; p < cnt[i]; p++)
      add_pkt(i, p == 0 ? 40 : $urandom_range(40, 300));
    for (int p = 0; p < 3; p++) begin
      for (int i = 0; i < N; i++) if (p < cnt[i]) announce(i);
      @(negedge clk);
    end
    // expected order: round robin from the last served, starting at 0
    last = N - 1; total = 8;
    for (int n = 0; n < total; n++) begin
      for (int k = 1; k <= N; k++) begin
        int idx;
        idx = (last + k) % N;
        if (cnt[idx] > 0) begin cnt[idx]--; exp_src.push_back(idx); last = idx; break; end
      end
    end
    // expected output stream
    begin
      int off [N];
      off = '{0, 0, 0, 0};
      foreach (exp_src[n]) begin
        int i, nw, base, sumw;
        i = exp_src[n];
        sumw = 0;
        for (int q = 0; q < off[i]; q++) sumw += plen[i][q];
        nw = plen[i][off[i]];
        for (int w = 0; w < nw; w++) exp_words.push_back(hist[i][sumw + w]);
        off[i]++;
      end
    end
    while (pkts_out < 8) @(negedge clk);
    check(first_sop_cycle - first_deq_cycle == 2, "out_sop two clocks after first deq");
    check(gaps == 0, "packets back to back");
    for (int i = 0; i < N; i++) begin
      int w;
      w = 0;
      foreach (plen[i][q]) w += plen[i][q];
      check(deq_cnt[i] == w, "deq count equals packet words");
    end
    check(cred_cnt[0] == 3 && cred_cnt[1] == 2 && cred_cnt[2] == 0 && cred_cnt[3] == 3, "credit toggles");
    // phase 2: a packet on 2 while busy with a long one on 0, then on 1
    for (int i = 0; i < N; i++) begin plen[i].delete(); hist[i].delete(); deq_cnt[i] = 0; end
    add_pkt(0, 1500);
    for (int w = 0; w < 376; w++) exp_words.push_back(hist[0][w]);
    announce(0);
    exp_src.push_back(0);
    repeat (10) @(negedge clk);
    gaps = 0;   // the idle clock between the phases is not a gap
    add_pkt(2, 40); announce(2);
    @(negedge clk);
    add_pkt(1, 100); announce(1);
    begin
      for (int w = 0; w < 26; w++) exp_words.push_back(hist[1][w]);
      for (int w = 0; w < 11; w++) exp_words.push_back(hist[2][w]);
    end
    while (pkts_out < 11) @(negedge clk);
    repeat (5) @(negedge clk);
    check(gaps == 0, "phase 2 back to back");
    check(exp_words.size() == 0, "all words delivered");
    check(cred_cnt[0] == 4 && cred_cnt[1] == 3 && cred_cnt[2] == 1, "phase 2 credit toggles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
