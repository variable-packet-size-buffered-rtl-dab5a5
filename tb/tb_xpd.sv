// tb_xpd: crosspoint datapath test, input clock 10 ns, output clock 13 ns.
// Sends packets on the row bus, some with this crosspoint's bitmap bit set
// and some without. Checks that (1) new_pkt toggles exactly once per packet
// with the bit set, 2 to 3 output clocks after the sop clock edge (the
// synchronizer delay), and never for the others; (2) reading each counted
// packet back with deq returns exactly its words, in order, one output clock
// after each deq; (3) the buffer wraps around (more words than its depth).
module tb_xpd;
  localparam int unsigned WIDTH = 32, DEPTH = 512;
  logic clk_in = 0, clk_out = 0, rst_in_n = 0, rst_out_n = 0;
  logic sop = 0, eop = 0, sel_bit = 0, deq = 0;
  logic [WIDTH-1:0] in_data = '0;
  logic new_pkt;
  logic [WIDTH-1:0] rd_data;
  int checks = 0, failures = 0;
  logic [WIDTH-1:0] words [$];   // words of enqueued packets, in order
  int               lens  [$];   // word counts of enqueued packets
  int  toggles = 0, total_words = 0, n_kept = 0;
  realtime t_sop;

  xpd #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk_in = ~clk_in;
  always #6.5 clk_out = ~clk_out;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // enqueue one packet of nw words; keep = bitmap bit of this crosspoint
  task automatic send(int nw, bit keep);
    for (int w = 0; w < nw; w++) begin
      logic [WIDTH-1:0] d;
      d = $urandom;
      sop <= (w == 0); eop <= (w == nw - 1); sel_bit <= (w == 0) ? keep : $urandom_range(0, 1);
      in_data <= d;
      if (keep) words.push_back(d);
      @(posedge clk_in);
      if (w == 0) t_sop = $realtime;
    end
    sop <= 0; eop <= 0; sel_bit <= 0;
    if (keep) begin lens.push_back(nw); n_kept++; end
  endtask

  // count new_pkt changes and check the synchronizer delay
  logic prev_new = 0;
  always @(posedge clk_out) if (rst_out_n) begin
    prev_new <= new_pkt;
    if (new_pkt != prev_new) begin
      toggles++;
      check($realtime - t_sop <= 3 * 13.0 + 1 && $realtime - t_sop >= 13.0, "newPacket synchronizer delay");
    end
  end

  task automatic drain(int n);
    for (int p = 0; p < n; p++) begin
      int nw;
      nw = lens.pop_front();
      for (int w = 0; w < nw; w++) begin
        @(negedge clk_out); deq = 1;
        @(negedge clk_out); deq = 0;
        check(rd_data == words.pop_front(), "dequeued word");
        total_words++;
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk_in);
    rst_in_n = 1; rst_out_n = 1;
    repeat (3) @(posedge clk_in);
    send(11, 1); repeat (6) @(posedge clk_in);
    check(toggles == 1, "one toggle after one packet");
    send(20, 0); repeat (6) @(posedge clk_in);
    check(toggles == 1, "no toggle for a packet without the bitmap bit");
    send(376, 1); repeat (6) @(posedge clk_in);
    check(toggles == 2, "second toggle");
    drain(2);
    for (int r = 0; r < 6; r++) begin
      for (int p = 0; p < 3; p++) begin
        send($urandom_range(11, 60), $urandom_range(0, 1));
        repeat (6) @(posedge clk_in);
      end
      drain(lens.size());
    end
    check(toggles == n_kept, "one toggle per enqueued packet");
    check(total_words > DEPTH, "buffer wrap-around exercised");
    check(words.size() == 0, "all words read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk_in);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
