// tb_crs: credit sequencer test at the default 32 outputs.
//
// Credit toggles are driven from an unrelated 7.3 ns clock; the sequencer
// runs on 10 ns. A decoder here reads the serial line (start bit, 5-bit
// output number MSB first, stop bit) and checks: (1) a single credit goes
// out with the right number, its start bit 3 to 5 clocks after the toggle;
// (2) credits from several outputs pending together go out in round-robin
// order after the last one sent, back to back, one every 7 clocks;
// (3) a random burst of many credits per output, more than one pending at a
// time, is delivered completely (count per output).
module tb_crs;
  localparam int unsigned N = 32, IW = 5;
  logic clk = 0, tclk = 0, rst_n = 0;
  logic [N-1:0] cred_tgl = '0;
  logic cred_line;
  int checks = 0, failures = 0;
  int got [$];
  int got_cyc [$];
  int sent_cnt [N], rx_cnt [N];
  int cyc = 0;

  crs #(.N(N), .CNT_W(6)) dut (.*);

  always #5 clk = ~clk;
  always #3.65 tclk = ~tclk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %t", what, $time); end
  endtask

  // serial decoder
  initial begin
    @(posedge clk iff rst_n);
    forever begin
      @(posedge clk);
      if (cred_line) begin
        int num, c0;
        c0 = cyc;
        num = 0;
        for (int b = 0; b < IW; b++) begin
          @(posedge clk);
          num = (num << 1) | int'(cred_line);
        end
        @(posedge clk);
        check(cred_line == 1'b0, "stop bit");
        got.push_back(num);
        got_cyc.push_back(c0);
        if (num < N) rx_cnt[num]++;
      end
    end
  end

  task automatic toggle(int k);
    @(posedge tclk);
    cred_tgl[k] <= ~cred_tgl[k];
    sent_cnt[k]++;
  endtask

  initial begin
    int c_tgl;
    for (int i = 0; i < N; i++) begin sent_cnt[i] = 0; rx_cnt[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    // (1) single credit
    toggle(13);
    c_tgl = cyc;
    repeat (20) @(posedge clk);
    check(got.size() == 1 && got[0] == 13, "single credit number");
    if (got_cyc.size() == 1) check(got_cyc[0] - c_tgl >= 3 && got_cyc[0] - c_tgl <= 5, "single credit latency");
    got.delete(); got_cyc.delete();
    // (2) round robin after 13: 20, 31, 2, 7
    @(posedge tclk);
    cred_tgl[2] <= ~cred_tgl[2]; cred_tgl[7] <= ~cred_tgl[7];
    cred_tgl[20] <= ~cred_tgl[20]; cred_tgl[31] <= ~cred_tgl[31];
    sent_cnt[2]++; sent_cnt[7]++; sent_cnt[20]++; sent_cnt[31]++;
    repeat (40) @(posedge clk);
    check(got.size() == 4, "four credits");
    if (got.size() == 4) begin
      check(got[0] == 20 && got[1] == 31 && got[2] == 2 && got[3] == 7, "round-robin order");
      check(got_cyc[1] - got_cyc[0] == 7 && got_cyc[3] - got_cyc[2] == 7, "one credit every 7 clocks");
    end
    // (3) random burst
    // the same output toggles at most once every few clocks, as a real output does
    for (int n = 0; n < 400; n++) toggle((n * 13 + $urandom_range(0, 2)) % N);
    repeat (400 * 8 + 50) @(posedge clk);
    for (int i = 0; i < N; i++) check(rx_cnt[i] == sent_cnt[i], "credits per output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
