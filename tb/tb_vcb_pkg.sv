// tb_vcb_pkg: checks the packet word-count formula of vcb_pkg against
// independently written values: a packet of L bytes is the bitmap word plus
// ceil(L/4) words, so 40 bytes -> 11 words, 41 -> 12, 1500 -> 376; and that
// the default sizes give a 512-word crosspoint buffer that holds one
// maximum-size packet plus at least a 500-byte round-trip window.
module tb_vcb_pkg;
  import vcb_pkg::*;
  int checks = 0, failures = 0;

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    expect_eq(pkt_words(16'd40),   11,  "words(40)");
    expect_eq(pkt_words(16'd41),   12,  "words(41)");
    expect_eq(pkt_words(16'd43),   12,  "words(43)");
    expect_eq(pkt_words(16'd44),   12,  "words(44)");
    expect_eq(pkt_words(16'd552),  139, "words(552)");
    expect_eq(pkt_words(16'd576),  145, "words(576)");
    expect_eq(pkt_words(16'd1500), 376, "words(1500)");
    for (int l = 1; l <= 1600; l++) begin
      int w;
      w = 1 + l / 4 + ((l % 4) != 0 ? 1 : 0);
      expect_eq(pkt_words(16'(l)), w, "words(l)");
    end
    expect_eq(XP_BUF_BYTES / (WORD_W / 8), 512, "buffer words");
    checks++;
    if ((XP_BUF_BYTES / (WORD_W / 8)) * 4 < 1504 + 500 + 4) begin
      failures++;
      $display("FAIL buffer smaller than one maximum packet plus RTT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1ms;
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
