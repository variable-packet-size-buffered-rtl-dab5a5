// tb_enqc: enqueue controller test. Sends packets of chosen and random sizes,
// back to back and with idle gaps, and checks that sop marks exactly the
// bitmap word and eop exactly the last word (1 + ceil(L/4) words, computed
// here independently), that data and valid pass through unchanged, all one
// clock after the input.
module tb_enqc;
  localparam int unsigned WIDTH = 32;
  logic clk = 0, rst_n = 0, link_valid = 0;
  logic [WIDTH-1:0] link_data = '0;
  logic valid, sop, eop;
  logic [WIDTH-1:0] data;
  int checks = 0, failures = 0;
  // expected outputs, one entry per input clock
  logic exp_valid [$], exp_sop [$], exp_eop [$];
  logic [WIDTH-1:0] exp_data [$];
  int n_sop = 0, n_eop = 0;
  logic started = 0, started2 = 0;
  always @(posedge clk) started2 <= started;

  enqc #(.WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic drive(logic v, logic [WIDTH-1:0] d, logic s, logic e);
    link_valid <= v; link_data <= d;
    exp_valid.push_back(v); exp_data.push_back(d);
    exp_sop.push_back(s); exp_eop.push_back(e);
    @(posedge clk);
  endtask

  task automatic send(int len);
    int nw;
    nw = 1 + (len + 3) / 4;
    for (int w = 0; w < nw; w++) begin
      logic [WIDTH-1:0] d;
      d = (w == 0) ? 32'h0000_0005 : (w == 1) ? {16'h4500, 16'(len)} : $urandom;
      drive(1, d, w == 0, w == nw - 1);
    end
  endtask

  // compare the registered outputs with the expectation of the previous clock
  always @(posedge clk) if (rst_n && exp_valid.size() > 0 && started2) begin
    logic v, s, e;
    logic [WIDTH-1:0] d;
    v = exp_valid.pop_front(); s = exp_sop.pop_front(); e = exp_eop.pop_front(); d = exp_data.pop_front();
    checks++;
    if (valid !== v || sop !== s || eop !== e || (v && data !== d)) begin
      failures++;
      $display("FAIL at %t: got v%b s%b e%b %h, expected v%b s%b e%b %h", $time, valid, sop, eop, data, v, s, e, d);
    end
    if (sop) n_sop++;
    if (eop) n_eop++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    started <= 1;
    send(40); send(41); send(1500); send(44);
    drive(0, '0, 0, 0); drive(0, '0, 0, 0);
    send(43); send(552);
    for (int n = 0; n < 60; n++) begin
      send($urandom_range(40, 1500));
      if ($urandom_range(0, 2) == 0) drive(0, '0, 0, 0);
    end
    drive(0, '0, 0, 0);
    drive(0, '0, 0, 0);
    checks++;
    if (n_sop != 66 || n_eop != 66) begin
      failures++;
      $display("FAIL: %0d sop and %0d eop, expected 66", n_sop, n_eop);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
