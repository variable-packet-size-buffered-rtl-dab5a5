// tb_xpm: crosspoint memory test. Writes on one clock, reads on an unrelated
// clock, and checks against a reference array: every read returns the last
// word written at that address, one read clock after rd, and rd_data holds
// while rd is low. Covers the whole 512-word address range.
module tb_xpm;
  localparam int unsigned WIDTH = 32, DEPTH = 512;
  logic wr_clk = 0, rd_clk = 0, wr = 0, rd = 0;
  logic [8:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  xpm #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 wr_clk = ~wr_clk;
  always #3.7 rd_clk = ~rd_clk;

  task automatic write(int a, logic [WIDTH-1:0] d);
    @(negedge wr_clk);
    wr = 1; wr_addr = 9'(a); wr_data = d;
    @(negedge wr_clk);
    wr = 0;
    ref_mem[a] = d;
  endtask

  task automatic read_check(int a);
    logic [WIDTH-1:0] held;
    @(negedge rd_clk);
    rd = 1; rd_addr = 9'(a);
    @(negedge rd_clk);
    rd = 0;
    checks++;
    if (rd_data !== ref_mem[a]) begin
      failures++;
      $display("FAIL read %0d: %h expected %h", a, rd_data, ref_mem[a]);
    end
    held = rd_data;
    rd_addr = 9'(a + 1);
    @(negedge rd_clk);
    checks++;
    if (rd_data !== held) begin
      failures++;
      $display("FAIL rd_data changed without rd");
    end
  endtask

  initial begin
    for (int a = 0; a < DEPTH; a++) write(a, $urandom);
    for (int a = 0; a < DEPTH; a++) read_check(a);
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      if ($urandom_range(0, 1)) write(a, $urandom);
      read_check(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20000) @(posedge wr_clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks + 1, failures + 1);
    $finish;
  end
endmodule
