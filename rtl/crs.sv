// crs: credit sequencer of one input port (one crosspoint row).
//
// Every time an output starts sending a packet taken from this row's
// crosspoint, it toggles its credit signal for this row (in the output's
// clock domain). The credit sequencer brings each of the N toggles into the
// input port's clock with a two-flip-flop synchronizer, counts the credits
// not yet sent per output, and sends them one at a time on the serial credit
// line to the ingress line card. A credit names only the output of the
// departed packet; the line card remembers the sizes of the packets it sent.
// When several outputs have credits pending, they are served in round-robin
// order after the output of the last credit sent.
//
// Credit line format (one bit per clock, idle low): a start bit 1, then the
// output number, IW bits, most significant first, then one stop bit 0. One
// credit occupies IW + 2 clocks (7 for 32 outputs), shorter than the 11
// clocks of a minimum-size packet, so the line keeps up with the fastest
// departure rate the row can sustain.
//
// Interface and timing: cred_tgl[k] comes from output scheduler k,
// asynchronous to clk. A toggle is seen 2-3 clocks after it happens; a
// credit can start on the clock after it is counted. cred_line is a
// register output.
//
// Follows the paper: one credit per departing packet, naming the output
// port only, sent from the crossbar to the line card over a credit line, the
// credit logic of a row working in its input's clock. This design's choice:
// the frame format, the per-output counters and round-robin order (credits
// of one output keep their order; credits of different outputs are not sent
// in strict arrival order), and the counter width, which is large enough for
// every packet a crosspoint buffer can hold.
module crs #(
  parameter int unsigned N     = 32,
  parameter int unsigned CNT_W = 6,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] cred_tgl,   // from the N output schedulers
  output logic         cred_line
);

  logic [N-1:0]     sync1, sync2, seen;
  logic [CNT_W-1:0] pend [N];
  logic [IW-1:0]    last;
  logic [IW:0]      shreg;         // output number, then stop bit
  logic [IW+1:0]    bits_left;     // bits of the current frame still to send
  logic             found;
  logic [IW-1:0]    sel;
  logic             take;

  always_comb begin
    found = 1'b0;
    sel   = last;
    for (int k = 1; k <= N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(last) + k) % N);
      if (!found && pend[idx] != '0) begin
        found = 1'b1;
        sel   = idx;
      end
    end
    take = found && (bits_left == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync1     <= '0;
      sync2     <= '0;
      seen      <= '0;
      last      <= IW'(N - 1);
      shreg     <= '0;
      bits_left <= '0;
      cred_line <= 1'b0;
      for (int i = 0; i < N; i++) pend[i] <= '0;
    end else begin
      sync1 <= cred_tgl;
      sync2 <= sync1;
      seen  <= sync2;
      for (int i = 0; i < N; i++) begin
        pend[i] <= pend[i] + CNT_W'(sync2[i] ^ seen[i])
                           - CNT_W'(take && sel == IW'(i));
      end
      if (take) begin
        cred_line <= 1'b1;                 // start bit
        shreg     <= {sel, 1'b0};          // number, then stop bit
        bits_left <= (IW + 2)'(IW + 1);
        last      <= sel;
      end else if (bits_left != '0) begin
        cred_line <= shreg[IW];
        shreg     <= {shreg[IW-1:0], 1'b0};
        bits_left <= bits_left - 1'b1;
      end else begin
        cred_line <= 1'b0;
      end
    end
  end

endmodule
