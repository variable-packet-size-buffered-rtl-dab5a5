// vcb_line_card: behavioural model of one ingress line card, for testbenches.
//
// It holds N unicast VOQs plus one multicast queue, filled at time zero with
// NPKT generated packets, and a round-robin input scheduler over them. A
// queue is eligible when it is non-empty and its head packet fits in the
// credit of every output it goes to; credit per output starts at the size of
// a crosspoint buffer (CREDIT_WORDS words). Sending a packet takes its size
// from the credit and remembers the size; each credit received on the serial
// credit line (start bit, output number, stop bit) gives back the size of the
// oldest unreturned packet for that output. Packets go out with their words
// back to back: word 0 bitmap, word 1 IP header start with the length in
// [15:0], word 2 {source, sequence number}, then payload words that are a
// fixed function of source, sequence number and word index.
//
// MODE 0: random outputs, random sizes (40..1500 bytes, with the two extremes
// frequent). MODE 1: every packet to output 0 (hot spot). MODE 2: as MODE 0
// with one packet in four multicast to a random set of outputs. SIZES selects
// the size mix: 0 as above, 1 only 40-byte, 2 only 1500-byte, 3 uniform.
// MODE 3: a single flow to output 0 alternating MAXB-byte and SMALL-byte
// packets. CRED_DELAY lengthens the credit round trip (link and line-card
// delays that the switch core does not include).
// MODE 4: unbalanced traffic: output J with probability f + (1-f)/N, any
// other output uniformly otherwise (f = F_PM / 1000).
// SIZES 4: bounded Pareto sizes, 40..1500 bytes, shape 0.0912 (mean 370):
// L / (1 - u (1 - (L/H)^a))^(1/a) with u uniform in [0,1).
module vcb_line_card #(
  parameter int unsigned N            = 4,
  parameter int unsigned WIDTH        = 32,
  parameter int unsigned J            = 0,
  parameter int unsigned CREDIT_WORDS = 512,
  parameter int unsigned NPKT         = 20,
  parameter int unsigned MODE         = 0,
  parameter int unsigned MAXB         = 1500,
  parameter int unsigned SIZES        = 0,   // 0 mixed, 1 all 40 bytes, 2 all 1500 bytes, 3 uniform 40..1500
  parameter int unsigned SMALL        = 40,  // MODE 3: size of the short packet
  parameter int unsigned CRED_DELAY   = 0,   // extra clocks before a received credit is usable
  parameter int unsigned F_PM         = 0,   // MODE 4: unbalance factor f, in thousandths
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cred_line,
  output logic             link_valid,
  output logic [WIDTH-1:0] link_data,
  output logic             done,          // every packet sent and every credit back
  output int unsigned      sent_cnt [N],  // packet copies sent to each output
  output int unsigned      stall_cycles,  // cycles with packets waiting but no credit
  output int unsigned      credits_rx,
  output int unsigned      consumed [N],  // words sent to each output so far
  output logic             tx_busy,
  output int unsigned      tx_seq,        // sequence number being sent
  output int unsigned      errors         // credits that matched no sent packet
);

  typedef struct {
    logic [N-1:0] map;
    int unsigned  len;
  } pkt_t;

  pkt_t        q [N+1][$];
  int unsigned sizes [N][$];
  int unsigned returned [N];
  int unsigned next_seq;
  int unsigned rr_last;
  int unsigned total_sent;
  int unsigned total_cred;

  function automatic logic [WIDTH-1:0] payload(int unsigned src, int unsigned seq, int unsigned k);
    return WIDTH'((src * 32'h9E3779B1) ^ (seq * 32'h85EBCA6B) ^ (k * 32'hC2B2AE35));
  endfunction

  function automatic int unsigned words_of(int unsigned len);
    return 1 + (len + 3) / 4;
  endfunction

  function automatic bit fits(pkt_t p);
    for (int k = 0; k < N; k++)
      if (p.map[k] && (CREDIT_WORDS - consumed[k] + returned[k]) < words_of(p.len)) return 0;
    return 1;
  endfunction

  // traffic generation
  initial begin
    for (int i = 0; i < N; i++) begin
      consumed[i] = 0;
      returned[i] = 0;
      sent_cnt[i] = 0;
    end
    for (int n = 0; n < NPKT; n++) begin
      pkt_t p;
      int unsigned r;
      r = $urandom_range(0, 9);
      p.len = (r < 3) ? 40 : (r < 5) ? MAXB : $urandom_range(40, MAXB);
      if (SIZES == 1) p.len = 40;
      if (SIZES == 2) p.len = MAXB;
      if (SIZES == 3) p.len = $urandom_range(40, MAXB);
      if (MODE == 3) p.len = (n % 2 == 0) ? MAXB : SMALL;
      if (SIZES == 4) begin
        real u, a, x;
        a = 0.0912;
        u = real'($urandom) / 4294967296.0;
        x = 40.0 / ((1.0 - u * (1.0 - (40.0 / real'(MAXB)) ** a)) ** (1.0 / a));
        p.len = int'(x);
        if (p.len < 40) p.len = 40;
        if (p.len > MAXB) p.len = MAXB;
      end
      p.map = '0;
      if (MODE == 1 || MODE == 3) p.map[0] = 1'b1;
      else if (MODE == 4) begin
        if ($urandom_range(0, 999999) < (F_PM * 1000 + (1000 - F_PM) * 1000 / N)) p.map[J] = 1'b1;
        else p.map[(J + $urandom_range(1, N - 1)) % N] = 1'b1;
      end
      else p.map[$urandom_range(0, N - 1)] = 1'b1;
      if (MODE == 2 && (n % 4) == 3) begin
        p.map = N'($urandom) | N'(1 << (n % N)) | N'(1 << ((n + 1) % N));
        q[N].push_back(p);
      end else begin
        for (int k = 0; k < N; k++) if (p.map[k]) q[k].push_back(p);
      end
    end
  end

  // input scheduler and link transmitter
  initial begin
    link_valid   = 1'b0;
    link_data    = '0;
    tx_busy      = 1'b0;
    tx_seq       = 0;
    stall_cycles = 0;
    next_seq     = 1;
    rr_last      = N;
    total_sent   = 0;
    @(posedge clk iff rst_n);
    forever begin
      int  pick;
      bit  waiting;
      pick    = -1;
      waiting = 0;
      for (int s = 1; s <= N + 1; s++) begin
        int unsigned qi;
        qi = (rr_last + s) % (N + 1);
        if (q[qi].size() != 0) begin
          waiting = 1;
          if (pick < 0 && fits(q[qi][0])) pick = qi;
        end
      end
      if (pick < 0) begin
        link_valid <= 1'b0;
        tx_busy    <= 1'b0;
        if (waiting) stall_cycles++;
        @(posedge clk);
      end else begin
        pkt_t p;
        int unsigned nw;
        p = q[pick].pop_front();
        rr_last = pick;
        nw = words_of(p.len);
        for (int k = 0; k < N; k++)
          if (p.map[k]) begin
            consumed[k] += nw;
            sizes[k].push_back(nw);
            sent_cnt[k]++;
            total_sent++;
          end
        tx_busy <= 1'b1;
        tx_seq  <= next_seq;
        for (int w = 0; w < nw; w++) begin
          link_valid <= 1'b1;
          if (w == 0)      link_data <= WIDTH'(p.map);
          else if (w == 1) link_data <= {16'h4500, 16'(p.len)};
          else if (w == 2) link_data <= {8'(J), 24'(next_seq)};
          else             link_data <= payload(J, next_seq, w);
          @(posedge clk);
        end
        next_seq++;
      end
    end
  end

  // credit receiver
  initial begin
    credits_rx = 0;
    errors     = 0;
    total_cred = 0;
    @(posedge clk iff rst_n);
    forever begin
      @(posedge clk);
      if (cred_line) begin
        logic [IW-1:0] num;
        for (int b = 0; b < IW; b++) begin
          @(posedge clk);
          num = IW'({num, cred_line});
        end
        @(posedge clk);    // stop bit
        if (sizes[num].size() == 0) begin
          errors++;
          $display("line card %0d: credit for output %0d with nothing outstanding", J, num);
        end
        else begin
          automatic int unsigned sz = sizes[num].pop_front();
          automatic int unsigned k  = num;
          if (CRED_DELAY == 0) returned[k] += sz;
          else fork
            begin
              repeat (CRED_DELAY) @(posedge clk);
              returned[k] += sz;
            end
          join_none
        end
        credits_rx++;
        total_cred++;
      end
    end
  end

  always @(posedge clk) begin
    bit empty;
    empty = 1;
    for (int i = 0; i <= N; i++) if (q[i].size() != 0) empty = 0;
    done <= empty && !tx_busy && (total_cred == total_sent);
  end

endmodule
