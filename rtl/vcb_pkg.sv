// vcb_pkg: constants and helper functions shared by the variable-packet-size
// buffered crossbar (CICQ) switch.
//
// Packet format on every internal w-bit bus (w = 32): word 0 is the multicast
// bitmap (bit i set = enqueue the packet in the crosspoint of output i); the
// IP packet follows from word 1 on, most significant byte first, so the IP
// total-length field (bytes 2 and 3 of the IP header) is bits [15:0] of word 1.
// A packet of L bytes therefore occupies 1 + ceil(L/4) words on the bus and in
// a crosspoint buffer. The bitmap-in-the-first-word and length-in-the-header
// ideas follow the paper; the exact word layout is this design's choice.
package vcb_pkg;

  // Default switch size and datapath width (32 x 32 ports, 32-bit datapath).
  localparam int unsigned N_PORTS  = 32;
  localparam int unsigned WORD_W   = 32;
  // Crosspoint buffer: 2 KByte of 2-port SRAM = 512 words of 32 bits.
  localparam int unsigned XP_BUF_BYTES = 2048;
  // IP packet size range used by the design (bytes).
  localparam int unsigned MIN_PKT_BYTES = 40;
  localparam int unsigned MAX_PKT_BYTES = 1500;
  // Width of the packet-length field in word 1.
  localparam int unsigned LEN_W = 16;

  // Words a packet of len_bytes IP bytes occupies, bitmap word included.
  function automatic int unsigned pkt_words(input logic [LEN_W-1:0] len_bytes);
    return 1 + ((int'(len_bytes) + 3) / 4);
  endfunction

endpackage
