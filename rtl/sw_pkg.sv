// Shared types and packet decoding for the 2x2 packet switch.
//
// A packet is 32 bits wide. Bits are numbered b1..b32 in the switch rules; this
// package maps b1 to bit 0, b2 to bit 1 and so on (the bit order itself is a
// choice of this implementation, the rules only speak of the "first",
// "second", "third" and "fourth" bit).
//   * b1 selects the destination output buffer: 0 routes to output 0, 1 to output 1.
//   * A packet is "interesting" when b2, b3 and b4 are all 0.
// The switch exists in three variants that differ only in how colliding
// transfers are prioritised (see sw_transfer_ctrl):
//   SW_SIMPLIFIED  routing, output-full stall, input 0 wins same-destination collisions
//   SW_ORIGINAL    as simplified, plus an interesting-packet counter that can
//                  only count one per cycle, so two interesting packets never
//                  move in the same cycle; input 0 wins that collision too
//   SW_MODIFIED    as original, but when the two interesting packets go to
//                  different outputs, input 1 wins
package sw_pkg;

  localparam int unsigned PKT_W = 32;   // packet width in bits
  localparam int unsigned NPORT = 2;    // inputs and outputs of the switch

  typedef logic [PKT_W-1:0] packet_t;

  typedef enum logic [1:0] {
    SW_SIMPLIFIED = 2'd0,
    SW_ORIGINAL   = 2'd1,
    SW_MODIFIED   = 2'd2
  } sw_variant_e;

  // Destination output buffer of a packet: its first bit.
  function automatic logic pkt_dest(packet_t p);
    return p[0];
  endfunction

  // Interesting packet: second, third and fourth bit all 0.
  function automatic logic pkt_interesting(packet_t p);
    return p[3:1] == 3'b000;
  endfunction

endpackage
