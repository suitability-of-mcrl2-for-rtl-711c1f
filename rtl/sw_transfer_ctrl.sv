// Transfer controller of the 2x2 switch: decides, every clock cycle, which
// input buffers move their head packet into an output buffer.
//
// How it works. Input buffer i can transfer ("can_i") when it holds a packet
// and the output buffer named by that packet's first bit is not full. If only
// one input can transfer, it does. If both can, they collide when
//   C1: both head packets go to the same output buffer, or
//   C2: both head packets are interesting (Original and Modified variants
//       only: the counter can only count one interesting packet per cycle).
// Without a collision both transfer in the same cycle (maximum throughput).
// On a collision exactly one transfers:
//   SW_SIMPLIFIED, SW_ORIGINAL  input 0 wins;
//   SW_MODIFIED                 input 0 wins if C1 holds, input 1 wins if
//                               only C2 holds.
// In the switch rules this is expressed as permissions that one input buffer
// hands to the other ("grant" for priority, "free" for a simultaneous
// transfer); here the same decision is a small combinational function. A
// collision is only resolved between transfers that are both possible: an
// input whose own output is full never blocks the other input (choice of this
// implementation; see the README).
//
// Interface (purely combinational, no clock)
//   head_valid[i], head_pkt[i]  head of input buffer i
//   out_full[o]                 output buffer o is full
//   send[i]                     input buffer i transfers its head this cycle
//   recv[o], recv_pkt[o]        output buffer o receives this packet this cycle
//   collide, winner             a collision happened and which input won
module sw_transfer_ctrl
  import sw_pkg::*;
#(
  parameter sw_variant_e VARIANT = SW_ORIGINAL
) (
  input  logic    [NPORT-1:0] head_valid,
  input  packet_t [NPORT-1:0] head_pkt,
  input  logic    [NPORT-1:0] out_full,
  output logic    [NPORT-1:0] send,
  output logic    [NPORT-1:0] recv,
  output packet_t [NPORT-1:0] recv_pkt,
  output logic                collide,
  output logic                winner
);

  logic [NPORT-1:0] dest, intr, can;
  logic             c1, c2;

  always_comb begin
    for (int i = 0; i < NPORT; i++) begin
      dest[i] = pkt_dest(head_pkt[i]);
      intr[i] = pkt_interesting(head_pkt[i]);
      can[i]  = head_valid[i] && !out_full[dest[i]];
    end

    c1 = (dest[0] == dest[1]);
    c2 = (VARIANT != SW_SIMPLIFIED) && intr[0] && intr[1];

    collide = can[0] && can[1] && (c1 || c2);
    winner  = (VARIANT == SW_MODIFIED) && !c1 && c2;

    send = can;
    if (collide) send[!winner] = 1'b0;

    recv     = '0;
    recv_pkt = '0;
    for (int i = 0; i < NPORT; i++) begin
      if (send[i]) begin
        recv[dest[i]]     = 1'b1;
        recv_pkt[dest[i]] = head_pkt[i];
      end
    end
  end

endmodule
