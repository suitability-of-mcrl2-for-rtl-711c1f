// Input buffer of the 2x2 switch: a FIFO of CAP packets.
//
// Packets arrive from outside through a valid/ready "enter" handshake and leave
// towards an output buffer when the transfer controller asserts `send`, which
// pops the head packet. As in the switch rules, the buffer performs at most
// one operation per clock cycle: receive a packet, send one, or nothing. When
// both are possible the internal transfer wins (the rules demand that a packet
// is transferred whenever it can be), so `enter_ready` drops in a cycle in
// which the buffer sends; that tie-break is this implementation's choice.
//
// Interface
//   enter_valid/enter_ready/enter_pkt  packet in; accepted on valid & ready
//   head_valid/head_pkt                oldest packet, shown to the controller
//   send                               pop the head this cycle (needs head_valid)
//   count                              packets held, 0..CAP
// Timing: a packet accepted in cycle t is visible at the head in cycle t+1
// if the buffer was empty. Storage is a circular array with a read pointer
// and an occupancy count; synchronous, active-low reset empties it.
module sw_input_buffer
  import sw_pkg::*;
#(
  parameter int unsigned CAP = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       enter_valid,
  output logic                       enter_ready,
  input  packet_t                    enter_pkt,
  output logic                       head_valid,
  output packet_t                    head_pkt,
  input  logic                       send,
  output logic [$clog2(CAP+1)-1:0]   count
);

  localparam int unsigned PW = (CAP > 1) ? $clog2(CAP) : 1;
  localparam int unsigned CW = $clog2(CAP+1);

  packet_t          mem [CAP];
  logic [PW-1:0]    rd_ptr;
  logic [CW-1:0]    cnt;
  logic [PW-1:0]    wr_ptr;
  logic             do_enter;

  function automatic logic [PW-1:0] wrap_add(logic [PW-1:0] a, logic [CW-1:0] b);
    int unsigned s;
    s = int'(a) + int'(b);
    if (s >= CAP) s = s - CAP;
    return PW'(s);
  endfunction

  assign head_valid  = (cnt != '0);
  assign head_pkt    = mem[rd_ptr];
  assign enter_ready = (cnt != CW'(CAP)) && !send;
  assign do_enter    = enter_valid && enter_ready;
  assign wr_ptr      = wrap_add(rd_ptr, cnt);
  assign count       = cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      cnt    <= '0;
    end else if (send) begin
      rd_ptr <= wrap_add(rd_ptr, CW'(1));
      cnt    <= cnt - 1'b1;
    end else if (do_enter) begin
      cnt    <= cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_enter) mem[wr_ptr] <= enter_pkt;
  end

  // The controller may only pop a packet that is there.
  a_send_nonempty: assert property (@(posedge clk) disable iff (!rst_n) send |-> head_valid);
  // One operation per cycle.
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(send && do_enter));

endmodule
