// One 2x2 packet switch.
//
// Two input FIFO buffers take 32-bit packets from outside; two output FIFO
// buffers hand them back out. Every cycle the transfer controller moves the
// head packet of each input buffer to the output buffer selected by the
// packet's first bit, as long as that output is not full, and resolves
// collisions by priority (see sw_transfer_ctrl for the rules of each
// VARIANT). In the Original and Modified variants a counter counts the
// interesting packets (second to fourth bit zero) as they are transferred;
// the Simplified variant has no counter and `int_count` stays 0.
// Each buffer does at most one operation per cycle; an internal transfer has
// precedence over the outside handshakes (enter_ready or leave_valid drop in
// that cycle).
//
// Interface (index = input or output buffer number)
//   enter_valid/enter_ready/enter_pkt  into input buffer i, taken on valid & ready
//   leave_valid/leave_ready/leave_pkt  out of output buffer o, taken on valid & ready
//   int_count                          interesting packets transferred so far
// Timing: a packet entering an empty switch in cycle t can be transferred in
// t+1 and leave in t+2 at the earliest.
module sw_switch
  import sw_pkg::*;
#(
  parameter sw_variant_e VARIANT = SW_ORIGINAL,
  parameter int unsigned CAP     = 3,
  parameter int unsigned CNT_W   = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic    [NPORT-1:0] enter_valid,
  output logic    [NPORT-1:0] enter_ready,
  input  packet_t [NPORT-1:0] enter_pkt,
  output logic    [NPORT-1:0] leave_valid,
  input  logic    [NPORT-1:0] leave_ready,
  output packet_t [NPORT-1:0] leave_pkt,
  output logic    [CNT_W-1:0] int_count
);

  logic    [NPORT-1:0] head_valid, send, recv, out_full, inc;
  packet_t [NPORT-1:0] head_pkt, recv_pkt;
  logic                collide, winner;

  for (genvar i = 0; i < NPORT; i++) begin : g_in
    sw_input_buffer #(.CAP(CAP)) u_in (
      .clk         (clk),
      .rst_n       (rst_n),
      .enter_valid (enter_valid[i]),
      .enter_ready (enter_ready[i]),
      .enter_pkt   (enter_pkt[i]),
      .head_valid  (head_valid[i]),
      .head_pkt    (head_pkt[i]),
      .send        (send[i]),
      .count       ()
    );
  end

  sw_transfer_ctrl #(.VARIANT(VARIANT)) u_ctrl (
    .head_valid (head_valid),
    .head_pkt   (head_pkt),
    .out_full   (out_full),
    .send       (send),
    .recv       (recv),
    .recv_pkt   (recv_pkt),
    .collide    (collide),
    .winner     (winner)
  );

  for (genvar o = 0; o < NPORT; o++) begin : g_out
    sw_output_buffer #(.CAP(CAP)) u_out (
      .clk         (clk),
      .rst_n       (rst_n),
      .recv        (recv[o]),
      .recv_pkt    (recv_pkt[o]),
      .full        (out_full[o]),
      .leave_valid (leave_valid[o]),
      .leave_ready (leave_ready[o]),
      .leave_pkt   (leave_pkt[o]),
      .inc         (inc[o]),
      .count       ()
    );
  end

  if (VARIANT == SW_SIMPLIFIED) begin : g_nocnt
    assign int_count = '0;
  end else begin : g_cnt
    sw_counter #(.CNT_W(CNT_W)) u_cnt (
      .clk   (clk),
      .rst_n (rst_n),
      .inc   (inc),
      .count (int_count)
    );
    // Requirement 4: never two interesting packets in one cycle.
    a_one_interesting: assert property (@(posedge clk) disable iff (!rst_n)
      !(send[0] && send[1] && pkt_interesting(head_pkt[0]) && pkt_interesting(head_pkt[1])));
  end

  // Requirement 3: no two packets into the same output buffer in one cycle.
  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(send[0] && send[1] && (pkt_dest(head_pkt[0]) == pkt_dest(head_pkt[1]))));
  // Maximum progress: an input that can transfer and loses no collision does.
  a_progress0: assert property (@(posedge clk) disable iff (!rst_n)
    (head_valid[0] && !out_full[pkt_dest(head_pkt[0])] && !(collide && winner)) |-> send[0]);
  a_progress1: assert property (@(posedge clk) disable iff (!rst_n)
    (head_valid[1] && !out_full[pkt_dest(head_pkt[1])] && !(collide && !winner)) |-> send[1]);

endmodule
