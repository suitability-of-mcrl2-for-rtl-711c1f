// Output buffer of the 2x2 switch: a FIFO of CAP packets.
//
// Packets arrive from an input buffer when the transfer controller asserts
// `recv` (which it only does while `full` is low) and depart to the outside
// through a valid/ready "leave" handshake. At most one operation per clock
// cycle: receive, leave, or nothing. A transfer from an input buffer takes
// precedence, so `leave_valid` is held low in a cycle in which the buffer
// receives; that tie-break is this implementation's choice, made so that the
// controller only needs to look at `full`.
// Receiving an interesting packet raises `inc` for that cycle; the switch
// feeds it to the interesting-packet counter (the counting is attached to the
// output buffers, where a packet is counted as it is transferred).
//
// Interface
//   recv/recv_pkt                      push a packet (needs !full)
//   full                               CAP packets held
//   leave_valid/leave_ready/leave_pkt  packet out; taken on valid & ready
//   inc                                an interesting packet is received this cycle
//   count                              packets held, 0..CAP
module sw_output_buffer
  import sw_pkg::*;
#(
  parameter int unsigned CAP = 3
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       recv,
  input  packet_t                    recv_pkt,
  output logic                       full,
  output logic                       leave_valid,
  input  logic                       leave_ready,
  output packet_t                    leave_pkt,
  output logic                       inc,
  output logic [$clog2(CAP+1)-1:0]   count
);

  localparam int unsigned PW = (CAP > 1) ? $clog2(CAP) : 1;
  localparam int unsigned CW = $clog2(CAP+1);

  packet_t          mem [CAP];
  logic [PW-1:0]    rd_ptr;
  logic [CW-1:0]    cnt;
  logic [PW-1:0]    wr_ptr;
  logic             do_leave;

  function automatic logic [PW-1:0] wrap_add(logic [PW-1:0] a, logic [CW-1:0] b);
    int unsigned s;
    s = int'(a) + int'(b);
    if (s >= CAP) s = s - CAP;
    return PW'(s);
  endfunction

  assign full        = (cnt == CW'(CAP));
  assign leave_valid = (cnt != '0) && !recv;
  assign leave_pkt   = mem[rd_ptr];
  assign do_leave    = leave_valid && leave_ready;
  assign wr_ptr      = wrap_add(rd_ptr, cnt);
  assign inc         = recv && pkt_interesting(recv_pkt);
  assign count       = cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      cnt    <= '0;
    end else if (recv) begin
      cnt    <= cnt + 1'b1;
    end else if (do_leave) begin
      rd_ptr <= wrap_add(rd_ptr, CW'(1));
      cnt    <= cnt - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (recv) mem[wr_ptr] <= recv_pkt;
  end

  // Never push into a full buffer (the overflow the switch must not have).
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) recv |-> !full);

endmodule
