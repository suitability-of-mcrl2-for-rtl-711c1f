// Top level: the three 2x2 switch variants side by side.
//
// The switch is specified in three cases of rising difficulty, which share
// buffers and routing and differ only in their collision priority:
//   index 0  Simplified switch  (routing, output-full stall, input 0 priority)
//   index 1  Original switch    (adds the interesting-packet counter; two
//                                interesting packets never move together,
//                                input 0 wins)
//   index 2  Modified switch    (as Original, but input 1 wins when two
//                                interesting packets go to different outputs)
// Each instance has its own ports; they share only clock and reset. All ports
// are arrays indexed [variant][buffer]. int_count[0] is always 0 (the
// Simplified switch counts nothing).
// Parameters: CAP, the capacity of every buffer (3, the value used for all
// the property checks of the switch), and CNT_W, the counter width (chosen
// here, not specified).
module switch_top
  import sw_pkg::*;
#(
  parameter int unsigned CAP   = 3,
  parameter int unsigned CNT_W = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic    [2:0][NPORT-1:0]      enter_valid,
  output logic    [2:0][NPORT-1:0]      enter_ready,
  input  packet_t [2:0][NPORT-1:0]      enter_pkt,
  output logic    [2:0][NPORT-1:0]      leave_valid,
  input  logic    [2:0][NPORT-1:0]      leave_ready,
  output packet_t [2:0][NPORT-1:0]      leave_pkt,
  output logic    [2:0][CNT_W-1:0]      int_count
);

  localparam sw_variant_e VARIANTS [3] = '{SW_SIMPLIFIED, SW_ORIGINAL, SW_MODIFIED};

  for (genvar v = 0; v < 3; v++) begin : g_sw
    sw_switch #(.VARIANT(VARIANTS[v]), .CAP(CAP), .CNT_W(CNT_W)) u_sw (
      .clk         (clk),
      .rst_n       (rst_n),
      .enter_valid (enter_valid[v]),
      .enter_ready (enter_ready[v]),
      .enter_pkt   (enter_pkt[v]),
      .leave_valid (leave_valid[v]),
      .leave_ready (leave_ready[v]),
      .leave_pkt   (leave_pkt[v]),
      .int_count   (int_count[v])
    );
  end

endmodule
