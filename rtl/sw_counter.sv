// Interesting-packet counter of the Original and Modified 2x2 switch.
//
// Counts the interesting packets that are transferred from input to output
// buffers. Each output buffer raises its `inc` line in the cycle in which it
// receives an interesting packet; the counter adds one in any cycle with an
// inc. It can only count one per cycle, which is why the transfer controller
// never lets two interesting packets move together; an assertion checks that.
// The counter width is this implementation's choice; it wraps around.
//
// Interface: inc[o] from output buffer o, count is the running total
// (registered, visible the cycle after the transfer). Synchronous active-low
// reset clears it.
module sw_counter
  import sw_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORT-1:0]  inc,
  output logic [CNT_W-1:0]  count
);

  always_ff @(posedge clk) begin
    if (!rst_n)        count <= '0;
    else if (|inc)     count <= count + 1'b1;
  end

  a_one_per_cycle: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(inc));

endmodule
