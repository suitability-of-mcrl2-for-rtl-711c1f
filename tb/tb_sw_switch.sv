// Directed testbench of sw_switch. Three instances, one per variant, receive
// the same stimulus; the expected reactions differ per variant.
//   A  latency: a packet entered into an empty switch is transferred in the
//      next cycle and can leave the cycle after (2 cycles enter-to-leave).
//   B  same destination: input 0's packet goes first, input 1's one cycle
//      later, in that order at the output (all variants).
//   C  two interesting packets to different outputs: both move in one cycle
//      (Simplified), input 0 first (Original), input 1 first (Modified); the
//      counter counts both, one per cycle.
//   D  two interesting heads, one bound for a full output: the other packet
//      still moves at once and is counted; the blocked one follows as soon
//      as its output drains.
//   E  a full output and full input buffer back-pressure: enter_ready drops.
module tb_sw_switch;
  import sw_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic    [1:0] enter_valid, leave_ready;
  packet_t [1:0] enter_pkt;
  logic    [2:0][1:0] enter_ready, leave_valid;
  packet_t [2:0][1:0] leave_pkt;
  logic    [2:0][31:0] int_count;

  sw_switch #(.VARIANT(SW_SIMPLIFIED)) u0 (.clk, .rst_n, .enter_valid, .enter_ready(enter_ready[0]),
    .enter_pkt, .leave_valid(leave_valid[0]), .leave_ready, .leave_pkt(leave_pkt[0]), .int_count(int_count[0]));
  sw_switch #(.VARIANT(SW_ORIGINAL)) u1 (.clk, .rst_n, .enter_valid, .enter_ready(enter_ready[1]),
    .enter_pkt, .leave_valid(leave_valid[1]), .leave_ready, .leave_pkt(leave_pkt[1]), .int_count(int_count[1]));
  sw_switch #(.VARIANT(SW_MODIFIED)) u2 (.clk, .rst_n, .enter_valid, .enter_ready(enter_ready[2]),
    .enter_pkt, .leave_valid(leave_valid[2]), .leave_ready, .leave_pkt(leave_pkt[2]), .int_count(int_count[2]));

  int checks = 0, failures = 0;

  // packets: bit 0 = destination, bits 3:1 = 0 makes it interesting
  localparam packet_t P0   = 32'hA000_0012;  // dest 0, not interesting
  localparam packet_t P1   = 32'hB000_0013;  // dest 1, not interesting
  localparam packet_t I0   = 32'hC000_0020;  // dest 0, interesting
  localparam packet_t I1   = 32'hD000_0021;  // dest 1, interesting
  localparam packet_t Q0   = 32'hE000_0032;  // dest 0, not interesting (second one)

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 30) $display("FAIL t=%0t %s", $time, what); end
  endtask

  task automatic do_reset();
    rst_n = 0; enter_valid = '0; enter_pkt = '0; leave_ready = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
  endtask

  // offer packets for one clock edge, then sit at the following negedge
  task automatic enter2(logic [1:0] v, packet_t a, packet_t b);
    enter_valid = v; enter_pkt[0] = a; enter_pkt[1] = b;
    @(negedge clk);
    enter_valid = '0;
  endtask

  task automatic step(int n = 1);
    repeat (n) @(negedge clk);
  endtask

  // three packets into output 0 through input 0, one at a time (an input
  // buffer that sends in a cycle takes no packet in that cycle)
  task automatic fill_out0();
    for (int k = 0; k < 3; k++) begin
      enter2(2'b01, P0, '0);
      step();
    end
  endtask

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // ---- A: latency ----
    do_reset();
    enter2(2'b01, P1, '0);                 // accepted at edge 0
    for (int v = 0; v < 3; v++) check(leave_valid[v] == 2'b00, "A: not out after 1 cycle");
    step();                                // transferred at edge 1
    for (int v = 0; v < 3; v++) begin
      check(leave_valid[v] == 2'b10, $sformatf("A v%0d: out after 2 cycles", v));
      check(leave_pkt[v][1] == P1, "A: packet intact");
    end
    leave_ready = 2'b10; step(); leave_ready = '0;
    for (int v = 0; v < 3; v++) check(leave_valid[v] == 2'b00, "A: gone after leave");

    // ---- B: same destination ----
    do_reset();
    enter2(2'b11, P0, Q0);
    step();                                // edge 1: input 0 transfers
    step();                                // edge 2: input 1 transfers
    for (int v = 0; v < 3; v++) begin
      check(leave_valid[v][0] && leave_pkt[v][0] == P0, $sformatf("B v%0d: input 0 first", v));
    end
    leave_ready = 2'b01; step(); leave_ready = '0;
    for (int v = 0; v < 3; v++)
      check(leave_valid[v][0] && leave_pkt[v][0] == Q0, $sformatf("B v%0d: input 1 second", v));

    // ---- C: two interesting packets, different outputs ----
    do_reset();
    enter2(2'b11, I0, I1);
    step();                                // edge 1: first transfer(s)
    check(leave_valid[0] == 2'b11, "C simplified: both at once");
    check(leave_valid[1] == 2'b01, "C original: input 0 first");
    check(leave_valid[2] == 2'b10, "C modified: input 1 first");
    check(int_count[0] == 0, "C simplified: no counter");
    check(int_count[1] == 1 && int_count[2] == 1, "C: one counted per cycle");
    step();                                // edge 2: the other one
    check(leave_valid[1] == 2'b11 && leave_valid[2] == 2'b11, "C: second follows");
    check(int_count[1] == 2 && int_count[2] == 2, "C: both counted");

    // ---- D: interesting pair, one output full ----
    do_reset();
    fill_out0();                           // output 0 now holds 3 packets
    for (int v = 0; v < 3; v++) check(leave_valid[v] == 2'b01, "D: output 0 loaded");
    enter2(2'b11, I0, I1);                 // I0 blocked, I1 free
    step();
    for (int v = 0; v < 3; v++)
      check(leave_valid[v][1] && leave_pkt[v][1] == I1, $sformatf("D v%0d: free packet moved", v));
    check(int_count[1] == 1 && int_count[2] == 1, "D: free packet counted");
    step(3);
    check(int_count[1] == 1 && int_count[2] == 1, "D: blocked packet still waits");
    leave_ready = 2'b01; step(); leave_ready = '0;  // one slot frees at output 0
    step();
    check(int_count[1] == 2 && int_count[2] == 2, "D: blocked packet moved once room appeared");

    // ---- E: back-pressure ----
    do_reset();
    fill_out0();                           // output 0 full
    for (int k = 0; k < 3; k++) enter2(2'b01, P0, '0);
    for (int v = 0; v < 3; v++) check(enter_ready[v][0] == 1'b0, $sformatf("E v%0d: input full refuses", v));
    for (int v = 0; v < 3; v++) check(enter_ready[v][1] == 1'b1, $sformatf("E v%0d: other input free", v));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
