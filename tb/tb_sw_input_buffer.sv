// Testbench of sw_input_buffer at the default capacity (3).
// A queue model is driven with random enter requests and random pops (only
// while the model says a packet is there). Each cycle head_valid, head_pkt,
// enter_ready and count are compared with the model, including the rule that
// a cycle with a send refuses a new packet. A directed start checks that a
// packet entered into an empty buffer is at the head one cycle later.
module tb_sw_input_buffer;
  import sw_pkg::*;

  localparam int CAP = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, enter_valid, enter_ready, head_valid, send;
  packet_t enter_pkt, head_pkt;
  logic [1:0] count;

  sw_input_buffer #(.CAP(CAP)) dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_blocked = 0;
  packet_t q[$];
  bit exp_rdy;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; enter_valid = 0; enter_pkt = '0; send = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: one packet, visible at the head the next cycle
    @(negedge clk);
    check(!head_valid && enter_ready && count == 0, "empty after reset");
    enter_valid = 1; enter_pkt = 32'hCAFE_0001;
    @(negedge clk);
    enter_valid = 0;
    check(head_valid && head_pkt == 32'hCAFE_0001 && count == 1, "head one cycle after enter");
    send = 1;
    @(negedge clk);
    send = 0;
    check(!head_valid && count == 0, "empty after send");

    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      enter_valid = ($urandom_range(99, 0) < 60);
      enter_pkt   = $urandom();
      send        = (q.size() > 0) && ($urandom_range(99, 0) < (cyc % 600 < 300 ? 30 : 70));
      #1;
      exp_rdy = (q.size() < CAP) && !send;
      check(enter_ready == exp_rdy, "enter_ready");
      check(head_valid == (q.size() > 0), "head_valid");
      check(count == 2'(q.size()), "count");
      if (q.size() > 0) check(head_pkt == q[0], $sformatf("head_pkt %h exp %h", head_pkt, q[0]));
      if (enter_valid && q.size() == CAP) n_full++;
      if (enter_valid && q.size() < CAP && send) n_blocked++;
      if (send) void'(q.pop_front());
      else if (enter_valid && exp_rdy) q.push_back(enter_pkt);
    end
    check(n_full > 0 && n_blocked > 0, "full and blocked cases reached");
    $display("input-full refusals=%0d enter-blocked-by-send=%0d", n_full, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
