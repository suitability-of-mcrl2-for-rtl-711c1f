// Testbench of sw_output_buffer at the default capacity (3).
// Random receives (only while the model is not full) and random leave_ready
// are applied; each cycle full, leave_valid, leave_pkt, inc and count are
// compared with a queue model. Checks that a receive holds leave_valid low and
// that inc follows the interesting-packet rule (bits 3:1 zero).
module tb_sw_output_buffer;
  import sw_pkg::*;

  localparam int CAP = 3;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, recv, full, leave_valid, leave_ready, inc;
  packet_t recv_pkt, leave_pkt;
  logic [1:0] count;

  sw_output_buffer #(.CAP(CAP)) dut (.*);

  int checks = 0, failures = 0;
  int n_full = 0, n_blocked = 0, n_inc = 0;
  packet_t q[$];
  bit exp_val;

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
    rst_n = 0; recv = 0; recv_pkt = '0; leave_ready = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      recv        = (q.size() < CAP) && ($urandom_range(99, 0) < 50);
      recv_pkt    = $urandom();
      if ($urandom_range(1, 0) == 1) recv_pkt[3:1] = 3'b000;
      leave_ready = ($urandom_range(99, 0) < (cyc % 500 < 250 ? 20 : 80));
      #1;
      exp_val = (q.size() > 0) && !recv;
      check(full == (q.size() == CAP), "full");
      check(leave_valid == exp_val, "leave_valid");
      check(count == 2'(q.size()), "count");
      check(inc == (recv && recv_pkt[3:1] == 3'b000), "inc");
      if (exp_val) check(leave_pkt == q[0], $sformatf("leave_pkt %h exp %h", leave_pkt, q[0]));
      if (q.size() == CAP) n_full++;
      if (recv && q.size() > 0 && leave_ready) n_blocked++;
      if (inc) n_inc++;
      if (recv) q.push_back(recv_pkt);
      else if (exp_val && leave_ready) void'(q.pop_front());
    end
    check(n_full > 0 && n_blocked > 0 && n_inc > 0, "full, blocked and inc cases reached");
    $display("full=%0d leave-blocked-by-recv=%0d inc=%0d", n_full, n_blocked, n_inc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
