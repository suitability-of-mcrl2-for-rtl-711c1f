// Capacity sweep of switch_top: the buffer capacities 1, 2, 4 and 5 (the
// default, 3, is run by tb_switch_top), each with all three variants, random
// traffic against the reference model in switch_checker and a final drain.
// The switches run in parallel on one clock; the result sums all checkers.
module tb_switch_cap_sweep;
  import sw_pkg::*;

  localparam int CYCLES = 8000;
  localparam int NCAP   = 4;
  localparam int CAPS [NCAP] = '{1, 2, 4, 5};

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int   checks_a   [NCAP];
  int   failures_a [NCAP];
  logic [NCAP-1:0] done_a;

  for (genvar k = 0; k < NCAP; k++) begin : g_cap
    logic    [2:0][1:0]  enter_valid, enter_ready, leave_valid, leave_ready;
    packet_t [2:0][1:0]  enter_pkt, leave_pkt;
    logic    [2:0][31:0] int_count;

    switch_top #(.CAP(CAPS[k])) dut (.clk, .rst_n, .enter_valid, .enter_ready, .enter_pkt,
      .leave_valid, .leave_ready, .leave_pkt, .int_count);
    switch_checker #(.CAP(CAPS[k]), .CYCLES(CYCLES)) chk (.clk, .rst_n, .enter_valid,
      .enter_ready, .enter_pkt, .leave_valid, .leave_ready, .leave_pkt, .int_count,
      .checks(checks_a[k]), .failures(failures_a[k]), .done(done_a[k]));
  end

  function automatic int sum(int a [NCAP]);
    int s = 0;
    foreach (a[k]) s += a[k];
    return s;
  endfunction

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        wait (&done_a);
        $display("TB_RESULT checks=%0d failures=%0d", sum(checks_a), sum(failures_a));
      end
      begin  // watchdog
        repeat (CYCLES + 1000) @(posedge clk);
        $display("FAIL watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", sum(checks_a), sum(failures_a) + 1);
      end
    join_any
    $finish;
  end

endmodule
