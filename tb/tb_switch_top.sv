// End-to-end testbench of switch_top at its default parameters (buffer
// capacity 3, 32-bit packets, 32-bit counter): all three switch variants run
// 20,000 cycles of random traffic against the reference model in
// switch_checker, followed by a drain. See switch_checker for what is checked
// and which mechanisms must occur.
module tb_switch_top;
  import sw_pkg::*;

  localparam int CYCLES = 20000;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic    [2:0][1:0]  enter_valid, enter_ready, leave_valid, leave_ready;
  packet_t [2:0][1:0]  enter_pkt, leave_pkt;
  logic    [2:0][31:0] int_count;
  int                  checks, failures;
  logic                done;

  switch_top dut (.*);
  switch_checker #(.CAP(3), .CYCLES(CYCLES)) chk (.*);

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        wait (done);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      end
      begin  // watchdog
        repeat (CYCLES + 1000) @(posedge clk);
        $display("FAIL watchdog");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      end
    join_any
    $finish;
  end

endmodule
