// Testbench of sw_counter: random single inc pulses (never two at once) on
// either line; the count must follow one cycle later and wrap at the width.
// Run with an 8-bit counter so that the wrap-around is reached.
module tb_sw_counter;
  localparam int W = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [1:0] inc;
  logic [W-1:0] count;

  sw_counter #(.CNT_W(W)) dut (.*);

  int checks = 0, failures = 0, model = 0, wraps = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL t=%0t %s", $time, what); end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; inc = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(count == 0, "reset value");
    rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      case ($urandom_range(3, 0))
        0: inc = 2'b00;
        1: inc = 2'b01;
        default: inc = 2'b10;
      endcase
      @(negedge clk);
      if (inc != 0) begin
        model = (model + 1) % (1 << W);
        if (model == 0) wraps++;
      end
      check(count == W'(model), $sformatf("count %0d exp %0d", count, model));
    end
    check(wraps > 0, "wrap-around reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
