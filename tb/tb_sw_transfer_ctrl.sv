// Testbench of sw_transfer_ctrl: one instance per variant, driven with every
// combination of head_valid, out_full, first bit and interesting flag of the
// two head packets (2^8 cases, random remaining bits). The expected send,
// recv and recv_pkt are derived from the switch rules written out case by
// case below, independently of the RTL's formulation.
module tb_sw_transfer_ctrl;
  import sw_pkg::*;

  logic    [1:0] head_valid, out_full;
  packet_t [1:0] head_pkt;
  logic    [2:0][1:0] send, recv;
  packet_t [2:0][1:0] recv_pkt;
  logic    [2:0] collide, winner;

  sw_transfer_ctrl #(.VARIANT(SW_SIMPLIFIED)) u0 (.head_valid, .head_pkt, .out_full,
    .send(send[0]), .recv(recv[0]), .recv_pkt(recv_pkt[0]), .collide(collide[0]), .winner(winner[0]));
  sw_transfer_ctrl #(.VARIANT(SW_ORIGINAL)) u1 (.head_valid, .head_pkt, .out_full,
    .send(send[1]), .recv(recv[1]), .recv_pkt(recv_pkt[1]), .collide(collide[1]), .winner(winner[1]));
  sw_transfer_ctrl #(.VARIANT(SW_MODIFIED)) u2 (.head_valid, .head_pkt, .out_full,
    .send(send[2]), .recv(recv[2]), .recv_pkt(recv_pkt[2]), .collide(collide[2]), .winner(winner[2]));

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [1:0] exp_send;
    bit [1:0] exp_recv;
    bit d0, d1, i0, i1, ok0, ok1;
    for (int rep = 0; rep < 4; rep++)
    for (int c = 0; c < 256; c++) begin
      head_valid = c[1:0];
      out_full   = c[3:2];
      d0 = c[4]; d1 = c[5]; i0 = c[6]; i1 = c[7];
      head_pkt[0] = $urandom(); head_pkt[1] = $urandom();
      head_pkt[0][0] = d0; head_pkt[1][0] = d1;
      if (i0) head_pkt[0][3:1] = 3'b000; else if (head_pkt[0][3:1] == 0) head_pkt[0][2] = 1'b1;
      if (i1) head_pkt[1][3:1] = 3'b000; else if (head_pkt[1][3:1] == 0) head_pkt[1][3] = 1'b1;
      #1;
      ok0 = head_valid[0] && !out_full[d0];
      ok1 = head_valid[1] && !out_full[d1];
      for (int v = 0; v < 3; v++) begin
        if (!ok0 || !ok1)           exp_send = {ok1, ok0};
        else if (d0 == d1)          exp_send = 2'b01;           // same output: input 0
        else if (v == 0)            exp_send = 2'b11;           // simplified: both
        else if (!(i0 && i1))       exp_send = 2'b11;           // at most one interesting
        else if (v == 1)            exp_send = 2'b01;           // original: input 0
        else                        exp_send = 2'b10;           // modified: input 1
        exp_recv = '0;
        if (exp_send[0]) exp_recv[d0] = 1'b1;
        if (exp_send[1]) exp_recv[d1] = 1'b1;
        check(send[v] == exp_send, $sformatf("v%0d case %0d send=%b exp %b", v, c, send[v], exp_send));
        check(recv[v] == exp_recv, $sformatf("v%0d case %0d recv=%b exp %b", v, c, recv[v], exp_recv));
        if (exp_send[0]) check(recv_pkt[v][d0] == head_pkt[0], "recv_pkt from input 0");
        if (exp_send[1]) check(recv_pkt[v][d1] == head_pkt[1], "recv_pkt from input 1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
