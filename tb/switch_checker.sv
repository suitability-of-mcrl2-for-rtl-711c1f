// Stimulus generator, reference model and checker for switch_top, shared by
// the end-to-end testbenches. It drives the enter/leave handshakes of all
// three variants with random traffic and compares the DUT every cycle with a
// cycle-accurate model written independently of the RTL: the four queues of
// each variant are SystemVerilog queues, and each cycle the switch rules are
// applied to them (routing by the first bit, output-full stall, one operation
// per buffer per cycle with transfers first, the collision priority of each
// variant, the interesting-packet count). Compared every cycle: enter_ready,
// leave_valid, leave_pkt and int_count. Traffic runs in phases of light and
// heavy draining so the buffers fill and empty. At the end the switch is
// drained and must come out empty. The checker counts how often each
// mechanism happened per variant and counts a failure for any that never did.
// CAP must match the capacity of the switch under test.
module switch_checker
  import sw_pkg::*;
#(
  parameter int CAP    = 3,
  parameter int CYCLES = 20000,
  parameter int DRAIN  = 10 * CAP + 10
) (
  input  logic                clk,
  input  logic                rst_n,
  output logic    [2:0][1:0]  enter_valid,
  input  logic    [2:0][1:0]  enter_ready,
  output packet_t [2:0][1:0]  enter_pkt,
  input  logic    [2:0][1:0]  leave_valid,
  output logic    [2:0][1:0]  leave_ready,
  input  packet_t [2:0][1:0]  leave_pkt,
  input  logic    [2:0][31:0] int_count,
  output int                  checks,
  output int                  failures,
  output logic                done
);


  // mechanism counters [variant]
  int n_simul[3], n_same_coll[3], n_int_coll0[3], n_int_coll1[3], n_out_stall[3];
  int n_in_full[3], n_enter_blocked[3], n_leave_blocked[3], n_count[3], n_full_int[3];

  packet_t inq [3][2][$];
  packet_t outq[3][2][$];
  int      cnt_model[3];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic packet_t rand_pkt();
    packet_t p;
    p = $urandom();
    if ($urandom_range(1, 0) == 1) p[3:1] = 3'b000;
    return p;
  endfunction

  initial begin : main
    bit      snd [2];
    bit      rcv [2];
    bit      can [2];
    bit      dst [2];
    bit      itr [2];
    int      leave_bias;
    bit      exp_rdy, exp_val;
    packet_t p;
    done        = 1'b0;
    checks      = 0;
    failures    = 0;
    enter_valid = '0;
    enter_pkt   = '0;
    leave_ready = '0;
    for (int v = 0; v < 3; v++) cnt_model[v] = 0;
    @(posedge clk);
    while (!rst_n) @(posedge clk);

    for (int cyc = 0; cyc < CYCLES + DRAIN; cyc++) begin
      @(negedge clk);
      if (cyc % 400 == 0) leave_bias = $urandom_range(100, 0);
      // drive stimulus; a refused packet is offered again unchanged; in the
      // last DRAIN cycles nothing enters and the outside takes everything
      for (int v = 0; v < 3; v++)
        for (int i = 0; i < 2; i++) begin
          if (cyc >= CYCLES) begin
            enter_valid[v][i] = 1'b0;
            leave_ready[v][i] = 1'b1;
            continue;
          end
          if (!(enter_valid[v][i] && !enter_ready[v][i])) begin
            enter_valid[v][i] = ($urandom_range(99, 0) < 70);
            enter_pkt[v][i]   = rand_pkt();
          end
          leave_ready[v][i] = ($urandom_range(99, 0) < leave_bias);
        end
      #1;
      for (int v = 0; v < 3; v++) begin
        // transfer decision of the model
        for (int i = 0; i < 2; i++) begin
          snd[i] = 1'b0;
          if (inq[v][i].size() > 0) begin
            dst[i] = pkt_dest(inq[v][i][0]);
            itr[i] = (inq[v][i][0][3:1] == 3'b000);
            can[i] = (outq[v][dst[i]].size() < CAP);
          end else begin
            dst[i] = 1'b0; itr[i] = 1'b0; can[i] = 1'b0;
          end
        end
        if (can[0] && can[1]) begin
          if (dst[0] == dst[1]) begin
            snd[0] = 1; n_same_coll[v]++;
          end else if (v != 0 && itr[0] && itr[1]) begin
            if (v == 2) begin snd[1] = 1; n_int_coll1[v]++; end
            else        begin snd[0] = 1; n_int_coll0[v]++; end
          end else begin
            snd[0] = 1; snd[1] = 1; n_simul[v]++;
          end
        end else begin
          snd[0] = can[0]; snd[1] = can[1];
          // both interesting heads, different outputs, one output full:
          // the other packet must still move
          if (v != 0 && inq[v][0].size() > 0 && inq[v][1].size() > 0 && itr[0] && itr[1]
              && dst[0] != dst[1] && (can[0] != can[1])) n_full_int[v]++;
        end
        for (int i = 0; i < 2; i++)
          if (inq[v][i].size() > 0 && !can[i]) n_out_stall[v]++;
        rcv[0] = 0; rcv[1] = 0;
        for (int i = 0; i < 2; i++) if (snd[i]) rcv[dst[i]] = 1;

        // compare the handshake outputs
        for (int i = 0; i < 2; i++) begin
          exp_rdy = (inq[v][i].size() < CAP) && !snd[i];
          check(enter_ready[v][i] == exp_rdy,
                $sformatf("v%0d enter_ready[%0d]=%0b exp %0b", v, i, enter_ready[v][i], exp_rdy));
          if (enter_valid[v][i] && inq[v][i].size() >= CAP) n_in_full[v]++;
          if (enter_valid[v][i] && inq[v][i].size() < CAP && snd[i]) n_enter_blocked[v]++;
        end
        for (int o = 0; o < 2; o++) begin
          exp_val = (outq[v][o].size() > 0) && !rcv[o];
          check(leave_valid[v][o] == exp_val,
                $sformatf("v%0d leave_valid[%0d]=%0b exp %0b", v, o, leave_valid[v][o], exp_val));
          if (exp_val)
            check(leave_pkt[v][o] == outq[v][o][0],
                  $sformatf("v%0d leave_pkt[%0d]=%h exp %h", v, o, leave_pkt[v][o], outq[v][o][0]));
          if (outq[v][o].size() > 0 && rcv[o] && leave_ready[v][o]) n_leave_blocked[v]++;
        end
        check(int_count[v] == 32'(cnt_model[v]),
              $sformatf("v%0d int_count=%0d exp %0d", v, int_count[v], cnt_model[v]));

        // advance the model to the next cycle
        for (int o = 0; o < 2; o++)
          if ((outq[v][o].size() > 0) && !rcv[o] && leave_ready[v][o]) void'(outq[v][o].pop_front());
        for (int i = 0; i < 2; i++)
          if (snd[i]) begin
            p = inq[v][i].pop_front();
            outq[v][pkt_dest(p)].push_back(p);
            if (v != 0 && p[3:1] == 3'b000) begin cnt_model[v]++; n_count[v]++; end
          end
        for (int i = 0; i < 2; i++)
          if (enter_valid[v][i] && enter_ready[v][i]) inq[v][i].push_back(enter_pkt[v][i]);
      end
    end

    $display("CAP=%0d", CAP);
    for (int v = 0; v < 3; v++) begin
      $display("variant %0d: simultaneous=%0d same-dest-collisions=%0d int-collisions(in0 wins)=%0d int-collisions(in1 wins)=%0d",
               v, n_simul[v], n_same_coll[v], n_int_coll0[v], n_int_coll1[v]);
      $display("           output-full stalls=%0d input-full refusals=%0d enter-blocked-by-send=%0d leave-blocked-by-recv=%0d counted=%0d interesting-pair-with-full-output=%0d",
               n_out_stall[v], n_in_full[v], n_enter_blocked[v], n_leave_blocked[v], n_count[v], n_full_int[v]);
      check(n_simul[v] > 0, "no simultaneous transfer");
      check(n_same_coll[v] > 0, "no same-destination collision");
      check(n_out_stall[v] > 0, "no output-full stall");
      check(n_in_full[v] > 0, "no input-full refusal");
      if (CAP > 1) begin  // with one slot a buffer cannot be both non-full and busy
        check(n_enter_blocked[v] > 0, "no enter blocked by a send");
        check(n_leave_blocked[v] > 0, "no leave blocked by a receive");
      end
      if (v != 0) begin
        check(n_count[v] > 0, "no interesting packet counted");
        check(n_full_int[v] > 0, "no interesting pair with one output full");
      end
      if (v == 1) check(n_int_coll0[v] > 0, "no interesting collision won by input 0");
      if (v == 2) check(n_int_coll1[v] > 0, "no interesting collision won by input 1");
    end
    // after the drain every packet must have come out: no deadlock, nothing lost
    for (int v = 0; v < 3; v++)
      for (int o = 0; o < 2; o++) begin
        check(leave_valid[v][o] == 1'b0, $sformatf("v%0d output %0d not drained", v, o));
        check(outq[v][o].size() == 0 && inq[v][o].size() == 0, "model not drained");
      end
    done = 1'b1;
  end

endmodule
