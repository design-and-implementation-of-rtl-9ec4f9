// tb_noc_router: end-to-end test of the five-port router at its default
// parameters (router coordinates (1,1)).
//
// Part 1 sends single packets through an idle router and checks the
// delivery time: for an L-flit packet and a neighbour that acknowledges at
// once, the last flit leaves 3L+4 clock edges after the request is raised
// (1 edge to acknowledge, L to store, 1 to request the output, 1 to win
// arbitration, L+1 to copy through the crossbar, L to send).
//
// Part 2 runs random traffic: five sender models (one per port) send packets
// of 1 to 15 flits with headers that route to a random output port, and five
// receiver models answer with random acknowledge delays. A scoreboard holds
// the packets expected per (source, destination) pair; every delivered packet
// must match the oldest one outstanding from its source to that output, and
// every packet must arrive. The source of a delivered packet is taken from the
// order of grants at that output, since a one-flit packet carries no payload
// to tell it apart. Grants are compared with a round-robin reference
// per output channel. Counted mechanisms, each of which must occur:
// collisions at an output, input back-pressure (request held off), slow
// downstream acknowledge, parallel crossbar connections, full 15-flit and
// 1-flit packets, and traffic through every input and every output.
module tb_noc_router;
  import noc_pkg::*;
  localparam int unsigned N = NUM_PORTS;
  localparam int NPKT = 1000;  // random packets per source port

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] in_req, in_ack, out_req, out_ack;
  flit_t [N-1:0] in_data, out_data;

  logic  s_req [N];
  flit_t s_data[N];
  logic  r_ack [N];

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  bit random_phase = 1'b0;
  int unsigned sent[N], rcvd[N];
  int unsigned n_collide = 0, n_backpressure = 0, n_slow_ack = 0, n_parallel = 0;
  int unsigned n_long = 0, n_short = 0;
  flit_t expq[N][N][$][$];   // [source][destination] packets outstanding
  int          grant_src[N][$]; // per output: sources in grant order
  int unsigned last_done;    // cycle of the latest last-flit capture

  noc_router dut (.*);

  for (genvar p = 0; p < N; p++) begin : g_pin
    assign in_req[p]  = s_req[p];
    assign in_data[p] = s_data[p];
    assign out_ack[p] = r_ack[p];
  end

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // header that XY routing at (1,1) sends to port d
  function automatic flit_t header_for(input int d);
    logic [3:0] x, y;
    x = 4'd1; y = 4'd1;
    case (d)
      0: begin x = 4'($urandom_range(2, 15)); y = 4'($urandom_range(15)); end  // east
      1: begin x = 4'd0;                      y = 4'($urandom_range(15)); end  // west
      2: y = 4'($urandom_range(2, 15));                                       // north
      3: y = 4'd0;                                                            // south
      default: ;                                                              // local
    endcase
    return {y, x};
  endfunction

  // upstream sender on port p: drives one packet over req/ack
  task automatic send(input int p, input flit_t pkt[$], output int unsigned t_req);
    int k;
    bit hs;
    k = 0;
    @(negedge clk);
    s_req[p] = 1'b1; s_data[p] = pkt[0];
    t_req = cyc;
    while (k < pkt.size()) begin
      hs = in_ack[p];
      if (!hs && cyc > t_req) n_backpressure++;
      @(posedge clk);
      @(negedge clk);
      if (hs) k++;
      if (k < pkt.size()) s_data[p] = pkt[k];
      else s_req[p] = 1'b0;
    end
  endtask

  function automatic void make_packet(input int src, input int dst, input int len,
                                      output flit_t pkt[$]);
    pkt = {};
    pkt.push_back(header_for(dst));
    for (int k = 1; k < len; k++) pkt.push_back(flit_t'($urandom));
    if (len == 15) n_long++;
    if (len == 1) n_short++;
    expq[src][dst].push_back(pkt);
    sent[src]++;
  endfunction

  // downstream receivers, one per output port
  for (genvar p = 0; p < N; p++) begin : g_rx
    initial begin
      flit_t got[$];
      bit found;
      r_ack[p] = 1'b0;
      forever begin
        @(negedge clk);
        if (out_req[p] && !r_ack[p]) begin
          if (random_phase) begin
            int d;
            d = (p == 3) ? $urandom_range(2, 8) : $urandom_range(2);
            if (d > 0) n_slow_ack++;
            repeat (d) @(negedge clk);
          end
          r_ack[p] = 1'b1;
          got = {};
          while (out_req[p]) begin
            got.push_back(out_data[p]);
            @(negedge clk);
          end
          last_done = cyc - 1;
          r_ack[p] = 1'b0;
          // the grant order at this output names the source of each packet
          found = 1'b0;
          if (grant_src[p].size() > 0) begin
            int s;
            s = grant_src[p].pop_front();
            found = expq[s][p].size() > 0 && expq[s][p][0] == got;
            if (expq[s][p].size() > 0) void'(expq[s][p].pop_front());
            if (!found) $display("  out %0d from %0d got %p", p, s, got);
          end
          check(found, "delivered packet is the oldest outstanding from its source");
          rcvd[p]++;
        end
      end
    end
  end

  // round-robin reference and mechanism counters
  int rr_ptr[N];
  logic [N-1:0][N-1:0] req_prev;
  logic [N-1:0] act_prev;
  always @(negedge clk) begin
    if (rst_n) begin
      for (int o = 0; o < N; o++) begin
        if (dut.oc_active[o] && !act_prev[o]) begin
          int e;
          e = -1;
          for (int k = 0; k < N; k++)
            if (e < 0 && req_prev[o][(rr_ptr[o] + k) % N]) e = (rr_ptr[o] + k) % N;
          check(int'(dut.oc_sel[o]) == e, "round-robin grant");
          rr_ptr[o] = (int'(dut.oc_sel[o]) + 1) % N;
          grant_src[o].push_back(int'(dut.oc_sel[o]));
          if ($countones(req_prev[o]) > 1) n_collide++;
        end
      end
      if ($countones(dut.oc_active) > 1) n_parallel++;
      req_prev = dut.req_oi;
      act_prev = dut.oc_active;
    end
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t pkt[$];
    int unsigned t0;
    for (int p = 0; p < N; p++) begin
      s_req[p] = 1'b0; s_data[p] = '0; sent[p] = 0; rcvd[p] = 0; rr_ptr[p] = 0;
    end
    req_prev = '0; act_prev = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Part 1: latency through an idle router
    for (int p = 0; p < N; p++) begin
      int len, d;
      len = (p == 0) ? 1 : (p == 1) ? 15 : $urandom_range(1, 15);
      d   = (p + 2) % N;
      make_packet(p, d, len, pkt);
      send(p, pkt, t0);
      repeat (3 * len + 10) @(negedge clk);
      check(last_done - t0 == 3 * len + 3, "idle-router latency 3L+4 edges");
      if (last_done - t0 != 3 * len + 3)
        $display("latency: L=%0d measured %0d", len, last_done - t0 + 1);
    end

    // Part 2: random traffic from all five ports at once
    random_phase = 1'b1;
    for (int p0 = 0; p0 < N; p0++) begin
      fork
        automatic int p = p0;
        begin
          flit_t q[$];
          int unsigned t;
          for (int n = 0; n < NPKT; n++) begin
            int len, d;
            len = (n % 17 == 0) ? 15 : (n % 13 == 0) ? 1 : $urandom_range(1, 15);
            // output 3 is slow and popular, to force collisions there
            d = ($urandom_range(3) == 0) ? 3 : $urandom_range(N - 1);
            make_packet(p, d, len, q);
            send(p, q, t);
            repeat ($urandom_range(2)) @(negedge clk);
          end
        end
      join_none
    end
    wait fork;
    repeat (2000) @(negedge clk);

    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        check(expq[s][d].size() == 0, "every packet delivered");
    for (int p = 0; p < N; p++) begin
      check(sent[p] > 0, "traffic from every input");
      check(rcvd[p] > 0, "traffic to every output");
    end
    check(n_collide > 0, "output collisions");
    check(n_backpressure > 0, "input back-pressure");
    check(n_slow_ack > 0, "slow downstream acknowledge");
    check(n_parallel > 0, "parallel crossbar connections");
    check(n_long > 0 && n_short > 0, "15-flit and 1-flit packets");
    $display("collisions %0d, back-pressure cycles %0d, slow acks %0d, parallel cycles %0d, 15-flit %0d, 1-flit %0d",
             n_collide, n_backpressure, n_slow_ack, n_parallel, n_long, n_short);
    $display("sent %0d %0d %0d %0d %0d received %0d %0d %0d %0d %0d",
             sent[0], sent[1], sent[2], sent[3], sent[4], rcvd[0], rcvd[1], rcvd[2], rcvd[3], rcvd[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
