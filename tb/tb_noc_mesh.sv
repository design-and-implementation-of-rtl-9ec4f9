// tb_noc_mesh: end-to-end test of the 3 x 3 mesh of routers (noc_mesh at its
// default parameters).
//
// The testbench drives only the nine local ports. A request on a link at the
// boundary of the mesh stops the simulation through the mesh's assertion,
// since XY routing never sends a packet addressed inside the mesh off it.
//
// Part 1 sends single packets between corners through an idle mesh and
// checks the hop latency: an L-flit packet crossing k routers finishes
// k*(2L+4) + L clock edges after its request (each router stores the packet,
// requests, wins and copies it, then the next one starts receiving; the last
// local receiver acknowledges at once).
//
// Part 2 has every core send packets of 4 to 15 flits to random destinations
// (itself included) while the local receivers acknowledge with random
// delays. Flits 1 to 3 carry the source and a 16-bit sequence number. Every
// packet must arrive at the right core, unchanged and in order for its
// source, and no sooner than the idle-mesh latency for its hop count. Packets
// that took longer waited on a collision or a busy channel somewhere on their
// path; such contention is counted and required.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int unsigned N = NUM_PORTS;
  localparam int DIM = 3;
  localparam int NODES = DIM * DIM;
  localparam int NPKT = 1000;  // random packets per core

  logic clk = 1'b0, rst_n = 1'b0;

  logic  [NODES-1:0] in_req, in_ack, out_req, out_ack;
  flit_t [NODES-1:0] in_data, out_data;

  // local-port drivers, indexed by node = y*DIM + x
  logic  l_req [NODES];
  flit_t l_data[NODES];
  logic  l_ack [NODES];

  int unsigned checks = 0, failures = 0;
  int unsigned cyc = 0;
  bit random_phase = 1'b0;
  int unsigned n_delayed = 0, n_delivered = 0, n_sent = 0;
  int unsigned tstart[NODES][NPKT];
  flit_t expq[NODES][NODES][$][$];   // [source][destination]
  int unsigned last_done[NODES];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- the mesh, at its default size ----
  noc_mesh dut (.*);

  for (genvar n = 0; n < NODES; n++) begin : g_pin
    assign in_req[n]  = l_req[n];
    assign in_data[n] = l_data[n];
    assign out_ack[n] = l_ack[n];
  end

  // ---- local receivers ----
  for (genvar n = 0; n < NODES; n++) begin : g_rx
    initial begin
      flit_t got[$];
      int src, seq, hops, lat_min, d;
      bit ok;
      l_ack[n] = 1'b0;
      forever begin
        @(negedge clk);
        if (out_req[n] && !l_ack[n]) begin
          d = random_phase ? $urandom_range(3) : 0;
          repeat (d) @(negedge clk);
          l_ack[n] = 1'b1;
          got = {};
          while (out_req[n]) begin
            got.push_back(out_data[n]);
            @(negedge clk);
          end
          last_done[n] = cyc - 1;
          l_ack[n] = 1'b0;
          check(got.size() >= 4, "packet long enough to name its source");
          ok = 1'b0;
          if (got.size() >= 4) begin
            src = int'(got[1]);
            seq = {got[3], got[2]};
            // no packet can beat the idle-mesh latency; a later one waited
            if (src < NODES && seq < NPKT) begin
              hops = ((src % DIM > n % DIM) ? src % DIM - n % DIM : n % DIM - src % DIM)
                   + ((src / DIM > n / DIM) ? src / DIM - n / DIM : n / DIM - src / DIM) + 1;
              lat_min = hops * (2 * got.size() + 4) + got.size() - 1 + d;
              check(int'(last_done[n] - tstart[src][seq]) >= lat_min, "latency not below the idle-mesh value");
              if (int'(last_done[n] - tstart[src][seq]) > lat_min) n_delayed++;
            end
            check(got[0] == {4'(n / DIM), 4'(n % DIM)}, "arrived at its destination");
            if (src < NODES && expq[src][n].size() > 0) begin
              ok = (expq[src][n][0] == got);
              void'(expq[src][n].pop_front());
            end
          end
          check(ok, "packet intact and in order for its source");
          n_delivered++;
        end
      end
    end
  end

  // ---- local senders ----
  task automatic send(input int n, input flit_t pkt[$], output int unsigned t_req);
    int k;
    bit hs;
    k = 0;
    @(negedge clk);
    l_req[n] = 1'b1; l_data[n] = pkt[0];
    t_req = cyc;
    while (k < pkt.size()) begin
      hs = in_ack[n];
      @(posedge clk);
      @(negedge clk);
      if (hs) k++;
      if (k < pkt.size()) l_data[n] = pkt[k];
      else l_req[n] = 1'b0;
    end
  endtask

  function automatic void make_packet(input int src, input int dst, input int len,
                                      input int seq, output flit_t pkt[$]);
    pkt = {};
    pkt.push_back({4'(dst / DIM), 4'(dst % DIM)});
    pkt.push_back(flit_t'(src));
    pkt.push_back(flit_t'(seq));
    pkt.push_back(flit_t'(seq >> 8));
    for (int k = 4; k < len; k++) pkt.push_back(flit_t'($urandom));
    expq[src][dst].push_back(pkt);
    n_sent++;
  endfunction

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
    for (int n = 0; n < NODES; n++) begin
      l_req[n] = 1'b0; l_data[n] = '0; last_done[n] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // Part 1: hop latency through an idle mesh
    begin
      int src[4] = '{0, 8, 2, 4};
      int dst[4] = '{8, 0, 6, 4};
      int hops[4] = '{5, 5, 5, 1};
      int len[4] = '{4, 15, 7, 4};
      for (int t = 0; t < 4; t++) begin
        make_packet(src[t], dst[t], len[t], 16'hffff, pkt);
        send(src[t], pkt, t0);
        repeat (hops[t] * (2 * len[t] + 4) + len[t] + 10) @(negedge clk);
        check(last_done[dst[t]] - t0 == hops[t] * (2 * len[t] + 4) + len[t] - 1,
              "hop latency k*(2L+4)+L edges");
        if (last_done[dst[t]] - t0 != hops[t] * (2 * len[t] + 4) + len[t] - 1)
          $display("latency %0d->%0d L=%0d: %0d edges", src[t], dst[t], len[t], last_done[dst[t]] - t0 + 1);
      end
    end

    // Part 2: random all-to-all traffic
    random_phase = 1'b1;
    for (int n0 = 0; n0 < NODES; n0++) begin
      fork
        automatic int n = n0;
        begin
          flit_t q[$];
          int unsigned t;
          for (int s = 0; s < NPKT; s++) begin
            make_packet(n, $urandom_range(NODES - 1), $urandom_range(4, 15), s, q);
            send(n, q, t);
            tstart[n][s] = t;
            repeat ($urandom_range(4)) @(negedge clk);
          end
        end
      join_none
    end
    wait fork;
    repeat (3000) @(negedge clk);

    for (int s = 0; s < NODES; s++)
      for (int d = 0; d < NODES; d++)
        check(expq[s][d].size() == 0, "every packet delivered");
    check(n_delivered == n_sent, "delivered count equals sent count");
    check(n_delayed > 0, "packets delayed by contention");
    $display("sent %0d delivered %0d, delayed by contention %0d", n_sent, n_delivered, n_delayed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
