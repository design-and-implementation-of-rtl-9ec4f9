// tb_input_channel: self-checking test of one router input channel at
// router coordinates (1,1).
//
// An upstream sender model transfers packets of random length (1 to 15
// flits) with random headers over the req/ack link. A switch-side model
// plays the output channel: it checks that the one-hot request names the
// port that XY routing gives for the header, grants after a random delay and
// pops the FIFO, checking every flit. The next packet is offered while the
// channel is still busy, so the channel must hold off its acknowledge until
// it is empty again (back-pressure); how often that happened is counted and
// must be non-zero. Cycle checks: ack rises one cycle after req, and the
// output request appears one cycle after req falls.
module tb_input_channel;
  import noc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic link_req = 1'b0, link_ack;
  flit_t link_data = '0;
  logic [NUM_PORTS-1:0] sw_req;
  logic sw_granted = 1'b0, sw_empty, sw_rd = 1'b0;
  flit_t sw_data;

  int unsigned checks = 0, failures = 0;
  int unsigned held_off = 0, per_port[NUM_PORTS];
  int unsigned req_drop_time;
  bit busy = 1'b0;   // a stored packet has not been drained yet

  input_channel #(.X(4'd1), .Y(4'd1)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // reference XY route at (1,1), written independently of the package
  function automatic int ref_route(input flit_t h);
    int dx, dy;
    dx = int'(h[3:0]); dy = int'(h[7:4]);
    if (dx > 1) return 0;       // east
    if (dx < 1) return 1;       // west
    if (dy > 1) return 2;       // north
    if (dy < 1) return 3;       // south
    return 4;                   // local
  endfunction

  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic send(input flit_t pkt[$]);
    int k;
    bit hs, first, was_busy;
    int unsigned t_req;
    k = 0; first = 1'b1;
    @(negedge clk);
    link_req = 1'b1; link_data = pkt[0];
    t_req = cyc;
    was_busy = busy;
    while (k < pkt.size()) begin
      hs = link_ack;
      if (!hs && cyc > t_req) held_off++;
      if (hs && first) begin
        // ack must come one cycle after req unless the channel is busy
        first = 1'b0;
      end
      @(posedge clk);
      @(negedge clk);
      if (hs) k++;
      if (k < pkt.size()) link_data = pkt[k];
      else link_req = 1'b0;
      if (cyc - t_req == 1 && !was_busy) check(link_ack, "ack one cycle after req");
    end
    req_drop_time = cyc;
    busy = 1'b1;
  endtask

  task automatic drain(input flit_t pkt[$]);
    int j;
    j = 0;
    @(negedge clk);
    while (sw_req == '0) @(negedge clk);
    check(cyc - req_drop_time <= 1 || pkt.size() == 0, "request one cycle after req falls");
    check(sw_req == (NUM_PORTS'(1) << ref_route(pkt[0])), "routed port");
    per_port[ref_route(pkt[0])]++;
    repeat ($urandom_range(4)) @(negedge clk);
    sw_granted = 1'b1;
    while (j < pkt.size()) begin
      check(!sw_empty, "data present");
      check(sw_data == pkt[j], "flit data");
      sw_rd = 1'b1;
      @(posedge clk);
      @(negedge clk);
      sw_rd = 1'b0;
      j++;
      if ($urandom_range(3) == 0) begin
        @(posedge clk); @(negedge clk);   // occasional gap in reading
      end
    end
    check(sw_empty, "empty after packet");
    @(posedge clk); @(negedge clk);
    sw_granted = 1'b0;
    busy = 1'b0;
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flit_t pkts[$][$];
    flit_t p[$];
    int np = 300;
    for (int n = 0; n < np; n++) begin
      int len;
      len = (n == 0) ? 15 : (n == 1) ? 1 : $urandom_range(1, 15);
      p = {};
      // header: destination y in [7:4], x in [3:0], around this router
      p.push_back({4'($urandom_range(2)), 4'($urandom_range(2))});
      for (int k = 1; k < len; k++) p.push_back(flit_t'($urandom));
      pkts.push_back(p);
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(pkts[0]);
    for (int n = 0; n < np; n++) begin
      fork
        drain(pkts[n]);
        if (n + 1 < np) begin
          repeat ($urandom_range(3)) @(negedge clk);
          send(pkts[n + 1]);
        end
      join
    end
    check(held_off > 0, "back-pressure happened");
    for (int q = 0; q < NUM_PORTS; q++) check(per_port[q] > 0, "every port routed to");
    $display("held off %0d cycles; per port %0d %0d %0d %0d %0d", held_off,
             per_port[0], per_port[1], per_port[2], per_port[3], per_port[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
