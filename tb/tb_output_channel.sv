// tb_output_channel: self-checking test of one router output channel.
//
// Five input-channel models hold packets of random length (1 to 15 flits)
// and request this output at random times; the testbench plays the crossbar
// (it forwards the selected model's FIFO head and empty flag and pops on
// xb_rd). A downstream receiver model answers link_req with link_ack after a
// random delay and collects flits while both are high. Checks:
//  - every grant goes to the input a reference round-robin pointer predicts,
//    the pointer moving to one past the input just served;
//  - every packet leaves in grant order with all flits intact;
//  - the copy through the crossbar takes L+1 cycles for an L-flit packet;
//  - collisions (several inputs requesting at once) and slow acknowledges
//    both happened.
module tb_output_channel;
  import noc_pkg::*;
  localparam int unsigned N = NUM_PORTS;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] arb_req = '0;
  logic [PORT_W-1:0] sel;
  logic active, xb_empty = 1'b1, xb_rd;
  flit_t xb_data = '0;
  logic link_req, link_ack = 1'b0;
  flit_t link_data;

  int unsigned checks = 0, failures = 0;
  int unsigned collisions = 0, slow_acks = 0, delivered = 0;

  // input-channel models
  flit_t src_mem [N][16];
  int    src_len [N];
  int    src_rd  [N];
  bit    src_has [N];
  bit    src_srv [N];

  flit_t expq[$][$];

  output_channel dut (.*);

  always #5 clk = ~clk;

  // crossbar model, driven once per cycle at the falling edge
  task automatic drive_xb();
    xb_data  = '0;
    xb_empty = 1'b1;
    if (active && int'(sel) < N) begin
      xb_empty = src_rd[sel] >= src_len[sel];
      if (!xb_empty) xb_data = src_mem[sel][src_rd[sel]];
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // downstream receiver model
  initial begin
    flit_t got[$];
    flit_t exp[$];
    forever begin
      @(negedge clk);
      if (link_req && !link_ack) begin
        int d;
        d = $urandom_range(3);
        if (d > 0) slow_acks++;
        repeat (d) @(negedge clk);
        link_ack = 1'b1;
        got = {};
        // a flit moves on each rising edge with req and ack both high
        while (link_req) begin
          got.push_back(link_data);
          @(negedge clk);
        end
        link_ack = 1'b0;
        check(expq.size() > 0, "packet expected");
        if (expq.size() > 0) begin
          exp = expq.pop_front();
          check(got == exp, "packet contents");
        end
        delivered++;
      end
    end
  end

  // sources, arbitration reference and copy timing
  initial begin
    int ptr, e, t_act, cnt_req, sel_s;
    bit rd_s;
    logic [N-1:0] req_prev;
    bit act_prev;
    flit_t p[$];
    ptr = 0; act_prev = 1'b0; req_prev = '0; t_act = 0;
    for (int i = 0; i < N; i++) begin
      src_len[i] = 0; src_rd[i] = 0; src_has[i] = 0; src_srv[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // a new grant: check it against the reference pointer
      if (active && !act_prev) begin
        e = -1;
        for (int k = 0; k < N; k++)
          if (e < 0 && req_prev[(ptr + k) % N]) e = (ptr + k) % N;
        check(int'(sel) == e, "round-robin grant");
        cnt_req = $countones(req_prev);
        if (cnt_req > 1) collisions++;
        ptr = (int'(sel) + 1) % N;
        src_srv[sel] = 1'b1;
        p = {};
        for (int k = 0; k < src_len[sel]; k++) p.push_back(src_mem[sel][k]);
        expq.push_back(p);
        t_act = 0;
      end
      if (active) t_act++;
      // end of a copy: check its length and free the source
      if (!active && act_prev) begin
        int s;
        s = -1;
        for (int i = 0; i < N; i++) if (src_srv[i]) s = i;
        check(s >= 0 && t_act == src_len[s] + 1, "copy takes L+1 cycles");
        if (s >= 0) begin
          src_has[s] = 0; src_srv[s] = 0;
        end
      end
      act_prev = active;
      // new packets appear at random
      for (int i = 0; i < N; i++) begin
        if (!src_has[i] && $urandom_range(9) == 0) begin
          src_len[i] = $urandom_range(1, 15);
          src_rd[i]  = 0;
          for (int k = 0; k < 16; k++) src_mem[i][k] = flit_t'($urandom);
          src_has[i] = 1;
        end
      end
      for (int i = 0; i < N; i++) arb_req[i] = src_has[i] && !src_srv[i];
      req_prev = arb_req;
      drive_xb();
      #1;
      rd_s  = xb_rd;
      sel_s = int'(sel);
      @(posedge clk);
      if (rd_s) src_rd[sel_s]++;
    end
    repeat (100) @(negedge clk);
    check(collisions > 0, "collisions happened");
    check(slow_acks > 0, "slow acknowledges happened");
    check(delivered > 100, "packets delivered");
    $display("delivered %0d, collisions %0d, slow acks %0d", delivered, collisions, slow_acks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
