// tb_rr_arbiter: self-checking test of the round-robin arbiter (N = 5).
//
// The reference is an independent pointer model: after a grant to index g is
// accepted, the highest priority goes to g+1 (mod N). Each cycle random
// requests and a random accept are applied and the grant is compared with
// the first request found by walking from the model pointer. Two further
// checks cover the fairness claim directly: with all five requesting and
// every grant accepted, the grants must cycle 0,1,2,3,4,0,...; and a
// requester that is held high is served within N grants.
module tb_rr_arbiter;
  localparam int unsigned N = 5;
  localparam int unsigned IW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0] req = '0, grant;
  logic accept = 1'b0, valid;
  logic [IW-1:0] grant_idx;

  int unsigned checks = 0, failures = 0;
  int unsigned ptr = 0;

  rr_arbiter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t req=%b grant=%b ptr=%0d", what, $time, req, grant, ptr);
    end
  endtask

  function automatic int expected_idx(input logic [N-1:0] r, input int unsigned p);
    for (int unsigned k = 0; k < N; k++)
      if (r[(p + k) % N]) return int'((p + k) % N);
    return -1;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e, waited, last;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1. all requesting, always accepted: strict rotation
    last = -1;
    for (int k = 0; k < 3 * N; k++) begin
      @(negedge clk);
      req = '1; accept = 1'b1;
      #1;
      check(valid && int'(grant_idx) == (k % N), "rotation order");
      check(grant == (N'(1) << grant_idx), "one-hot grant");
      @(posedge clk);
      ptr = (int'(grant_idx) + 1) % N;
    end

    // 2. random requests and accepts against the pointer model
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      req = N'($urandom);
      accept = $urandom_range(3) != 0;
      #1;
      e = expected_idx(req, ptr);
      check(valid == (e >= 0), "valid");
      if (e >= 0) begin
        check(int'(grant_idx) == e, "grant index");
        check(grant == (N'(1) << e), "grant vector");
      end else begin
        check(grant == '0, "no grant");
      end
      @(posedge clk);
      if (accept && e >= 0) ptr = (e + 1) % N;
    end

    // 3. starvation freedom: requester 3 held high among random others
    for (int trial = 0; trial < 50; trial++) begin
      waited = 0;
      do begin
        @(negedge clk);
        req = N'($urandom) | N'(1 << 3);
        accept = 1'b1;
        #1;
        waited++;
        @(posedge clk);
      end while (!(grant[3]) && waited < 100);
      check(waited <= N, "served within N grants");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
