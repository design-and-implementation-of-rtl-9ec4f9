// tb_crossbar: self-checking test of the 5 x 5 multiplexer/demultiplexer
// cross-point matrix.
//
// Each cycle a random partial matching of outputs to inputs is drawn (no
// input is selected by two active outputs, as in the router), with random
// input data, empty flags and read strobes. The reference computes, outside
// the DUT, what every output must see (data and empty of its selected input,
// or empty when inactive) and what every input must get back (grant and read
// strobe from the output that selected it).
module tb_crossbar;
  import noc_pkg::*;
  localparam int unsigned N = 5, W = 8, SW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0][W-1:0]  in_data;
  logic [N-1:0]         in_empty, in_rd, in_granted;
  logic [N-1:0][SW-1:0] out_sel;
  logic [N-1:0]         out_active, out_rd, out_empty;
  logic [N-1:0][W-1:0]  out_data;

  int unsigned checks = 0, failures = 0;

  crossbar #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm[N];
    int owner[N];   // output that selects input i, or -1
    in_data = '0; in_empty = '1; out_sel = '0; out_active = '0; out_rd = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // random permutation of inputs, then each output takes perm[o]
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(i);
        t = perm[i]; perm[i] = perm[j]; perm[j] = t;
      end
      for (int i = 0; i < N; i++) owner[i] = -1;
      for (int o = 0; o < N; o++) begin
        in_data[o]    = W'($urandom);
        in_empty[o]   = $urandom_range(3) == 0;
        out_sel[o]    = SW'(perm[o]);
        out_active[o] = $urandom_range(1) == 1;
        out_rd[o]     = $urandom_range(1) == 1;
        if (out_active[o]) owner[perm[o]] = o;
      end
      #1;
      for (int o = 0; o < N; o++) begin
        if (out_active[o]) begin
          check(out_data[o] == in_data[perm[o]], "forward data");
          check(out_empty[o] == in_empty[perm[o]], "forward empty");
        end else begin
          check(out_empty[o] == 1'b1, "inactive output sees empty");
        end
      end
      for (int i = 0; i < N; i++) begin
        check(in_granted[i] == (owner[i] >= 0), "grant steered back");
        check(in_rd[i] == ((owner[i] >= 0) ? out_rd[owner[i]] : 1'b0), "read strobe steered back");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
