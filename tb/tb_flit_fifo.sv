// tb_flit_fifo: self-checking test of the 16 x 8 flit FIFO.
//
// Random pushes and pops, biased in phases towards filling and draining, are
// applied for several thousand cycles. A queue in the testbench is the
// reference: before each clock edge the head flit, empty, full and count are
// compared with it. Writes to a full FIFO and reads from an empty one are
// never issued (the FIFO asserts on them). The fill phases reach full and
// the drain phases reach empty, which is counted and required.
module tb_flit_fifo;
  localparam int unsigned W = 8;
  localparam int unsigned D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(D+1)-1:0] count;

  int unsigned checks = 0, failures = 0;
  int unsigned saw_full = 0, saw_empty = 0;
  logic [W-1:0] model[$];

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

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
    int unsigned wr_bias;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      // compare with the reference
      check(empty == (model.size() == 0), "empty");
      check(full == (model.size() == D), "full");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      if (full) saw_full++;
      if (empty) saw_empty++;
      // phases of 200 cycles alternate between filling and draining
      wr_bias = ((cyc / 200) % 2 == 0) ? 80 : 20;
      wr_en   = ($urandom_range(99) < wr_bias) && (model.size() < D);
      rd_en   = ($urandom_range(99) >= wr_bias) && (model.size() > 0);
      wr_data = W'($urandom);
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
    end
    check(saw_full > 0, "reached full");
    check(saw_empty > 0, "reached empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
