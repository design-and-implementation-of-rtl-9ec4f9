// crossbar: 5 x 5 cross-point matrix built from multiplexers and
// demultiplexers.
//
// Every output port o owns a 5:1 multiplexer whose 3-bit select out_sel[o]
// is set by that output channel's arbiter; while out_active[o] is high the
// multiplexer forwards the chosen input channel's FIFO head (in_data) and its
// empty flag to the output channel. In the other direction, demultiplexers
// steer the output channel's read strobe (out_rd) and the grant itself back
// to the selected input channel, so that an input channel is popped only by
// the output that granted it. An inactive output sees an empty source and
// drives nothing back. Since each output grants at most one input and each
// input requests at most one output, at most one output selects a given
// input at a time (checked by an assertion). Purely combinational.
//
// The document gives the multiplexer structure, the 5:1 width and the 3-bit
// select; the 8-bit datapath width is the flit size (the document also
// mentions 40-bit inputs, which this design does not follow), and the
// backward demultiplexing of read strobe and grant is this design's reading
// of "configures the multiplexers and demultiplexers".
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned N = NUM_PORTS,
  parameter int unsigned W = FLIT_W,
  localparam int unsigned SW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,     // only used by the assertions
  input  logic                 rst_n,
  // input-channel side
  input  logic [N-1:0][W-1:0]  in_data,
  input  logic [N-1:0]         in_empty,
  output logic [N-1:0]         in_rd,
  output logic [N-1:0]         in_granted,
  // output-channel side
  input  logic [N-1:0][SW-1:0] out_sel,
  input  logic [N-1:0]         out_active,
  input  logic [N-1:0]         out_rd,
  output logic [N-1:0][W-1:0]  out_data,
  output logic [N-1:0]         out_empty
);

  // Forward multiplexers, one per output.
  always_comb begin
    for (int unsigned o = 0; o < N; o++) begin
      out_data[o]  = '0;
      out_empty[o] = 1'b1;
      if (out_active[o] && (int'(out_sel[o]) < N)) begin
        out_data[o]  = in_data[out_sel[o]];
        out_empty[o] = in_empty[out_sel[o]];
      end
    end
  end

  // Backward demultiplexers, one per output, OR-ed per input.
  always_comb begin
    in_rd      = '0;
    in_granted = '0;
    for (int unsigned o = 0; o < N; o++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (out_active[o] && out_sel[o] == SW'(i)) begin
          in_granted[i] = 1'b1;
          in_rd[i]      = in_rd[i] | out_rd[o];
        end
      end
    end
  end

  // No input may be connected to two outputs at once.
  for (genvar i = 0; i < N; i++) begin : g_chk
    logic [N-1:0] users;
    for (genvar o = 0; o < N; o++) begin : g_u
      assign users[o] = out_active[o] && (out_sel[o] == SW'(i));
    end
    a_single_user: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(users));
  end

endmodule
