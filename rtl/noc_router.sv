// noc_router: five-port store-and-forward packet router for a 2-D mesh
// network on chip.
//
// The router has an east, west, north, south and local port. Each port has
// an input channel and an output channel, each with a 16 x 8-bit FIFO and its
// own FSM, and a 5 x 5 crossbar joins them. A packet (1 to 15 flits of 8
// bits, header first) arrives over the req/ack link of one port and is
// stored whole in that port's input channel. The input channel picks an
// output port from the header (XY routing against the router's coordinates X
// and Y) and requests that output channel. Each output channel runs its own
// round-robin arbiter over the input channels asking for it, sets its
// crossbar multiplexer to the winner, copies the packet into its FIFO and
// then sends it out over its own req/ack link. Because each input channel and
// each output channel works independently, up to five transfers run in
// parallel; two packets headed for the same output collide and are served
// in round-robin order.
//
// Link ports (index = port: 0 east, 1 west, 2 north, 3 south, 4 local):
//   in_req/in_ack/in_data   from the neighbour into the router
//   out_req/out_ack/out_data from the router to the neighbour
// A flit moves on every cycle where req and ack are both high; the sender
// drops req after its last flit and the receiver drops ack after that.
//
// The port set, the channel/crossbar split, FIFO sizes, flit size, packet
// size and round-robin arbitration in the output channels follow the
// document. XY routing, the header layout and the cycle timing are this
// design's choices. The document also mentions giving priority to packets
// that keep travelling in the same dimension; this router uses plain round
// robin, which is the scheme the document builds and evaluates.
module noc_router
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X = 4'd1,
  parameter logic [COORD_W-1:0] Y = 4'd1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NUM_PORTS-1:0] in_req,
  output logic [NUM_PORTS-1:0] in_ack,
  input  flit_t [NUM_PORTS-1:0] in_data,
  output logic [NUM_PORTS-1:0] out_req,
  input  logic [NUM_PORTS-1:0] out_ack,
  output flit_t [NUM_PORTS-1:0] out_data
);

  // input channel -> output channel requests, [input][output]
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] req_io;
  // the same, transposed to [output][input]
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0] req_oi;

  flit_t [NUM_PORTS-1:0]              ic_data, oc_data;
  logic  [NUM_PORTS-1:0]              ic_empty, ic_rd, ic_granted;
  logic  [NUM_PORTS-1:0][PORT_W-1:0]  oc_sel;
  logic  [NUM_PORTS-1:0]              oc_active, oc_rd, oc_empty;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_in
    input_channel #(.X(X), .Y(Y)) u_in (
      .clk        (clk),
      .rst_n      (rst_n),
      .link_req   (in_req[p]),
      .link_ack   (in_ack[p]),
      .link_data  (in_data[p]),
      .sw_req     (req_io[p]),
      .sw_granted (ic_granted[p]),
      .sw_data    (ic_data[p]),
      .sw_empty   (ic_empty[p]),
      .sw_rd      (ic_rd[p])
    );
  end

  always_comb begin
    for (int unsigned o = 0; o < NUM_PORTS; o++)
      for (int unsigned i = 0; i < NUM_PORTS; i++)
        req_oi[o][i] = req_io[i][o];
  end

  crossbar #(.N(NUM_PORTS), .W(FLIT_W)) u_xbar (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_data    (ic_data),
    .in_empty   (ic_empty),
    .in_rd      (ic_rd),
    .in_granted (ic_granted),
    .out_sel    (oc_sel),
    .out_active (oc_active),
    .out_rd     (oc_rd),
    .out_data   (oc_data),
    .out_empty  (oc_empty)
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_out
    output_channel u_out (
      .clk       (clk),
      .rst_n     (rst_n),
      .arb_req   (req_oi[p]),
      .sel       (oc_sel[p]),
      .active    (oc_active[p]),
      .xb_data   (oc_data[p]),
      .xb_empty  (oc_empty[p]),
      .xb_rd     (oc_rd[p]),
      .link_req  (out_req[p]),
      .link_ack  (out_ack[p]),
      .link_data (out_data[p])
    );
  end

endmodule
