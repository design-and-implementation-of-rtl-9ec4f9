// noc_mesh: a network on chip of COLS x ROWS routers in a 2-D grid.
//
// Router (x,y) is a noc_router with coordinates X = x, Y = y. Its east port
// links to the west port of (x+1,y) and its north port to the south port of
// (x,y+1): each output link (req, data) drives the neighbour's input link,
// whose ack comes back. The local port of every router is brought out as
// the mesh's interface to its cores, indexed by node n = y*COLS + x, with the
// same req/ack/data handshake as a router port. Links on the mesh boundary
// are tied idle (no request, no acknowledge). XY routing never sends a
// packet addressed inside the mesh across the boundary; a header naming a
// node outside the mesh would stall at the boundary, which the assertion
// below reports.
//
// The 2-D grid topology, the five-port routers and the local port per node
// follow the document, which evaluates its routers in a network; the network
// size is not given, so the 3 x 3 default is this design's choice. It is the
// smallest mesh with a router that uses all five ports.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned COLS = 3,
  parameter int unsigned ROWS = 3,
  localparam int unsigned NODES = COLS * ROWS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // local ports of all routers, node n = y*COLS + x
  input  logic  [NODES-1:0]    in_req,
  output logic  [NODES-1:0]    in_ack,
  input  flit_t [NODES-1:0]    in_data,
  output logic  [NODES-1:0]    out_req,
  input  logic  [NODES-1:0]    out_ack,
  output flit_t [NODES-1:0]    out_data
);

  // router-side link bundles, [node][port]
  logic  [NODES-1:0][NUM_PORTS-1:0] r_in_req, r_in_ack, r_out_req, r_out_ack;
  flit_t [NODES-1:0][NUM_PORTS-1:0] r_in_data, r_out_data;
  logic  [NODES-1:0][3:0]           edge_req;

  for (genvar x = 0; x < COLS; x++) begin : g_x
    for (genvar y = 0; y < ROWS; y++) begin : g_y
      localparam int unsigned N = y * COLS + x;

      noc_router #(.X(COORD_W'(x)), .Y(COORD_W'(y))) u_router (
        .clk      (clk),
        .rst_n    (rst_n),
        .in_req   (r_in_req[N]),
        .in_ack   (r_in_ack[N]),
        .in_data  (r_in_data[N]),
        .out_req  (r_out_req[N]),
        .out_ack  (r_out_ack[N]),
        .out_data (r_out_data[N])
      );

      // mesh links: port p = 0 east, 1 west, 2 north, 3 south
      for (genvar p = 0; p < 4; p++) begin : g_p
        localparam int NX  = (p == 0) ? x + 1 : (p == 1) ? x - 1 : x;
        localparam int NY  = (p == 2) ? y + 1 : (p == 3) ? y - 1 : y;
        localparam int OPP = (p == 0) ? 1 : (p == 1) ? 0 : (p == 2) ? 3 : 2;
        if (NX >= 0 && NX < int'(COLS) && NY >= 0 && NY < int'(ROWS)) begin : g_link
          localparam int unsigned M = NY * COLS + NX;
          assign r_in_req[N][p]  = r_out_req[M][OPP];
          assign r_in_data[N][p] = r_out_data[M][OPP];
          assign r_out_ack[N][p] = r_in_ack[M][OPP];
          assign edge_req[N][p]  = 1'b0;
        end else begin : g_edge
          assign r_in_req[N][p]  = 1'b0;
          assign r_in_data[N][p] = '0;
          assign r_out_ack[N][p] = 1'b0;
          assign edge_req[N][p]  = r_out_req[N][p];
        end
      end

      // local port
      assign r_in_req[N][PORT_LOCAL]  = in_req[N];
      assign r_in_data[N][PORT_LOCAL] = in_data[N];
      assign r_out_ack[N][PORT_LOCAL] = out_ack[N];
      assign in_ack[N]   = r_in_ack[N][PORT_LOCAL];
      assign out_req[N]  = r_out_req[N][PORT_LOCAL];
      assign out_data[N] = r_out_data[N][PORT_LOCAL];
    end
  end

  // No packet may be routed off the mesh.
  a_no_edge_traffic: assert property (@(posedge clk) disable iff (!rst_n) edge_req == '0);

endmodule
