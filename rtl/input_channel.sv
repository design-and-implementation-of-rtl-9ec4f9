// input_channel: one router input port with its FIFO and control FSM.
//
// The neighbouring router (or the local core) asks to send by raising
// link_req. When the channel is free it raises link_ack and keeps it high
// while link_req stays high; every cycle with link_req && link_ack moves one
// flit from link_data into the 16-flit FIFO. The sender drops link_req after
// its last flit and the channel then drops link_ack, so request and
// acknowledge fall in that order. The whole packet is now stored (store and
// forward). The FSM reads the header at the FIFO head, decides the output
// port with dimension-ordered XY routing against this router's coordinates
// (X, Y), and raises the one-hot sw_req line for that output channel. When
// an output channel grants it (sw_granted), that output channel pops the
// FIFO through the crossbar (sw_rd) until it is empty; the channel then goes
// back to idle and can take the next packet.
//
// States: IDLE -> RECV (ack high, storing) -> REQUEST (waiting for the
// grant) -> XFER (being emptied) -> IDLE. The req/ack behaviour, the FIFO
// size, the header-first packet and the FSM structure follow the document;
// the exact cycle timing, the header layout and XY routing are this design's
// choices.
//
// Timing: link_ack rises on the clock edge after link_req is seen; a packet
// of L flits is then stored in L cycles; sw_req rises on the clock edge
// after link_req falls.
module input_channel
  import noc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X = '0,
  parameter logic [COORD_W-1:0] Y = '0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // link from the upstream neighbour
  input  logic                 link_req,
  output logic                 link_ack,
  input  flit_t                link_data,
  // towards the crossbar and output channels
  output logic [NUM_PORTS-1:0] sw_req,
  input  logic                 sw_granted,
  output flit_t                sw_data,
  output logic                 sw_empty,
  input  logic                 sw_rd
);

  typedef enum logic [1:0] {IN_IDLE, IN_RECV, IN_REQUEST, IN_XFER} in_state_e;

  in_state_e state;
  port_e     dest;
  logic      fifo_wr, fifo_full;
  flit_t     head;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  assign link_ack = (state == IN_RECV);
  assign fifo_wr  = link_req && link_ack;
  assign sw_data  = head;

  always_comb begin
    sw_req = '0;
    if (state == IN_REQUEST) sw_req[dest] = 1'b1;
  end

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (fifo_wr),
    .wr_data (link_data),
    .rd_en   (sw_rd),
    .rd_data (head),
    .empty   (sw_empty),
    .full    (fifo_full),
    .count   (fifo_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IN_IDLE;
      dest  <= PORT_LOCAL;
    end else begin
      unique case (state)
        IN_IDLE:    if (link_req) state <= IN_RECV;
        IN_RECV:    if (!link_req) begin
                      if (sw_empty) state <= IN_IDLE;   // request without data
                      else begin
                        dest  <= route_xy(head, X, Y);
                        state <= IN_REQUEST;
                      end
                    end
        IN_REQUEST: if (sw_granted) state <= IN_XFER;
        IN_XFER:    if (sw_empty) state <= IN_IDLE;
        default:    state <= IN_IDLE;
      endcase
    end
  end

  // A packet is at most 15 flits (120 bits) and so always fits in the FIFO;
  // only a granted channel is emptied.
  a_pkt_len:    assert property (@(posedge clk) disable iff (!rst_n)
                                 !(fifo_wr && 32'(fifo_count) >= MAX_PKT_FLITS));
  a_fits:       assert property (@(posedge clk) disable iff (!rst_n) !(fifo_wr && fifo_full));
  a_rd_granted: assert property (@(posedge clk) disable iff (!rst_n)
                                 sw_rd |-> (state == IN_REQUEST || state == IN_XFER));

  // Link rule: ack falls on the edge after req is seen low.
  a_ack_follows_req: assert property (@(posedge clk) disable iff (!rst_n)
                                      (link_ack && !link_req) |=> !link_ack);

endmodule
