// output_channel: one router output port with its arbiter, FIFO and FSM.
//
// While its FIFO is empty the channel arbitrates, with a round-robin arbiter,
// among the input channels whose packet is headed for this port (arb_req).
// It latches the winner's index as the crossbar select (sel) and raises
// active, which connects the winner's FIFO through the crossbar. It then
// pops the input FIFO and pushes its own FIFO one flit per cycle as long as
// the input FIFO is not empty. When the input FIFO runs empty the packet is
// stored here, the cross-point is released, and the FSM sends the packet to
// the neighbour: it raises link_req, and every cycle with link_req &&
// link_ack moves one flit out. After the last flit it drops link_req and
// waits for link_ack to fall before arbitrating again, so an empty FIFO is
// what starts the next transfer through the crossbar.
//
// States: IDLE (arbitrate) -> XFER (copy through crossbar) -> SEND (handshake
// to neighbour) -> CLOSE (wait for ack low) -> IDLE. The sequence, FIFO size
// and round-robin policy follow the document; the cycle timing is this
// design's choice.
//
// Timing: grant in the cycle a request is seen in IDLE; the copy of an
// L-flit packet takes L+1 cycles in XFER; sending takes one cycle for the
// receiver's acknowledge, then L cycles, then the close.
module output_channel
  import noc_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // requests from the input channels
  input  logic [NUM_PORTS-1:0] arb_req,
  // crossbar control and data
  output logic [PORT_W-1:0]    sel,
  output logic                 active,
  input  flit_t                xb_data,
  input  logic                 xb_empty,
  output logic                 xb_rd,
  // link to the downstream neighbour
  output logic                 link_req,
  input  logic                 link_ack,
  output flit_t                link_data
);

  typedef enum logic [1:0] {OUT_IDLE, OUT_XFER, OUT_SEND, OUT_CLOSE} out_state_e;

  out_state_e state;
  logic [NUM_PORTS-1:0] grant;
  logic [PORT_W-1:0]    grant_idx;
  logic                 grant_valid, arb_accept;
  logic                 fifo_rd, fifo_empty, fifo_full;
  logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_count;

  assign arb_accept = (state == OUT_IDLE);
  assign active     = (state == OUT_XFER);
  assign xb_rd      = active && !xb_empty && !fifo_full;
  assign link_req   = (state == OUT_SEND);
  assign fifo_rd    = link_req && link_ack;

  rr_arbiter #(.N(NUM_PORTS)) u_arb (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (arb_req),
    .accept    (arb_accept),
    .grant     (grant),
    .grant_idx (grant_idx),
    .valid     (grant_valid)
  );

  flit_fifo #(.WIDTH(FLIT_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (xb_rd),
    .wr_data (xb_data),
    .rd_en   (fifo_rd),
    .rd_data (link_data),
    .empty   (fifo_empty),
    .full    (fifo_full),
    .count   (fifo_count)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= OUT_IDLE;
      sel   <= '0;
    end else begin
      unique case (state)
        OUT_IDLE:  if (grant_valid) begin
                     sel   <= grant_idx;
                     state <= OUT_XFER;
                   end
        OUT_XFER:  if (xb_empty) state <= fifo_empty ? OUT_IDLE : OUT_SEND;
        OUT_SEND:  if (fifo_rd && fifo_count == 1) state <= OUT_CLOSE;
        OUT_CLOSE: if (!link_ack) state <= OUT_IDLE;
        default:   state <= OUT_IDLE;
      endcase
    end
  end

  // The granted input really asked for this port; the FIFO is empty when
  // arbitration starts (store and forward, one packet at a time).
  a_grant_req:  assert property (@(posedge clk) disable iff (!rst_n)
                                 (grant_valid && arb_accept) |-> arb_req[grant_idx]);
  a_idle_empty: assert property (@(posedge clk) disable iff (!rst_n)
                                 (state == OUT_IDLE) |-> fifo_empty);
  a_grant_oh:   assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

  // Link rule: a new request starts only once the previous ack has fallen.
  a_req_after_ack: assert property (@(posedge clk) disable iff (!rst_n)
                                    $rose(link_req) |-> !$past(link_ack));

endmodule
