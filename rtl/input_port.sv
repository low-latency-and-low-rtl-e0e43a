// input_port: one input of the packet switch.
//
// Incoming words are written into a 16-entry shift-register FIFO (srl_fifo).
// Because the FIFO's read mux is slow, its oldest word is copied into a head
// register before it is offered to the output ports; the next-hop route
// look-up is done on the way from the FIFO to that register. An input word
// therefore shows up at the head two cycles after it was strobed in when the
// FIFO was empty: one cycle to enter the FIFO, one in the head register.
//
// req ("check empty") carries the route bits of the head word and is all zero
// while the head register is empty, so no output arbiter sees a spurious
// request. pop is driven by the output port that takes the head word; the
// FIFO then refills the head in the same cycle if it holds a word, giving one
// word per cycle. in_ready is the FIFO's sendok, which already leaves room
// for the words still in flight after it drops.
//
// Structure and latency follow the design description; placing the
// look-up result in the head register is this design's reading of it.
module input_port
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = noc_pkg::NOC_DATA_W,
  parameter node_t       NODE   = 2'd0
) (
  input  logic              clk,
  input  logic              rst,
  // link from the upstream sender
  input  logic              in_strobe,
  input  ctrl_t             in_ctrl,
  input  logic [DATA_W-1:0] in_data,
  output logic              in_ready,
  // head word offered to the output ports
  output route_t            req,
  output logic              head_last,
  output dest_t             head_dest,
  output route_t            head_next,
  output logic [DATA_W-1:0] head_data,
  input  logic              pop
);

  ctrl_t             fifo_ctrl;
  logic [DATA_W-1:0] fifo_data;
  logic              fifo_avail, fifo_rd;
  route_t            fifo_sel, fifo_next;

  logic   hvalid;
  route_t hroute;

  srl_fifo #(.DATA_W(DATA_W)) u_fifo (
    .clk, .rst,
    .control  (in_ctrl),
    .d        (in_data),
    .we       (in_strobe),
    .rd       (fifo_rd),
    .sendok   (in_ready),
    .avail    (fifo_avail),
    .control_q(fifo_ctrl),
    .q        (fifo_data),
    .sel      (fifo_sel)
  );

  route_lookup #(.NODE(NODE)) u_lookup (
    .dest      (fifo_ctrl.dest),
    .route     (fifo_sel),
    .next_route(fifo_next)
  );

  assign fifo_rd = fifo_avail && (!hvalid || pop);

  always_ff @(posedge clk) begin
    if (rst) begin
      hvalid    <= 1'b0;
      hroute    <= '0;
      head_last <= 1'b0;
      head_dest <= '0;
      head_next <= '0;
      head_data <= '0;
    end else if (fifo_rd) begin
      hvalid    <= 1'b1;
      hroute    <= fifo_ctrl.route;
      head_last <= fifo_ctrl.last;
      head_dest <= fifo_ctrl.dest;
      head_next <= fifo_next;
      head_data <= fifo_data;
    end else if (pop) begin
      hvalid    <= 1'b0;
    end
  end

  assign req = hvalid ? hroute : '0;

  a_pop_valid: assert property (@(posedge clk) disable iff (rst) pop |-> hvalid)
    else $error("input_port popped while empty");
  a_one_select: assert property (@(posedge clk) disable iff (rst) hvalid |-> $onehot(hroute))
    else $error("input_port: no select signal active");

endmodule
