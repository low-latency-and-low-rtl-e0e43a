// noc_switch: 4-port wormhole packet switch (one node of the network).
//
// Four input ports, four output ports and the crossbar between them, which is
// nothing more than the AND-OR mux inside each output port. An input port
// raises the request bit of the output its head word is routed to; the output
// port's arbiter grants one input, which is popped in the same cycle.
//
// Latency, counted from the cycle a word is strobed into an input until the
// cycle it is strobed on the output link: 3 cycles when the input FIFO was
// empty and no other input wants the same output, 4 cycles when the word's
// packet first has to win arbitration. Throughput is one word per cycle per
// output. Words of a packet follow each other through the output the packet
// holds (wormhole switching); other packets for that output wait in their
// input FIFOs.
//
// Link signals per port, in each direction: strobe, 12-bit control word
// (last, destination, one-hot route) and data; ready travels back. NODE is the
// switch's position in the 2x2 array and selects the next-hop route table.
//
// The four parts (input ports, output ports, crossbar, distributed arbiters),
// the wormhole switching and the 3- and 4-cycle latencies follow the design
// description; the port numbering is this design's choice.
module noc_switch
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = noc_pkg::NOC_DATA_W,
  parameter node_t       NODE   = 2'd0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_strobe [NPORTS],
  input  ctrl_t             in_ctrl   [NPORTS],
  input  logic [DATA_W-1:0] in_data   [NPORTS],
  output logic              in_ready  [NPORTS],
  output logic              out_strobe[NPORTS],
  output ctrl_t             out_ctrl  [NPORTS],
  output logic [DATA_W-1:0] out_data  [NPORTS],
  input  logic              out_ready [NPORTS]
);

  route_t            req       [NPORTS];
  logic [NPORTS-1:0] head_last;
  dest_t             head_dest [NPORTS];
  route_t            head_next [NPORTS];
  logic [DATA_W-1:0] head_data [NPORTS];
  logic [NPORTS-1:0] pop;
  // grant[o][i]: output o takes the head word of input i this cycle
  logic [NPORTS-1:0] grant     [NPORTS];
  // req_t[o][i]: input i requests output o
  logic [NPORTS-1:0] req_t     [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    input_port #(.DATA_W(DATA_W), .NODE(NODE)) u_in (
      .clk, .rst,
      .in_strobe(in_strobe[p]),
      .in_ctrl  (in_ctrl[p]),
      .in_data  (in_data[p]),
      .in_ready (in_ready[p]),
      .req      (req[p]),
      .head_last(head_last[p]),
      .head_dest(head_dest[p]),
      .head_next(head_next[p]),
      .head_data(head_data[p]),
      .pop      (pop[p])
    );
  end

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req_t[o][i] = req[i][o];
    pop = '0;
    for (int o = 0; o < NPORTS; o++)
      pop = pop | grant[o];
  end

  for (genvar p = 0; p < NPORTS; p++) begin : g_out
    output_port #(.DATA_W(DATA_W), .SELF(p)) u_out (
      .clk, .rst,
      .sel       (req_t[p]),
      .head_last (head_last),
      .head_dest (head_dest),
      .head_next (head_next),
      .head_data (head_data),
      .grant     (grant[p]),
      .out_strobe(out_strobe[p]),
      .out_ctrl  (out_ctrl[p]),
      .out_data  (out_data[p]),
      .out_ready (out_ready[p])
    );
  end

endmodule
