// noc_2x2: four 4-port switches in a 2x2 array, with a Wishbone bridge on
// each of the eight local ports.
//
// Node n sits at x = n[0], y = n[1]. Port 2 of every switch links it with its
// horizontal neighbour (n^1), port 3 with its vertical neighbour (n^2); ports
// 0 and 1 carry network ports 2n and 2n+1, each behind a wb_bridge. Packets
// are routed X first, then Y; each switch looks up the route the next switch
// must take while forwarding a word, so no switch decodes the destination
// address in its critical path.
//
// Ports: one Wishbone slave per network port p = 0..7, as arrays indexed by p.
// All logic runs on clk; rst is synchronous and active high.
//
// The array, the four-port nodes and the Wishbone access come from the
// design description; the port numbering is this design's choice.
module noc_2x2
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = noc_pkg::NOC_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              wb_cyc_i [NNETPORTS],
  input  logic              wb_stb_i [NNETPORTS],
  input  logic              wb_we_i  [NNETPORTS],
  input  logic [2:0]        wb_adr_i [NNETPORTS],
  input  logic [DATA_W-1:0] wb_dat_i [NNETPORTS],
  output logic [DATA_W-1:0] wb_dat_o [NNETPORTS],
  output logic              wb_ack_o [NNETPORTS]
);

  // Link arrays indexed [node][port]: sw_in_* enter switch `node` at `port`,
  // sw_out_* leave it there.
  logic              sw_in_strobe [NNODES][NPORTS];
  ctrl_t             sw_in_ctrl   [NNODES][NPORTS];
  logic [DATA_W-1:0] sw_in_data   [NNODES][NPORTS];
  logic              sw_in_ready  [NNODES][NPORTS];
  logic              sw_out_strobe[NNODES][NPORTS];
  ctrl_t             sw_out_ctrl  [NNODES][NPORTS];
  logic [DATA_W-1:0] sw_out_data  [NNODES][NPORTS];
  logic              sw_out_ready [NNODES][NPORTS];

  for (genvar n = 0; n < NNODES; n++) begin : g_node
    noc_switch #(.DATA_W(DATA_W), .NODE(node_t'(n))) u_sw (
      .clk, .rst,
      .in_strobe (sw_in_strobe[n]),
      .in_ctrl   (sw_in_ctrl[n]),
      .in_data   (sw_in_data[n]),
      .in_ready  (sw_in_ready[n]),
      .out_strobe(sw_out_strobe[n]),
      .out_ctrl  (sw_out_ctrl[n]),
      .out_data  (sw_out_data[n]),
      .out_ready (sw_out_ready[n])
    );

    // mesh links: port 2 to node n^1, port 3 to node n^2
    for (genvar m = P_HORIZ; m <= P_VERT; m++) begin : g_mesh
      localparam int unsigned NB = n ^ (m == P_HORIZ ? 1 : 2);
      assign sw_in_strobe[n][m] = sw_out_strobe[NB][m];
      assign sw_in_ctrl[n][m]   = sw_out_ctrl[NB][m];
      assign sw_in_data[n][m]   = sw_out_data[NB][m];
      assign sw_out_ready[n][m] = sw_in_ready[NB][m];
    end

    for (genvar l = 0; l < NLOCAL; l++) begin : g_local
      localparam int unsigned P = n * NLOCAL + l;
      wb_bridge #(.DATA_W(DATA_W), .NODE(node_t'(n)), .LOCAL(l[0])) u_ni (
        .clk, .rst,
        .wb_cyc_i (wb_cyc_i[P]),
        .wb_stb_i (wb_stb_i[P]),
        .wb_we_i  (wb_we_i[P]),
        .wb_adr_i (wb_adr_i[P]),
        .wb_dat_i (wb_dat_i[P]),
        .wb_dat_o (wb_dat_o[P]),
        .wb_ack_o (wb_ack_o[P]),
        .tx_strobe(sw_in_strobe[n][l]),
        .tx_ctrl  (sw_in_ctrl[n][l]),
        .tx_data  (sw_in_data[n][l]),
        .tx_ready (sw_in_ready[n][l]),
        .rx_strobe(sw_out_strobe[n][l]),
        .rx_ctrl  (sw_out_ctrl[n][l]),
        .rx_data  (sw_out_data[n][l]),
        .rx_ready (sw_out_ready[n][l])
      );
    end
  end

endmodule
