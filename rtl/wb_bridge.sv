// wb_bridge: network interface that connects a Wishbone bus master to one
// local port of a switch.
//
// Wishbone side (classic single cycles, slave, word addressed, ack one cycle
// after the request is accepted):
//   adr 0  DEST     R/W  destination network port of the words sent next
//   adr 1  TX_DATA  W    send one word, packet continues
//   adr 2  TX_LAST  W    send one word and end the packet
//   adr 3  RX_DATA  R    oldest received word, removed by the read
//                        (reads 0 and removes nothing when none is waiting)
//   adr 4  STATUS   R    bit 0 word received, bit 1 it is the last of its
//                        packet, bit 2 the network accepts a word now
// A write to TX_DATA/TX_LAST is accepted when the switch's ready flag is high
// in this cycle or was high in one of the two cycles before, and waits (ack
// held low) otherwise. The switch's input FIFO still has five free entries
// when ready drops, and writes are at least two cycles apart, so the extra
// word this admits always fits; a master that writes one word right after
// each STATUS read showing bit 2 set never waits.
// (A master that can be held in a write cannot read its own receive
// registers meanwhile; two such masters sending to each other could
// otherwise block each other for good.) The bridge computes the first-hop X-Y route of its own switch
// and sends {last, dest, route} with the word.
//
// Network side: received words land in a 16-entry srl_fifo whose sendok is
// the ready flag towards the switch, so the switch may keep sending for a few
// cycles after ready drops.
//
// A Wishbone bridge at the network edge is part of the design; its register
// map and all timing above are this design's own choice.
module wb_bridge
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = noc_pkg::NOC_DATA_W,
  parameter node_t       NODE   = 2'd0,
  parameter bit          LOCAL  = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  // Wishbone slave
  input  logic              wb_cyc_i,
  input  logic              wb_stb_i,
  input  logic              wb_we_i,
  input  logic [2:0]        wb_adr_i,
  input  logic [DATA_W-1:0] wb_dat_i,
  output logic [DATA_W-1:0] wb_dat_o,
  output logic              wb_ack_o,
  // to the switch's local input
  output logic              tx_strobe,
  output ctrl_t             tx_ctrl,
  output logic [DATA_W-1:0] tx_data,
  input  logic              tx_ready,
  // from the switch's local output
  input  logic              rx_strobe,
  input  ctrl_t             rx_ctrl,
  input  logic [DATA_W-1:0] rx_data,
  output logic              rx_ready
);

  localparam logic [2:0] A_DEST = 3'd0, A_TX = 3'd1, A_TXLAST = 3'd2,
                         A_RX = 3'd3, A_STATUS = 3'd4;
  localparam dest_t MY_ADDR = dest_t'({NODE, LOCAL});

  dest_t             dest_q;
  logic              req, wait_tx, rx_avail, rx_pop;
  logic [1:0]        tx_ready_q;  // tx_ready one and two cycles ago
  ctrl_t             rx_head_ctrl;
  logic [DATA_W-1:0] rx_head_data;

  srl_fifo #(.DATA_W(DATA_W)) u_rx (
    .clk, .rst,
    .control  (rx_ctrl),
    .d        (rx_data),
    .we       (rx_strobe),
    .rd       (rx_pop),
    .sendok   (rx_ready),
    .avail    (rx_avail),
    .control_q(rx_head_ctrl),
    .q        (rx_head_data),
    .sel      ()
  );

  assign req     = wb_cyc_i && wb_stb_i && !wb_ack_o;
  assign wait_tx = wb_we_i && (wb_adr_i == A_TX || wb_adr_i == A_TXLAST) && !tx_ready && tx_ready_q == '0;
  assign rx_pop  = req && !wb_we_i && wb_adr_i == A_RX;

  always_ff @(posedge clk) begin
    if (rst) tx_ready_q <= '0;
    else     tx_ready_q <= {tx_ready_q[0], tx_ready};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dest_q    <= '0;
      wb_ack_o  <= 1'b0;
      wb_dat_o  <= '0;
      tx_strobe <= 1'b0;
      tx_ctrl   <= '0;
      tx_data   <= '0;
    end else begin
      wb_ack_o  <= req && !wait_tx;
      tx_strobe <= 1'b0;
      if (req && !wait_tx) begin
        if (wb_we_i) begin
          unique case (wb_adr_i)
            A_DEST: dest_q <= wb_dat_i[DEST_W-1:0];
            A_TX, A_TXLAST: begin
              tx_strobe     <= 1'b1;
              tx_ctrl.last  <= (wb_adr_i == A_TXLAST);
              tx_ctrl.dest  <= dest_q;
              tx_ctrl.rsvd  <= '0;
              tx_ctrl.route <= xy_route(NODE, dest_q);
              tx_data       <= wb_dat_i;
            end
            default: ;
          endcase
        end else begin
          unique case (wb_adr_i)
            A_DEST:   wb_dat_o <= DATA_W'(dest_q);
            A_RX:     wb_dat_o <= rx_avail ? rx_head_data : '0;
            A_STATUS: wb_dat_o <= DATA_W'({tx_ready, rx_avail && rx_head_ctrl.last, rx_avail});
            default:  wb_dat_o <= '0;
          endcase
        end
      end
    end
  end

  a_no_self_send: assert property (@(posedge clk) disable iff (rst)
    tx_strobe |-> tx_ctrl.dest != MY_ADDR)
    else $error("wb_bridge: packet addressed to its own port");
  a_rx_mine: assert property (@(posedge clk) disable iff (rst)
    rx_strobe |-> rx_ctrl.dest == MY_ADDR)
    else $error("wb_bridge: received a word for another port");

endmodule
