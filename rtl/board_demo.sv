// board_demo: board-level test of the network with 8-bit words, for a board
// with DIP switches, an LED and a 33 MHz clock.
//
// The 2x2 network (noc_2x2, DATA_W = 8) is driven by two small Wishbone
// masters. The source master at network port 4 sets DEST = 0 once and then,
// while DIP switch 8 is on, sends a one-word packet holding PATTERN every
// PERIOD cycles (after checking STATUS that the network is ready). The sink
// master at network port 0 polls STATUS and reads every word that arrives;
// a word equal to PATTERN lights the LED and restarts a HOLD-cycle timer, and
// the LED goes dark once no such word has arrived for HOLD cycles. With the
// switch off nothing is sent and the LED stays dark. DIP switch 1 is an
// active-high reset; the LED is lit while reset is held. The other six
// network ports stay idle. Port 4 is on node 2, port 0 on node 0, so each
// word crosses two switches over a vertical link.
//
// Inputs are synchronised with two flip-flops. Test set-up (8-bit network,
// switch 1 as reset, switch 8 as transmit input, LED at the destination, lit
// in reset, 33 MHz clock) follows the design description; the word pattern,
// the rate and the LED hold time are this design's choices.
module board_demo
  import noc_pkg::*;
#(
  parameter int unsigned       DATA_W  = 8,
  parameter logic [DATA_W-1:0] PATTERN = DATA_W'('hA5),
  parameter int unsigned       PERIOD  = 64,    // cycles between words sent
  parameter int unsigned       HOLD    = 256    // LED stays lit this long
) (
  input  logic clk_33mhz_fpga,
  input  logic gpio_dip_sw1,     // reset, active high
  input  logic gpio_dip_sw8,     // transmit enable
  output logic led_error1        // lit: words arriving at port 0 (or reset)
);

  localparam int unsigned SRC = 4, DST = 0;
  localparam logic [2:0]  A_DEST = 3'd0, A_TXLAST = 3'd2, A_RX = 3'd3, A_STATUS = 3'd4;

  logic clk;
  assign clk = clk_33mhz_fpga;

  // The reset synchroniser powers up in reset (FPGA configuration value).
  logic [1:0] rst_sync = 2'b11;
  logic [1:0] sw8_sync;
  logic       rst, send_en;
  always_ff @(posedge clk) begin
    rst_sync <= {rst_sync[0], gpio_dip_sw1};
    sw8_sync <= {sw8_sync[0], gpio_dip_sw8};
  end
  assign rst     = rst_sync[1];
  assign send_en = sw8_sync[1];

  logic              wb_cyc [NNETPORTS], wb_stb [NNETPORTS], wb_we [NNETPORTS], wb_ack [NNETPORTS];
  logic [2:0]        wb_adr [NNETPORTS];
  logic [DATA_W-1:0] wb_wdat [NNETPORTS], wb_rdat [NNETPORTS];

  noc_2x2 #(.DATA_W(DATA_W)) u_noc (
    .clk, .rst,
    .wb_cyc_i(wb_cyc), .wb_stb_i(wb_stb), .wb_we_i(wb_we), .wb_adr_i(wb_adr),
    .wb_dat_i(wb_wdat), .wb_dat_o(wb_rdat), .wb_ack_o(wb_ack)
  );

  // ------------------------------------------------------------ source master
  typedef enum logic [1:0] {S_DEST, S_STATUS, S_SEND} src_state_t;
  src_state_t                  s_state;
  logic                        s_cyc, s_we;
  logic [2:0]                  s_adr;
  logic [DATA_W-1:0]           s_wdat;
  logic [$clog2(PERIOD+1)-1:0] gap;

  always_ff @(posedge clk) begin
    if (rst) begin
      s_state <= S_DEST;
      s_cyc   <= 1'b0;
      s_we    <= 1'b0;
      s_adr   <= A_DEST;
      s_wdat  <= '0;
      gap     <= '0;
    end else begin
      if (gap != 0) gap <= gap - 1'b1;
      if (!s_cyc) begin
        // start the next access of the current state
        unique case (s_state)
          S_DEST:   begin s_cyc <= 1'b1; s_we <= 1'b1; s_adr <= A_DEST;   s_wdat <= DATA_W'(DST); end
          S_STATUS: if (send_en && gap == 0) begin
                      s_cyc <= 1'b1; s_we <= 1'b0; s_adr <= A_STATUS;
                    end
          S_SEND:   begin s_cyc <= 1'b1; s_we <= 1'b1; s_adr <= A_TXLAST; s_wdat <= PATTERN; end
          default:  s_state <= S_DEST;
        endcase
      end else if (wb_ack[SRC]) begin
        s_cyc <= 1'b0;
        unique case (s_state)
          S_DEST:   s_state <= S_STATUS;
          S_STATUS: s_state <= wb_rdat[SRC][2] ? S_SEND : S_STATUS;
          S_SEND:   begin s_state <= S_STATUS; gap <= ($bits(gap))'(PERIOD); end
          default:  s_state <= S_DEST;
        endcase
      end
    end
  end

  // -------------------------------------------------------------- sink master
  typedef enum logic {K_STATUS, K_READ} snk_state_t;
  snk_state_t                k_state;
  logic                      k_cyc, led_q;
  logic [$clog2(HOLD+1)-1:0] hold;

  always_ff @(posedge clk) begin
    if (rst) begin
      k_state <= K_STATUS;
      k_cyc   <= 1'b0;
      led_q   <= 1'b0;
      hold    <= '0;
    end else begin
      if (hold != 0) hold <= hold - 1'b1;
      else           led_q <= 1'b0;
      if (!k_cyc) k_cyc <= 1'b1;
      else if (wb_ack[DST]) begin
        k_cyc <= 1'b0;
        if (k_state == K_STATUS) begin
          if (wb_rdat[DST][0]) k_state <= K_READ;
        end else begin
          k_state <= K_STATUS;
          if (wb_rdat[DST] == PATTERN) begin
            led_q <= 1'b1;
            hold  <= ($bits(hold))'(HOLD);
          end
        end
      end
    end
  end

  assign led_error1 = rst || led_q;

  // ------------------------------------------------------------ bus wiring
  always_comb begin
    for (int p = 0; p < NNETPORTS; p++) begin
      wb_cyc[p] = 1'b0; wb_stb[p] = 1'b0; wb_we[p] = 1'b0; wb_adr[p] = '0; wb_wdat[p] = '0;
    end
    wb_cyc[SRC] = s_cyc; wb_stb[SRC] = s_cyc; wb_we[SRC] = s_we; wb_adr[SRC] = s_adr; wb_wdat[SRC] = s_wdat;
    wb_cyc[DST] = k_cyc; wb_stb[DST] = k_cyc; wb_we[DST] = 1'b0;
    wb_adr[DST] = (k_state == K_READ) ? A_RX : A_STATUS;
  end

endmodule
