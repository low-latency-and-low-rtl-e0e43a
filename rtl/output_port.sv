// output_port: one output of the packet switch.
//
// The arbiter (rr_arbiter) decides which input may send; a one-hot AND-OR mux
// picks that input's head word and an output register drives the link. The
// outgoing control word combines the head's destination address, its next-hop
// route (the route the receiving switch must use) and the last flag. A word
// is taken from an input only while the downstream ready flag (oktosend) is
// high, so the output register never has to hold a word back: out_strobe is
// high for one cycle per word sent.
//
// The port never serves the input of the same index (SELF): a packet is never
// sent back to where it came from, so each output of a 4-port switch chooses
// from three inputs, as in the design description. Timing: a word granted in
// cycle t is on the link in cycle t+1.
module output_port
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W = noc_pkg::NOC_DATA_W,
  parameter int unsigned SELF   = 0
) (
  input  logic              clk,
  input  logic              rst,
  // head words of all inputs
  input  logic [NPORTS-1:0] sel,          // input i requests this output
  input  logic [NPORTS-1:0] head_last,
  input  dest_t             head_dest [NPORTS],
  input  route_t            head_next [NPORTS],
  input  logic [DATA_W-1:0] head_data [NPORTS],
  output logic [NPORTS-1:0] grant,        // input i sends now
  // link to the downstream receiver
  output logic              out_strobe,
  output ctrl_t             out_ctrl,
  output logic [DATA_W-1:0] out_data,
  input  logic              out_ready
);

  logic [NPORTS-1:0] sel_m;
  logic [NPORTS-1:0] override_q;
  logic              override_any;
  ctrl_t             mux_ctrl;
  logic [DATA_W-1:0] mux_data;

  assign sel_m = sel & ~(NPORTS'(1) << SELF);

  rr_arbiter #(.NIN(NPORTS)) u_arb (
    .clk, .rst,
    .sel       (sel_m),
    .last      (head_last),
    .oktosend  (out_ready),
    .grant     (grant),
    .override_q(override_q),
    .override_any  (override_any)
  );

  always_comb begin
    mux_ctrl = '0;
    mux_data = '0;
    for (int i = 0; i < NPORTS; i++)
      if (grant[i]) begin
        mux_ctrl.last  = mux_ctrl.last | head_last[i];
        mux_ctrl.dest  = mux_ctrl.dest | head_dest[i];
        mux_ctrl.route = mux_ctrl.route | head_next[i];
        mux_data       = mux_data | head_data[i];
      end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_strobe <= 1'b0;
      out_ctrl   <= '0;
      out_data   <= '0;
    end else begin
      out_strobe <= |grant;
      if (|grant) begin
        out_ctrl <= mux_ctrl;
        out_data <= mux_data;
      end
    end
  end

  a_no_uturn: assert property (@(posedge clk) disable iff (rst) !sel[SELF])
    else $error("output_port %0d: packet routed back to its own input", SELF);

endmodule
