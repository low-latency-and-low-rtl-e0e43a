// rr_arbiter: arbiter of one switch output port.
//
// Inputs A..D (index 0..3) raise sel[i] while their head word is routed to
// this output; last[i] marks the final word of the packet; oktosend is the
// ready flag of the link behind the output.
//
// Each input has a registered grant flag, override_q[i], and a done flag.
// override_any is high while any grant flag is held; the output then belongs to
// that input for the rest of its packet (wormhole switching) and is released
// after the word with last set has passed, which also sets the input's done
// flag.
//
// With no grant held:
//  * If exactly one input requests ("only A", "only B", ...), it is served in
//    the same cycle, with no arbitration delay; if its word is not the last,
//    its grant flag is set to hold the output for the rest of the packet.
//  * If several request, the first of A, B, C, D whose done flag is clear gets
//    its grant flag set; it sends from the next cycle on (one cycle of
//    arbitration delay). When every requester already has its done flag set,
//    all done flags are cleared and the choice starts over from A. The done
//    flags thus make the fixed A>B>C>D priority a round robin.
//
// grant[i] is combinational: input i sends a word in this cycle. The rules
// (only-X path, done flags, A>B>C>D order, release on last and oktosend)
// follow the design description; the exact point at which done flags clear
// is this design's reading of it.
module rr_arbiter #(
  parameter int unsigned NIN = 4
) (
  input  logic           clk,
  input  logic           rst,
  input  logic [NIN-1:0] sel,
  input  logic [NIN-1:0] last,
  input  logic           oktosend,
  output logic [NIN-1:0] grant,
  output logic [NIN-1:0] override_q,
  output logic           override_any
);

  logic [NIN-1:0] done_q, ovr_d, done_d, only, elig;
  logic           picked;

  assign override_any = |override_q;

  always_comb begin
    for (int i = 0; i < NIN; i++)
      only[i] = sel[i] && ((sel & ~(NIN'(1) << i)) == '0);
    for (int i = 0; i < NIN; i++)
      grant[i] = sel[i] && oktosend && (override_q[i] || (!override_any && only[i]));
  end

  always_comb begin
    ovr_d  = override_q;
    done_d = done_q;
    elig   = '0;
    picked = 1'b0;
    if (override_any) begin
      for (int i = 0; i < NIN; i++)
        if (grant[i] && last[i]) begin
          ovr_d[i]  = 1'b0;
          done_d[i] = 1'b1;
        end
    end else if (only != '0) begin
      for (int i = 0; i < NIN; i++)
        if (grant[i]) begin
          ovr_d[i] = !last[i];
          if (last[i]) done_d[i] = 1'b1;
        end
    end else if (sel != '0) begin
      elig = sel & ~done_q;
      if (elig == '0) begin
        elig   = sel;
        done_d = '0;
      end
      for (int i = 0; i < NIN; i++)
        if (elig[i] && !picked) begin
          ovr_d[i] = 1'b1;
          picked   = 1'b1;
        end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      override_q <= '0;
      done_q     <= '0;
    end else begin
      override_q <= ovr_d;
      done_q     <= done_d;
    end
  end

  a_one_grant: assert property (@(posedge clk) disable iff (rst) $onehot0(override_q))
    else $error("rr_arbiter: more than one input granted");
  a_one_send: assert property (@(posedge clk) disable iff (rst) $onehot0(grant))
    else $error("rr_arbiter: more than one input sending");

endmodule
