// srl_fifo: 16-entry shift-register FIFO of a switch input port.
//
// Written words enter at stage 0 of a shift register and every stored word
// moves one stage on at each write, exactly like a chain of FPGA SRL16
// primitives. A 4-bit address pointer `addrptr` selects the oldest word, so
// the read side is a 16:1 mux on the shift register. The pointer value 1111
// means empty; otherwise it holds (number of stored words - 1). It counts up
// on a write without a read, down on a read without a write, and stays on a
// simultaneous read and write. Because 1111 is the empty code, at most 15
// words can be held.
//
// avail   : a word is present; control_q/q show the oldest one (combinational).
// sendok  : registered flow-control flag, high while the pointer was empty or
//           below READY_LIMIT (1001) at the last clock edge. It drops while 5
//           entries are still free, which absorbs the words already on their
//           way through the sender's pipeline.
// sel     : the route bits of the oldest word gated by avail (no spurious
//           request from an empty FIFO).
// rd      : pops the oldest word; ignored when avail is low.
//
// The pointer rules, the empty code, avail, sendok and its threshold follow
// the design description; the shift register has no reset, as an SRL has none.
module srl_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DATA_W      = noc_pkg::NOC_DATA_W,
  parameter int unsigned AW          = 4,   // log2 of the shift-register depth
  parameter int unsigned READY_LIMIT = 9    // sendok while addrptr < this
) (
  input  logic              clk,
  input  logic              rst,
  input  ctrl_t             control,
  input  logic [DATA_W-1:0] d,
  input  logic              we,
  input  logic              rd,
  output logic              sendok,
  output logic              avail,
  output ctrl_t             control_q,
  output logic [DATA_W-1:0] q,
  output route_t            sel
);

  localparam int unsigned DEPTH = 2 ** AW;
  localparam int unsigned W     = CTRL_W + DATA_W;

  logic [W-1:0]  srl [DEPTH];
  logic [AW-1:0] addrptr, new_addrptr;
  logic          pop;

  // Shift register: no reset, shifts only on a write.
  always_ff @(posedge clk) begin
    if (we) begin
      srl[0] <= {control, d};
      for (int i = 1; i < DEPTH; i++) srl[i] <= srl[i-1];
    end
  end

  assign avail = (addrptr != '1);
  assign pop   = rd && avail;

  always_comb begin
    new_addrptr = addrptr;
    if (we && !pop)      new_addrptr = addrptr + 1'b1;
    else if (!we && pop) new_addrptr = addrptr - 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addrptr <= '1;
      sendok  <= 1'b1;
    end else begin
      addrptr <= new_addrptr;
      sendok  <= (addrptr == '1) || (addrptr < AW'(READY_LIMIT));
    end
  end

  assign {control_q, q} = srl[addrptr];
  assign sel = avail ? control_q.route : '0;

  // A write into a FIFO holding 15 words would wrap the pointer to "empty".
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
    !(we && !pop && addrptr == AW'(DEPTH - 2)))
    else $error("srl_fifo overflow");

endmodule
