// tb_wb_bridge: two Wishbone bridges of switch 0 (local ports 0 and 1) wired
// back to back, the link of one straight into the other. Through the
// Wishbone registers the test
//  * sets and reads back DEST, sends a 3-word packet from port 0 to port 1
//    and checks the words, the last flag and the first-hop route (local 1);
//  * sends 24 words while the receiver only starts reading after 60 cycles:
//    its ready flag must drop, a write must then wait (ack held back), and
//    all words must still arrive in order;
//  * reads RX_DATA with nothing received, which must give 0.
module tb_wb_bridge;
  import noc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        cyc [2], stb [2], we [2], ack [2];
  logic [2:0]  adr [2];
  logic [35:0] dat_i [2], dat_o [2];
  logic        strobe [2], ready [2];
  ctrl_t       ctrl [2];
  logic [35:0] data [2];
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // bridge k sends on link k; link k enters bridge 1-k
  for (genvar k = 0; k < 2; k++) begin : g_ni
    wb_bridge #(.NODE(2'd0), .LOCAL(k[0])) u_ni (
      .clk, .rst,
      .wb_cyc_i(cyc[k]), .wb_stb_i(stb[k]), .wb_we_i(we[k]), .wb_adr_i(adr[k]),
      .wb_dat_i(dat_i[k]), .wb_dat_o(dat_o[k]), .wb_ack_o(ack[k]),
      .tx_strobe(strobe[k]), .tx_ctrl(ctrl[k]), .tx_data(data[k]), .tx_ready(ready[1-k]),
      .rx_strobe(strobe[1-k]), .rx_ctrl(ctrl[1-k]), .rx_data(data[1-k]), .rx_ready(ready[k])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic wb(input int k, input bit w, input logic [2:0] a, input logic [35:0] wd,
                    output logic [35:0] rd, output int waited);
    int t0;
    t0 = cycle;
    cyc[k] <= 1; stb[k] <= 1; we[k] <= w; adr[k] <= a; dat_i[k] <= wd;
    do @(posedge clk); while (!ack[k]);
    rd = dat_o[k];
    waited = cycle - t0;
    cyc[k] <= 0; stb[k] <= 0; we[k] <= 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // route of every word leaving bridge 0 (to port 1 on the same switch)
  always @(negedge clk) if (!rst && strobe[0])
    check(ctrl[0].route == 4'b0010 && ctrl[0].dest == 5'd1, "first-hop route and dest");

  initial begin
    logic [35:0] r;
    int wt, max_wait;
    for (int k = 0; k < 2; k++) begin cyc[k] = 0; stb[k] = 0; we[k] = 0; adr[k] = 0; dat_i[k] = 0; end
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    wb(0, 1, 3'd0, 36'd1, r, wt);
    wb(0, 0, 3'd0, 36'd0, r, wt);
    check(r == 36'd1, "DEST read back");
    wb(1, 0, 3'd3, 36'd0, r, wt);
    check(r == 36'd0, "empty RX reads 0");
    wb(0, 1, 3'd1, 36'hA00000001, r, wt);
    wb(0, 1, 3'd1, 36'hA00000002, r, wt);
    wb(0, 1, 3'd2, 36'hA00000003, r, wt);
    repeat (6) @(posedge clk);
    for (int i = 1; i <= 3; i++) begin
      wb(1, 0, 3'd4, 36'd0, r, wt);
      check(r[0] == 1'b1 && r[1] == (i == 3), $sformatf("STATUS before word %0d", i));
      wb(1, 0, 3'd3, 36'd0, r, wt);
      check(r == 36'hA00000000 + i, $sformatf("received word %0d", i));
    end
    wb(1, 0, 3'd4, 36'd0, r, wt);
    check(r[0] == 1'b0, "RX empty again");
    // back-pressure: 24 words; the receiver starts reading only after 60 cycles
    max_wait = 0;
    fork
      begin
        repeat (60) @(posedge clk);
        for (int j = 0; j < 24; j++) begin
          logic [35:0] rr;
          int ww;
          do wb(1, 0, 3'd4, 36'd0, rr, ww); while (!rr[0]);
          wb(1, 0, 3'd3, 36'd0, rr, ww);
          check(rr == 36'hB00000000 + j, $sformatf("stalled word %0d", j));
        end
      end
    join_none
    for (int i = 0; i < 24; i++) begin
      wb(0, 1, (i == 23) ? 3'd2 : 3'd1, 36'hB00000000 + i, r, wt);
      if (wt > max_wait) max_wait = wt;
    end
    check(max_wait > 20, $sformatf("a write waited for ready (longest %0d cycles)", max_wait));
    wait fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
