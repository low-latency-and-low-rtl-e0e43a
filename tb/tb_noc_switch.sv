// tb_noc_switch: test of one 4-port switch (node 0 of the array).
//  * latency: a word into an idle switch leaves 3 cycles after its strobe;
//    two words arriving together for one output leave after 4 and 5 cycles;
//  * random wormhole traffic on all four inputs (never routed back to the
//    input port), senders obeying in_ready, receivers dropping out_ready at
//    random: on every output the words of a packet must be contiguous, the
//    packets of each input must keep their order, every word must carry the
//    next-hop route worked out from grid coordinates, and all words must
//    arrive.
module tb_noc_switch;
  import noc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        in_strobe [4], in_ready [4], out_strobe [4], out_ready [4];
  ctrl_t       in_ctrl [4], out_ctrl [4];
  logic [35:0] in_data [4], out_data [4];
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  noc_switch #(.NODE(2'd0)) dut (.clk, .rst, .in_strobe, .in_ctrl, .in_data, .in_ready,
    .out_strobe, .out_ctrl, .out_data, .out_ready);

  typedef struct { ctrl_t c; logic [35:0] d; } word_t;
  word_t src [4][$];       // words still to send, per input
  word_t exp_q [4][4][$];  // [output][input] words expected, in order
  int    holder [4];       // input whose packet holds output o, -1 if none
  int    total, received;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic route_t expect_next(int dst, int port);
    int dx, dy;
    dx = (dst / 2) % 2; dy = (dst / 4) % 2;
    if (port == 2) return (dx != 1) ? 4'b0100 : (dy != 0) ? 4'b1000 : (dst % 2) ? 4'b0010 : 4'b0001;
    if (port == 3) return (dx != 0) ? 4'b0100 : (dy != 1) ? 4'b1000 : (dst % 2) ? 4'b0010 : 4'b0001;
    return '0;
  endfunction

  function automatic int onehot_idx(route_t r);
    for (int i = 0; i < 4; i++) if (r[i]) return i;
    return -1;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receivers: check every word leaving an output
  always @(negedge clk) if (!rst) begin
    for (int o = 0; o < 4; o++)
      if (out_strobe[o]) begin
        int i;
        i = int'(out_data[o][35:34]);
        received++;
        check(holder[o] < 0 || holder[o] == i, "packet contiguous on output");
        check(exp_q[o][i].size() != 0, "unexpected word");
        if (exp_q[o][i].size() != 0) begin
          word_t w;
          w = exp_q[o][i].pop_front();
          check(out_data[o] == w.d && out_ctrl[o].last == w.c.last && out_ctrl[o].dest == w.c.dest,
                "word order and content");
          check(out_ctrl[o].route == expect_next(int'(w.c.dest), o), "next-hop route");
        end
        holder[o] = out_ctrl[o].last ? -1 : i;
      end
  end

  task automatic send_one(input int p, input int o, input int dst, input logic [35:0] d);
    in_strobe[p] = 1;
    in_ctrl[p] = '{last: 1'b1, dest: dest_t'(dst), rsvd: 2'b0, route: route_t'(1 << o)};
    in_data[p] = d;
    exp_q[o][p].push_back('{in_ctrl[p], d});
    total++;
  endtask

  initial begin
    int t0, seen;
    for (int p = 0; p < 4; p++) begin
      in_strobe[p] = 0; in_ctrl[p] = '0; in_data[p] = '0; out_ready[p] = 1; holder[p] = -1;
    end
    total = 0; received = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk);
    // uncontested latency: input 0 -> output 1
    send_one(0, 1, 1, {2'd0, 34'h1});
    t0 = cycle;
    @(negedge clk) in_strobe[0] = 0;
    while (!out_strobe[1] && cycle < t0 + 10) @(negedge clk);
    check(cycle - t0 == 3, $sformatf("uncontested latency 3 (got %0d)", cycle - t0));
    repeat (3) @(negedge clk);
    // contested: inputs 0 and 3 -> output 2 in the same cycle
    send_one(0, 2, 2, {2'd0, 34'h2});
    send_one(3, 2, 2, {2'd3, 34'h3});
    t0 = cycle;
    @(negedge clk) begin in_strobe[0] = 0; in_strobe[3] = 0; end
    seen = 0;
    while (cycle < t0 + 10) begin
      if (out_strobe[2]) begin
        seen++;
        check(cycle - t0 == 3 + seen, $sformatf("contested latency %0d (got %0d)", 3 + seen, cycle - t0));
      end
      @(negedge clk);
    end
    check(seen == 2, "both contested words delivered");
    // random traffic
    for (int p = 0; p < 4; p++)
      for (int k = 0; k < 80; k++) begin
        int o, len, dst;
        do o = $urandom_range(0, 3); while (o == p);
        len = $urandom_range(1, 6);
        dst = $urandom_range(0, 7);
        for (int j = 0; j < len; j++) begin
          word_t w;
          w.c = '{last: (j == len - 1), dest: dest_t'(dst), rsvd: 2'b0, route: route_t'(1 << o)};
          w.d = {2'(p), 10'(k), 8'(j), 16'($urandom)};
          src[p].push_back(w);
          exp_q[o][p].push_back(w);
          total++;
        end
      end
    for (int cyc = 0; cyc < 20000 && received < total; cyc++) begin
      for (int p = 0; p < 4; p++) begin
        in_strobe[p] = in_ready[p] && src[p].size() != 0 && ($urandom_range(0, 99) < 70);
        if (in_strobe[p]) begin
          word_t w;
          w = src[p].pop_front();
          in_ctrl[p] = w.c; in_data[p] = w.d;
        end
        out_ready[p] = ($urandom_range(0, 99) < 85);
      end
      @(negedge clk);
    end
    for (int p = 0; p < 4; p++) begin in_strobe[p] = 0; out_ready[p] = 1; end
    repeat (10) @(negedge clk);
    check(received == total, $sformatf("all words delivered (%0d of %0d)", received, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
