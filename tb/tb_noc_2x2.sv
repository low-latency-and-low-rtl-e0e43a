// tb_noc_2x2: end-to-end test of the 2x2 network at its full size (36-bit
// words, 16-entry FIFOs), driven only through the eight Wishbone ports.
//
// First, single words measure the latency from a bridge's link into the
// network to the link out of it: 3 cycles per switch passed (1, 2 and 3
// switches). Then every port runs a Wishbone master that sends 40 packets of
// 1..8 words to random other ports while polling STATUS and reading what it
// receives; each master goes deaf for a third of the time so that receive
// FIFOs fill and ready flags throttle the network. Each word carries
// {source, sequence number, index, length}; the receiver checks that packets
// arrive whole, in order per source, with the last flag on the last word,
// and that every packet arrives.
//
// Counted mechanisms, each of which must occur at least once: a word sent
// without arbitration delay (only one requester), an arbitration between
// several requesters, a new round-robin round (done flags cleared), a
// requester held off by a packet that owns the output (wormhole), a switch
// input signalling not-ready, and words forwarded over mesh links with a
// looked-up next route. (Masters write only after STATUS shows the network
// ready, so Wishbone writes are expected never to wait; the count is
// printed.)
module tb_noc_2x2;
  import noc_pkg::*;

  localparam int NP = NNETPORTS;
  localparam int NPKT = 40;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic        wb_cyc_i [NP], wb_stb_i [NP], wb_we_i [NP], wb_ack_o [NP];
  logic [2:0]  wb_adr_i [NP];
  logic [35:0] wb_dat_i [NP], wb_dat_o [NP];

  noc_2x2 dut (.clk, .rst, .wb_cyc_i, .wb_stb_i, .wb_we_i, .wb_adr_i, .wb_dat_i, .wb_dat_o, .wb_ack_o);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- mechanisms
  int n_fast = 0, n_arb = 0, n_round = 0, n_hold = 0, n_notready = 0, n_wbwait = 0, n_meshhop = 0;
  for (genvar n = 0; n < NNODES; n++) begin : g_mon
    for (genvar o = 0; o < NPORTS; o++) begin : g_o
      always @(posedge clk) if (!rst) begin
        automatic logic [3:0] s = dut.g_node[n].u_sw.g_out[o].u_out.u_arb.sel;
        automatic logic [3:0] ov = dut.g_node[n].u_sw.g_out[o].u_out.u_arb.override_q;
        automatic logic [3:0] dn = dut.g_node[n].u_sw.g_out[o].u_out.u_arb.done_q;
        automatic logic [3:0] g = dut.g_node[n].u_sw.g_out[o].u_out.grant;
        if (g != 0 && ov == 0) n_fast++;
        if (ov == 0 && !$onehot0(s)) n_arb++;
        if (ov == 0 && !$onehot0(s) && (s & ~dn) == 0) n_round++;
        if (ov != 0 && (s & ~ov) != 0) n_hold++;
        if (!dut.sw_in_ready[n][o]) n_notready++;
        if (o >= P_HORIZ && dut.sw_out_strobe[n][o]) begin
          n_meshhop++;
          check(dut.sw_out_ctrl[n][o].route == xy_route(node_t'(n ^ (o == P_HORIZ ? 1 : 2)),
                                                        dut.sw_out_ctrl[n][o].dest), "next route on mesh link");
        end
      end
    end
  end

  // ---------------------------------------------------------------- Wishbone
  task automatic wb(input int p, input bit w, input logic [2:0] a, input logic [35:0] wd,
                    output logic [35:0] rd);
    int t0;
    t0 = cycle;
    wb_cyc_i[p] <= 1; wb_stb_i[p] <= 1; wb_we_i[p] <= w; wb_adr_i[p] <= a; wb_dat_i[p] <= wd;
    do @(posedge clk); while (!wb_ack_o[p]);
    rd = wb_dat_o[p];
    if (w && cycle - t0 > 2) n_wbwait++;
    wb_cyc_i[p] <= 0; wb_stb_i[p] <= 0; wb_we_i[p] <= 0;
  endtask

  // ---------------------------------------------------------------- traffic
  int exp_seq  [NP][NP];   // next sequence number expected at [dst] from [src]
  int sent_seq [NP][NP];
  int cur_src  [NP];       // source of the packet being received, -1 if none
  int cur_idx  [NP];
  int cur_seq  [NP];
  int pkts_sent = 0, pkts_recv = 0, words_recv = 0;
  bit all_sent [NP];

  function automatic logic [35:0] make_word(int src, int seq, int idx, int len);
    return {3'(src), 8'(seq), 8'(idx), 4'(len), 13'($urandom)};
  endfunction

  task automatic receive(input int p, input logic [35:0] st);
    logic [35:0] w;
    int src, seq, idx, len;
    wb(p, 0, 3'd3, '0, w);
    src = int'(w[35:33]); seq = int'(w[32:25]); idx = int'(w[24:17]); len = int'(w[16:13]);
    words_recv++;
    if (cur_src[p] < 0) begin
      check(idx == 0, "packet starts with word 0");
      check(seq == (exp_seq[p][src] & 8'hff), "packets of a source arrive in order");
      cur_src[p] = src; cur_seq[p] = seq; cur_idx[p] = 0;
    end else begin
      check(src == cur_src[p] && seq == cur_seq[p] && idx == cur_idx[p] + 1,
            "packet arrives whole");
      cur_idx[p] = idx;
    end
    check(st[1] == (idx == len - 1), "last flag on the last word");
    if (idx == len - 1) begin
      exp_seq[p][cur_src[p]]++;
      cur_src[p] = -1;
      pkts_recv++;
    end
  endtask

  task automatic master(input int p);
    logic [35:0] st, dummy;
    int pk, dst, len, idx;
    pk = 0; idx = 0; len = 0; dst = 0;
    while (!(pk == NPKT && pkts_recv == pkts_sent && all_sent.and())) begin
      bit deaf;
      deaf = ((cycle + p * 97) % 900) < 300;
      wb(p, 0, 3'd4, '0, st);
      if (st[0] && !deaf) receive(p, st);
      else if (pk < NPKT && idx == 0 && len == 0) begin
        // choose the next packet and set DEST; its words follow after
        // fresh STATUS reads
        do dst = $urandom_range(0, NP - 1); while (dst == p);
        len = $urandom_range(1, 8);
        wb(p, 1, 3'd0, 36'(dst), dummy);
      end else if (pk < NPKT && st[2]) begin
        wb(p, 1, (idx == len - 1) ? 3'd2 : 3'd1, make_word(p, sent_seq[dst][p], idx, len), dummy);
        idx++;
        if (idx == len) begin
          idx = 0; len = 0; pk++;
          sent_seq[dst][p]++;
          pkts_sent++;
          if (pk == NPKT) all_sent[p] = 1;
        end
      end else
        repeat ($urandom_range(0, 3)) @(posedge clk);
    end
  endtask

  // ---------------------------------------------------------------- latency
  task automatic latency(input int src, input int dst, input int expect_cycles);
    logic [35:0] dummy;
    int t_in, t_out, sn, sl, dn, dl;
    sn = src / 2; sl = src % 2; dn = dst / 2; dl = dst % 2;
    wb(src, 1, 3'd0, 36'(dst), dummy);
    fork
      wb(src, 1, 3'd2, make_word(src, sent_seq[dst][src], 0, 1), dummy);
      begin
        @(negedge clk);
        while (!dut.sw_in_strobe[sn][sl]) @(negedge clk);
        t_in = cycle;
        while (!dut.sw_out_strobe[dn][dl]) @(negedge clk);
        t_out = cycle;
      end
    join
    sent_seq[dst][src]++;
    pkts_sent++;
    check(t_out - t_in == expect_cycles,
          $sformatf("latency port %0d -> %0d: %0d cycles, expected %0d", src, dst, t_out - t_in, expect_cycles));
    repeat (4) @(posedge clk);
    wb(dst, 0, 3'd4, '0, dummy);
    receive(dst, dummy);
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired: %0d of %0d packets received", pkts_recv, pkts_sent);
    for (int p = 0; p < NP; p++) $display("DBG p%0d cyc=%0d we=%0d adr=%0d txrdy=%0d rxrdy=%0d", p, wb_cyc_i[p], wb_we_i[p], wb_adr_i[p], dut.sw_in_ready[p/2][p%2], dut.sw_out_ready[p/2][p%2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < NP; p++) begin
      wb_cyc_i[p] = 0; wb_stb_i[p] = 0; wb_we_i[p] = 0; wb_adr_i[p] = 0; wb_dat_i[p] = 0;
      cur_src[p] = -1; all_sent[p] = 0;
      for (int q = 0; q < NP; q++) begin exp_seq[p][q] = 0; sent_seq[p][q] = 0; end
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (2) @(posedge clk);
    latency(0, 1, 3);   // one switch
    latency(0, 2, 6);   // two switches, x hop
    latency(0, 7, 9);   // three switches, x then y
    latency(6, 1, 9);
    for (int p = 0; p < NP; p++)
      fork
        automatic int pp = p;
        master(pp);
      join_none
    wait fork;
    repeat (5) @(posedge clk);
    check(pkts_recv == pkts_sent && pkts_sent == NP * NPKT + 4,
          $sformatf("all packets delivered (%0d sent, %0d received)", pkts_sent, pkts_recv));
    $display("mechanisms: fast=%0d arbitration=%0d new_round=%0d wormhole_hold=%0d not_ready=%0d wb_wait=%0d mesh_words=%0d",
             n_fast, n_arb, n_round, n_hold, n_notready, n_wbwait, n_meshhop);
    $display("words received %0d in %0d cycles", words_recv, cycle);
    check(n_fast > 0, "immediate grant happened");
    check(n_arb > 0, "arbitration happened");
    check(n_round > 0, "new round-robin round happened");
    check(n_hold > 0, "wormhole hold happened");
    check(n_notready > 0, "input not-ready happened");
    check(n_meshhop > 0, "mesh hop happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
