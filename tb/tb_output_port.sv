// tb_output_port: test of one switch output (arbiter, mux, output register),
// instanced as port 2 of a switch, so inputs 0, 1 and 3 may use it.
//  * a lone one-word packet is granted in the cycle it is offered and is on
//    the link the next cycle, with {last, dest, next route} and data intact;
//  * nothing is granted and nothing sent while out_ready is low;
//  * random packets from three inputs with bubbles and random out_ready:
//    every word sent must be the word granted one cycle earlier, words of a
//    packet must leave back to back with no other input in between
//    (wormhole), and every word must leave exactly once.
module tb_output_port;
  import noc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [3:0]  sel, head_last, grant;
  dest_t       head_dest [4];
  route_t      head_next [4];
  logic [35:0] head_data [4];
  logic        out_strobe, out_ready;
  ctrl_t       out_ctrl;
  logic [35:0] out_data;
  int checks = 0, failures = 0;

  output_port #(.SELF(2)) dut (.clk, .rst, .sel, .head_last, .head_dest, .head_next, .head_data,
    .grant, .out_strobe, .out_ctrl, .out_data, .out_ready);

  typedef struct { logic last; dest_t dest; route_t nxt; logic [35:0] data; } word_t;
  word_t q [4][$];
  int    total_words;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_heads(input logic [3:0] offer);
    for (int i = 0; i < 4; i++) begin
      sel[i] = offer[i] && q[i].size() != 0;
      if (q[i].size() != 0) begin
        head_last[i] = q[i][0].last; head_dest[i] = q[i][0].dest;
        head_next[i] = q[i][0].nxt;  head_data[i] = q[i][0].data;
      end else begin
        head_last[i] = 1'b0; head_dest[i] = '0; head_next[i] = '0; head_data[i] = '0;
      end
    end
  endtask

  initial begin
    word_t w, sent;
    bit have_sent;
    int holder, delivered;
    sel = '0; head_last = '0; out_ready = 1;
    for (int i = 0; i < 4; i++) begin head_dest[i] = '0; head_next[i] = '0; head_data[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    // lone word from input 3
    q[3].push_back('{1'b1, 5'd6, 4'b1000, 36'h123456789});
    drive_heads(4'b1000);
    #1 check(grant == 4'b1000, "lone word granted at once");
    @(negedge clk);
    void'(q[3].pop_front()); drive_heads(4'b0000);
    check(out_strobe && out_ctrl.last && out_ctrl.dest == 5'd6 && out_ctrl.route == 4'b1000 &&
          out_data == 36'h123456789, "lone word on the link one cycle later");
    @(negedge clk);
    check(!out_strobe, "single strobe");
    // out_ready low
    q[0].push_back('{1'b1, 5'd1, 4'b0000, 36'h1});
    out_ready = 0; drive_heads(4'b0001);
    repeat (3) begin
      #1 check(grant == '0, "no grant while not ready");
      @(negedge clk);
      check(!out_strobe, "no strobe while not ready");
    end
    out_ready = 1;
    #1 check(grant == 4'b0001, "grant once ready");
    @(negedge clk); void'(q[0].pop_front()); drive_heads('0);
    @(negedge clk);
    // random packets
    total_words = 0;
    foreach (q[i]) if (i != 2)
      for (int p = 0; p < 60; p++) begin
        int len;
        len = $urandom_range(1, 4);
        for (int k = 0; k < len; k++) begin
          w.last = (k == len - 1); w.dest = dest_t'($urandom_range(0, 7));
          w.nxt = route_t'(1 << $urandom_range(0, 3)); w.data = {$urandom, 4'(i)};
          q[i].push_back(w); total_words++;
        end
      end
    have_sent = 0; holder = -1; delivered = 0;
    for (int cyc = 0; cyc < 6000 && delivered < total_words; cyc++) begin
      // check what the previous cycle sent
      check(out_strobe == have_sent, "strobe follows grant");
      if (have_sent)
        check(out_ctrl.last == sent.last && out_ctrl.dest == sent.dest &&
              out_ctrl.route == sent.nxt && out_data == sent.data, "word on link");
      out_ready = ($urandom_range(0, 99) < 80);
      drive_heads(4'($urandom) | 4'b0000);
      #1;
      check($onehot0(grant) && (grant & ~sel) == '0, "grant only to a requester");
      have_sent = 0;
      for (int i = 0; i < 4; i++)
        if (grant[i]) begin
          check(holder < 0 || holder == i, "packet not interleaved");
          sent = q[i].pop_front(); have_sent = 1; delivered++;
          holder = sent.last ? -1 : i;
        end
      @(negedge clk);
    end
    check(delivered == total_words, $sformatf("all %0d words sent (got %0d)", total_words, delivered));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
