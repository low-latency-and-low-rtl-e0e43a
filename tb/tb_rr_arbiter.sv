// tb_rr_arbiter: directed scenarios for the output-port arbiter. Each input
// has a list of packets (start cycle, length); sel and last follow from the
// list and a granted word is consumed. The cycle and input of every grant is
// recorded and compared with the sequence worked out by hand:
//   S1 a lone 3-word packet is sent at once and holds the port,
//   S2 two inputs colliding lose one cycle to arbitration, the loser then goes
//      without delay as the only requester,
//   S3 two inputs with two packets each alternate (round robin via done
//      flags); the last one left goes without arbitration delay,
//   S4 a packet holding the port blocks a newcomer until its last word,
//   S5 nothing is granted while oktosend is low,
//   S6 four inputs requesting at once are served A, B, C, D, then A alone,
//   S7 two inputs with three packets each strictly alternate A, B, A, B, A, B.
module tb_rr_arbiter;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [3:0] sel, last, grant, override_q;
  logic       oktosend, override_any;
  int checks = 0, failures = 0;

  rr_arbiter #(.NIN(4)) dut (.clk, .rst, .sel, .last, .oktosend, .grant, .override_q, .override_any);

  typedef struct { int start; int len; } pkt_t;
  pkt_t pk [4][$];
  int   remaining [4];
  int   got [$];  // cycle*4 + input of each grant

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int ncycles, input int ok_from, input int exp[$], input string name);
    got.delete();
    @(negedge clk) rst = 1;
    @(negedge clk) rst = 0;
    for (int i = 0; i < 4; i++) remaining[i] = 0;
    for (int c = 0; c < ncycles; c++) begin
      for (int i = 0; i < 4; i++) begin
        if (remaining[i] == 0 && pk[i].size() != 0 && pk[i][0].start <= c) remaining[i] = pk[i][0].len;
        sel[i]  = remaining[i] != 0;
        last[i] = remaining[i] == 1;
      end
      oktosend = (c >= ok_from);
      #1;
      checks++;
      if (!$onehot0(grant)) failures++;
      for (int i = 0; i < 4; i++)
        if (grant[i]) begin
          got.push_back(c * 4 + i);
          remaining[i]--;
          if (remaining[i] == 0) void'(pk[i].pop_front());
        end
      @(negedge clk);
    end
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %p expected %p", name, got, exp);
    end
    for (int i = 0; i < 4; i++) pk[i].delete();
  endtask

  initial begin
    sel = 0; last = 0; oktosend = 0;
    repeat (2) @(posedge clk);
    // S1: lone packet of three words
    pk[0].push_back('{0, 3});
    run(6, 0, '{0*4+0, 1*4+0, 2*4+0}, "S1");
    // S2: B and C collide with single words
    pk[1].push_back('{0, 1}); pk[2].push_back('{0, 1});
    run(6, 0, '{1*4+1, 2*4+2}, "S2");
    // S3: A and B always requesting, single-word packets
    repeat (2) begin pk[0].push_back('{0, 1}); pk[1].push_back('{0, 1}); end
    run(10, 0, '{1*4+0, 3*4+1, 5*4+0, 6*4+1}, "S3");
    // S4: A holds the port for two words, B arrives at cycle 1
    pk[0].push_back('{0, 2}); pk[1].push_back('{1, 1});
    run(6, 0, '{0*4+0, 1*4+0, 2*4+1}, "S4");
    // S5: oktosend low for three cycles
    pk[0].push_back('{0, 1});
    run(6, 3, '{3*4+0}, "S5");
    // S6: four requesters
    for (int i = 0; i < 4; i++) pk[i].push_back('{0, 1});
    pk[0].push_back('{0, 1});
    run(14, 0, '{1*4+0, 3*4+1, 5*4+2, 7*4+3, 8*4+0}, "S6");
    // S7: A and B with three packets each, both waiting from the start
    repeat (3) begin pk[0].push_back('{0, 1}); pk[1].push_back('{0, 1}); end
    run(14, 0, '{1*4+0, 3*4+1, 5*4+0, 7*4+1, 9*4+0, 10*4+1}, "S7");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
