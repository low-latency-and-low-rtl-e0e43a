// tb_input_port: test of one switch input (FIFO, look-up, head register).
//  * latency: a word written into an empty port is offered (req) exactly two
//    cycles after its strobe, and not one cycle after;
//  * flow control: with nothing popped, in_ready is seen low after 12 words; the
//    sender then still pushes 4 words in flight, none may be lost;
//  * random traffic: random pushes (respecting in_ready) and random pops;
//    every offered head word must equal the oldest word sent, with a next
//    route worked out independently from grid coordinates (switch 0).
module tb_input_port;
  import noc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic         in_strobe, in_ready, head_last, pop;
  ctrl_t        in_ctrl;
  logic [35:0]  in_data, head_data;
  route_t       req, head_next;
  dest_t        head_dest;
  int checks = 0, failures = 0;
  logic [47:0]  model [$];

  input_port #(.NODE(2'd0)) dut (.clk, .rst, .in_strobe, .in_ctrl, .in_data, .in_ready,
    .req, .head_last, .head_dest, .head_next, .head_data, .pop);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic route_t expect_next(int dst, route_t r);
    int dx, dy;
    dx = (dst / 2) % 2; dy = (dst / 4) % 2;
    if (r[2]) return (dx != 1) ? 4'b0100 : (dy != 0) ? 4'b1000 : (dst % 2) ? 4'b0010 : 4'b0001;
    if (r[3]) return (dx != 0) ? 4'b0100 : (dy != 1) ? 4'b1000 : (dst % 2) ? 4'b0010 : 4'b0001;
    return '0;
  endfunction

  function automatic logic [47:0] rand_word();
    ctrl_t c;
    c = '0;
    c.dest  = dest_t'($urandom_range(0, 7));
    c.last  = 1'($urandom);
    c.route = route_t'(1 << $urandom_range(1, 3));  // never back to port 0
    return {c, $urandom, 4'($urandom)};
  endfunction

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [47:0] w;
    int sent, ready_low_at;
    in_strobe = 0; in_ctrl = '0; in_data = '0; pop = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    @(negedge clk);
    // latency of one word through an empty port
    w = rand_word();
    {in_ctrl, in_data} = w; in_strobe = 1;
    @(negedge clk) in_strobe = 0;
    check(req == '0, "no request one cycle after the strobe");
    @(negedge clk);
    check(req == w[39:36] && head_data == w[35:0] && head_next == expect_next(int'(w[46:42]), w[39:36]),
          "head offered two cycles after the strobe");
    pop = 1;
    @(negedge clk) pop = 0;
    check(req == '0, "empty after pop");
    // fill without popping
    sent = 0; ready_low_at = -1;
    for (int i = 0; i < 40 && ready_low_at < 0; i++) begin
      if (!in_ready) ready_low_at = sent;
      else begin
        w = rand_word(); {in_ctrl, in_data} = w; in_strobe = 1;
        model.push_back(w); sent++;
        @(negedge clk);
      end
    end
    // words already in flight when ready dropped
    repeat (4) begin
      w = rand_word(); {in_ctrl, in_data} = w; in_strobe = 1;
      model.push_back(w);
      @(negedge clk);
    end
    in_strobe = 0;
    // one word sits in the head register, sendok looks at the pointer one
    // edge late: ready is seen low after the 12th word
    check(ready_low_at == 12, $sformatf("in_ready drops after 12 words (got %0d)", ready_low_at));
    // random traffic
    for (int cyc = 0; cyc < 8000; cyc++) begin
      if (req != '0) begin
        check(model.size() != 0, "request without a word sent");
        if (model.size() != 0) begin
          w = model[0];
          check(req == w[39:36] && head_last == w[47] && head_dest == w[46:42] &&
                head_data == w[35:0] && head_next == expect_next(int'(w[46:42]), w[39:36]),
                "head word");
        end
      end
      pop = (req != '0) && ($urandom_range(0, 99) < 60);
      in_strobe = in_ready && cyc < 7800 && ($urandom_range(0, 99) < 55);
      if (in_strobe) begin
        w = rand_word(); {in_ctrl, in_data} = w;
        model.push_back(w);
      end
      @(posedge clk);
      if (pop) void'(model.pop_front());
      @(negedge clk);
    end
    check(model.size() == 0 && req == '0, "all words delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
