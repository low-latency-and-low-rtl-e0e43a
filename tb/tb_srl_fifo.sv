// tb_srl_fifo: self-checking test of the 16-entry shift-register FIFO.
// Random writes and reads, in phases that fill it up to 15 words and drain
// it again, are mirrored in a queue. Every cycle the test compares avail, the
// oldest word, the gated route bits and the registered sendok flag (high
// when the FIFO held at most 9 words one edge earlier) with the queue. It
// also checks that a written word is readable one cycle after the write.
module tb_srl_fifo;
  import noc_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  ctrl_t        control, control_q;
  logic [35:0]  d, q;
  logic         we, rd, sendok, avail;
  route_t       sel;
  int           checks = 0, failures = 0;
  logic [47:0]  model [$];
  logic         exp_sendok;

  srl_fifo dut (.clk, .rst, .control, .d, .we, .rd, .sendok, .avail, .control_q, .q, .sel);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int phase;
    we = 0; rd = 0; control = '0; d = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    exp_sendok = 1'b1;
    // single write: visible one cycle later
    we = 1; control = '{last: 1'b1, dest: 5'd3, rsvd: 2'b0, route: 4'b0100}; d = 36'hABCDE1234;
    @(negedge clk);
    we = 0;
    check(avail && q == 36'hABCDE1234 && control_q.dest == 5'd3 && sel == 4'b0100, "one-cycle write latency");
    rd = 1;
    @(negedge clk);
    rd = 0;
    check(!avail && sel == '0, "empty after read");
    for (int cyc = 0; cyc < 6000; cyc++) begin
      phase = (cyc / 200) % 3;  // 0 fill, 1 drain, 2 balanced
      @(negedge clk);
      check(avail == (model.size() != 0), "avail");
      if (model.size() != 0) begin
        check({control_q, q} == model[0], "oldest word");
        check(sel == control_q.route, "sel gated route");
      end else
        check(sel == '0, "sel zero when empty");
      check(sendok == exp_sendok, "sendok");
      we = ($urandom_range(0, 99) < (phase == 0 ? 80 : phase == 1 ? 20 : 50));
      rd = ($urandom_range(0, 99) < (phase == 0 ? 20 : phase == 1 ? 80 : 50));
      if (model.size() >= 15 && !(rd)) we = 0;
      control = ctrl_t'($urandom);
      control.route = 4'b1 << $urandom_range(0, 3);
      d = {$urandom, 4'($urandom)};
      @(posedge clk);
      exp_sendok = (model.size() <= 9);
      if (rd && model.size() != 0) void'(model.pop_front());
      if (we) model.push_back({control, d});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
