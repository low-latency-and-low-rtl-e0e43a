// tb_board_demo: test of the board-level demo at its default settings
// (8-bit network, a word every 64 cycles, LED hold 256 cycles).
//  * the LED is lit while DIP switch 1 (reset) is on;
//  * with switch 8 off nothing enters the network and the LED stays dark;
//  * with switch 8 on, words enter at port 4 and leave at port 0 six cycles
//    later (two switches), carry the pattern 0xA5, and the LED lights;
//  * after switch 8 goes off again the LED goes dark within hold time plus
//    one period.
module tb_board_demo;
  logic clk = 1'b0;
  always #15 clk = ~clk;   // about 33 MHz

  logic sw1, sw8, led;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_in = 0, n_out = 0, t_in;
  always @(posedge clk) cycle <= cycle + 1;

  board_demo dut (.clk_33mhz_fpga(clk), .gpio_dip_sw1(sw1), .gpio_dip_sw8(sw8), .led_error1(led));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d", what, cycle);
    end
  endtask

  // port 4 = node 2, local 0; port 0 = node 0, local 0
  always @(negedge clk) begin
    if (dut.u_noc.sw_in_strobe[2][0]) begin
      n_in++;
      t_in = cycle;
    end
    if (dut.u_noc.sw_out_strobe[0][0]) begin
      n_out++;
      check(dut.u_noc.sw_out_data[0][0] == 8'hA5, "pattern at port 0");
      check(cycle - t_in == 6, $sformatf("two-switch latency 6 (got %0d)", cycle - t_in));
    end
  end

  initial begin
    #(30 * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lit_at, dark_at;
    sw1 = 1; sw8 = 0;
    repeat (6) @(negedge clk);
    check(led == 1'b1, "LED lit in reset");
    sw1 = 0;
    repeat (1000) begin
      @(negedge clk);
      if (cycle > 10) check(led == 1'b0, "LED dark with switch 8 off");
    end
    check(n_in == 0, "nothing sent with switch 8 off");
    sw8 = 1;
    lit_at = -1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (led && lit_at < 0) lit_at = c;
    end
    check(lit_at >= 0 && lit_at < 100, $sformatf("LED lit soon after switch 8 on (%0d)", lit_at));
    check(n_out >= 25 && n_out == n_in, $sformatf("words sent %0d and received %0d", n_in, n_out));
    check(led == 1'b1, "LED still lit while words arrive");
    sw8 = 0;
    dark_at = -1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk);
      if (!led && dark_at < 0) dark_at = c;
      if (dark_at >= 0) check(!led, "LED stays dark");
    end
    check(dark_at > 0 && dark_at <= 256 + 64 + 20, $sformatf("LED dark after switch 8 off (%0d)", dark_at));
    sw1 = 1;
    repeat (4) @(negedge clk);
    check(led == 1'b1, "LED lit in reset again");
    $display("words through the network: %0d", n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
