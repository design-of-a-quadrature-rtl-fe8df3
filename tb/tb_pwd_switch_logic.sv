`timescale 1ps/1fs
// tb_pwd_switch_logic: checks the switch logic of the pulse-width detector.
// During a pulse sw is low and exactly one of sw_clk (sel low) and sw_dqs
// (sel high) is low, with dclk low and rst low; after the pulse, dclk rises
// 30 ps later (charging is over before sampling), rst rises 30 ps after dclk
// (sampling is over before reset) and stays high until the next pulse.
module tb_pwd_switch_logic;
  int checks = 0, failures = 0;
  logic pulse = 1'b0, sel = 1'b0, sw, sw_dqs, sw_clk, dclk, rst;
  real  t_fall, t_dclk, t_rst;

  pwd_switch_logic dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0.1f", what, $realtime); end
  endtask

  always @(posedge dclk) t_dclk = $realtime;
  always @(posedge rst)  t_rst  = $realtime;

  initial begin
    #200;
    for (int k = 0; k < 10; k++) begin
      sel = 1'(k % 2);
      pulse = 1'b1;
      #(real'($urandom_range(100, 700)));
      check(sw == 1'b0, "sw low during pulse");
      check(sw_clk == sel && sw_dqs == !sel, "mode switch during pulse");
      check(dclk == 1'b0 && rst == 1'b0, "no sampling or reset during pulse");
      pulse = 1'b0;
      t_fall = $realtime;
      #0.01;
      check(sw && sw_dqs && sw_clk, "switches off after pulse");
      #100;
      check(t_dclk > t_fall + 29.99 && t_dclk < t_fall + 30.01, "dclk 30 ps after pulse end");
      check(t_rst > t_dclk + 29.99 && t_rst < t_dclk + 30.01, "rst 30 ps after dclk");
      check(rst == 1'b1, "rst held until next pulse");
      #(real'($urandom_range(100, 500)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
