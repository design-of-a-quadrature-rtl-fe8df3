`timescale 1ps/1fs
// tb_idac: checks the IDAC model.
// The current must be the offset plus one unit per thermometer bit set
// (36 uA + 2.2 uA per unit), rise by one unit per code of the decoder,
// include the 84.48 uA ideal current of 24 fF capacitors at 1.6 GHz within
// the code range, cover 52.8-105.6 uA (1.0-2.0 GHz), and be 0 with en low.
module tb_idac;
  int checks = 0, failures = 0;
  logic [31:0] therm;
  logic        en = 1'b1;
  real         i_ua;
  real         prev;

  idac dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit hit_ideal = 0;
    for (int n = 0; n < 32; n++) begin
      therm = 32'hFFFF_FFFF >> (31 - n);
      #1;
      check(i_ua > 36.0 + 2.2 * (n + 1) - 1e-6 && i_ua < 36.0 + 2.2 * (n + 1) + 1e-6,
            $sformatf("code %0d current %0.3f", n, i_ua));
      if (n > 0) check(i_ua > prev, "monotonic");
      if (n > 0 && prev <= 84.48 && i_ua >= 84.48) hit_ideal = 1;
      if (n == 0)  check(i_ua <= 52.8, "covers 1.0 GHz");
      if (n == 31) check(i_ua >= 105.6, "covers 2.0 GHz");
      prev = i_ua;
    end
    check(hit_ideal, "84.48 uA inside the range");
    therm = 32'h0000_0F0F;  // bit count, not position, sets the current
    #1 check(i_ua > 36.0 + 8 * 2.2 - 1e-6 && i_ua < 36.0 + 8 * 2.2 + 1e-6, "count of units");
    en = 1'b0;
    #1 check(i_ua == 0.0, "disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
