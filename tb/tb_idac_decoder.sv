`timescale 1ps/1fs
// tb_idac_decoder: exhaustive check of the IDAC binary-to-thermometer decoder.
// Code n must switch on units 0..n and nothing else.
module tb_idac_decoder;
  int checks = 0, failures = 0;
  logic [4:0]  dac_ctrl;
  logic [31:0] therm;

  idac_decoder dut (.*);

  initial begin
    for (int n = 0; n < 32; n++) begin
      logic [31:0] want;
      dac_ctrl = 5'(n);
      #1;
      want = 32'hFFFF_FFFF >> (31 - n);
      checks++;
      if (therm !== want) begin
        failures++; $display("FAIL code %0d therm %h want %h", n, therm, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
