`timescale 1ps/1fs
// tb_dcdl_decoder: exhaustive check of the DCDL control decoder.
// For all 256 codes: sel has one bit set, at the coarse tap code[7:4];
// ctrlc enables exactly the chain stages before that tap; ctrlf switches in
// code[3:0] MOSCAPs, from bit 0 up.
module tb_dcdl_decoder;
  int checks = 0, failures = 0;
  logic [7:0]  code;
  logic [14:0] ctrlc, ctrlf;
  logic [15:0] sel;

  dcdl_decoder dut (.*);

  initial begin
    for (int n = 0; n < 256; n++) begin
      int c, f;
      code = 8'(n);
      c = n / 16;
      f = n % 16;
      #1;
      checks++;
      if (sel !== 16'(1 << c) || ctrlc !== 15'((1 << c) - 1) || ctrlf !== 15'((1 << f) - 1)) begin
        failures++;
        $display("FAIL code %0d sel %h ctrlc %h ctrlf %h", n, sel, ctrlc, ctrlf);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
