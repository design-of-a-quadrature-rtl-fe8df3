`timescale 1ps/1fs
// tb_fixed_delay_line: checks that every edge of the I strobe is delayed by
// 116.8 ps, the delay of a DCDL at its mid code 128 (40 + 8 * 9.6 ps), also
// for pulses shorter than the delay.
module tb_fixed_delay_line;
  int checks = 0, failures = 0;
  logic in = 1'b0, out;
  real  t_in [$];

  fixed_delay_line dut (.*);

  always @(in) if ($realtime > 0) t_in.push_back($realtime);
  always @(out) if ($realtime > 0) begin
    real t0;
    t0 = t_in.pop_front();
    checks++;
    if (!($realtime - t0 > 116.799 && $realtime - t0 < 116.801)) begin
      failures++; $display("FAIL delay %0.3f", $realtime - t0);
    end
  end

  initial begin
    #10;
    for (int k = 0; k < 40; k++) begin
      in = ~in;
      #(real'($urandom_range(60, 400)));
    end
    #500;
    checks++;
    if (t_in.size() != 0) begin failures++; $display("FAIL lost edges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
