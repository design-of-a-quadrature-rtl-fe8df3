`timescale 1ps/1fs
// tb_dcdl: checks the DCDL model.
// For random codes the delay from a rising and a falling input edge to the
// output edge must be 40 ps + code[7:4] * 9.6 ps + code[3:0] * 0.65 ps. Also
// checked: the delay rises with the code (no step skipped by the coarse/fine
// overlap), the range 0..255 spans about 153 ps, and an edge already in flight
// keeps the delay it started with when the code changes.
module tb_dcdl;
  int checks = 0, failures = 0;
  logic in = 1'b0, out;
  logic [7:0] code = 8'd128;
  real t_in, t_out;

  dcdl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real model(int c);
    return 40.0 + real'(c / 16) * 9.6 + real'(c % 16) * 0.65;
  endfunction

  always @(posedge out or negedge out) t_out = $realtime;

  task automatic measure(int c, output real dr, output real df);
    code = 8'(c);
    #300;
    in = 1'b1; t_in = $realtime; #300; dr = t_out - t_in;
    in = 1'b0; t_in = $realtime; #300; df = t_out - t_in;
  endtask

  initial begin
    real dr, df, d0, d255, prev;
    #10;
    for (int k = 0; k < 60; k++) begin
      int c;
      c = $urandom_range(0, 255);
      measure(c, dr, df);
      check(dr > model(c) - 0.001 && dr < model(c) + 0.001, $sformatf("code %0d rise delay %0.3f", c, dr));
      check(df > model(c) - 0.001 && df < model(c) + 0.001, $sformatf("code %0d fall delay %0.3f", c, df));
    end
    // coarse/fine overlap: fine steps of one coarse tap reach the next tap
    for (int c = 0; c < 255; c++)
      check(model(c + 1) - model(c) <= 0.65 + 1e-6 || model(c + 1) <= model(c - (c % 16)) + 9.75 + 1e-6,
            "no gap between coarse steps");
    measure(0, d0, df);
    measure(255, d255, df);
    check(d255 - d0 > 150.0 && d255 - d0 < 156.0, $sformatf("range %0.2f ps", d255 - d0));
    // code change while an edge is in flight
    code = 8'd0;
    #300;
    in = 1'b1; t_in = $realtime;
    #10 code = 8'd255;
    #300;
    check(t_out - t_in > model(0) - 0.001 && t_out - t_in < model(0) + 0.001, "edge in flight keeps its delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
