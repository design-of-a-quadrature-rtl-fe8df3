`timescale 1ps/1fs
// tb_test_mux: checks the test multiplexer.
// For every lane and every MUX3 input, with random values on all inputs, the
// output must equal the selected signal; with no lane selected it is 0.
module tb_test_mux;
  int checks = 0, failures = 0;
  logic [3:0]  dqs_in, dqs_out;
  logic        clk, out;
  logic [0:11] sel_mux1;
  logic [0:3]  sel_mux2;

  test_mux dut (.*);

  initial begin
    for (int r = 0; r < 50; r++)
      for (int lane = 0; lane < 4; lane++)
        for (int s = 0; s < 3; s++) begin
          logic want;
          dqs_in  = 4'($urandom);
          dqs_out = 4'($urandom);
          clk     = 1'($urandom);
          sel_mux1 = '0; sel_mux1[3 * lane + s] = 1'b1;
          sel_mux2 = '0; sel_mux2[lane] = 1'b1;
          want = (s == 0) ? dqs_in[lane] : (s == 1) ? dqs_out[lane] : clk;
          #1;
          checks++;
          if (out !== want) begin
            failures++; $display("FAIL lane %0d input %0d out %b want %b", lane, s, out, want);
          end
        end
    dqs_in = '1; dqs_out = '1; clk = 1'b1; sel_mux1 = '1; sel_mux2 = '0;
    #1;
    checks++;
    if (out !== 1'b0) begin failures++; $display("FAIL no lane selected"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
