`timescale 1ps/1fs
// tb_dqs_pulse_gen: checks the DQS pulse generator.
// Four strobes of period 625 ps are driven with chosen rising-edge offsets
// (I at 0, Q, IB, QB at random offsets near a quarter period each). For each
// pair selection the output pulse must be exactly as wide as the offset
// between the two strobes of the pair and start at the earlier strobe's
// rising edge. The unused selection and en low must give no pulse.
module tb_dqs_pulse_gen;
  localparam real T_PS = 625.0;
  int checks = 0, failures = 0;
  logic i = 0, q = 0, ib = 0, qb = 0, en = 1'b1, dqs_pulse;
  logic [1:0] sel_dqs = 2'd0;
  real off [4];
  real t_r, width;
  int  npulse = 0;

  dqs_pulse_gen dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one DQS cycle starting now
  task automatic cycle();
    fork
      begin #(off[0]) i  = 1; #(T_PS / 2.0) i  = 0; end
      begin #(off[1]) q  = 1; #(T_PS / 2.0) q  = 0; end
      begin #(off[2]) ib = 1; #(T_PS / 2.0) ib = 0; end
      begin #(off[3]) qb = 1; #(T_PS / 2.0) qb = 0; end
    join
    #100.0;
  endtask

  always @(posedge dqs_pulse) t_r = $realtime;
  always @(negedge dqs_pulse) begin width = $realtime - t_r; npulse++; end

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    for (int r = 0; r < 6; r++) begin
      off[0] = 20.0;
      off[1] = off[0] + 156.25 + real'($urandom_range(0, 120)) - 60.0;
      off[2] = off[1] + 156.25 + real'($urandom_range(0, 120)) - 60.0;
      off[3] = off[2] + 156.25 + real'($urandom_range(0, 120)) - 60.0;
      for (int s = 0; s < 3; s++) begin
        int n0;
        real want;
        sel_dqs = 2'(s);
        n0 = npulse;
        cycle();
        want = off[s + 1] - off[s];
        check(npulse == n0 + 1, $sformatf("one pulse per cycle, pair %0d", s));
        check(width > want - 0.01 && width < want + 0.01,
              $sformatf("pair %0d width %0.2f want %0.2f", s, width, want));
      end
    end
    begin
      int n0;
      n0 = npulse;
      sel_dqs = 2'd3; cycle();
      check(npulse == n0, "no pulse for unused selection");
      sel_dqs = 2'd0; en = 1'b0; cycle();
      check(npulse == n0, "no pulse while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
