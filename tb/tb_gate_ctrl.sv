// tb_gate_ctrl: self-checking test of the external gate control.
// Directed sequences check, for each mode, the level of /gate and the
// three-clock latency from gate_in to /gate; mode 10 checks that only the
// first gate edge matters and that leaving the mode re-arms the trigger.
module tb_gate_ctrl;
  import qdr_pkg::*;

  logic clk = 0, rst_n = 0, gate_in = 0, gate_n, triggered;
  acq_mode_e mode = ACQ_OFF;
  int checks = 0, failures = 0;

  gate_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  // count clocks from a gate_in rise (at a negedge) until /gate is low
  task automatic rise_latency(output int n);
    @(negedge clk); gate_in = 1; n = 0;
    while (gate_n && n < 20) begin @(posedge clk); #1; n++; end
  endtask

  initial begin
    #2000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // 00: disabled, /gate high whatever gate_in does
    repeat (5) begin @(negedge clk); gate_in = ~gate_in; @(posedge clk); #1; check(gate_n, "mode 00 /gate high"); end
    // 01: continuous, /gate low
    @(negedge clk); mode = ACQ_CONT; gate_in = 0;
    repeat (2) @(posedge clk); #1;
    repeat (5) begin @(negedge clk); gate_in = ~gate_in; @(posedge clk); #1; check(!gate_n, "mode 01 /gate low"); end
    // 11: gated, /gate follows gate_in three clocks later
    @(negedge clk); mode = ACQ_GATED; gate_in = 0;
    repeat (4) @(posedge clk); #1;
    check(gate_n, "mode 11 gate low -> /gate high");
    rise_latency(n);
    check(n == 3, $sformatf("mode 11 latency %0d, expected 3", n));
    @(negedge clk); gate_in = 0;
    repeat (3) @(posedge clk); #1;
    check(gate_n, "mode 11 follows gate_in low");
    // 10: continuous triggered
    @(negedge clk); mode = ACQ_CONT_TRIG; gate_in = 0;
    repeat (10) begin @(posedge clk); #1; check(gate_n && !triggered, "mode 10 passive before trigger"); end
    rise_latency(n);
    check(n == 3, $sformatf("mode 10 latency %0d, expected 3", n));
    check(triggered, "triggered flag");
    // further gate activity does not stop acquisition
    repeat (20) begin @(negedge clk); gate_in = 1'($urandom_range(0, 1)); @(posedge clk); #1; check(!gate_n, "mode 10 stays on"); end
    // leaving the mode clears the trigger; re-entering waits again
    @(negedge clk); mode = ACQ_OFF; gate_in = 0;
    @(posedge clk); #1; check(gate_n, "mode 00 after 10");
    repeat (3) @(posedge clk);
    @(negedge clk); mode = ACQ_CONT_TRIG;
    repeat (5) begin @(posedge clk); #1; check(gate_n && !triggered, "re-armed"); end
    rise_latency(n);
    check(n == 3, "second trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
