// tb_ext_gate_ff: self-checking test of the single-trigger flip-flop.
// A reference model computes the expected trigger state every clock while
// the mode and the gate are driven randomly, with long runs in mode 10.
module tb_ext_gate_ff;
  import qdr_pkg::*;

  logic clk = 0, rst_n = 0, gate_s = 0, trig;
  acq_mode_e mode = ACQ_OFF;
  int checks = 0, failures = 0, triggers = 0;
  logic exp_trig = 0, gate_prev = 0;

  ext_gate_ff dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 40) == 0)
        mode = acq_mode_e'($urandom_range(0, 3) == 0 ? $urandom_range(0, 3) : 2);
      if ($urandom_range(0, 6) == 0) gate_s = ~gate_s;
      @(posedge clk);
      // reference: update on this edge
      if (mode != ACQ_CONT_TRIG) exp_trig = 0;
      else if (gate_s && !gate_prev) begin
        if (!exp_trig) triggers++;
        exp_trig = 1;
      end
      gate_prev = gate_s;
      #1;
      checks++;
      if (trig !== exp_trig) begin
        failures++;
        $display("FAIL at %0d: trig=%b exp=%b", i, trig, exp_trig);
      end
    end
    checks++;
    if (triggers < 3) begin failures++; $display("FAIL: too few triggers"); end
    $display("triggers=%0d", triggers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
