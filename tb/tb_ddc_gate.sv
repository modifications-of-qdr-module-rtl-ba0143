// tb_ddc_gate: self-checking test of the per-mode gate for modes 00, 01, 11.
module tb_ddc_gate;
  import qdr_pkg::*;

  logic clk = 0, rst_n = 0, gate_s = 0, gate;
  acq_mode_e mode = ACQ_OFF;
  int checks = 0, failures = 0;
  logic exp_gate;
  int seen [4] = '{0, 0, 0, 0};

  ddc_gate dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    checks++;
    if (gate !== 1'b0) begin failures++; $display("FAIL: reset"); end
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 20) == 0) mode = acq_mode_e'($urandom_range(0, 3));
      gate_s = 1'($urandom_range(0, 1));
      case (mode)
        ACQ_CONT:  exp_gate = 1;
        ACQ_GATED: exp_gate = gate_s;
        default:   exp_gate = 0;
      endcase
      seen[mode]++;
      @(posedge clk); #1;
      checks++;
      if (gate !== exp_gate) begin
        failures++;
        $display("FAIL at %0d mode=%0d gate_s=%b gate=%b", i, mode, gate_s, gate);
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (seen[m] == 0) begin failures++; $display("FAIL: mode %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
