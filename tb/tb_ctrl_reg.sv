// tb_ctrl_reg: self-checking test of the control register at 0x0010.
// Checks reset value, random writes with field decode, that writes to other
// addresses and reads leave it unchanged, and the one-clock write latency.
module tb_ctrl_reg;
  import qdr_pkg::*;

  logic clk = 0, rst_n = 0, req_valid = 0;
  bus_req_t req = '0;
  ctrl_t ctrl;
  logic [9:0] value;
  int checks = 0, failures = 0;
  logic [9:0] expv;

  ctrl_reg dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic access(input logic we, input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    req_valid = 1; req = '{we: we, addr: a, wdata: d};
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    #2000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(value == 0, "reset value");
    expv = 0;
    for (int i = 0; i < 200; i++) begin
      automatic logic [31:0] d = $urandom;
      automatic int kind = $urandom_range(0, 3);
      if (kind == 0)      access(1'b1, 16'h0014, d);          // other address
      else if (kind == 1) access(1'b0, A_CTRL, d);            // read
      else begin
        access(1'b1, A_CTRL, d);
        expv = d[9:0];
      end
      check(value == expv, $sformatf("value %h exp %h", value, expv));
      check(ctrl.vme_en == expv[0] && ctrl.acq_mode == acq_mode_e'(expv[2:1]) &&
            ctrl.acq_sel == expv[4:3] && ctrl.link_port == expv[5] &&
            ctrl.fifo_prog == expv[6] && ctrl.ddc_fmt == expv[9:8], "field decode");
    end
    // latency: the value is visible right after the write edge, not before
    @(negedge clk);
    req_valid = 1; req = '{we: 1'b1, addr: A_CTRL, wdata: 32'h0000_0144};
    #1 check(value == expv, "no change before edge");
    @(posedge clk); #1;
    check(value == 10'h144, "one-clock write latency");
    req_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
