// tb_fifo_access: self-checking test of FIFO stack and PAE/PAF offset
// register access. Three FIFO models sit on the FIFO pins. The test writes
// and reads the stacks, then runs the software sequence for programming the
// offsets (read PAE, read PAF, write PAE, write PAF) and checks the values
// in the FIFO models and on read-back, plus the two-clock access latency.
module tb_fifo_access;
  import qdr_pkg::*;

  localparam int NF = 3, FW = 18;

  logic clk = 0, rst_n = 0, req_valid = 0, prog = 0;
  bus_req_t req = '0;
  logic hit, ack;
  logic [FW-1:0] rdata;
  logic [NF-1:0] fifo_wen_n, fifo_ren_n;
  logic fifo_ld_n;
  logic [FW-1:0] fifo_d;
  logic [FW-1:0] fifo_q [NF];
  logic [13:0] pae_off [NF], paf_off [NF];
  logic [NF-1:0] ef_n, ff_n, pae_n, paf_n;
  int checks = 0, failures = 0;

  fifo_access #(.N_FIFO(NF), .FIFO_W(FW)) dut (.*);

  for (genvar k = 0; k < NF; k++) begin : g_fifo
    cy7c4255_model #(.W(FW), .DEPTH(16)) u_fifo (
      .clk, .rst_n, .d(fifo_d), .wen_n(fifo_wen_n[k]), .ren_n(fifo_ren_n[k]),
      .ld_n(fifo_ld_n), .q(fifo_q[k]), .ef_n(ef_n[k]), .ff_n(ff_n[k]),
      .pae_n(pae_n[k]), .paf_n(paf_n[k]), .pae_off(pae_off[k]), .paf_off(paf_off[k])
    );
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic access(input logic we, input int k, input logic [31:0] d,
                        output logic [31:0] rd, output int lat);
    @(negedge clk);
    req_valid = 1; req = '{we: we, addr: ADDR_W'(4 * k), wdata: d};
    @(posedge clk); #1;
    req_valid = 0;
    lat = 0;  // counts clocks from the request edge to the ack edge
    while (!ack && lat < 10) begin @(posedge clk); #1; lat++; end
    rd = DATA_W'(rdata);
  endtask

  initial begin
    #4000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] rd, pae_orig, paf_orig;
    logic [FW-1:0] exp_q [NF][$];
    int lat;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(fifo_ld_n && &fifo_wen_n && &fifo_ren_n, "idle pins");
    // ---- stack access: random interleaved writes and reads ----
    for (int i = 0; i < 300; i++) begin
      automatic int k = $urandom_range(0, NF - 1);
      if ($urandom_range(0, 1) != 0 && exp_q[k].size() < 16) begin
        automatic logic [31:0] d = $urandom;
        access(1'b1, k, d, rd, lat);
        exp_q[k].push_back(d[FW-1:0]);
        check(lat == 2, $sformatf("write ack after %0d clocks, expected 2", lat));
      end else if (exp_q[k].size() > 0) begin
        access(1'b0, k, 0, rd, lat);
        check(lat == 2, $sformatf("read ack after %0d clocks, expected 2", lat));
        check(rd == DATA_W'(exp_q[k].pop_front()), $sformatf("stack read fifo %0d", k));
      end
    end
    // drain
    for (int k = 0; k < NF; k++)
      while (exp_q[k].size() > 0) begin
        access(1'b0, k, 0, rd, lat);
        check(rd == DATA_W'(exp_q[k].pop_front()), "drain");
      end
    for (int k = 0; k < NF; k++) check(!ef_n[k], "fifo empty after drain");
    // ---- PAE/PAF programming sequence on each FIFO ----
    @(negedge clk); prog = 1;
    @(negedge clk); check(!fifo_ld_n, "/ld low in offset mode");
    for (int k = 0; k < NF; k++) begin
      automatic logic [13:0] new_pae = 14'($urandom);
      access(1'b0, k, 0, pae_orig, lat);
      check(pae_orig == DATA_W'(pae_off[k]), "read PAE");
      access(1'b0, k, 0, paf_orig, lat);
      check(paf_orig == DATA_W'(paf_off[k]), "read PAF");
      access(1'b1, k, DATA_W'(new_pae), rd, lat);
      access(1'b1, k, paf_orig, rd, lat);
      check(pae_off[k] == new_pae, "PAE written");
      check(DATA_W'(paf_off[k]) == paf_orig, "PAF kept");
      // read-back sequence
      access(1'b0, k, 0, rd, lat);
      check(rd == DATA_W'(new_pae), "read back PAE");
      access(1'b0, k, 0, rd, lat);
      check(rd == paf_orig, "read back PAF");
      // other FIFOs untouched
      for (int j = 0; j < NF; j++)
        if (j > k) check(pae_off[j] == 14'd3, "other FIFO untouched");
    end
    @(negedge clk); prog = 0;
    // stack works again and uses the new PAE offset
    access(1'b1, 0, 32'h1234, rd, lat);
    check(ef_n[0], "stack write after programming");
    access(1'b0, 0, 0, rd, lat);
    check(rd == 32'h1234, "stack after programming");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
