// tb_irq_ctrl_random: random interrupt traffic through irq_ctrl.
//
// The FIFO status changes at random while a software model serves the
// interrupts the way the VME controller and a service routine would:
// wait for /lirq, acknowledge with /lden, read the vector, wait a random
// time, clear the served Fn bit. A reference model kept in this testbench
// predicts the Fn flags every clock (a flag is set when its masked compare,
// with its enable, becomes true; cleared by a 1 written to it), records Fn
// when /lirq goes low, and requires every vector to be that of the lowest
// flag in the recorded set. It also checks that /lirq stays released from
// the acknowledge until the Fn write, and that every flag set is served.
module tb_irq_ctrl_random;
  import qdr_pkg::*;

  logic clk = 0, rst_n = 0, req_valid = 0, lden_n = 1;
  bus_req_t req = '0;
  logic hit, lirq_n, ld_oe;
  logic [DATA_W-1:0] rdata, ld_out;
  logic [9:0] fifo_status = '0;
  logic [3:0] fn;
  int checks = 0, failures = 0;

  irq_ctrl dut (.*);

  always #5 clk = ~clk;

  logic [9:0]  X [4], M [4];
  logic [31:0] V [4];
  logic [3:0]  IE = 4'b0000;

  // ---------------- reference model of Fn ----------------
  logic [3:0] ref_fn = '0, ref_en_q = '0, snap = '0;
  logic       in_service = 0, lirq_q = 1;
  int         n_set = 0, n_served = 0, n_multi = 0;

  function automatic logic [3:0] ref_match(logic [9:0] s);
    logic [3:0] r;
    for (int m = 0; m < 4; m++) r[m] = ((s ^ X[m]) & M[m]) == 0 && IE[m];
    return r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    automatic logic [3:0] en  = ref_match(fifo_status);
    automatic logic [3:0] clr = (req_valid && req.we && req.addr == A_FN) ? req.wdata[3:0] : 4'b0;
    automatic logic [3:0] rise = en & ~ref_en_q;
    n_set += $countones(rise & ~(ref_fn & ~clr));
    ref_fn   <= (ref_fn & ~clr) | rise;
    ref_en_q <= en;
  end

  // compare Fn, record Fn when /lirq goes active
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (fn !== ref_fn) begin
      failures++;
      $display("FAIL: Fn=%b expected %b (t=%0t)", fn, ref_fn, $time);
    end
    if (!lirq_n && lirq_q) begin
      snap = fn;
      if ($countones(fn) > 1) n_multi++;
    end
    if (in_service) begin
      checks++;
      if (!lirq_n) begin failures++; $display("FAIL: /lirq during service (t=%0t)", $time); end
    end
    lirq_q = lirq_n;
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    req_valid = 1; req = '{we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    req_valid = 0; req = '0;
  endtask

  function automatic int lowest(logic [3:0] f);
    for (int m = 0; m < 4; m++) if (f[m]) return m;
    return -1;
  endfunction

  // random FIFO status: flips a bit now and then
  initial begin
    forever begin
      @(negedge clk);
      if (rst_n && $urandom_range(0, 7) == 0)
        fifo_status[$urandom_range(0, 9)] ^= 1'b1;
    end
  end

  initial begin
    #40000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(A_FN, 32'hF);
    for (int m = 0; m < 4; m++) begin
      X[m] = 10'($urandom);
      M[m] = 10'(1 << $urandom_range(0, 9)) | 10'(1 << $urandom_range(0, 9));
      V[m] = 32'(2 * (m + 1) + 32'h80);
      wr(A_FN + 16'(16 * m + 4), 32'(X[m]));
      wr(A_FN + 16'(16 * m + 8), 32'(M[m]));
      wr(A_FN + 16'(16 * m + 12), V[m]);
    end
    wr(A_IE, 32'hF);
    IE = 4'hF;
    // serve interrupts
    for (int round = 0; round < 400; round++) begin
      automatic int n = 0;
      automatic int exp_m;
      automatic logic [31:0] vec;
      while (lirq_n && n < 200) begin @(negedge clk); n++; end
      if (lirq_n) continue;
      repeat ($urandom_range(1, 6)) @(negedge clk);
      lden_n = 0;
      #1 vec = ld_out;
      exp_m = lowest(snap);
      checks++;
      if (exp_m < 0 || vec !== V[exp_m]) begin
        failures++;
        $display("FAIL: vector %h, snapshot %b (t=%0t)", vec, snap, $time);
      end
      repeat (3) @(negedge clk);
      lden_n = 1;
      in_service = 1;
      repeat ($urandom_range(0, 20)) @(negedge clk);
      in_service = 0;
      if (exp_m >= 0) begin
        wr(A_FN, 32'(1 << exp_m));
        n_served++;
      end
    end
    // drain what is left with the enables off
    wr(A_IE, 32'h0);
    IE = 4'b0;
    while (!lirq_n) begin
      automatic int exp_m;
      @(negedge clk); lden_n = 0;
      exp_m = lowest(snap);
      @(negedge clk); lden_n = 1;
      wr(A_FN, 32'(1 << exp_m));
      n_served++;
    end
    repeat (3) @(negedge clk);
    checks++;
    if (fn != 0 || n_served != n_set) begin
      failures++;
      $display("FAIL: set %0d served %0d, Fn=%b", n_set, n_served, fn);
    end
    checks++;
    if (n_served < 50 || n_multi < 5) begin
      failures++;
      $display("FAIL: too little traffic (served %0d, multiple pending %0d)", n_served, n_multi);
    end
    $display("served=%0d multiple_pending=%0d", n_served, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
