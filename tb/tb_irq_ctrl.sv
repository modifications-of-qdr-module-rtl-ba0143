// tb_irq_ctrl: self-checking test of the FIFO-status interrupt controller.
// Directed scenarios: register read-back, a single interrupt through the
// whole ROAK handshake (/lirq, /lden, vector, Fn write-1-to-clear),
// simultaneous interrupts served by priority, an interrupt arriving during
// service, the vector snapshot taken at the first trigger, the enable
// register, the mask register, and no re-trigger while a status stays
// matched. Latencies are checked in clocks.
module tb_irq_ctrl;
  import qdr_pkg::*;

  logic clk = 0, rst_n = 0, req_valid = 0, lden_n = 1;
  bus_req_t req = '0;
  logic hit, lirq_n, ld_oe;
  logic [DATA_W-1:0] rdata, ld_out;
  logic [9:0] fifo_status = '0;
  logic [3:0] fn;
  int checks = 0, failures = 0;
  int n_services = 0;

  irq_ctrl dut (.*);

  always #5 clk = ~clk;

  localparam logic [31:0] VEC [4] = '{32'h10, 32'h22, 32'h3C, 32'hFE};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    req_valid = 1; req = '{we: 1'b1, addr: a, wdata: d};
    @(negedge clk);
    req_valid = 0; req = '0;
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk);
    req = '{we: 1'b0, addr: a, wdata: '0};
    #1 d = rdata;
    check(hit, $sformatf("hit %h", a));
    req = '0;
  endtask

  // One interrupt acknowledge cycle: /lden low for 4 clocks, check vector
  // and the release of /lirq one clock after /lden is sampled low.
  task automatic iack(input int m);
    check(!lirq_n, $sformatf("/lirq asserted before IACK of %0d", m + 1));
    @(negedge clk); lden_n = 0;
    #1 check(ld_oe && ld_out == VEC[m], $sformatf("vector %h expected %h", ld_out, VEC[m]));
    @(posedge clk); #1;
    check(lirq_n, "/lirq released one clock after /lden");
    repeat (3) @(negedge clk);
    lden_n = 1;
    #1 check(!ld_oe, "ld_oe off after /lden");
    n_services++;
  endtask

  initial begin
    #4000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int n;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(lirq_n && fn == 0, "idle after reset");
    wr(A_FN, 32'hF);                       // re-initialise the IRQ logic
    // ---- configuration and read-back ----
    for (int m = 0; m < 4; m++) begin
      wr(A_FN + 16'(16 * m + 4), 32'(1 << m));           // Xm: status bit m set
      wr(A_FN + 16'(16 * m + 8), 32'(1 << m) | 32'h200); // Mm: bit m and bit 9
      wr(A_FN + 16'(16 * m + 12), VEC[m]);
    end
    for (int m = 0; m < 4; m++) begin
      rd(A_FN + 16'(16 * m + 4), d);  check(d == 32'(1 << m), "X read-back");
      rd(A_FN + 16'(16 * m + 8), d);  check(d == (32'(1 << m) | 32'h200), "M read-back");
      rd(A_FN + 16'(16 * m + 12), d); check(d == VEC[m], "V read-back");
    end
    // ---- enable off: a match sets nothing ----
    @(negedge clk); fifo_status = 10'h004;
    repeat (3) @(posedge clk); #1;
    check(fn == 0 && lirq_n, "IE=0 blocks the interrupt");
    @(negedge clk); fifo_status = 0;
    wr(A_IE, 32'hF);
    rd(A_IE, d); check(d == 32'hF, "IE read-back");
    // ---- single interrupt, IRQ 3 ----
    @(negedge clk); fifo_status = 10'h004;
    @(posedge clk); #1;
    check(fn == 4'b0100 && !lirq_n, "IRQ3 sets Fn and /lirq one clock after match");
    @(posedge clk); #1;
    iack(2);
    repeat (5) begin @(posedge clk); #1; check(lirq_n, "/lirq stays off until Fn write"); end
    rd(A_FN, d); check(d == 32'h4, "Fn read");
    wr(A_FN, 32'h4);
    check(fn == 0 && lirq_n, "Fn cleared");
    // status still matched: no new trigger
    repeat (5) @(posedge clk); #1;
    check(fn == 0, "no re-trigger on a held match");
    // masked bit: bit 9 differs -> no match
    @(negedge clk); fifo_status = 10'h204;
    @(negedge clk); fifo_status = 10'h200;
    repeat (2) @(posedge clk); #1;
    check(fn == 0, "mask bit 9 compared");
    // ---- simultaneous IRQ 1, 2, 4 ----
    @(negedge clk); fifo_status = 10'h000;
    @(negedge clk); fifo_status = 10'h00B;
    repeat (2) @(posedge clk); #1;
    check(fn == 4'b1011, "Fn = 1011");
    iack(0);
    wr(A_FN, 32'h1);
    @(posedge clk); #1;
    check(fn == 4'b1010 && !lirq_n, "next IRQ cycle at once");
    @(posedge clk); #1;
    iack(1);
    wr(A_FN, 32'h2);
    @(posedge clk); #1;
    iack(3);
    wr(A_FN, 32'h8);
    check(fn == 0 && lirq_n, "all served");
    // ---- new interrupt during service, lower number than the one served ----
    @(negedge clk); fifo_status = 10'h000;
    @(negedge clk); fifo_status = 10'h008;   // IRQ 4
    repeat (2) @(posedge clk); #1;
    iack(3);
    @(negedge clk); fifo_status = 10'h001;   // IRQ 1 during the service of IRQ 4
    repeat (3) @(posedge clk); #1;
    check(fn == 4'b1001 && lirq_n, "held off during service");
    wr(A_FN, 32'h8);
    @(posedge clk); #1;
    iack(0);
    wr(A_FN, 32'h1);
    // ---- snapshot: a higher-priority IRQ after /lirq, before /lden ----
    @(negedge clk); fifo_status = 10'h000;
    @(negedge clk); fifo_status = 10'h004;   // IRQ 3 first
    repeat (2) @(posedge clk);
    @(negedge clk); fifo_status = 10'h006;   // then IRQ 2
    repeat (2) @(posedge clk); #1;
    check(fn == 4'b0110, "both pending");
    iack(2);                                   // vector of the first triggered
    wr(A_FN, 32'h4);
    @(posedge clk); #1;
    iack(1);
    wr(A_FN, 32'h2);
    check(fn == 0 && lirq_n, "idle at end");
    // trigger and clear of the same flag in one clock: the flag stays set
    @(negedge clk); fifo_status = 10'h000;
    @(negedge clk);
    fifo_status = 10'h001;
    req_valid = 1; req = '{we: 1'b1, addr: A_FN, wdata: 32'h1};
    @(negedge clk); req_valid = 0; req = '0;
    check(fn == 4'b0001, "set wins over clear");
    wr(A_FN, 32'hF);
    check(n_services == 8, $sformatf("services %0d", n_services));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
