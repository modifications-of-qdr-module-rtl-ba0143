// tb_qdr_top: end-to-end test of the QDR control logic at its default
// parameters, with three FIFO models on the FIFO pins and the testbench
// acting as VME controller (register bus master and /lden driver).
//
// The FIFO status register is built here from the FIFO flags:
//   [2:0] FIFO k empty, [5:3] FIFO k almost empty, [8:6] FIFO k almost
//   full, [9] any FIFO full.
// The run covers: the acquisition modes and the single trigger of the
// continuous triggered mode; FIFO stack writes and reads; reading and
// programming the PAE/PAF offsets with the four-step software sequence;
// an almost-full interrupt served through /lirq, /lden and the Fn clear;
// two pending interrupts served in priority order with the vector of the
// first one taken first. Each mechanism is counted and must occur.
module tb_qdr_top;
  import qdr_pkg::*;

  localparam int NF = 3, FW = 18, DEPTH = 16;

  logic clk = 0, rst_n = 0;
  logic bus_valid = 0, bus_we = 0;
  logic [ADDR_W-1:0] bus_addr = '0;
  logic [DATA_W-1:0] bus_wdata = '0;
  logic bus_ack;
  logic [DATA_W-1:0] bus_rdata;
  logic vme_en, link_port;
  logic [1:0] acq_sel, ddc_fmt;
  logic gate_in = 0, gate_n, gate_triggered;
  logic [NF-1:0] fifo_wen_n, fifo_ren_n;
  logic fifo_ld_n;
  logic [FW-1:0] fifo_d;
  logic [FW-1:0] fifo_q [NF];
  logic [STATUS_W-1:0] fifo_status;
  logic lden_n = 1, lirq_n, ld_oe;
  logic [DATA_W-1:0] ld_out;
  logic [N_IRQ-1:0] irq_flags;

  logic [NF-1:0] ef_n, ff_n, pae_n, paf_n;
  logic [13:0] pae_off [NF], paf_off [NF];

  qdr_top dut (.*);

  for (genvar k = 0; k < NF; k++) begin : g_fifo
    cy7c4255_model #(.W(FW), .DEPTH(DEPTH)) u_fifo (
      .clk, .rst_n, .d(fifo_d), .wen_n(fifo_wen_n[k]), .ren_n(fifo_ren_n[k]),
      .ld_n(fifo_ld_n), .q(fifo_q[k]), .ef_n(ef_n[k]), .ff_n(ff_n[k]),
      .pae_n(pae_n[k]), .paf_n(paf_n[k]), .pae_off(pae_off[k]), .paf_off(paf_off[k])
    );
  end

  assign fifo_status = {~&ff_n, ~paf_n, ~pae_n, ~ef_n};

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_trigger = 0, n_gated = 0, n_cont = 0, n_stack_wr = 0, n_stack_rd = 0;
  int n_off_rd = 0, n_off_wr = 0, n_irq = 0, n_iack = 0, n_fn_clear = 0, n_queued = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask

  task automatic bus(input logic we, input logic [15:0] a, input logic [31:0] d,
                     output logic [31:0] rd);
    int n = 0;
    @(negedge clk);
    bus_valid = 1; bus_we = we; bus_addr = a; bus_wdata = d;
    @(negedge clk);
    bus_valid = 0; bus_we = 0;
    while (!bus_ack && n < 10) begin @(negedge clk); n++; end
    check(bus_ack, $sformatf("ack for %h", a));
    rd = bus_rdata;
    if (we && a < 16'h000C) n_stack_wr += fifo_ld_n;
    if (we && a < 16'h000C) n_off_wr += !fifo_ld_n;
    if (!we && a < 16'h000C) n_stack_rd += fifo_ld_n;
    if (!we && a < 16'h000C) n_off_rd += !fifo_ld_n;
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    logic [31:0] dummy;
    bus(1'b1, a, d, dummy);
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    bus(1'b0, a, 32'h0, d);
  endtask

  // Interrupt acknowledge as the VME controller does it: /lden low while
  // the vector is read, /lirq must be released meanwhile.
  task automatic iack(output logic [31:0] vec);
    check(!lirq_n, "/lirq asserted at IACK");
    @(negedge clk); lden_n = 0;
    #1 vec = ld_out;
    check(ld_oe, "vector driven while /lden low");
    repeat (3) @(negedge clk);
    check(lirq_n, "/lirq released on acknowledge");
    lden_n = 1;
    n_iack++;
  endtask

  localparam logic [31:0] V [4] = '{32'h40, 32'h42, 32'h44, 32'h46};

  initial begin
    #20000000; failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, pae0, paf0, vec;
    logic [FW-1:0] sent [$];
    repeat (3) @(negedge clk);
    rst_n = 1;
    wr(A_FN, 32'hF);                                   // IRQ logic initialisation

    // ---------------- control register and gate ----------------
    wr(A_CTRL, 32'h0000_0309);                         // VME en, mode 00, sel 01, fmt 11
    rd(A_CTRL, d);
    check(d == 32'h309, "control read-back");
    check(vme_en && acq_sel == 2'b01 && ddc_fmt == 2'b11 && !link_port, "control outputs");
    check(gate_n, "acquisition disabled");
    wr(A_CTRL, 32'h0000_030D);                         // mode 10: continuous triggered
    repeat (10) begin @(negedge clk); check(gate_n, "passive before trigger"); end
    @(negedge clk); gate_in = 1;
    repeat (3) @(posedge clk); #1;
    check(!gate_n && gate_triggered, "triggered three clocks after gate_in");
    if (!gate_n) n_trigger++;
    @(negedge clk); gate_in = 0;
    repeat (10) begin @(negedge clk); check(!gate_n, "continuous after trigger"); end
    wr(A_CTRL, 32'h0000_030F);                         // mode 11: gated
    repeat (4) @(negedge clk);
    check(gate_n, "gated, gate low");
    gate_in = 1;
    repeat (4) @(negedge clk);
    check(!gate_n, "gated, gate high");
    if (!gate_n) n_gated++;
    gate_in = 0;
    wr(A_CTRL, 32'h0000_030B);                         // mode 01: continuous
    repeat (2) @(negedge clk);
    check(!gate_n, "continuous");
    if (!gate_n) n_cont++;
    wr(A_CTRL, 32'h0000_0309);                         // off again

    // ---------------- PAE/PAF programming of FIFO 0 ----------------
    wr(A_CTRL, 32'h0000_0349);                         // bit 6: offset registers
    rd(A_FIFO0, pae0);
    rd(A_FIFO0, paf0);
    check(pae0 == 32'(pae_off[0]) && paf0 == 32'(paf_off[0]), "read offsets");
    wr(A_FIFO0, pae0);                                 // PAE unchanged
    wr(A_FIFO0, 32'd4);                                // PAF = 4: almost full at 12 words
    check(paf_off[0] == 14'd4 && 32'(pae_off[0]) == pae0, "offsets programmed");
    wr(A_CTRL, 32'h0000_0309);                         // back to stack access

    // ---------------- interrupt sources ----------------
    // IRQ1: FIFO 0 almost full (status bit 6 = 1)
    wr(16'h0104, 32'h040); wr(16'h0108, 32'h040); wr(16'h010C, V[0]);
    // IRQ2: FIFO 1 not empty (status bit 1 = 0)
    wr(16'h0114, 32'h000); wr(16'h0118, 32'h002); wr(16'h011C, V[1]);
    // IRQ3, IRQ4 configured but left disabled
    wr(16'h0124, 32'h3FF); wr(16'h0128, 32'h3FF); wr(16'h012C, V[2]);
    wr(16'h0134, 32'h000); wr(16'h0138, 32'h000); wr(16'h013C, V[3]);
    wr(A_IE, 32'h3);
    check(lirq_n && irq_flags == 0, "no interrupt yet");

    // ---------------- fill FIFO 0 up to almost full ----------------
    for (int i = 0; i < 12; i++) begin
      automatic logic [FW-1:0] w = FW'($urandom);
      check(lirq_n, "no interrupt below almost full");
      wr(A_FIFO0, 32'(w));
      sent.push_back(w);
    end
    @(negedge clk);
    check(!lirq_n && irq_flags == 4'b0001, "almost-full interrupt");
    if (!lirq_n) n_irq++;
    iack(vec);
    check(vec == V[0], $sformatf("vector %h for IRQ1", vec));
    // service routine: read four words back, then clear the flag
    for (int i = 0; i < 4; i++) begin
      rd(A_FIFO0, d);
      check(d == 32'(sent.pop_front()), "FIFO 0 data");
    end
    check(lirq_n, "/lirq stays released during service");
    wr(A_FN, 32'h1);
    if (irq_flags == 0) n_fn_clear++;
    check(irq_flags == 0 && lirq_n, "IRQ1 cleared");

    // ---------------- two interrupts queued ----------------
    wr(A_FIFO1, 32'h155);                              // IRQ2: FIFO 1 not empty
    check(!lirq_n && irq_flags == 4'b0010, "IRQ2 pending");
    for (int i = 0; i < 4; i++) begin                  // refill FIFO 0: IRQ1 too
      automatic logic [FW-1:0] w = FW'($urandom);
      wr(A_FIFO0, 32'(w));
      sent.push_back(w);
    end
    check(irq_flags == 4'b0011, "IRQ1 and IRQ2 pending");
    iack(vec);
    check(vec == V[1], "vector of the first triggered IRQ (2)");
    rd(A_FIFO1, d);
    check(d == 32'h155, "FIFO 1 data");
    wr(A_FN, 32'h2);
    @(negedge clk);
    check(!lirq_n && irq_flags == 4'b0001, "IRQ1 re-requested at once");
    if (!lirq_n) n_queued++;
    iack(vec);
    check(vec == V[0], "then vector of IRQ1");
    while (sent.size() > 0) begin
      rd(A_FIFO0, d);
      check(d == 32'(sent.pop_front()), "FIFO 0 drain");
    end
    wr(A_FN, 32'h1);
    if (irq_flags == 0) n_fn_clear++;
    check(irq_flags == 0 && lirq_n, "all interrupts served");
    check(!ef_n[0] && !ef_n[1], "FIFOs empty");

    // ---------------- every mechanism happened ----------------
    check(n_trigger > 0, "single trigger");
    check(n_gated > 0, "gated mode");
    check(n_cont > 0, "continuous mode");
    check(n_stack_wr > 0 && n_stack_rd > 0, "stack access");
    check(n_off_rd > 0 && n_off_wr > 0, "offset register access");
    check(n_irq > 0 && n_iack >= 3, "interrupt and acknowledge");
    check(n_fn_clear >= 2, "Fn clear");
    check(n_queued > 0, "queued interrupt");
    $display("trigger=%0d gated=%0d cont=%0d stack_wr=%0d stack_rd=%0d off_rd=%0d off_wr=%0d irq=%0d iack=%0d fn_clear=%0d queued=%0d",
             n_trigger, n_gated, n_cont, n_stack_wr, n_stack_rd, n_off_rd, n_off_wr,
             n_irq, n_iack, n_fn_clear, n_queued);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
