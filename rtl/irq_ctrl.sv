// irq_ctrl: prioritised FIFO-status interrupt controller (QDR modification 1.6).
//
// Four interrupt sources watch the FIFO status register. Source m compares
// the status with its value register Xm under its mask Mm (irq_match). When
// the compare, passed by the enable bit IEm, becomes true, flag m of the Fn
// register is set. Any set Fn flag drives /lirq_out low. /lirq_out reaches
// the /lirq output towards the VME controller only while the /lirq_off
// flip-flop is clear.
//
// Acknowledge follows the release-on-acknowledge (ROAK) scheme. When /lirq
// first goes active, irq_vec_hold takes a snapshot of Fn into irq_vec_nr.
// The lowest-numbered flag in the snapshot has the highest priority and
// selects its vector register Vm. While /lden is low this vector is driven
// onto the local data bus (ld_out with ld_oe), and /lirq_off is set, which
// releases /lirq. Software ends the service routine by writing 1s to the Fn
// bits it serviced. The write clears those flags, clears /lirq_off and
// re-arms irq_vec_hold. If flags remain set, /lirq is asserted again at once
// and the next snapshot is taken.
//
// Register map, on the local register bus (byte offsets):
//   0x0100 Fn  [3:0]  status flags, write 1 to clear
//   0x0104 + 0x10*(m-1) Xm [9:0], 0x0108 + ... Mm [9:0], 0x010C + ... Vm [31:0]
//   0x0140 IE  [3:0]  interrupt enables
// All registers read back.
//
// Choices of this design, where the QDR documentation is silent:
// - Fn is set on the rising edge of (match AND IE), so a status that stays
//   matched raises one interrupt, not a new one after every clear;
// - a trigger and a clear of the same flag in one clock leave it set;
// - the enable bit gates the setting of Fn (as the block diagram shows);
// - /lden is sampled by `clk`, and all registers reset to zero.
//
// Timing: a new match sets Fn one clock later. /lirq falls combinationally
// from Fn, the snapshot is taken on the next clock edge, and /lirq rises
// one clock after /lden is sampled low.
module irq_ctrl
  import qdr_pkg::*;
#(
  parameter int unsigned N = N_IRQ,      // number of interrupt sources
  parameter int unsigned W = STATUS_W    // FIFO status register width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  input  bus_req_t          req,
  output logic              hit,          // req addresses this block
  output logic [DATA_W-1:0] rdata,        // read data for req (combinational)
  input  logic [W-1:0]      fifo_status,
  input  logic              lden_n,       // /lden from the VME controller
  output logic              lirq_n,       // /lirq to the VME controller
  output logic [DATA_W-1:0] ld_out,       // Status/ID vector
  output logic              ld_oe,        // drive ld_out onto the local data bus
  output logic [N-1:0]      fn            // Fn flags, for status
);

  logic [W-1:0]      x_r [N];
  logic [W-1:0]      m_r [N];
  logic [DATA_W-1:0] v_r [N];
  logic [N-1:0]      ie_r, fn_r, en_match, en_match_q, match;
  logic [N-1:0]      vec_nr;
  logic              vec_hold, lirq_off, lirq_out_n;

  // ---------------- address decode ----------------
  logic              fn_wr, ie_wr;
  logic [N-1:0]      x_wr, m_wr, v_wr;

  always_comb begin
    hit   = 1'b0;
    rdata = '0;
    fn_wr = 1'b0;
    ie_wr = 1'b0;
    x_wr  = '0;
    m_wr  = '0;
    v_wr  = '0;
    if (req.addr == A_FN) begin
      hit   = 1'b1;
      rdata = DATA_W'(fn_r);
      fn_wr = req_valid && req.we;
    end
    if (req.addr == A_IE) begin
      hit   = 1'b1;
      rdata = DATA_W'(ie_r);
      ie_wr = req_valid && req.we;
    end
    for (int i = 0; i < N; i++) begin
      if (req.addr == A_FN + ADDR_W'(16*i + 4)) begin
        hit     = 1'b1;
        rdata   = DATA_W'(x_r[i]);
        x_wr[i] = req_valid && req.we;
      end
      if (req.addr == A_FN + ADDR_W'(16*i + 8)) begin
        hit     = 1'b1;
        rdata   = DATA_W'(m_r[i]);
        m_wr[i] = req_valid && req.we;
      end
      if (req.addr == A_FN + ADDR_W'(16*i + 12)) begin
        hit     = 1'b1;
        rdata   = v_r[i];
        v_wr[i] = req_valid && req.we;
      end
    end
  end

  // ---------------- configuration registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ie_r <= '0;
      for (int i = 0; i < N; i++) begin
        x_r[i] <= '0;
        m_r[i] <= '0;
        v_r[i] <= '0;
      end
    end else begin
      if (ie_wr) ie_r <= req.wdata[N-1:0];
      for (int i = 0; i < N; i++) begin
        if (x_wr[i]) x_r[i] <= req.wdata[W-1:0];
        if (m_wr[i]) m_r[i] <= req.wdata[W-1:0];
        if (v_wr[i]) v_r[i] <= req.wdata;
      end
    end
  end

  // ---------------- mask/compare, enable, Fn ----------------
  for (genvar g = 0; g < N; g++) begin : g_match
    irq_match #(.W(W)) u_match (
      .status(fifo_status), .x(x_r[g]), .m(m_r[g]), .match(match[g])
    );
  end

  assign en_match = match & ie_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_match_q <= '0;
      fn_r       <= '0;
    end else begin
      en_match_q <= en_match;
      fn_r       <= (fn_r & ~(fn_wr ? req.wdata[N-1:0] : '0))
                  | (en_match & ~en_match_q);
    end
  end

  assign lirq_out_n = ~|fn_r;

  // ---------------- ROAK release: /lirq_off ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         lirq_off <= 1'b0;
    else if (fn_wr)     lirq_off <= 1'b0;
    else if (!lden_n)   lirq_off <= 1'b1;
  end

  assign lirq_n = lirq_out_n | lirq_off;

  // ---------------- vector snapshot: irq_vec_hold / irq_vec_nr ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vec_hold <= 1'b0;
      vec_nr   <= '0;
    end else if (fn_wr) begin
      vec_hold <= 1'b0;
    end else if (!vec_hold && !lirq_n) begin
      vec_hold <= 1'b1;
      vec_nr   <= fn_r;
    end
  end

  // ---------------- priority select of Vm ----------------
  always_comb begin
    ld_out = '0;
    for (int i = N - 1; i >= 0; i--)
      if (vec_nr[i]) ld_out = v_r[i];
  end

  assign ld_oe = !lden_n;
  assign fn    = fn_r;

endmodule
