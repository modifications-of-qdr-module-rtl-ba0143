// qdr_top: FPGA control logic of the QDR VME receiver module with the
// continuous triggered mode and the FIFO-status interrupt controller.
//
// A local register bus, as delivered by the VME interface controller,
// reaches three register groups: the control register (0x0010), the FIFO
// data registers (0x0000, 0x0004, 0x0008), which give access to the FIFO
// stacks or, with control bit 6 set, to their PAE/PAF offset registers, and
// the interrupt controller (0x0100..0x0140). The control register's mode
// bits [2..1] drive the external gate control, which produces /gate for the
// receiver channels. The interrupt controller watches the FIFO status
// register and talks to the VME controller through /lirq and /lden,
// placing the Status/ID vector on the local data bus while /lden is low.
//
// Register bus protocol (this design's choice): the master gives a
// one-clock bus_valid with bus_we, bus_addr (byte address) and bus_wdata,
// then waits for the one-clock bus_ack, with bus_rdata valid for a read.
// Control and interrupt registers ack one clock after the request, FIFO
// registers two clocks after it; unmapped addresses ack after one clock
// and read as zero.
//
// The FIFO chips, the VME controller and the acquisition data path are
// outside this logic: their pins are ports. The FIFO status register comes
// in as a port, as its bit assignment is defined elsewhere. Control
// register bit 7 is stored and read back but has no function, so it is
// the one control bit used nowhere in this module.
module qdr_top
  import qdr_pkg::*;
#(
  parameter int unsigned N_FIFO = 3,
  parameter int unsigned FIFO_W = 18
) (
  input  logic               clk,
  input  logic               rst_n,
  // local register bus
  input  logic               bus_valid,
  input  logic               bus_we,
  input  logic [ADDR_W-1:0]  bus_addr,
  input  logic [DATA_W-1:0]  bus_wdata,
  output logic               bus_ack,
  output logic [DATA_W-1:0]  bus_rdata,
  // control register fields used elsewhere on the board
  output logic               vme_en,
  output logic [1:0]         acq_sel,
  output logic               link_port,
  output logic [1:0]         ddc_fmt,
  // external gate
  input  logic               gate_in,
  output logic               gate_n,
  output logic               gate_triggered,
  // FIFO pins
  output logic [N_FIFO-1:0]  fifo_wen_n,
  output logic [N_FIFO-1:0]  fifo_ren_n,
  output logic               fifo_ld_n,
  output logic [FIFO_W-1:0]  fifo_d,
  input  logic [FIFO_W-1:0]  fifo_q [N_FIFO],
  // interrupt
  input  logic [STATUS_W-1:0] fifo_status,
  input  logic               lden_n,
  output logic               lirq_n,
  output logic [DATA_W-1:0]  ld_out,
  output logic               ld_oe,
  output logic [N_IRQ-1:0]   irq_flags
);

  bus_req_t          req;
  ctrl_t             ctrl;
  logic [9:0]        ctrl_val;
  logic [FIFO_W-1:0] fifo_rdata;
  logic [DATA_W-1:0] irq_rdata;
  logic              irq_hit, fifo_hit, fifo_ack;
  logic              reg_ack;
  logic [DATA_W-1:0] reg_rdata;

  assign req = '{we: bus_we, addr: bus_addr, wdata: bus_wdata};

  ctrl_reg u_ctrl_reg (
    .clk, .rst_n, .req_valid(bus_valid), .req, .ctrl, .value(ctrl_val)
  );

  gate_ctrl u_gate_ctrl (
    .clk, .rst_n, .mode(ctrl.acq_mode), .gate_in, .gate_n,
    .triggered(gate_triggered)
  );

  fifo_access #(.N_FIFO(N_FIFO), .FIFO_W(FIFO_W)) u_fifo_access (
    .clk, .rst_n, .req_valid(bus_valid), .req, .prog(ctrl.fifo_prog),
    .hit(fifo_hit), .ack(fifo_ack), .rdata(fifo_rdata),
    .fifo_wen_n, .fifo_ren_n, .fifo_ld_n, .fifo_d, .fifo_q
  );

  irq_ctrl u_irq_ctrl (
    .clk, .rst_n, .req_valid(bus_valid), .req, .hit(irq_hit),
    .rdata(irq_rdata), .fifo_status, .lden_n, .lirq_n, .ld_out, .ld_oe,
    .fn(irq_flags)
  );

  // Single-cycle register accesses (everything but the FIFO registers)
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_ack   <= 1'b0;
      reg_rdata <= '0;
    end else begin
      reg_ack <= bus_valid && !fifo_hit;
      if (bus_valid && !bus_we)
        reg_rdata <= (bus_addr == A_CTRL) ? DATA_W'(ctrl_val)
                   : irq_hit              ? irq_rdata
                   :                        '0;
    end
  end

  assign bus_ack   = reg_ack | fifo_ack;
  assign bus_rdata = fifo_ack ? DATA_W'(fifo_rdata) : reg_rdata;

  assign vme_en    = ctrl.vme_en;
  assign acq_sel   = ctrl.acq_sel;
  assign link_port = ctrl.link_port;
  assign ddc_fmt   = ctrl.ddc_fmt;

endmodule
