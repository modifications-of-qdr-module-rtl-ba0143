// qdr_pkg: constants and types shared by the QDR FPGA register logic.
//
// The register offsets are those of the QDR memory map (control register at
// 0x0010, IRQ block at 0x0100..0x0140, FIFO data registers at 0x0000, 0x0004
// and 0x0008). The acquisition mode encoding is the one of control register
// bits [2..1]. The local register bus request type (one-cycle strobe, byte
// address, 32-bit data) is this design's own choice.
package qdr_pkg;

  localparam int unsigned ADDR_W = 16;
  localparam int unsigned DATA_W = 32;

  // Number of interrupt sources and width of the FIFO status register
  localparam int unsigned N_IRQ    = 4;
  localparam int unsigned STATUS_W = 10;

  // Register map
  localparam logic [ADDR_W-1:0] A_FIFO0 = 16'h0000;
  localparam logic [ADDR_W-1:0] A_FIFO1 = 16'h0004;
  localparam logic [ADDR_W-1:0] A_FIFO2 = 16'h0008;
  localparam logic [ADDR_W-1:0] A_CTRL  = 16'h0010;
  localparam logic [ADDR_W-1:0] A_FN    = 16'h0100;
  localparam logic [ADDR_W-1:0] A_IE    = 16'h0140;

  // Control register bits [2..1]
  typedef enum logic [1:0] {
    ACQ_OFF       = 2'b00,  // acquisition disabled
    ACQ_CONT      = 2'b01,  // continuous acquisition
    ACQ_CONT_TRIG = 2'b10,  // continuous triggered acquisition
    ACQ_GATED     = 2'b11   // gated (synchronous) acquisition
  } acq_mode_e;

  // Decoded control register fields
  typedef struct packed {
    logic [1:0] ddc_fmt;      // [9..8] DDC data format
    logic       bit7;         // [7]   stored, no function assigned here
    logic       fifo_prog;    // [6]   0: FIFO stack, 1: PAE/PAF offset registers
    logic       link_port;    // [5]   link port
    logic [1:0] acq_sel;      // [4..3] acquisition mode select (01: bypass FIFOs)
    acq_mode_e  acq_mode;     // [2..1] acquisition enable / mode
    logic       vme_en;       // [0]   VME access enable
  } ctrl_t;

  // One local register bus access, valid for one clock
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
  } bus_req_t;

endpackage
