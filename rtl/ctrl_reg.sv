// ctrl_reg: the QDR control register at offset 0x0010.
//
// A write on the local register bus to 0x0010 loads bits [9..0]; higher
// bits are ignored, and the top level reads them as zero. The decoded
// fields follow the QDR memory map: bit 0 VME access enable, [2..1]
// acquisition enable/mode (00 off, 01 continuous, 10 continuous triggered,
// 11 gated), [4..3] acquisition mode select (01 bypasses the FIFOs), bit 5
// link port, bit 6 FIFO access select (1 = PAE/PAF offset registers),
// [9..8] DDC data format. Bit 7 is stored and read back but drives
// nothing, since no function is assigned to it. Reset to all zero
// (acquisition disabled) is this design's choice.
//
// Timing: the register takes the new value on the clock edge at which the
// write strobe is seen; `ctrl` and `value` show it right after that edge.
module ctrl_reg
  import qdr_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req_valid,   // one-cycle bus access strobe
  input  bus_req_t req,
  output ctrl_t    ctrl,        // decoded fields
  output logic [9:0]  value     // register contents, bits [9..0]
);

  logic [9:0] r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      r <= '0;
    else if (req_valid && req.we && req.addr == A_CTRL)
      r <= req.wdata[9:0];
  end

  assign ctrl  = ctrl_t'(r);
  assign value = r;

endmodule
