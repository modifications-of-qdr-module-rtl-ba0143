// irq_match: masked compare of the FIFO status register for one interrupt.
//
// The FIFO status register matches the value register Xm when every bit
// selected by the mask register Mm is equal in both; a mask bit of 1
// enables the compare of that flag and a mask bit of 0 ignores it, as in
// the QDR IRQ memory map. With an all-zero mask the compare always matches.
// Purely combinational.
module irq_match #(
  parameter int unsigned W = 10   // FIFO status register width
) (
  input  logic [W-1:0] status,  // FIFO status register
  input  logic [W-1:0] x,       // Xm value register
  input  logic [W-1:0] m,       // Mm mask register
  output logic         match
);

  assign match = ((status ^ x) & m) == '0;

endmodule
