// ext_gate_ff: single-trigger flip-flop for the continuous triggered mode.
//
// While the acquisition mode (control register bits [2..1]) is 10,
// continuous triggered, the flip-flop waits passively for an edge of the
// external gate and, once it has seen one, stays set so that data is then
// delivered continuously. In any other mode it is held clear, so leaving and
// re-entering mode 10 arms it for a new single trigger. Only the mode bits
// control it, as the QDR modification prescribes.
//
// This design samples the gate with the module clock and reacts to its
// rising edge (a low-to-high change between two samples); the input must
// already be synchronised to `clk`. `trig` rises on the clock edge after the
// sample that shows the gate high.
module ext_gate_ff
  import qdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  acq_mode_e mode,      // control register bits [2..1]
  input  logic      gate_s,    // synchronised gate_in
  output logic      trig       // 1: trigger seen, acquisition running
);

  logic gate_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gate_q <= 1'b0;
      trig   <= 1'b0;
    end else begin
      gate_q <= gate_s;
      if (mode != ACQ_CONT_TRIG)
        trig <= 1'b0;
      else if (gate_s && !gate_q)
        trig <= 1'b1;
    end
  end

endmodule
