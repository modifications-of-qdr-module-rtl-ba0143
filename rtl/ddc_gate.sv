// ddc_gate: gate for the acquisition modes other than continuous triggered.
//
// Gives the active-high gate that enables DDC data acquisition for
// control register modes 00 (disabled: gate off), 01 (continuous: gate
// always on) and 11 (gated/synchronous: the gate follows the external gate
// input sample by sample). In mode 10 the gate is off here, because that
// mode is served by ext_gate_ff. The QDR documentation only names this
// block; the per-mode behaviour is the simplest logic giving the modes the
// control register lists. The gate input must already be synchronised.
//
// Timing: the output is registered, one clock after the mode or gate sample.
module ddc_gate
  import qdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  acq_mode_e mode,
  input  logic      gate_s,
  output logic      gate     // 1: acquisition enabled
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      gate <= 1'b0;
    else
      unique case (mode)
        ACQ_OFF:       gate <= 1'b0;
        ACQ_CONT:      gate <= 1'b1;
        ACQ_GATED:     gate <= gate_s;
        ACQ_CONT_TRIG: gate <= 1'b0;
      endcase
  end

endmodule
