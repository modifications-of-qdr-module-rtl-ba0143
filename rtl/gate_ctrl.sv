// gate_ctrl: external gate triggering control (QDR modification 1.4).
//
// The external gate input is first passed through a two-stage synchroniser
// (this design's choice, since gate_in comes from outside). It then feeds
// two paths: ext_gate_ff, which latches a single trigger for the continuous
// triggered mode, and ddc_gate, the gate logic of the other modes. A
// multiplexer controlled by the control register bits [2..1] selects
// ext_gate_ff in mode 10 and ddc_gate otherwise, and drives the active-low
// /gate output.
//
// Timing: a rising gate_in reaches /gate three clocks later in mode 10
// (two synchroniser stages plus the trigger flip-flop) and in mode 11 (two
// stages plus the ddc_gate register).
module gate_ctrl
  import qdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  acq_mode_e mode,      // control register bits [2..1]
  input  logic      gate_in,   // external gate, asynchronous
  output logic      gate_n,    // /gate, low = acquire
  output logic      triggered  // ext_gate_ff state, for status
);

  logic [1:0] sync;
  logic       trig, ddc_g;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sync <= '0;
    else        sync <= {sync[0], gate_in};
  end

  ext_gate_ff u_ext_gate_ff (
    .clk, .rst_n, .mode, .gate_s(sync[1]), .trig
  );

  ddc_gate u_ddc_gate (
    .clk, .rst_n, .mode, .gate_s(sync[1]), .gate(ddc_g)
  );

  assign gate_n    = (mode == ACQ_CONT_TRIG) ? ~trig : ~ddc_g;
  assign triggered = trig;

endmodule
