// cy7c4255_model: behavioural model of a synchronous FIFO with programmable
// almost-empty / almost-full offset registers, for testbenches only.
//
// It models the part of the CY7C4255 behaviour the register logic relies
// on, with read and write clock tied to one clock:
// - /ld high: /wen low pushes D, /ren low pops onto Q (Q holds otherwise);
// - /ld low:  /wen low writes D[13:0] into the offset register currently
//   selected, /ren low puts it on Q; either access moves the selection
//   on, alternating Empty offset (PAE), Full offset (PAF), PAE, ...;
//   taking /ld high again does not reset the selection;
// - /pae low when the word count is at or below the PAE offset, /paf low
//   when it is at or above DEPTH minus the PAF offset.
// One shared read/write selection and the default offsets are choices of
// this model. DEPTH is kept small for simulation.
module cy7c4255_model #(
  parameter int unsigned W       = 18,
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned OFF_W   = 14,
  parameter int unsigned DEF_OFF = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         wen_n,
  input  logic         ren_n,
  input  logic         ld_n,
  output logic [W-1:0] q,
  output logic         ef_n,
  output logic         ff_n,
  output logic         pae_n,
  output logic         paf_n,
  output logic [OFF_W-1:0] pae_off,
  output logic [OFF_W-1:0] paf_off
);

  logic [W-1:0] mem [DEPTH];
  int unsigned  wp, rp, cnt;
  logic         off_sel;   // 0: PAE (empty) offset, 1: PAF (full) offset

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= 0; rp <= 0; cnt <= 0;
      q <= '0;
      off_sel <= 1'b0;
      pae_off <= OFF_W'(DEF_OFF);
      paf_off <= OFF_W'(DEF_OFF);
    end else if (!ld_n) begin
      if (!wen_n) begin
        if (!off_sel) pae_off <= d[OFF_W-1:0];
        else          paf_off <= d[OFF_W-1:0];
      end
      if (!ren_n)
        q <= W'(off_sel ? paf_off : pae_off);
      if (!wen_n || !ren_n)
        off_sel <= !off_sel;
    end else begin
      automatic logic do_w = !wen_n && cnt < DEPTH;
      automatic logic do_r = !ren_n && cnt > 0;
      if (do_w) begin
        mem[wp] <= d;
        wp <= (wp + 1) % DEPTH;
      end
      if (do_r) begin
        q  <= mem[rp];
        rp <= (rp + 1) % DEPTH;
      end
      cnt <= cnt + (do_w ? 1 : 0) - (do_r ? 1 : 0);
    end
  end

  assign ef_n  = cnt != 0;
  assign ff_n  = cnt != DEPTH;
  assign pae_n = !(cnt <= 32'(pae_off));
  assign paf_n = !(cnt >= DEPTH - 32'(paf_off));

endmodule
