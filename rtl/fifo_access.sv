// fifo_access: register-bus access to the FIFO stacks and their PAE/PAF
// offset registers (QDR modification 1.6).
//
// Each FIFO has a data register on the local register bus (FIFO k at byte
// offset 0x0000 + 4*k). A write to it becomes one FIFO write strobe (/wen
// low for one clock, the bus data on the FIFO D pins); a read becomes one
// FIFO read strobe (/ren low for one clock) and returns the FIFO Q pins.
// The /ld pins follow the FIFO access select bit (control register bit 6):
// with the bit set, /ld is held low, so the same reads and writes reach the
// FIFO's programmable offset registers instead of its stack, alternating
// PAE, PAF, PAE, ... as the FIFO itself sequences them. Keeping the
// read-PAE, read-PAF, write-PAE, write-PAF order is left to software.
//
// Timing (this design's choice; clk is also the FIFO read and write clock):
//   write: request at edge 0 -> /wen low during the next clock, the FIFO
//          takes D at edge 1 -> ack at edge 2.
//   read:  request at edge 0 -> /ren low during the next clock -> the FIFO
//          drives Q after edge 1 -> Q captured into rdata and ack at edge 2.
// A new request may be issued in the clock after ack; requests that arrive
// while an access is in progress are an error (checked by an assertion).
module fifo_access
  import qdr_pkg::*;
#(
  parameter int unsigned N_FIFO = 3,    // data registers at 0x0000, 0x0004, 0x0008
  parameter int unsigned FIFO_W = 18    // CY7C4255 data width, D0..D17
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  input  bus_req_t           req,
  input  logic               prog,          // control register bit 6
  output logic               hit,           // req addresses a FIFO register
  output logic               ack,           // one-clock completion pulse
  output logic [FIFO_W-1:0]  rdata,         // valid with ack of a read
  output logic [N_FIFO-1:0]  fifo_wen_n,
  output logic [N_FIFO-1:0]  fifo_ren_n,
  output logic               fifo_ld_n,     // common /ld of all FIFOs
  output logic [FIFO_W-1:0]  fifo_d,        // common data to all FIFOs
  input  logic [FIFO_W-1:0]  fifo_q [N_FIFO]
);

  typedef enum logic [1:0] {S_IDLE, S_STROBE, S_DONE} state_e;

  state_e                       state;
  logic                         is_rd;
  logic [$clog2(N_FIFO+1)-1:0]  sel;
  logic [$clog2(N_FIFO+1)-1:0]  idx;

  // FIFO k sits at byte offset 4*k
  assign idx = req.addr[2 +: $bits(idx)];
  assign hit = (req.addr[1:0] == 2'b00) && (req.addr >> 2) < ADDR_W'(N_FIFO);

  assign fifo_ld_n = ~prog;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      is_rd      <= 1'b0;
      sel        <= '0;
      ack        <= 1'b0;
      rdata      <= '0;
      fifo_wen_n <= '1;
      fifo_ren_n <= '1;
      fifo_d     <= '0;
    end else begin
      ack <= 1'b0;
      unique case (state)
        S_IDLE:
          if (req_valid && hit) begin
            sel   <= idx;
            is_rd <= !req.we;
            if (req.we) begin
              fifo_wen_n[idx] <= 1'b0;
              fifo_d          <= req.wdata[FIFO_W-1:0];
            end else begin
              fifo_ren_n[idx] <= 1'b0;
            end
            state <= S_STROBE;
          end
        S_STROBE: begin
          fifo_wen_n <= '1;
          fifo_ren_n <= '1;
          state      <= S_DONE;
        end
        S_DONE: begin
          if (is_rd) rdata <= fifo_q[sel];
          ack   <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The bus master waits for ack before the next FIFO access
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    (req_valid && hit) |-> state == S_IDLE);

endmodule
