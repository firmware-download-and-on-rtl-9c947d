// jtag_driver: TCK/TMS/TDI pin driver and TDO sampler.
//
// Each accepted bit operation becomes one TCK period: TMS and TDI change while
// TCK is low, TCK rises after HALF system clocks, TDO is sampled at the end of
// the high phase and TCK falls HALF clocks later. Operations offered back to
// back give a continuous TCK of CLK_HZ / (2*HALF); with the defaults
// (30 MHz system clock, this design's assumption) that is the 7.5 MHz the
// programmer is specified for, below the 10 MHz limit of the JTAG pins.
// HALF is rounded up, so TCK is never faster than TCK_HZ, and a setting that
// would exceed 10 MHz stops elaboration.
// When no operation is offered TCK stays low, as the programmer requires
// between chunks; TMS and TDI keep their last values.
//
// Interface: `op_valid`/`op_ready` handshake for a bit_op_t. `res_valid`
// pulses for one clock when the period of an accepted operation has ended,
// with the sampled `res_tdo` and the operation's `res_cap` flag. `idle` is
// high when no period is in progress.
module jtag_driver
  import jtag_pkg::*;
#(
  parameter int unsigned CLK_HZ = 30_000_000,
  parameter int unsigned TCK_HZ = 7_500_000
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    op_valid,
  input  bit_op_t op,
  output logic    op_ready,
  output logic    res_valid,
  output logic    res_tdo,
  output logic    res_cap,
  output logic    idle,
  output logic    tck,
  output logic    tms,
  output logic    tdi,
  input  logic    tdo
);

  // Clocks per TCK phase, rounded up so TCK never runs above TCK_HZ.
  localparam int unsigned HALF_RAW = (CLK_HZ + 2 * TCK_HZ - 1) / (2 * TCK_HZ);
  localparam int unsigned HALF     = HALF_RAW < 1 ? 1 : HALF_RAW;
  localparam int unsigned CW       = HALF > 1 ? $clog2(HALF) : 1;
  localparam int unsigned PIN_MAX_HZ = 10_000_000;

  if (CLK_HZ / (2 * HALF) > PIN_MAX_HZ) begin : g_too_fast
    $error("jtag_driver: TCK of %0d Hz exceeds the 10 MHz JTAG pin limit", CLK_HZ / (2 * HALF));
  end

  typedef enum logic [1:0] {D_IDLE, D_LOW, D_HIGH} dstate_t;

  dstate_t        st;
  logic [CW-1:0]  cnt;
  logic           cap_q;
  logic           accept;

  assign op_ready = (st == D_IDLE) || (st == D_HIGH && cnt == '0);
  assign accept   = op_valid && op_ready;
  assign idle     = (st == D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= D_IDLE;
      cnt       <= '0;
      tck       <= 1'b0;
      tms       <= 1'b1;
      tdi       <= 1'b0;
      cap_q     <= 1'b0;
      res_valid <= 1'b0;
      res_tdo   <= 1'b0;
      res_cap   <= 1'b0;
    end else begin
      res_valid <= 1'b0;
      unique case (st)
        D_IDLE: ;
        D_LOW:
          if (cnt == '0) begin
            tck <= 1'b1;
            cnt <= CW'(HALF - 1);
            st  <= D_HIGH;
          end else cnt <= cnt - 1'b1;
        D_HIGH:
          if (cnt == '0) begin
            tck       <= 1'b0;
            res_valid <= 1'b1;
            res_tdo   <= tdo;
            res_cap   <= cap_q;
            st        <= D_IDLE;
          end else cnt <= cnt - 1'b1;
        default: st <= D_IDLE;
      endcase
      if (accept) begin
        tms   <= op.tms;
        tdi   <= op.tdi;
        cap_q <= op.cap;
        // One clock is spent here with TCK low, so count HALF-1 more.
        cnt   <= CW'(HALF - 1);
        st    <= D_LOW;
      end
    end
  end

endmodule
