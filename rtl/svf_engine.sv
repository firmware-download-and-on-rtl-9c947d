// svf_engine: the prom-program state machine.
//
// It reads the compact command stream, one byte per clock at most, from the
// chunk buffer and turns every command into JTAG bit operations for the pin
// driver. The commands are the SVF ones reduced to what a single PROM needs:
//
//   SDR/SIR           0100/0011 eeee, size, TDI bytes
//   SDRMASK1/SIRMASK1 0010/0001 eeee, size, TDI bytes, expected-TDO bytes
//   SDRMASK/SIRMASK   0110/0101 eeee, size, TDI bytes, expected-TDO, mask
//   STATE             1111 ssss
//   RUNTEST           1011 ssss, TCK count
//
// eeee is the stable state to end in (ENDDR/ENDIR folded into the command),
// ssss a stable state. The size field holds the shift length minus one, so
// 256 bits fit in one byte. Its width, SIZE_BYTES, and the width of the
// RUNTEST count, COUNT_BYTES, are parameters; multi-byte fields arrive most
// significant byte first. TDI, expected and mask bytes each take
// ceil(bits/8) bytes, first byte first, and bit 0 of each byte is shifted
// first. (The byte order, bit order and field widths are this design's
// choices.) A RUNTEST walks to its state and gives that many TCK periods with
// TMS holding the state.
//
// A shift walks the TAP from its stable state to Shift-DR/IR, shifts the bits
// with TMS=1 on the last one, and walks on to the end state. For the checking
// commands each sampled TDO bit is kept in a capture register (up to
// MAX_CHECK_BITS); once the shift has finished the expected bytes are XORed
// in and, for the MASK forms, the mask bytes select which differences count.
//
// Errors: a byte that is not a known opcode, a state nibble that is not a
// stable state, or a checked shift longer than the capture register raises
// `err_set` with `err_type`=0; a TDO difference raises it with `err_type`=1.
// With the error the engine pulses `stream_abort`, empties the buffer and is then
// ready for the next command stream without any external reset.
// If the buffer runs dry in the middle of a command the engine simply waits,
// with TCK held low by the driver.
//
// `restart` (the host's program command) drops whatever command was in
// progress and waits for a new one; the TAP copy is kept, so the next command
// routes from wherever the PROM's TAP was left.
//
// Interface: `in_valid`/`in_data` is the head of a show-ahead buffer, popped
// by `in_pop`. `op_*`/`res_*`/`drv_idle` connect to jtag_driver. `busy` is low
// only when the engine waits for a command with an empty buffer and an idle
// driver, which is what the host polls for before sending the next chunk.
module svf_engine
  import jtag_pkg::*;
#(
  parameter int unsigned SIZE_BYTES     = 1,
  parameter int unsigned COUNT_BYTES    = 4,
  parameter int unsigned MAX_CHECK_BITS = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       restart,
  // command stream
  input  logic       in_valid,
  input  logic [7:0] in_data,
  output logic       in_pop,
  // jtag_driver
  output logic       op_valid,
  output bit_op_t    op,
  input  logic       op_ready,
  input  logic       res_valid,
  input  logic       res_tdo,
  input  logic       res_cap,
  input  logic       drv_idle,
  // status
  output logic       err_set,
  output logic       err_type,
  output logic       stream_abort,
  output logic       busy,
  output tap_state_t tap_state
);

  localparam int unsigned SZW   = 8 * SIZE_BYTES;
  localparam int unsigned NBW   = SZW + 1;           // shift length in bits
  localparam int unsigned CNW   = 8 * COUNT_BYTES;
  localparam int unsigned NCB   = (MAX_CHECK_BITS + 7) / 8;
  localparam int unsigned CAPW  = NCB * 8;
  localparam int unsigned CPW   = $clog2(CAPW + 1);
  localparam int unsigned CIW   = $clog2(CAPW);
  localparam int unsigned FBW   = (SIZE_BYTES > COUNT_BYTES ? SIZE_BYTES : COUNT_BYTES);
  localparam int unsigned FIW   = FBW > 1 ? $clog2(FBW) : 1;

  typedef enum logic [3:0] {
    E_CMD, E_SIZE, E_COUNT, E_NAV, E_SHIFT, E_RUN, E_WAIT, E_EXP, E_MASK,
    E_CHECK, E_ABORT
  } estate_t;

  typedef enum logic [1:0] {CHK_NONE, CHK_MASK1, CHK_MASK} chk_t;

  estate_t           st, nav_ret;
  tap_state_t        nav_target, end_state;
  logic [2:0]        rst_cnt;
  logic              is_ir;
  chk_t              chk;
  logic [FIW-1:0]    fidx;
  logic [SZW-1:0]    size_acc;
  logic [CNW-1:0]    count;
  logic [NBW-1:0]    nbits, bit_i;
  logic [NBW-4:0]    byte_j, nbytes;
  logic [7:0]        sh_byte;
  logic              have_byte;
  logic [CAPW-1:0]   cap_bits;
  logic [CPW-1:0]    cap_ptr;
  logic              mism;

  // TAP copy
  logic       trk_step, trk_tms_next, trk_at_target;
  tap_state_t trk_target;

  assign trk_step   = op_valid && op_ready;
  assign trk_target = nav_target;

  tap_tracker u_trk (
    .clk      (clk),
    .rst_n    (rst_n),
    .step     (trk_step),
    .tms      (op.tms),
    .target   (trk_target),
    .state    (tap_state),
    .tms_next (trk_tms_next),
    .at_target(trk_at_target)
  );

  // Decode of the byte at the head of the buffer.
  opcode_t    hd_op;
  tap_state_t hd_st;
  logic       hd_known;
  assign hd_op    = opcode_t'(in_data[7:4]);
  assign hd_st    = tap_state_t'(in_data[3:0]);
  always_comb begin
    unique case (in_data[7:4])
      OP_SDR, OP_SIR, OP_SDRMASK1, OP_SIRMASK1, OP_SDRMASK, OP_SIRMASK,
      OP_STATE, OP_RUNTEST: hd_known = is_stable(in_data[3:0]);
      default:              hd_known = 1'b0;
    endcase
  end

  // Navigation finished: RESET is reached by five TMS=1 periods whatever the
  // tracked state, every other target when the copy shows it.
  logic nav_done;
  assign nav_done = (nav_target == TAP_RESET) ? (rst_cnt == 3'd5) : trk_at_target;

  // Bits of expected/mask byte `byte_j` that belong to the shift.
  logic [7:0]     valid_mask;
  logic [NBW-1:0] rem_bits;
  always_comb begin
    rem_bits   = nbits - {byte_j, 3'b000};
    valid_mask = (rem_bits >= NBW'(8)) ? 8'hFF : 8'((9'd1 << rem_bits[3:0]) - 9'd1);
  end

  logic [7:0]     cap_byte, exp_diff;
  logic [CIW-1:0] jbase;
  assign jbase    = CIW'({byte_j, 3'b000});
  assign cap_byte = cap_bits[jbase +: 8];
  assign exp_diff = (cap_byte ^ in_data) & valid_mask;

  logic size_last, count_last;
  assign size_last  = (fidx == FIW'(SIZE_BYTES - 1));
  assign count_last = (fidx == FIW'(COUNT_BYTES - 1));
  logic [SZW-1:0] size_now;
  assign size_now = (SIZE_BYTES > 1) ? SZW'({size_acc, in_data}) : SZW'(in_data);
  logic [CNW-1:0] count_now;
  assign count_now = (COUNT_BYTES > 1) ? CNW'({count, in_data}) : CNW'(in_data);

  // Outputs toward the buffer and the driver.
  always_comb begin
    in_pop   = 1'b0;
    op_valid = 1'b0;
    op       = '{tms: 1'b0, tdi: 1'b0, cap: 1'b0};
    unique case (st)
      E_CMD, E_SIZE, E_COUNT, E_EXP, E_MASK, E_ABORT: in_pop = in_valid;
      E_SHIFT: begin
        in_pop = in_valid && !have_byte;
        if (have_byte) begin
          op_valid = 1'b1;
          op.tms   = (bit_i == nbits - 1'b1);
          op.tdi   = sh_byte[bit_i[2:0]];
          op.cap   = (chk != CHK_NONE);
        end
      end
      E_NAV: if (!nav_done) begin
        op_valid = 1'b1;
        op.tms   = (nav_target == TAP_RESET) ? 1'b1 : trk_tms_next;
        op.tdi   = 1'b0;
      end
      E_RUN: if (count != '0) begin
        op_valid = 1'b1;
        op.tms   = (end_state == TAP_RESET);
      end
      default: ;
    endcase
  end

  // The C-Link side is told at once, so that it stops filling the buffer.
  assign stream_abort = err_set;

  assign busy = !(st == E_CMD && !in_valid && drv_idle);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= E_CMD;
      nav_ret    <= E_CMD;
      nav_target <= TAP_RESET;
      end_state  <= TAP_IDLE;
      rst_cnt    <= '0;
      is_ir      <= 1'b0;
      chk        <= CHK_NONE;
      fidx       <= '0;
      size_acc   <= '0;
      count      <= '0;
      nbits      <= '0;
      bit_i      <= '0;
      byte_j     <= '0;
      nbytes     <= '0;
      sh_byte    <= '0;
      have_byte  <= 1'b0;
      cap_bits   <= '0;
      cap_ptr    <= '0;
      mism       <= 1'b0;
      err_set    <= 1'b0;
      err_type   <= 1'b0;
    end else begin
      err_set <= 1'b0;

      // TDO bits come back one period after they were asked for.
      if (res_valid && res_cap && cap_ptr < CPW'(CAPW)) begin
        cap_bits[cap_ptr[CIW-1:0]] <= res_tdo;
        cap_ptr           <= cap_ptr + 1'b1;
      end

      if (trk_step && st == E_NAV && nav_target == TAP_RESET) rst_cnt <= rst_cnt + 1'b1;

      if (restart) st <= E_CMD;
      else unique case (st)
        E_CMD: if (in_valid) begin
          fidx     <= '0;
          size_acc <= '0;
          count    <= '0;
          rst_cnt  <= '0;
          end_state <= hd_st;
          if (!hd_known) begin
            err_set  <= 1'b1;
            err_type <= 1'b0;
            st       <= E_ABORT;
          end else begin
            unique case (hd_op)
              OP_STATE: begin
                nav_target <= hd_st;
                nav_ret    <= E_CMD;
                st         <= E_NAV;
              end
              OP_RUNTEST: st <= E_COUNT;
              default: begin
                is_ir <= (hd_op == OP_SIR) || (hd_op == OP_SIRMASK1) || (hd_op == OP_SIRMASK);
                chk   <= (hd_op == OP_SDRMASK1 || hd_op == OP_SIRMASK1) ? CHK_MASK1 :
                         (hd_op == OP_SDRMASK  || hd_op == OP_SIRMASK ) ? CHK_MASK  : CHK_NONE;
                st    <= E_SIZE;
              end
            endcase
          end
        end

        E_SIZE: if (in_valid) begin
          size_acc <= size_now;
          fidx     <= fidx + 1'b1;
          if (size_last) begin
            nbits     <= NBW'(size_now) + 1'b1;
            nbytes    <= (NBW-3)'(((NBW+1)'(size_now) + (NBW+1)'(8)) >> 3);
            bit_i     <= '0;
            byte_j    <= '0;
            have_byte <= 1'b0;
            cap_ptr   <= '0;
            cap_bits  <= '0;
            mism      <= 1'b0;
            if (chk != CHK_NONE && NBW'(size_now) >= NBW'(MAX_CHECK_BITS)) begin
              err_set  <= 1'b1;
              err_type <= 1'b0;
              st       <= E_ABORT;
            end else begin
              nav_target <= is_ir ? TAP_SHIFT_IR : TAP_SHIFT_DR;
              nav_ret    <= E_SHIFT;
              st         <= E_NAV;
            end
          end
        end

        E_COUNT: if (in_valid) begin
          count <= count_now;
          fidx  <= fidx + 1'b1;
          if (count_last) begin
            nav_target <= end_state;
            nav_ret    <= E_RUN;
            rst_cnt    <= '0;
            st         <= E_NAV;
          end
        end

        E_NAV: if (nav_done) st <= nav_ret;

        E_SHIFT: begin
          if (!have_byte && in_valid) begin
            sh_byte   <= in_data;
            have_byte <= 1'b1;
          end
          if (op_valid && op_ready) begin
            bit_i <= bit_i + 1'b1;
            if (bit_i[2:0] == 3'd7) have_byte <= 1'b0;
            if (bit_i == nbits - 1'b1) begin
              have_byte  <= 1'b0;
              nav_target <= end_state;
              rst_cnt    <= '0;
              nav_ret    <= (chk == CHK_NONE) ? E_CMD : E_WAIT;
              st         <= E_NAV;
            end
          end
        end

        E_RUN: begin
          if (count == '0) st <= E_CMD;
          else if (op_valid && op_ready) count <= count - 1'b1;
        end

        E_WAIT: if (drv_idle && !res_valid) begin
          byte_j <= '0;
          st     <= E_EXP;
        end

        E_EXP: if (in_valid) begin
          if (chk == CHK_MASK1) mism <= mism | (|exp_diff);
          else                  cap_bits[jbase +: 8] <= exp_diff;
          if (byte_j == nbytes - 1'b1) begin
            byte_j <= '0;
            st     <= (chk == CHK_MASK1) ? E_CHECK : E_MASK;
          end else byte_j <= byte_j + 1'b1;
        end

        E_MASK: if (in_valid) begin
          mism <= mism | (|(cap_byte & in_data));
          if (byte_j == nbytes - 1'b1) st <= E_CHECK;
          else                         byte_j <= byte_j + 1'b1;
        end

        E_CHECK: begin
          if (mism) begin
            err_set  <= 1'b1;
            err_type <= 1'b1;
            st       <= E_ABORT;
          end else st <= E_CMD;
        end

        E_ABORT: if (!in_valid && drv_idle) st <= E_CMD;

        default: st <= E_CMD;
      endcase
    end
  end

endmodule
