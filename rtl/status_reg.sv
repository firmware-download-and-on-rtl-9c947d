// status_reg: status word the host polls over the D-Link.
//
// Bit 1 says that an error has been latched and bit 0 which kind: 1 for TDO
// read back differing from the expected bits, 0 for a byte in the stream that
// matches no known command. These two bits follow the protocol description;
// the rest are this design's additions: bit 2 busy (the state machine has not
// finished the chunk it holds), bit 3 a byte was lost to a full buffer, bit 4
// the programmer is armed. The first error is kept until `clear` (sent with
// the program command); an error and a clear in the same clock leave the
// error set. The word is a registered copy, one clock behind its sources.
module status_reg
  import jtag_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       err_set,
  input  logic       err_type,
  input  logic       overflow,
  input  logic       busy,
  input  logic       armed,
  output logic [7:0] status
);

  logic err_q, type_q, ovf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      err_q  <= 1'b0;
      type_q <= 1'b0;
      ovf_q  <= 1'b0;
      status <= '0;
    end else begin
      if (err_set && !err_q) begin
        err_q  <= 1'b1;
        type_q <= err_type;
      end else if (clear) begin
        err_q  <= 1'b0;
        type_q <= 1'b0;
      end
      if (overflow)   ovf_q <= 1'b1;
      else if (clear) ovf_q <= 1'b0;

      status              <= '0;
      status[ST_ERR]      <= err_q;
      status[ST_ERR_TYPE] <= type_q;
      status[ST_BUSY]     <= busy;
      status[ST_OVERFLOW] <= ovf_q;
      status[ST_ARMED]    <= armed;
    end
  end

endmodule
