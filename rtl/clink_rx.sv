// clink_rx: C-Link front end of the PROM programmer.
//
// The host triggers programming by sending a command word down the C-Link and
// then sends the chunks of the command stream as data words. This block takes
// the already received C-Link words (`cl_valid`, `cl_is_cmd`, `cl_data`): the
// command CLINK_CMD_PROGRAM arms the programmer and clears the status errors
// (`clear` pulse); while armed every data word is written into the chunk
// buffer. An error seen by the state machine (`disarm`) ends the armed state,
// so the rest of a broken stream is dropped until the host sends the program
// command again. Other command words belong to other functions of the board
// and are ignored. Link framing and the value of the command code are not
// given by the protocol description and are this design's choices.
module clink_rx
  import jtag_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cl_valid,
  input  logic       cl_is_cmd,
  input  logic [7:0] cl_data,
  input  logic       disarm,
  output logic       armed,
  output logic       clear,
  output logic       wr_en,
  output logic [7:0] wr_data
);

  logic start;
  assign start = cl_valid && cl_is_cmd && (cl_data == CLINK_CMD_PROGRAM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed   <= 1'b0;
      clear   <= 1'b0;
      wr_en   <= 1'b0;
      wr_data <= '0;
    end else begin
      clear   <= start;
      wr_en   <= cl_valid && !cl_is_cmd && armed && !disarm;
      wr_data <= cl_data;
      if (start)       armed <= 1'b1;
      else if (disarm) armed <= 1'b0;
    end
  end

endmodule
