// prom_prog_top: FPGA side of the on-board flash PROM programmer.
//
// A new firmware image, converted off-board from SVF into a compact command
// stream, arrives from the host over the C-Link in chunks. The chain is:
//
//   C-Link words -> clink_rx -> chunk_fifo -> svf_engine -> jtag_driver -> PROM
//                                               |  (tap_tracker inside)
//                                               +-> status_reg -> D-Link word
//
// clink_rx arms the programmer on the program command and fills the buffer;
// svf_engine executes the commands and walks the PROM's TAP; jtag_driver puts
// each bit on TCK/TMS/TDI at 7.5 MHz and samples TDO; status_reg collects
// the error and busy bits the host polls before it sends the next chunk.
// The C-Link and D-Link themselves are outside this module: the C-Link comes
// in as received words and the status word goes out as a plain port.
//
// Parameters: system clock CLK_HZ (30 MHz, assumed), TCK_HZ (7.5 MHz),
// FIFO_DEPTH (1024 bytes, assumed), SIZE_BYTES / COUNT_BYTES (widths of the
// shift-length and RUNTEST count fields) and MAX_CHECK_BITS (longest shift
// whose TDO can be checked).
module prom_prog_top
  import jtag_pkg::*;
#(
  parameter int unsigned CLK_HZ         = 30_000_000,
  parameter int unsigned TCK_HZ         = 7_500_000,
  parameter int unsigned FIFO_DEPTH     = 1024,
  parameter int unsigned SIZE_BYTES     = 1,
  parameter int unsigned COUNT_BYTES    = 4,
  parameter int unsigned MAX_CHECK_BITS = 256
) (
  input  logic       clk,
  input  logic       rst_n,
  // C-Link, as received words
  input  logic       cl_valid,
  input  logic       cl_is_cmd,
  input  logic [7:0] cl_data,
  // status word, read by the host over the D-Link
  output logic [7:0] status,
  // JTAG pins of the flash PROM
  output logic       jtag_tck,
  output logic       jtag_tms,
  output logic       jtag_tdi,
  input  logic       jtag_tdo,
  // observation: tracked TAP state and bytes waiting in the buffer
  output tap_state_t tap_state,
  output logic [$clog2(FIFO_DEPTH+1)-1:0] fifo_level
);

  logic       armed, clear, wr_en;
  logic [7:0] wr_data;
  logic       rd_valid, rd_pop, overflow;
  logic [7:0] rd_data;
  logic       op_valid, op_ready, res_valid, res_tdo, res_cap, drv_idle;
  bit_op_t    op;
  logic       err_set, err_type, stream_abort, busy;

  clink_rx u_clink (
    .clk     (clk),
    .rst_n   (rst_n),
    .cl_valid(cl_valid),
    .cl_is_cmd(cl_is_cmd),
    .cl_data (cl_data),
    .disarm  (stream_abort),
    .armed   (armed),
    .clear   (clear),
    .wr_en   (wr_en),
    .wr_data (wr_data)
  );

  chunk_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_fifo (
    .clk     (clk),
    .rst_n   (rst_n),
    .flush   (clear),
    .wr_en   (wr_en),
    .wr_data (wr_data),
    .rd_valid(rd_valid),
    .rd_data (rd_data),
    .rd_pop  (rd_pop),
    .full    (),
    .empty   (),
    .overflow(overflow),
    .level   (fifo_level)
  );

  svf_engine #(
    .SIZE_BYTES    (SIZE_BYTES),
    .COUNT_BYTES   (COUNT_BYTES),
    .MAX_CHECK_BITS(MAX_CHECK_BITS)
  ) u_engine (
    .clk         (clk),
    .rst_n       (rst_n),
    .restart     (clear),
    .in_valid    (rd_valid),
    .in_data     (rd_data),
    .in_pop      (rd_pop),
    .op_valid    (op_valid),
    .op          (op),
    .op_ready    (op_ready),
    .res_valid   (res_valid),
    .res_tdo     (res_tdo),
    .res_cap     (res_cap),
    .drv_idle    (drv_idle),
    .err_set     (err_set),
    .err_type    (err_type),
    .stream_abort(stream_abort),
    .busy        (busy),
    .tap_state   (tap_state)
  );

  jtag_driver #(.CLK_HZ(CLK_HZ), .TCK_HZ(TCK_HZ)) u_drv (
    .clk      (clk),
    .rst_n    (rst_n),
    .op_valid (op_valid),
    .op       (op),
    .op_ready (op_ready),
    .res_valid(res_valid),
    .res_tdo  (res_tdo),
    .res_cap  (res_cap),
    .idle     (drv_idle),
    .tck      (jtag_tck),
    .tms      (jtag_tms),
    .tdi      (jtag_tdi),
    .tdo      (jtag_tdo)
  );

  status_reg u_status (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (clear),
    .err_set (err_set),
    .err_type(err_type),
    .overflow(overflow),
    .busy    (busy),
    .armed   (armed),
    .status  (status)
  );

endmodule
