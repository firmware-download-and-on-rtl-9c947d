// tb_clink_rx: self-checking test of the C-Link front end.
//
// A random mix of command and data words is sent. A reference model decides
// for each word whether it must reach the buffer (data word while armed) and
// the testbench checks the written bytes in order, the clear pulse that
// follows each program command, that other commands are ignored, and that
// `disarm` stops the forwarding until the next program command.
module tb_clink_rx;
  import jtag_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       cl_valid, cl_is_cmd, disarm, armed, clear, wr_en;
  logic [7:0] cl_data, wr_data;

  clink_rx dut (.clk(clk), .rst_n(rst_n), .cl_valid(cl_valid), .cl_is_cmd(cl_is_cmd),
                .cl_data(cl_data), .disarm(disarm), .armed(armed), .clear(clear),
                .wr_en(wr_en), .wr_data(wr_data));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic ref_armed = 1'b0, exp_wr = 1'b0, exp_clear = 1'b0;
  logic [7:0] exp_data = '0;
  int n_wr = 0, n_clear = 0, n_disarm = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cl_valid = 0; cl_is_cmd = 0; cl_data = 0; disarm = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      #1;
      check(armed == ref_armed, "armed state");
      check(wr_en == exp_wr && (!exp_wr || wr_data == exp_data), "buffer write");
      check(clear == exp_clear, "clear pulse");
      cl_valid  = ($urandom % 4) != 0;
      cl_is_cmd = ($urandom % 10) == 0;
      cl_data   = (cl_is_cmd && ($urandom % 2)) ? CLINK_CMD_PROGRAM : 8'($urandom);
      disarm    = ($urandom % 200) == 0;
      // reference
      exp_wr    = cl_valid && !cl_is_cmd && ref_armed && !disarm;
      exp_data  = cl_data;
      exp_clear = cl_valid && cl_is_cmd && cl_data == CLINK_CMD_PROGRAM;
      if (exp_wr) n_wr++;
      if (exp_clear) n_clear++;
      if (disarm && ref_armed) n_disarm++;
      @(posedge clk);
      if (exp_clear) ref_armed = 1'b1;
      else if (disarm) ref_armed = 1'b0;
    end
    check(n_wr > 100 && n_clear > 20 && n_disarm > 3, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
