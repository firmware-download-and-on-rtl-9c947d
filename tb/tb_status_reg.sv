// tb_status_reg: self-checking test of the status word.
//
// Random error, overflow, busy, armed and clear events are applied and the
// status word is compared with a reference one clock later: bit 1 error
// latched, bit 0 type of the first error, bit 2 busy, bit 3 overflow seen,
// bit 4 armed; clear removes the latched bits.
module tb_status_reg;
  import jtag_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic clear, err_set, err_type, overflow, busy, armed;
  logic [7:0] status;

  status_reg dut (.clk(clk), .rst_n(rst_n), .clear(clear), .err_set(err_set),
                  .err_type(err_type), .overflow(overflow), .busy(busy), .armed(armed),
                  .status(status));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic r_err = 0, r_type = 0, r_ovf = 0;
  logic [7:0] exp_status = '0;
  int n_t0 = 0, n_t1 = 0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 0; err_set = 0; err_type = 0; overflow = 0; busy = 0; armed = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      #1;
      check(status == exp_status, $sformatf("status %02h expected %02h", status, exp_status));
      clear    = ($urandom % 30) == 0;
      err_set  = ($urandom % 20) == 0;
      err_type = 1'($urandom);
      overflow = ($urandom % 40) == 0;
      busy     = 1'($urandom);
      armed    = 1'($urandom);
      @(posedge clk);
      // the word shows the latched bits as they were before this edge
      exp_status = {3'b000, armed, r_ovf, busy, r_err, r_type};
      if (err_set && !r_err) begin
        r_err = 1; r_type = err_type;
        if (err_type) n_t1++; else n_t0++;
      end else if (clear) begin
        r_err = 0; r_type = 0;
      end
      if (overflow) r_ovf = 1; else if (clear) r_ovf = 0;
    end
    check(n_t0 > 10 && n_t1 > 10, "both error types latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
