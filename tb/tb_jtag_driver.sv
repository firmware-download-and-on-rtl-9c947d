// tb_jtag_driver: self-checking test of the JTAG pin driver.
//
// Random bit operations are offered, sometimes back to back and sometimes
// with gaps. The testbench checks that every operation gives exactly one TCK
// rise, that TMS/TDI are stable at each rise and equal the operation's
// values, that back-to-back operations give a 4-clock TCK period (7.5 MHz at
// 30 MHz), that TCK rests low between operations, and that the TDO value
// returned is the one present on the pin at the end of the high phase, with
// the operation's capture flag.
module tb_jtag_driver;
  import jtag_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic    op_valid, op_ready, res_valid, res_tdo, res_cap, idle;
  bit_op_t op;
  logic    tck, tms, tdi, tdo;

  jtag_driver #(.CLK_HZ(30_000_000), .TCK_HZ(7_500_000)) dut (
    .clk(clk), .rst_n(rst_n), .op_valid(op_valid), .op(op), .op_ready(op_ready),
    .res_valid(res_valid), .res_tdo(res_tdo), .res_cap(res_cap), .idle(idle),
    .tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected values per operation, in issue order
  bit_op_t sent [0:4095];
  logic    tdo_at_fall [0:4095];
  int n_sent = 0, n_rise = 0, n_res = 0, n_fall = 0;

  // the far end: a fresh random TDO after every falling TCK
  always @(negedge tck) begin
    tdo <= 1'($urandom);
  end
  initial tdo = 1'b0;

  logic tck_d = 1'b0;
  int cyc = 0, last_rise = -100, n_period4 = 0, n_short = 0, idle_high = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    tck_d <= tck;
    if (tck && !tck_d) begin
      if (cyc - last_rise == 4) n_period4++;
      if (cyc - last_rise < 4) n_short++;
      last_rise <= cyc;
      check(tms == sent[n_rise].tms && tdi == sent[n_rise].tdi,
            $sformatf("TMS/TDI of operation %0d at TCK rise", n_rise));
      n_rise++;
    end
    if (!tck && tck_d) n_fall++;
    if (idle && tck) idle_high++;
    if (res_valid) begin
      check(res_cap == sent[n_res].cap, "capture flag echoed");
      check(res_tdo == tdo_at_fall[n_res], $sformatf("TDO of operation %0d", n_res));
      n_res++;
    end
  end

  // TDO seen by the driver is the pin value just before TCK falls.
  always @(posedge clk) if (rst_n && tck && dut.st == dut.D_HIGH && dut.cnt == '0) tdo_at_fall[n_fall] <= tdo;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    op_valid = 1'b0; op = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(tck == 1'b0 && idle, "TCK low after reset");
    for (int i = 0; i < 1000; i++) begin
      #1;
      op_valid = 1'b1;
      op = bit_op_t'(3'($urandom));
      sent[n_sent] = op;
      @(posedge clk);
      while (!op_ready) @(posedge clk);
      n_sent++;
      #1;
      op_valid = 1'b0;
      if (i % 100 == 50) begin
        repeat (20) @(posedge clk);
        check(tck == 1'b0 && idle, "TCK rests low between operations");
      end
    end
    repeat (20) @(posedge clk);
    check(n_rise == 1000 && n_res == 1000, $sformatf("one TCK per operation (%0d, %0d)", n_rise, n_res));
    check(n_period4 > 900 && n_short == 0, $sformatf("back-to-back TCK period 4 clocks (%0d)", n_period4));
    check(idle_high == 0, "TCK never high while idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
