// tb_svf_engine: self-checking test of the prom-program state machine.
//
// svf_engine drives a jtag_driver and a behavioural PROM TAP; the testbench
// plays the chunk buffer with its own array, so it can also starve the engine
// in the middle of a payload. Expected results come from the PROM model's
// registers and counters: instruction and data register contents, TAP state
// after each command, TCK periods spent in Run-Test/Idle and Test-Logic-Reset,
// the error pulses and their type, draining after an error, and the TCK
// period (4 system clocks) during a long shift.
module tb_svf_engine;
  import jtag_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // byte source standing in for the chunk buffer
  logic [7:0] mem [0:8191];
  int         wr = 0, rd = 0;
  logic       starve = 1'b0;
  logic       in_valid, in_pop;
  logic [7:0] in_data;
  assign in_valid = !starve && (rd < wr);
  assign in_data  = mem[rd[12:0]];
  always @(posedge clk) if (in_pop && in_valid) rd <= rd + 1;

  logic op_valid, op_ready, res_valid, res_tdo, res_cap, drv_idle;
  bit_op_t op;
  logic err_set, err_type, stream_abort, busy;
  logic restart = 1'b0;
  tap_state_t tap_state;
  logic tck, tms, tdi, tdo;

  svf_engine dut (
    .clk(clk), .rst_n(rst_n), .restart(restart), .in_valid(in_valid), .in_data(in_data), .in_pop(in_pop),
    .op_valid(op_valid), .op(op), .op_ready(op_ready), .res_valid(res_valid),
    .res_tdo(res_tdo), .res_cap(res_cap), .drv_idle(drv_idle), .err_set(err_set),
    .err_type(err_type), .stream_abort(stream_abort), .busy(busy), .tap_state(tap_state));

  jtag_driver drv (
    .clk(clk), .rst_n(rst_n), .op_valid(op_valid), .op(op), .op_ready(op_ready),
    .res_valid(res_valid), .res_tdo(res_tdo), .res_cap(res_cap), .idle(drv_idle),
    .tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo));

  logic [3:0]  m_state;
  logic [7:0]  m_ir;
  logic [15:0] m_data;
  int m_idle, m_reset, m_edges, m_dru, m_iru;
  prom_tap_model #(.IDCODE(32'h5502_6093)) prom (
    .tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo), .state(m_state), .ir(m_ir),
    .data_cell(m_data), .idle_tcks(m_idle), .reset_tcks(m_reset), .tck_edges(m_edges),
    .dr_updates(m_dru), .ir_updates(m_iru));

  // error pulses
  int n_err0 = 0, n_err1 = 0;
  always @(posedge clk) if (rst_n && err_set) begin
    if (err_type) n_err1++; else n_err0++;
  end

  // TCK period during streaming
  int last_rise = -1, cyc = 0, n_period_ok = 0, n_period_bad = 0;
  logic tck_d = 1'b0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    tck_d <= tck;
    if (tck && !tck_d) begin
      if (last_rise >= 0 && cyc - last_rise == 4) n_period_ok++;
      else if (last_rise >= 0 && cyc - last_rise < 4) n_period_bad++;
      last_rise = cyc;
    end
  end

  task automatic push(input logic [7:0] b);
    mem[wr[12:0]] = b;
    wr = wr + 1;
  endtask

  // Encode one shift command: opcode, end state, length, TDI [, exp [, mask]].
  task automatic shift(input logic [3:0] opc, input logic [3:0] endst, input int nbits,
                       input logic [255:0] tdiv, input logic [255:0] expv,
                       input logic [255:0] maskv);
    int nb;
    nb = (nbits + 7) / 8;
    push({opc, endst});
    push(8'(nbits - 1));
    for (int i = 0; i < nb; i++) push(tdiv[i*8 +: 8]);
    if (opc == OP_SDRMASK1 || opc == OP_SIRMASK1 || opc == OP_SDRMASK || opc == OP_SIRMASK)
      for (int i = 0; i < nb; i++) push(expv[i*8 +: 8]);
    if (opc == OP_SDRMASK || opc == OP_SIRMASK)
      for (int i = 0; i < nb; i++) push(maskv[i*8 +: 8]);
  endtask

  task automatic state_cmd(input logic [3:0] s);
    push({OP_STATE, s});
  endtask

  task automatic runtest(input logic [3:0] s, input logic [31:0] n);
    push({OP_RUNTEST, s});
    push(n[31:24]); push(n[23:16]); push(n[15:8]); push(n[7:0]);
  endtask

  task automatic wait_done();
    repeat (3) @(posedge clk);
    while (busy || rd < wr) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int idle0, edges0, e0, e1;
  logic [255:0] pat, expb;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // 1. reset and idle
    state_cmd(TAP_RESET);
    wait_done();
    check(m_state == 4'hF, "STATE RESET reaches Test-Logic-Reset");
    check(m_edges == 5, "STATE RESET gives five TCK periods");
    check(tap_state == TAP_RESET, "tracked state RESET");
    state_cmd(TAP_IDLE);
    wait_done();
    check(m_state == 4'hC, "STATE IDLE reaches Run-Test/Idle");
    check(m_edges == 6, "RESET->IDLE is one TCK");

    // 2. instruction scan with check of the captured IR value
    shift(OP_SIRMASK1, TAP_IDLE, 8, 256'h01, 256'h01, '0);
    wait_done();
    check(m_ir == 8'h01 && m_state == 4'hC, "SIRMASK1 loads IDCODE, ends in IDLE");
    check(n_err0 == 0 && n_err1 == 0, "no error for matching IR capture");

    // 3. IDCODE read with all-ones mask
    shift(OP_SDRMASK1, TAP_IDLE, 32, 256'h0, 256'h5502_6093, '0);
    wait_done();
    check(n_err1 == 0, "IDCODE matches");

    // 4. write the data cell, read it back through a mask, end in DRPAUSE
    shift(OP_SIR, TAP_IDLE, 8, 256'h02, '0, '0);
    shift(OP_SDR, TAP_IDLE, 16, 256'hA5C3, '0, '0);
    wait_done();
    check(m_ir == 8'h02 && m_data == 16'hA5C3, "SDR writes the data cell");
    shift(OP_SDRMASK, TAP_PAUSE_DR, 16, 256'h1234, 256'hA5C3, 256'hFFFF);
    wait_done();
    check(n_err1 == 0, "read back of written word matches");
    check(m_state == 4'h3 && tap_state == TAP_PAUSE_DR, "SDRMASK ends in DRPAUSE");
    check(m_data == 16'hA5C3, "no Update-DR yet in DRPAUSE");
    e0 = m_dru;
    state_cmd(TAP_PAUSE_IR);
    wait_done();
    check(m_state == 4'hB && m_dru == e0 + 1 && m_data == 16'h1234,
          "DRPAUSE->IRPAUSE passes Update-DR");
    state_cmd(TAP_IDLE);
    wait_done();
    // Leaving IRPAUSE passes Update-IR, which loads the captured 8'h01.
    check(m_state == 4'hC && m_ir == 8'h01, "IRPAUSE->IDLE updates IR with its capture");
    shift(OP_SIR, TAP_IDLE, 8, 256'h02, '0, '0);

    // 5. masked difference is ignored
    shift(OP_SDRMASK, TAP_IDLE, 16, 256'h1234, 256'h12F4, 256'hFF0F);
    wait_done();
    check(n_err1 == 0, "difference under a zero mask bit is not an error");

    // 6. RUNTEST in IDLE
    idle0 = m_idle;
    runtest(TAP_IDLE, 32'd100);
    wait_done();
    check(m_idle - idle0 == 100, $sformatf("RUNTEST gives 100 TCKs in IDLE (%0d)", m_idle - idle0));

    // 7. long shift through BYPASS with the buffer starved mid-payload
    shift(OP_SIR, TAP_IDLE, 8, 256'hFF, '0, '0);
    pat = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    expb = {pat[254:0], 1'b0};
    starve = 1'b1;
    shift(OP_SDRMASK1, TAP_IDLE, 256, pat, expb, '0);
    starve = 1'b0;
    repeat (150) @(posedge clk);
    starve = 1'b1;
    repeat (60) @(posedge clk);
    edges0 = m_edges;
    repeat (100) @(posedge clk);
    check(m_edges == edges0, "TCK stops while the buffer is empty");
    check(tck == 1'b0, "TCK held low while waiting");
    starve = 1'b0;
    wait_done();
    check(n_err1 == 0 && n_err0 == 0, "256-bit BYPASS shift matches");
    check(n_period_ok > 200 && n_period_bad == 0, "TCK period is 4 clocks (7.5 MHz at 30 MHz)");

    // 8. TDO mismatch: error type 1, remaining bytes drained, nothing clocked
    shift(OP_SIR, TAP_IDLE, 8, 256'h02, '0, '0);
    shift(OP_SDRMASK1, TAP_IDLE, 16, 256'h0, 256'hFFFF, '0);
    e0 = wr;
    state_cmd(TAP_RESET);
    shift(OP_SDR, TAP_IDLE, 16, 256'hBEEF, '0, '0);
    wait_done();
    check(n_err1 == 1 && n_err0 == 0, "TDO mismatch flagged with type 1");
    check(m_state == 4'hC, "commands after the error are not executed");
    check(rd == wr, "buffer drained after the error");

    // 9. unknown opcode: type 0, then the engine runs the next stream
    push(8'h70);
    push(8'hFF);
    wait_done();
    check(n_err0 == 1, "unknown opcode flagged with type 0");
    push(8'h4A); // SDR ending in Shift-IR: not a stable state
    wait_done();
    check(n_err0 == 2, "bad end state flagged with type 0");
    e1 = m_reset;
    state_cmd(TAP_RESET);
    runtest(TAP_RESET, 32'd3);
    wait_done();
    // STATE RESET from IDLE: 2 of its 5 periods start in Test-Logic-Reset;
    // RUNTEST RESET: 5 routing periods plus 3 counted ones.
    check(m_state == 4'hF && m_reset - e1 == 10,
          $sformatf("engine recovers: RESET then RUNTEST in RESET (%0d)", m_reset - e1));

    // 10. restart drops a command whose payload never comes
    push({OP_SDR, TAP_IDLE}); push(8'd15); push(8'hAA);
    repeat (200) @(posedge clk);
    check(busy && m_state == 4'h2, "engine waits in Shift-DR for the missing byte");
    @(posedge clk); #1 restart = 1'b1;
    @(posedge clk); #1 restart = 1'b0;
    state_cmd(TAP_IDLE);
    wait_done();
    check(m_state == 4'hC && !busy, "after restart the next command routes out of Shift-DR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
