// tb_svf_engine_wide: the prom-program state machine with wider fields.
//
// The engine is built with a two-byte length field, a two-byte RUNTEST count
// and a 512-bit capture register, and run against the behavioural PROM TAP.
// Checks: a 300-bit checked scan through BYPASS (both MASK1 and masked
// forms), a 600-bit unchecked scan, a 600-bit checked scan that exceeds the
// capture register (stream error, type 0), and a two-byte RUNTEST count.
module tb_svf_engine_wide;
  import jtag_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] mem [0:8191];
  int         wr = 0, rd = 0;
  logic       in_valid, in_pop;
  logic [7:0] in_data;
  assign in_valid = (rd < wr);
  assign in_data  = mem[rd[12:0]];
  always @(posedge clk) if (in_pop && in_valid) rd <= rd + 1;

  logic op_valid, op_ready, res_valid, res_tdo, res_cap, drv_idle;
  bit_op_t op;
  logic err_set, err_type, stream_abort, busy;
  tap_state_t tap_state;
  logic tck, tms, tdi, tdo;
  logic restart = 1'b0;

  svf_engine #(.SIZE_BYTES(2), .COUNT_BYTES(2), .MAX_CHECK_BITS(512)) dut (
    .clk(clk), .rst_n(rst_n), .restart(restart), .in_valid(in_valid), .in_data(in_data),
    .in_pop(in_pop), .op_valid(op_valid), .op(op), .op_ready(op_ready), .res_valid(res_valid),
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
  prom_tap_model prom (
    .tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo), .state(m_state), .ir(m_ir),
    .data_cell(m_data), .idle_tcks(m_idle), .reset_tcks(m_reset), .tck_edges(m_edges),
    .dr_updates(m_dru), .ir_updates(m_iru));

  int n_err0 = 0, n_err1 = 0;
  always @(posedge clk) if (rst_n && err_set) begin
    if (err_type) n_err1++; else n_err0++;
  end

  task automatic push(input logic [7:0] b);
    mem[wr[12:0]] = b;
    wr = wr + 1;
  endtask

  task automatic shift(input logic [3:0] opc, input logic [3:0] endst, input int nbits,
                       input logic [1023:0] tdiv, input logic [1023:0] expv,
                       input logic [1023:0] maskv);
    int nb;
    logic [15:0] len;
    nb  = (nbits + 7) / 8;
    len = 16'(nbits - 1);
    push({opc, endst});
    push(len[15:8]);
    push(len[7:0]);
    for (int i = 0; i < nb; i++) push(tdiv[i*8 +: 8]);
    if (opc == OP_SDRMASK1 || opc == OP_SIRMASK1 || opc == OP_SDRMASK || opc == OP_SIRMASK)
      for (int i = 0; i < nb; i++) push(expv[i*8 +: 8]);
    if (opc == OP_SDRMASK || opc == OP_SIRMASK)
      for (int i = 0; i < nb; i++) push(maskv[i*8 +: 8]);
  endtask

  task automatic wait_done();
    repeat (3) @(posedge clk);
    while (busy || rd < wr) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1023:0] pat, expb, msk;
  int idle0, e0;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    push({OP_STATE, TAP_RESET});
    push({OP_STATE, TAP_IDLE});
    shift(OP_SIR, TAP_IDLE, 8, 1024'hFF, '0, '0);
    wait_done();
    check(m_ir == 8'hFF && m_state == 4'hC, "BYPASS selected");

    for (int i = 0; i < 32; i++) pat[i*32 +: 32] = $urandom;
    pat[1023:300] = '0;
    expb = {pat[1022:0], 1'b0};
    expb[1023:300] = '0;
    e0 = m_edges;
    shift(OP_SDRMASK1, TAP_IDLE, 300, pat, expb, '0);
    wait_done();
    check(n_err0 == 0 && n_err1 == 0, "300-bit checked scan through BYPASS");
    check(m_edges - e0 == 3 + 300 + 2, $sformatf("300-bit scan TCK count (%0d)", m_edges - e0));

    // masked: flip bits of the expected value where the mask is 0
    msk = {1024{1'b1}};
    msk[10] = 1'b0; msk[299] = 1'b0;
    expb[10] = ~expb[10]; expb[299] = ~expb[299];
    shift(OP_SDRMASK, TAP_PAUSE_DR, 300, pat, expb, msk);
    wait_done();
    check(n_err1 == 0 && m_state == 4'h3, "masked 300-bit scan ignores masked bits, ends in DRPAUSE");

    shift(OP_SDR, TAP_IDLE, 600, pat, '0, '0);
    wait_done();
    check(n_err0 == 0 && m_state == 4'hC, "600-bit unchecked scan");

    idle0 = m_idle;
    push({OP_RUNTEST, TAP_IDLE}); push(8'h03); push(8'hE8);  // 1000
    wait_done();
    check(m_idle - idle0 == 1000, $sformatf("two-byte RUNTEST count 1000 (%0d)", m_idle - idle0));

    e0 = m_edges;
    shift(OP_SDRMASK1, TAP_IDLE, 600, pat, pat, '0);
    wait_done();
    check(n_err0 == 1 && m_edges == e0, "checked scan longer than the capture register is a stream error");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
