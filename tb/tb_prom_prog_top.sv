// tb_prom_prog_top: end-to-end test of the PROM programmer at its default
// parameters (30 MHz clock, 7.5 MHz TCK, 1024-byte buffer, one-byte length
// field, four-byte RUNTEST count, 256 checkable bits).
//
// The testbench plays the host: it sends the program command and then the
// command stream in chunks over the C-Link, polls the status word until busy
// drops, checks the error bits and sends the next chunk. A behavioural PROM
// TAP sits on the JTAG pins. The session resets the TAP, checks the IR
// capture and the IDCODE, writes and reads back the PROM model's data cell
// with every shift opcode, runs RUNTEST, visits all four stable states, and
// then provokes each abnormal case: a payload that arrives slower than it is
// shifted (the engine starves with TCK held low), a TDO mismatch, an unknown
// opcode and a buffer overflow, each followed by recovery with a new program
// command. Every mechanism is counted and one that never happens is a failure.
module tb_prom_prog_top;
  import jtag_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic       cl_valid = 1'b0, cl_is_cmd = 1'b0;
  logic [7:0] cl_data = '0;
  logic [7:0] status;
  logic       tck, tms, tdi, tdo;
  tap_state_t tap_state;
  logic [10:0] fifo_level;

  prom_prog_top dut (
    .clk(clk), .rst_n(rst_n), .cl_valid(cl_valid), .cl_is_cmd(cl_is_cmd), .cl_data(cl_data),
    .status(status), .jtag_tck(tck), .jtag_tms(tms), .jtag_tdi(tdi), .jtag_tdo(tdo),
    .tap_state(tap_state), .fifo_level(fifo_level));

  logic [3:0]  m_state;
  logic [7:0]  m_ir;
  logic [15:0] m_data;
  int m_idle, m_reset, m_edges, m_dru, m_iru;
  prom_tap_model #(.IDCODE(32'h0502_6093)) prom (
    .tck(tck), .tms(tms), .tdi(tdi), .tdo(tdo), .state(m_state), .ir(m_ir),
    .data_cell(m_data), .idle_tcks(m_idle), .reset_tcks(m_reset), .tck_edges(m_edges),
    .dr_updates(m_dru), .ir_updates(m_iru));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- host side ---------------------------------------------------------
  logic [7:0] chunk [0:4095];
  int         clen = 0;
  int         n_chunks = 0, n_polls = 0;

  task automatic push(input logic [7:0] b);
    chunk[clen] = b;
    clen++;
  endtask

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

  task automatic cl_word(input logic is_cmd, input logic [7:0] d);
    #1;
    cl_valid = 1'b1; cl_is_cmd = is_cmd; cl_data = d;
    @(posedge clk);
    #1;
    cl_valid = 1'b0; cl_is_cmd = 1'b0;
  endtask

  task automatic program_cmd();
    cl_word(1'b1, CLINK_CMD_PROGRAM);
    repeat (3) @(posedge clk);
  endtask

  // Send the assembled chunk, one word every `gap`+1 clocks, then clear it.
  task automatic send_chunk(input int gap);
    for (int i = 0; i < clen; i++) begin
      cl_word(1'b0, chunk[i]);
      repeat (gap) @(posedge clk);
    end
    clen = 0;
    n_chunks++;
  endtask

  // Poll the status word every 32 clocks until busy is low.
  task automatic poll_done();
    repeat (4) @(posedge clk);
    while (status[ST_BUSY]) begin
      repeat (32) @(posedge clk);
      n_polls++;
      if (!status[ST_BUSY]) check(tck == 1'b0, "TCK low between chunks");
    end
  endtask

  // ---- mechanism counters --------------------------------------------------
  int n_starve = 0, n_err_tdo = 0, n_err_cmd = 0, n_ovf = 0, n_recover = 0;
  int quiet = 0;
  logic tck_d = 1'b0;
  int cyc = 0, last_rise = -100, n_period4 = 0, n_short = 0;
  always @(posedge clk) if (rst_n) begin
    tck_d <= tck;
    cyc <= cyc + 1;
    if (tck && !tck_d) begin
      if (cyc - last_rise == 4) n_period4++;
      if (cyc - last_rise < 4)  n_short++;
      last_rise <= cyc;
    end
    // starved: mid-shift in the PROM, buffer empty, TCK idle for 16 clocks
    if (tck != tck_d || fifo_level != 0 || !(m_state == 4'h2 || m_state == 4'hA)) quiet <= 0;
    else begin
      quiet <= quiet + 1;
      if (quiet == 16) n_starve++;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [255:0] pat;
  int idle0;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    check(status == 8'h00, "status clear after reset");

    // chunk 1: reset, idle, IR capture check, IDCODE check
    program_cmd();
    check(status[ST_ARMED], "armed by the program command");
    state_cmd(TAP_RESET);
    state_cmd(TAP_IDLE);
    shift(OP_SIRMASK1, TAP_IDLE, 8, 256'h01, 256'h01, '0);
    shift(OP_SDRMASK1, TAP_IDLE, 32, '0, 256'h0502_6093, '0);
    send_chunk(0);
    poll_done();
    check(status[ST_ERR] == 1'b0, "chunk 1 without error");
    check(m_state == 4'hC && m_ir == 8'h01, "chunk 1 leaves IDLE with IDCODE");

    // chunk 2: write the data cell, wait, read it back masked, via DRPAUSE
    shift(OP_SIR, TAP_IDLE, 8, 256'h02, '0, '0);
    shift(OP_SDR, TAP_IDLE, 16, 256'h3C5A, '0, '0);
    runtest(TAP_IDLE, 32'd750);
    shift(OP_SDRMASK, TAP_PAUSE_DR, 16, 256'h0000, 256'h3C5A, 256'hFFFF);
    idle0 = m_idle;
    send_chunk(0);
    poll_done();
    check(status[ST_ERR] == 1'b0, "chunk 2 without error");
    check(m_state == 4'h3, "chunk 2 ends in DRPAUSE");
    // 750 from RUNTEST plus one TCK leaving IDLE for each of the three shifts
    check(m_idle - idle0 == 753,
          $sformatf("RUNTEST 750 TCKs in IDLE (%0d)", m_idle - idle0));

    // chunk 3: IRPAUSE and back, SIR masks, Update-DR on leaving DRPAUSE
    state_cmd(TAP_PAUSE_IR);
    state_cmd(TAP_IDLE);
    shift(OP_SIRMASK, TAP_PAUSE_IR, 8, 256'h02, 256'hF1, 256'h03);
    shift(OP_SDRMASK1, TAP_IDLE, 16, 256'h0000, 256'h0000, '0);
    send_chunk(1);
    poll_done();
    check(status[ST_ERR] == 1'b0, "chunk 3 without error");
    check(m_data == 16'h0000 && m_ir == 8'h02, "data cell rewritten through DRPAUSE exit");

    // chunk 4: 256-bit BYPASS shift sent slower than it is shifted (starves)
    shift(OP_SIR, TAP_IDLE, 8, 256'hFF, '0, '0);
    pat = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    shift(OP_SDRMASK1, TAP_IDLE, 256, pat, {pat[254:0], 1'b0}, '0);
    send_chunk(60);
    poll_done();
    check(status[ST_ERR] == 1'b0, "slow 256-bit chunk without error");
    check(n_starve > 0, "engine starved mid-payload");

    // chunk 5: TDO mismatch -> error type 1, rest of the chunk discarded
    shift(OP_SIR, TAP_IDLE, 8, 256'h01, '0, '0);
    shift(OP_SDRMASK1, TAP_IDLE, 32, '0, 256'h1502_6093, '0);
    state_cmd(TAP_RESET);
    send_chunk(0);
    poll_done();
    check(status[ST_ERR] && status[ST_ERR_TYPE], "TDO mismatch reported as type 1");
    check(!status[ST_ARMED] && m_state == 4'hC, "disarmed, later command not run");
    if (status[ST_ERR] && status[ST_ERR_TYPE]) n_err_tdo++;

    // recovery and chunk 6: unknown opcode -> error type 0
    program_cmd();
    check(status[ST_ERR] == 1'b0, "program command clears the error");
    state_cmd(TAP_IDLE);
    push(8'h90);
    shift(OP_SDR, TAP_IDLE, 8, 256'h00, '0, '0);
    send_chunk(0);
    poll_done();
    check(status[ST_ERR] && !status[ST_ERR_TYPE], "unknown opcode reported as type 0");
    if (status[ST_ERR] && !status[ST_ERR_TYPE]) n_err_cmd++;

    // recovery and chunk 7: more bytes than the buffer holds -> overflow
    program_cmd();
    for (int k = 0; k < 40; k++) shift(OP_SDR, TAP_IDLE, 256, '0, '0, '0);
    send_chunk(0);
    check(status[ST_OVERFLOW], "overflow flagged when the buffer is overrun");
    if (status[ST_OVERFLOW]) n_ovf++;
    repeat (200) @(posedge clk);

    // recovery: the program command restarts a working session
    program_cmd();
    check(status[ST_OVERFLOW] == 1'b0 && status[ST_ERR] == 1'b0, "status cleared");
    state_cmd(TAP_RESET);
    state_cmd(TAP_IDLE);
    shift(OP_SIRMASK1, TAP_IDLE, 8, 256'h01, 256'h01, '0);
    shift(OP_SDRMASK1, TAP_IDLE, 32, '0, 256'h0502_6093, '0);
    send_chunk(0);
    poll_done();
    check(status[ST_ERR] == 1'b0 && m_state == 4'hC, "session after overflow works");
    if (status[ST_ERR] == 1'b0) n_recover++;

    $display("mechanisms: chunks=%0d polls=%0d starve=%0d tdo_err=%0d cmd_err=%0d overflow=%0d recover=%0d",
             n_chunks, n_polls, n_starve, n_err_tdo, n_err_cmd, n_ovf, n_recover);
    check(n_period4 > 1000 && n_short == 0,
          $sformatf("TCK runs at 7.5 MHz, never faster (%0d periods of 4 clocks)", n_period4));
    check(n_chunks >= 8 && n_polls > 0, "chunked transfer with polling");
    check(n_err_tdo > 0 && n_err_cmd > 0 && n_ovf > 0 && n_recover > 0,
          "every error case and the recovery happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
