// tb_chunk_fifo: self-checking test of the chunk buffer.
//
// Random writes and pops are compared with a reference queue: order of the
// bytes, level, full/empty, the overflow pulse on a write into a full
// buffer (the byte is dropped) and flush. DEPTH is reduced to 16 so that
// full is reached often.
module tb_chunk_fifo;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  localparam int D = 16;
  logic       flush, wr_en, rd_valid, rd_pop, full, empty, overflow;
  logic [7:0] wr_data, rd_data;
  logic [4:0] level;

  chunk_fifo #(.DEPTH(D), .WIDTH(8)) dut (
    .clk(clk), .rst_n(rst_n), .flush(flush), .wr_en(wr_en), .wr_data(wr_data),
    .rd_valid(rd_valid), .rd_data(rd_data), .rd_pop(rd_pop), .full(full), .empty(empty),
    .overflow(overflow), .level(level));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [7:0] q [$];
  int n_ovf = 0, n_full = 0, exp_ovf = 0;
  logic ovf_next = 1'b0;
  logic wr_ok;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 0; wr_en = 0; rd_pop = 0; wr_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      #1;
      // compare the state before this clock
      check(level == 5'(q.size()), "level");
      check(empty == (q.size() == 0) && full == (q.size() == D), "full/empty");
      if (q.size() != 0) check(rd_valid && rd_data == q[0], "head byte");
      else               check(!rd_valid, "no data when empty");
      check(overflow == ovf_next, "overflow pulse");
      if (full) n_full++;
      flush   = (i % 997 == 500);
      wr_en   = ($urandom % 100) < (i < 2500 ? 70 : 30);
      wr_data = 8'($urandom);
      rd_pop  = (q.size() != 0) && (($urandom % 100) < 50);
      ovf_next = wr_en && q.size() == D;
      if (ovf_next) n_ovf++;
      wr_ok   = wr_en && q.size() < D;  // a write into a full buffer is dropped
      @(posedge clk);
      if (flush) q.delete();
      else begin
        if (rd_pop) void'(q.pop_front());
        if (wr_ok)  q.push_back(wr_data);
      end
    end
    check(n_full > 10 && n_ovf > 5, $sformatf("full reached (%0d) and overflowed (%0d)", n_full, n_ovf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
