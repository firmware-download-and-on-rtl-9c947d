// chunk_fifo: buffer space for one chunk of the command stream.
//
// The FPGA cannot hold a whole configuration stream, so the host sends it in
// chunks that each end on a command boundary and waits until the state
// machine has used one up before sending the next. This is a plain
// synchronous byte FIFO of DEPTH entries (a memory array with read and write
// pointers) that presents its oldest byte at the output (show-ahead):
// `rd_valid`/`rd_data` are valid in the cycle the byte is at the head and
// `rd_pop` removes it. A write while full is dropped and reported by a
// one-clock `overflow` pulse; `flush` empties the buffer. The depth of 1024
// bytes is this design's choice; the protocol gives no size.
module chunk_fifo #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  output logic             rd_valid,
  output logic [WIDTH-1:0] rd_data,
  input  logic             rd_pop,
  output logic             full,
  output logic             empty,
  output logic             overflow,
  output logic [$clog2(DEPTH+1)-1:0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic             do_wr, do_rd;

  assign empty    = (cnt == '0);
  assign full     = (cnt == ($clog2(DEPTH+1))'(DEPTH));
  assign rd_valid = !empty;
  assign rd_data  = mem[rp];
  assign level    = cnt;
  assign do_wr    = wr_en && !full;
  assign do_rd    = rd_pop && !empty;

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp       <= '0;
      rp       <= '0;
      cnt      <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= wr_en && full;
      if (flush) begin
        wp  <= '0;
        rp  <= '0;
        cnt <= '0;
      end else begin
        if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
        unique case ({do_wr, do_rd})
          2'b10:   cnt <= cnt + 1'b1;
          2'b01:   cnt <= cnt - 1'b1;
          default: ;
        endcase
      end
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) rd_pop |-> !empty);

endmodule
