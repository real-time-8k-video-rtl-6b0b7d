// stream_fifo: buffered 128-bit stream (InputStream / OutputStream).
//
// A first-in first-out buffer of DEPTH words between a writer and a reader,
// each with a valid/ready handshake: a word moves on a side when valid and
// ready are both high there. The storage is a plain array (block RAM or
// registers after synthesis) with wrapping read and write pointers one bit
// wider than the address, so full and empty are told apart without a counter.
// The head word is read straight from the array: a word written into an empty
// buffer is offered on the read side in the next cycle, and the buffer moves
// one word per cycle in each direction at the same time.
//
// Reset is synchronous and active low (rst_n), a choice of this design.
//
// The stream width is the document's; that the streams are buffered, and the
// depth, are this design's own choices.
module stream_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 16   // power of two, at least 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             wr_valid,
  output logic             wr_ready,
  output logic [WIDTH-1:0] rd_data,
  output logic             rd_valid,
  input  logic             rd_ready
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr_q, rd_ptr_q;
  logic             full, empty, do_wr, do_rd;

  assign empty    = (wr_ptr_q == rd_ptr_q);
  assign full     = (wr_ptr_q[AW-1:0] == rd_ptr_q[AW-1:0]) && (wr_ptr_q[AW] != rd_ptr_q[AW]);
  assign wr_ready = !full;
  assign rd_valid = !empty;
  assign do_wr    = wr_valid && wr_ready;
  assign do_rd    = rd_valid && rd_ready;
  assign rd_data  = mem[rd_ptr_q[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr)
      mem[wr_ptr_q[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr_q <= '0;
      rd_ptr_q <= '0;
    end else begin
      if (do_wr) wr_ptr_q <= wr_ptr_q + 1'b1;
      if (do_rd) rd_ptr_q <= rd_ptr_q + 1'b1;
    end
  end

  initial begin
    assert (DEPTH >= 2 && (DEPTH & (DEPTH - 1)) == 0)
      else $error("stream_fifo: DEPTH must be a power of two of at least 2");
  end

  a_rd_hold: assert property (@(posedge clk) disable iff (!rst_n)
    rd_valid && !rd_ready |=> rd_valid && $stable(rd_data));

endmodule
