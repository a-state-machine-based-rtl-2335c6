// spi_fifo: synchronous first-in first-out byte buffer.
//
// The SPI master moves every byte through FIFOs: one carries host data to
// the multiplexer and one carries received bytes back to the host (the
// target-scoped FIFOs), and each port has one from the multiplexer to its
// engine and one from the engine back (the VI-scoped FIFOs). That the data
// passes through FIFOs is taken from the paper; their depth and the
// circuit inside are this design's choice.
//
// Interface: push with push_data writes when not full; pop reads when not
// empty. rd_data shows the oldest entry (first-word fall-through), so a pop
// in a cycle consumes the byte visible in that cycle. count gives the fill
// level. A push to a full FIFO or a pop from an empty one is ignored and
// flagged by an assertion. Storage is an array with wrapping pointers;
// the pointers carry one extra bit to tell full from empty, so DEPTH
// must be a power of two. Reset (rst_n, active low) is synchronous.
module spi_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  logic [WIDTH-1:0]         push_data,
  input  logic                     pop,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wr_ptr, rd_ptr;
  logic             do_push, do_pop;

  assign empty   = (wr_ptr == rd_ptr);
  assign full    = (wr_ptr[AW-1:0] == rd_ptr[AW-1:0]) && (wr_ptr[AW] != rd_ptr[AW]);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign rd_data = mem[rd_ptr[AW-1:0]];
  assign count   = ($clog2(DEPTH+1))'(wr_ptr - rd_ptr);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
    end else begin
      if (do_push) wr_ptr <= wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= rd_ptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr[AW-1:0]] <= push_data;
  end

  initial assert ((1 << AW) == DEPTH)
    else $error("spi_fifo: DEPTH must be a power of two");

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop  |-> !empty);

endmodule
