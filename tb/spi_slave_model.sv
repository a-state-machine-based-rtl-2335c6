// spi_slave_model: behavioural SPI slave for testbenches, any of the four
// clock modes.
//
// While `sel` is high the model follows SCLK: with CPHA=0 it samples MOSI
// on the leading edge (SCLK leaving its CPOL idle level) and drives the
// next MISO bit on the trailing edge, the first bit being driven when it is
// selected; with CPHA=1 it drives MISO on the leading edge and samples on
// the trailing edge. MISO bit k of a selection is `pattern[k]`; MOSI bit k
// is stored in `rx_bits[k]` and `rx_count` counts them. The testbench sets
// `pattern` and reads the results hierarchically. Not synthesizable.
module spi_slave_model (
  input  logic sel,
  input  logic sclk,
  input  logic mosi,
  input  logic cpol,
  input  logic cpha,
  output logic miso
);

  logic [4095:0] pattern;
  logic [4095:0] rx_bits;
  int unsigned   rx_count;
  int unsigned   out_idx;

  initial begin
    pattern  = '0;
    rx_bits  = '0;
    rx_count = 0;
    out_idx  = 0;
    miso     = 1'b0;
  end

  always @(posedge sel) begin
    rx_count = 0;
    out_idx  = 0;
    rx_bits  = '0;
    if (!cpha) begin
      miso    = pattern[0];
      out_idx = 1;
    end
  end

  always @(sclk) begin
    if (sel) begin
      if (sclk != cpol) begin           // leading edge
        if (!cpha) begin
          rx_bits[rx_count] = mosi;
          rx_count++;
        end else begin
          miso = pattern[out_idx];
          out_idx++;
        end
      end else begin                    // trailing edge
        if (!cpha) begin
          miso = pattern[out_idx];
          out_idx++;
        end else begin
          rx_bits[rx_count] = mosi;
          rx_count++;
        end
      end
    end
  end

endmodule
