// spi_top: multi-port SPI master controlled by a host through FIFOs.
//
// The host gives commands (Configure, Write/Read, Idle) for one of
// NUM_PORTS SPI ports. Bytes to send are written into a host-to-FPGA
// target-scoped FIFO and received bytes come back through an FPGA-to-host
// target-scoped FIFO. The multiplexer (spi_mux) handles the command
// handshake, keeps the global configuration variables and moves bytes
// between the target-scoped FIFOs and the VI-scoped FIFOs of the named
// port. Each port has its own engine (spi_engine), which holds that port's
// configuration and plays the SPI sequence on the port's SCLK, MOSI, MISO
// and NUM_CS chip-select lines, so several slaves can share one port and
// each port can run its own clock mode and rate, changed at run time.
// The split into host interface, multiplexer and engine, and the FIFOs
// between them, follow the paper; the port and chip-select counts and
// FIFO depths are this design's choices.
//
// Host protocol: present host_cmd with a one-cycle host_start while
// host_busy is low; host_done pulses when the command has finished. For a
// Write/Read, push ceil(total_bits/8) bytes into the host FIFO (before or
// during the command) and pop the same number of answer bytes from
// f2h_data afterwards (first-word fall-through: f2h_data is valid while
// f2h_empty is low). SCLK of a port runs at f_clk / (2 * clk_div).
// write_flag[p] pulses for one cycle each time port p has exchanged a byte
// (after the 8th bit, or the last bit of a transfer), as the write flag
// described in the paper's test results.
// Reset is synchronous and active low.
module spi_top
  import spi_pkg::*;
#(
  parameter int unsigned NUM_PORTS       = 2,
  parameter int unsigned NUM_CS          = 4,
  parameter int unsigned HOST_FIFO_DEPTH = 64,
  parameter int unsigned VI_FIFO_DEPTH   = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // host command interface
  input  logic                 host_start,
  input  spi_host_cmd_t        host_cmd,
  output logic                 host_busy,
  output logic                 host_done,
  // host to FPGA data
  input  logic                 h2f_push,
  input  logic [DATA_W-1:0]    h2f_wdata,
  output logic                 h2f_full,
  // FPGA to host data
  input  logic                 f2h_pop,
  output logic [DATA_W-1:0]    f2h_rdata,
  output logic                 f2h_empty,
  // SPI ports
  output logic [NUM_PORTS-1:0] sclk,
  output logic [NUM_PORTS-1:0] mosi,
  input  logic [NUM_PORTS-1:0] miso,
  output logic [NUM_CS-1:0]    cs [NUM_PORTS],
  output logic [NUM_PORTS-1:0] port_busy,  // engine of the port is active
  output logic [NUM_PORTS-1:0] write_flag  // pulse: a byte has been exchanged
);

  // target-scoped FIFOs
  logic              h2f_empty, h2f_pop, f2h_full, f2h_push;
  logic [DATA_W-1:0] h2f_rdata, f2h_wdata;

  spi_fifo #(.WIDTH(DATA_W), .DEPTH(HOST_FIFO_DEPTH)) u_h2f_fifo (
    .clk, .rst_n, .push(h2f_push), .push_data(h2f_wdata), .pop(h2f_pop),
    .rd_data(h2f_rdata), .full(h2f_full), .empty(h2f_empty), .count()
  );

  spi_fifo #(.WIDTH(DATA_W), .DEPTH(HOST_FIFO_DEPTH)) u_f2h_fifo (
    .clk, .rst_n, .push(f2h_push), .push_data(f2h_wdata), .pop(f2h_pop),
    .rd_data(f2h_rdata), .full(f2h_full), .empty(f2h_empty), .count()
  );

  // multiplexer to engines
  logic                 eng_start;
  logic [3:0]           eng_port;
  spi_cmd_e             eng_cmd;
  spi_cfg_t             eng_cfg;
  logic [LEN_W-1:0]     eng_total_bits;
  logic [NUM_PORTS-1:0] eng_done;
  logic [NUM_PORTS-1:0] tx_full, tx_push, rx_empty, rx_pop;
  logic [DATA_W-1:0]    tx_data;
  logic [DATA_W-1:0]    rx_data [NUM_PORTS];

  spi_mux #(.NUM_PORTS(NUM_PORTS)) u_mux (
    .clk, .rst_n,
    .host_start, .host_cmd, .host_busy, .host_done,
    .h2f_empty, .h2f_data(h2f_rdata), .h2f_pop,
    .f2h_full, .f2h_push, .f2h_data(f2h_wdata),
    .eng_start, .eng_port, .eng_cmd, .eng_cfg, .eng_total_bits, .eng_done,
    .tx_full, .tx_push, .tx_data, .rx_empty, .rx_data, .rx_pop
  );

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic              e_tx_empty, e_tx_pop, e_rx_full, e_rx_push;
    logic [DATA_W-1:0] e_tx_data, e_rx_data;

    // the engine stores a received byte once its 8th (or last) bit is in
    assign write_flag[p] = e_rx_push;

    // VI-scoped FIFO, multiplexer to engine
    spi_fifo #(.WIDTH(DATA_W), .DEPTH(VI_FIFO_DEPTH)) u_tx_fifo (
      .clk, .rst_n, .push(tx_push[p]), .push_data(tx_data), .pop(e_tx_pop),
      .rd_data(e_tx_data), .full(tx_full[p]), .empty(e_tx_empty), .count()
    );

    // VI-scoped FIFO, engine to multiplexer
    spi_fifo #(.WIDTH(DATA_W), .DEPTH(VI_FIFO_DEPTH)) u_rx_fifo (
      .clk, .rst_n, .push(e_rx_push), .push_data(e_rx_data), .pop(rx_pop[p]),
      .rd_data(rx_data[p]), .full(e_rx_full), .empty(rx_empty[p]), .count()
    );

    spi_engine #(.PORT_ID(p), .NUM_CS(NUM_CS)) u_engine (
      .clk, .rst_n,
      .start(eng_start), .port(eng_port), .cmd(eng_cmd), .cfg_in(eng_cfg),
      .total_bits(eng_total_bits), .done(eng_done[p]), .busy(port_busy[p]),
      .tx_empty(e_tx_empty), .tx_data(e_tx_data), .tx_pop(e_tx_pop),
      .rx_full(e_rx_full), .rx_push(e_rx_push), .rx_data(e_rx_data),
      .sclk(sclk[p]), .mosi(mosi[p]), .miso(miso[p]), .cs(cs[p])
    );
  end

endmodule
