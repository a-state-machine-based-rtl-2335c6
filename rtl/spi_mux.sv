// spi_mux: the FPGA multiplexer between the host and the SPI engines.
//
// A state machine handles the handshake with the host and routes data to
// the port the host names. It waits in IDLE for the host's start strobe,
// then checks the command:
//   Configure   the configuration (CS line, CS level, CPOL, CPHA, clock
//               divider) is written to the global configuration register
//               and the start flag is raised for the named port's engine,
//               which copies it into its own configuration cluster;
//   Write/Read  the start flag is raised with the bit count, then
//               total_bytes bytes are moved from the host's target-scoped
//               FIFO into the port's VI-scoped transmit FIFO while, at the
//               same time, received bytes are moved from the port's
//               VI-scoped receive FIFO into the target-scoped FIFO that goes
//               back to the host;
//   Idle        the start flag is raised and the engine only reports done.
// The command is finished when the engine has reported done and, for a
// Write/Read, all bytes have been moved both ways; `host_done` then pulses.
// The command set, the global variables, the target-scoped and VI-scoped
// FIFOs and the routing by port follow the paper; the state encoding,
// the one-strobe handshake and moving both directions concurrently with
// the engine are this design's choices. total_bytes must equal the number
// of bytes the engine consumes, ceil(total_bits / 8). A port number of
// NUM_PORTS or more finishes at once without touching any engine.
//
// Interface: host_cmd is captured with host_start. FIFOs are first-word
// fall-through (see spi_fifo); tx_data is shared by all ports and tx_push
// selects the port. Each move takes one cycle per byte when the FIFOs
// allow it. A command takes two cycles (CHECK, START_ENG) before the
// engine sees its start flag and one (DONE) after it has finished.
module spi_mux
  import spi_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // host handshake
  input  logic                  host_start,
  input  spi_host_cmd_t         host_cmd,
  output logic                  host_busy,
  output logic                  host_done,
  // target-scoped FIFO, host to FPGA (read side)
  input  logic                  h2f_empty,
  input  logic [DATA_W-1:0]     h2f_data,
  output logic                  h2f_pop,
  // target-scoped FIFO, FPGA to host (write side)
  input  logic                  f2h_full,
  output logic                  f2h_push,
  output logic [DATA_W-1:0]     f2h_data,
  // start flag and global variables to the engines
  output logic                  eng_start,
  output logic [3:0]            eng_port,
  output spi_cmd_e              eng_cmd,
  output spi_cfg_t              eng_cfg,
  output logic [LEN_W-1:0]      eng_total_bits,
  input  logic [NUM_PORTS-1:0]  eng_done,
  // VI-scoped FIFOs of each port
  input  logic [NUM_PORTS-1:0]  tx_full,
  output logic [NUM_PORTS-1:0]  tx_push,
  output logic [DATA_W-1:0]     tx_data,
  input  logic [NUM_PORTS-1:0]  rx_empty,
  input  logic [DATA_W-1:0]     rx_data [NUM_PORTS],
  output logic [NUM_PORTS-1:0]  rx_pop
);

  typedef enum logic [2:0] {
    M_IDLE, M_CHECK, M_START_ENG, M_XFER, M_WAIT_ENG, M_DONE
  } mstate_e;

  mstate_e          state;
  logic [3:0]       port_q;
  spi_cmd_e         cmd_q;
  spi_host_cmd_t    cmd_rec;      // command record latched at start
  spi_cfg_t         cfg_g;        // global configuration variables
  logic [LEN_W-1:0] bits_g;
  logic [LEN_W-1:0] bytes_left;
  logic             eng_done_seen;
  logic             port_ok;
  logic             move_tx, move_rx;
  logic             sel_tx_full, sel_rx_empty, sel_done;

  assign port_ok = (32'(port_q) < NUM_PORTS);

  always_comb begin
    sel_tx_full  = 1'b1;
    sel_rx_empty = 1'b1;
    sel_done     = 1'b0;
    f2h_data     = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      if (port_q == 4'(p)) begin
        sel_tx_full  = tx_full[p];
        sel_rx_empty = rx_empty[p];
        sel_done     = eng_done[p];
        f2h_data     = rx_data[p];
      end
    end
  end

  assign move_tx = (state == M_XFER) && (bytes_left != '0) && !h2f_empty && !sel_tx_full;
  assign move_rx = (state == M_XFER) && !sel_rx_empty && !f2h_full;

  assign h2f_pop  = move_tx;
  assign tx_data  = h2f_data;
  assign f2h_push = move_rx;
  always_comb begin
    tx_push = '0;
    rx_pop  = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      tx_push[p] = move_tx && (port_q == 4'(p));
      rx_pop[p]  = move_rx && (port_q == 4'(p));
    end
  end

  assign eng_port       = port_q;
  assign eng_cmd        = cmd_q;
  assign eng_cfg        = cfg_g;
  assign eng_total_bits = bits_g;
  assign eng_start      = (state == M_START_ENG);
  assign host_busy      = (state != M_IDLE);
  assign host_done      = (state == M_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state         <= M_IDLE;
      port_q        <= '0;
      cmd_q         <= CMD_IDLE;
      cmd_rec       <= '0;
      cfg_g         <= '{cs_sel: '0, cs_active: 1'b0, cpol: 1'b0, cpha: 1'b0,
                         clk_div: DIV_W'(MIN_DIV)};
      bits_g        <= '0;
      bytes_left    <= '0;
      eng_done_seen <= 1'b0;
    end else begin
      unique case (state)
        M_IDLE: begin
          if (host_start) begin
            cmd_rec <= host_cmd;
            port_q  <= host_cmd.port;
            cmd_q   <= host_cmd.cmd;
            state  <= M_CHECK;
          end
        end

        M_CHECK: begin
          eng_done_seen <= 1'b0;
          bytes_left    <= '0;
          if (!port_ok) begin
            state <= M_DONE;
          end else begin
            unique case (cmd_q)
              CMD_CONFIGURE:  cfg_g <= cmd_rec.cfg;
              CMD_WRITE_READ: begin
                bits_g     <= cmd_rec.total_bits;
                bytes_left <= cmd_rec.total_bytes;
              end
              default: ;
            endcase
            state <= M_START_ENG;
          end
        end

        M_START_ENG: begin
          state <= (cmd_q == CMD_WRITE_READ) ? M_XFER : M_WAIT_ENG;
        end

        M_XFER: begin
          if (move_tx) bytes_left <= bytes_left - 1'b1;
          if (sel_done) eng_done_seen <= 1'b1;
          // finished: engine done, every host byte forwarded and no
          // received byte left behind
          if ((eng_done_seen || sel_done) && bytes_left == '0 && sel_rx_empty)
            state <= M_DONE;
        end

        M_WAIT_ENG: begin
          if (sel_done) state <= M_DONE;
        end

        M_DONE: state <= M_IDLE;

        default: state <= M_IDLE;
      endcase
    end
  end

  // The host may only start a command while the multiplexer is idle.
  a_start_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    host_start |-> state == M_IDLE);

endmodule
