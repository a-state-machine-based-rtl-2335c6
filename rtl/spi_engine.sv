// spi_engine: the state machine that plays the SPI protocol on one port.
//
// Each state does one step of a transfer, in the order the bus requires:
//   IDLE        wait for the start flag with this engine's port number
//   START       look at the command: Configure, Write/Read or Idle
//   CONFIG_HW   copy the configuration (CS line, CS level, CPOL, CPHA,
//               clock divider) into this port's configuration cluster
//   START_HW    load the number of bits of the transfer
//   INIT        put SCLK at its idle level (CPOL)
//   READ_FIFO   take the next byte from the transmit FIFO
//   SET_CS      select the slave; with CPHA=0 the first bit goes on MOSI
//   WAIT_SET    hold SCLK idle for the rest of the half period
//   SET_CLK     SCLK to its active level (leading edge); CPHA=0 samples
//               MISO here, CPHA=1 puts the next bit on MOSI
//   WAIT_RESET  hold SCLK active for the rest of the half period
//   RESET_CLK   SCLK back to idle (trailing edge); CPHA=1 samples MISO,
//               CPHA=0 puts the next bit on MOSI
//   WRITE_FIFO  after 8 bits (or the last bit) store the received byte
//   RESET_CS    deselect the slave, then STOP and SET_DONE
// The state list, their order and the CPHA rules follow the paper's
// flow chart of the engine. This design's own choices: the loop after a
// bit goes through WAIT_SET, so both SCLK half periods last clk_div
// system clocks; READ_FIFO runs for every byte, not only the first; a
// Configure command ends in SET_DONE and also parks SCLK and CS at their
// new idle levels.
//
// Interface: `start` with `port`, `cmd`, `cfg_in` and `total_bits` is the
// start flag and global variables written by the multiplexer; an engine
// reacts only when `port` equals PORT_ID. `done` pulses for one cycle when
// the command is finished. Bytes to send come from a first-word
// fall-through FIFO (tx_*), received bytes go to another (rx_*). A transfer
// waits with SCLK idle when the transmit FIFO is empty or the receive FIFO
// is full. Bits go out MSB first; a final partial byte sends its top bits
// and its received bits are returned in the low bits.
//
// Timing: SCLK runs at f_clk / (2 * clk_div); clk_div below 2 is taken as
// 2. Between bytes the idle half period is two cycles longer (READ_FIFO,
// WRITE_FIFO). MISO is sampled in the system clock cycle before the SCLK
// register changes, so it is read just ahead of the sampling edge.
module spi_engine
  import spi_pkg::*;
#(
  parameter int unsigned PORT_ID = 0,
  parameter int unsigned NUM_CS  = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // start flag and global variables from the multiplexer
  input  logic                  start,
  input  logic [3:0]            port,
  input  spi_cmd_e              cmd,
  input  spi_cfg_t              cfg_in,
  input  logic [LEN_W-1:0]      total_bits,
  output logic                  done,
  output logic                  busy,
  // transmit VI-scoped FIFO (read side)
  input  logic                  tx_empty,
  input  logic [DATA_W-1:0]     tx_data,
  output logic                  tx_pop,
  // receive VI-scoped FIFO (write side)
  input  logic                  rx_full,
  output logic                  rx_push,
  output logic [DATA_W-1:0]     rx_data,
  // SPI bus
  output logic                  sclk,
  output logic                  mosi,
  input  logic                  miso,
  output logic [NUM_CS-1:0]     cs
);

  typedef enum logic [3:0] {
    S_IDLE, S_START, S_CONFIG_HW, S_SET_DONE, S_START_HW, S_INIT,
    S_READ_FIFO, S_SET_CS, S_WAIT_SET, S_SET_CLK, S_WAIT_RESET,
    S_RESET_CLK, S_WRITE_FIFO, S_RESET_CS, S_STOP
  } state_e;

  state_e            state;
  spi_cmd_e          cmd_q;
  spi_cfg_t          cfg;          // configuration cluster
  logic [LEN_W-1:0]  bits_left;
  logic [2:0]        bit_cnt;      // bits done in the current byte
  logic [DATA_W-1:0] tx_sh;        // byte being shifted out
  logic [DATA_W-1:0] rx_sh;        // byte being shifted in
  logic [DIV_W-1:0]  wait_cnt;
  logic              cs_on;        // slave currently selected

  // Wait-state load value: a half period is one SET/RESET cycle plus
  // clk_div-1 wait cycles; the counter counts down to zero.
  logic [DIV_W-1:0]  wait_load;
  assign wait_load = DIV_W'(cfg.clk_div - DIV_W'(2));

  // Chip-select lines: the selected one at its active level, all others
  // (and all lines when idle) at the inactive level.
  function automatic logic [NUM_CS-1:0] cs_vec(input spi_cfg_t c, input logic on);
    logic [NUM_CS-1:0] v;
    for (int i = 0; i < NUM_CS; i++)
      v[i] = (on && c.cs_sel == 4'(i)) ? c.cs_active : ~c.cs_active;
    return v;
  endfunction

  assign busy    = (state != S_IDLE);
  assign tx_pop  = (state == S_READ_FIFO) && !tx_empty;
  assign rx_push = (state == S_WRITE_FIFO) && !rx_full;
  assign rx_data = rx_sh;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cmd_q     <= CMD_IDLE;
      cfg       <= '{cs_sel: '0, cs_active: 1'b0, cpol: 1'b0, cpha: 1'b0,
                     clk_div: DIV_W'(MIN_DIV)};
      bits_left <= '0;
      bit_cnt   <= '0;
      tx_sh     <= '0;
      rx_sh     <= '0;
      wait_cnt  <= '0;
      cs_on     <= 1'b0;
      sclk      <= 1'b0;
      mosi      <= 1'b0;
      cs        <= '1;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start && port == 4'(PORT_ID)) begin
            cmd_q     <= cmd;
            bits_left <= total_bits;
            state     <= S_START;
          end
        end

        S_START: begin
          unique case (cmd_q)
            CMD_CONFIGURE:  state <= S_CONFIG_HW;
            CMD_WRITE_READ: state <= S_START_HW;
            default:        state <= S_SET_DONE;
          endcase
        end

        S_CONFIG_HW: begin
          cfg <= cfg_in;
          if (cfg_in.clk_div < DIV_W'(MIN_DIV)) cfg.clk_div <= DIV_W'(MIN_DIV);
          sclk  <= cfg_in.cpol;
          cs    <= cs_vec(cfg_in, 1'b0);
          state <= S_SET_DONE;
        end

        S_START_HW: begin
          state <= (bits_left == '0) ? S_SET_DONE : S_INIT;
        end

        S_INIT: begin
          sclk  <= cfg.cpol;
          state <= S_READ_FIFO;
        end

        S_READ_FIFO: begin
          if (!tx_empty) begin
            tx_sh   <= tx_data;
            bit_cnt <= '0;
            if (!cs_on) begin
              state <= S_SET_CS;
            end else begin
              if (!cfg.cpha) mosi <= tx_data[DATA_W-1];
              wait_cnt <= wait_load;
              state    <= S_WAIT_SET;
            end
          end
        end

        S_SET_CS: begin
          cs_on    <= 1'b1;
          cs       <= cs_vec(cfg, 1'b1);
          if (!cfg.cpha) mosi <= tx_sh[DATA_W-1];
          wait_cnt <= wait_load;
          state    <= S_WAIT_SET;
        end

        S_WAIT_SET: begin
          if (wait_cnt == '0) state <= S_SET_CLK;
          else                wait_cnt <= wait_cnt - 1'b1;
        end

        S_SET_CLK: begin
          sclk <= ~cfg.cpol;
          if (!cfg.cpha) begin
            rx_sh <= {rx_sh[DATA_W-2:0], miso};
          end else begin
            mosi  <= tx_sh[DATA_W-1];
            tx_sh <= {tx_sh[DATA_W-2:0], 1'b0};
          end
          wait_cnt <= wait_load;
          state    <= S_WAIT_RESET;
        end

        S_WAIT_RESET: begin
          if (wait_cnt == '0) state <= S_RESET_CLK;
          else                wait_cnt <= wait_cnt - 1'b1;
        end

        S_RESET_CLK: begin
          sclk      <= cfg.cpol;
          bits_left <= bits_left - 1'b1;
          bit_cnt   <= bit_cnt + 1'b1;
          if (cfg.cpha) begin
            rx_sh <= {rx_sh[DATA_W-2:0], miso};
          end else begin
            // next bit of this byte; the first bit of the next byte is
            // placed by READ_FIFO
            tx_sh <= {tx_sh[DATA_W-2:0], 1'b0};
            if (bit_cnt != 3'd7 && bits_left != LEN_W'(1))
              mosi <= tx_sh[DATA_W-2];
          end
          if (bit_cnt == 3'd7 || bits_left == LEN_W'(1)) begin
            state <= S_WRITE_FIFO;
          end else begin
            wait_cnt <= wait_load;
            state    <= S_WAIT_SET;
          end
        end

        S_WRITE_FIFO: begin
          if (!rx_full) begin
            rx_sh <= '0;
            state <= (bits_left == '0) ? S_RESET_CS : S_READ_FIFO;
          end
        end

        S_RESET_CS: begin
          cs_on <= 1'b0;
          cs    <= cs_vec(cfg, 1'b0);
          state <= S_STOP;
        end

        S_STOP: state <= S_SET_DONE;

        S_SET_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // SCLK only changes in SET_CLK, RESET_CLK, INIT and CONFIG_HW.
  a_sclk_steps: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {S_WAIT_SET, S_WAIT_RESET, S_READ_FIFO, S_WRITE_FIFO})
      |=> $stable(sclk));
  // The slave stays selected for the whole bit loop.
  a_cs_held: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {S_SET_CLK, S_WAIT_RESET, S_RESET_CLK, S_WAIT_SET}) |-> cs_on);

endmodule
