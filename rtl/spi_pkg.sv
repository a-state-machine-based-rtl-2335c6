// spi_pkg: types and constants shared by the SPI master blocks.
//
// The host drives a small command record (port, command, chip-select choice,
// clock mode, clock divider and transfer length) together with a one-cycle
// start strobe, in the same way as the SPI_Configure and SPI_Write/Read
// register sets of the host interface. Field names follow those registers.
// Field widths are this design's choice: 16 bits for the byte and bit
// counts (unsigned 16-bit host values) and 16 bits for the clock divider.
package spi_pkg;

  // Serial word size: one byte per FIFO entry, shifted MSB first.
  localparam int unsigned DATA_W = 8;
  localparam int unsigned LEN_W  = 16;  // width of total bits / total bytes
  localparam int unsigned DIV_W  = 16;  // width of the clock divider

  // Commands the host can give (SPI_Cmd).
  typedef enum logic [1:0] {
    CMD_IDLE       = 2'd0,
    CMD_CONFIGURE  = 2'd1,
    CMD_WRITE_READ = 2'd2
  } spi_cmd_e;

  // Per-port configuration cluster written by a Configure command.
  // clk_div is the number of system clock cycles in each SCLK half period.
  typedef struct packed {
    logic [3:0]       cs_sel;     // which chip-select line of the port
    logic             cs_active;  // level of CS while selected (0: active low)
    logic             cpol;       // SCLK idle level
    logic             cpha;       // 0: sample on leading edge, 1: on trailing
    logic [DIV_W-1:0] clk_div;    // half-period length in system clocks
  } spi_cfg_t;

  // Command record presented by the host with the start strobe.
  typedef struct packed {
    logic [3:0]       port;        // SPI_Port
    spi_cmd_e         cmd;         // SPI_Cmd
    spi_cfg_t         cfg;         // used by CMD_CONFIGURE
    logic [LEN_W-1:0] total_bytes; // used by CMD_WRITE_READ
    logic [LEN_W-1:0] total_bits;  // used by CMD_WRITE_READ
  } spi_host_cmd_t;

  // Smallest half period the engine produces.
  localparam int unsigned MIN_DIV = 2;

endpackage
