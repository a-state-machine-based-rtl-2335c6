// l3g4200d_model: behavioural model of the SPI side of an L3G4200D
// three-axis gyroscope, for testbenches. Not synthesizable.
//
// The sensor is an SPI slave in mode 3 (SCLK idles high, data driven on the
// falling edge and captured on the rising edge) selected by an active-low
// CS. The first byte of a transfer is the command: bit 7 RW (1 = read),
// bit 6 MS (1 = auto-increment the address after every data byte) and
// bits 5:0 the register address. Each following byte is written to the
// addressed register, or, for a read, the register is driven on MISO MSB
// first. The model keeps 64 byte registers; the angular rate outputs are
// the little-endian pairs at 0x28/0x29 (X), 0x2A/0x2B (Y) and 0x2C/0x2D (Z),
// which the testbench loads through `set_rates`. WHO_AM_I (0x0F) reads
// 0xD3 as on the real part. The model does not make rates from motion,
// does not protect read-only registers and drives MISO low when idle.
module l3g4200d_model (
  input  logic cs_n,
  input  logic sclk,
  input  logic mosi,
  output logic miso
);

  logic [7:0]  regs [64];
  logic [7:0]  sh;
  logic [7:0]  out_sh;
  logic        rw, ms;
  logic [5:0]  addr;
  int unsigned bit_idx;
  int unsigned writes, reads;

  initial begin
    for (int i = 0; i < 64; i++) regs[i] = 8'h00;
    regs[6'h0F] = 8'hD3;
    miso = 1'b0;
    bit_idx = 0;
    writes = 0;
    reads = 0;
    sh = '0; out_sh = '0; rw = 0; ms = 0; addr = '0;
  end

  function automatic void set_rates(input logic [15:0] x, input logic [15:0] y,
                                    input logic [15:0] z);
    regs[6'h28] = x[7:0];  regs[6'h29] = x[15:8];
    regs[6'h2A] = y[7:0];  regs[6'h2B] = y[15:8];
    regs[6'h2C] = z[7:0];  regs[6'h2D] = z[15:8];
  endfunction

  always @(negedge cs_n) begin
    bit_idx = 0;
  end

  always @(posedge cs_n) miso = 1'b0;

  // falling edge: drive read data
  always @(negedge sclk) begin
    if (!cs_n && bit_idx >= 8 && rw) begin
      if (bit_idx % 8 == 0) begin
        out_sh = regs[addr];
        reads++;
      end
      miso = out_sh[7 - (bit_idx % 8)];
    end
  end

  // rising edge: capture MOSI
  always @(posedge sclk) begin
    if (!cs_n) begin
      sh = {sh[6:0], mosi};
      bit_idx++;
      if (bit_idx == 8) begin
        rw   = sh[7];
        ms   = sh[6];
        addr = sh[5:0];
      end else if (bit_idx % 8 == 0) begin
        if (!rw) begin
          regs[addr] = sh;
          writes++;
        end
        if (ms) addr = addr + 1'b1;
      end
    end
  end

endmodule
