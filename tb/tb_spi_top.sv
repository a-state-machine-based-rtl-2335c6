// tb_spi_top: end-to-end test of the SPI master at its default parameters.
//
// A host model drives the command interface and the two host FIFOs.
// Port 0 carries an L3G4200D gyroscope model on CS line 0 (SPI mode 3).
// Port 1 carries two generic slaves: one on CS line 1 used in mode 0 and
// one on CS line 2 used in mode 2, with different clock dividers, so the
// port is reconfigured between them.
//
// The gyroscope sequence is the host program's: configure the port, write
// CTRL_REG1, CTRL_REG2, CTRL_REG4 and CTRL_REG5 (address 0x20..0x24 with
// the values 0x07, 0x09, 0xB0, 0x60), then read the six rate registers with
// commands 0xA8..0xAD, each as a 16-bit transfer, and join them into X, Y
// and Z. A 56-bit burst read with auto-increment (0xE8) reads the same six
// bytes at once, and WHO_AM_I is read.
// On port 1 modes 0 and 2 are used, and a 200-byte transfer is run while the
// host first reads no answers and later supplies no data, so the engine
// waits on a full receive FIFO and on an empty transmit FIFO.
//
// Counted mechanisms (each must happen at least once): Configure command,
// Write/Read command, Idle command, clock mode switch on a port, clock
// divider change on a port, chip-select line change on a port, engine
// waiting for transmit data, engine waiting for receive space, host FIFO
// full, out-of-range port. Also checked: SCLK period on the gyroscope
// port equals 2 * clk_div system clocks, the write flag pulses once per
// byte, one six-register sample fits the 10 ms of the sensor's 100 Hz data
// rate at a 40 MHz system clock, and register values and returned bytes
// against the models.
module tb_spi_top;
  import spi_pkg::*;

  localparam int unsigned NP = 2;
  localparam int unsigned NCS = 4;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic            host_start, host_busy, host_done;
  spi_host_cmd_t   host_cmd;
  logic            h2f_push, h2f_full, f2h_pop, f2h_empty;
  logic [7:0]      h2f_wdata, f2h_rdata;
  logic [NP-1:0]   sclk, mosi, miso, port_busy, write_flag;
  logic [NCS-1:0]  cs [NP];

  spi_top dut (
    .clk, .rst_n, .host_start, .host_cmd, .host_busy, .host_done,
    .h2f_push, .h2f_wdata, .h2f_full, .f2h_pop, .f2h_rdata, .f2h_empty,
    .sclk, .mosi, .miso, .cs, .port_busy, .write_flag
  );

  // ---- slaves ----
  logic gyro_miso, sa_miso, sb_miso;
  l3g4200d_model gyro (.cs_n(cs[0][0]), .sclk(sclk[0]), .mosi(mosi[0]), .miso(gyro_miso));
  assign miso[0] = gyro_miso;

  logic sa_sel, sb_sel;
  assign sa_sel = !cs[1][1];
  assign sb_sel = !cs[1][2];
  spi_slave_model slave_a (.sel(sa_sel), .sclk(sclk[1]), .mosi(mosi[1]),
                           .cpol(1'b0), .cpha(1'b0), .miso(sa_miso));
  spi_slave_model slave_b (.sel(sb_sel), .sclk(sclk[1]), .mosi(mosi[1]),
                           .cpol(1'b1), .cpha(1'b0), .miso(sb_miso));
  assign miso[1] = sa_sel ? sa_miso : (sb_sel ? sb_miso : 1'b0);

  // ---- bookkeeping ----
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int unsigned n_configure = 0, n_write_read = 0, n_idle = 0;
  int unsigned n_mode_switch = 0, n_div_change = 0, n_cs_change = 0;
  int unsigned n_write_flag [NP] = '{0, 0};
  int unsigned n_tx_wait = 0, n_rx_wait = 0, n_host_full = 0, n_bad_port = 0;

  // engine state codes: 6 = READ_FIFO, 12 = WRITE_FIFO
  always @(posedge clk) begin
    if (rst_n) begin
      if (4'(dut.g_port[1].u_engine.state) == 4'd6 && dut.g_port[1].e_tx_empty) n_tx_wait++;
      if (4'(dut.g_port[1].u_engine.state) == 4'd12 && dut.g_port[1].e_rx_full) n_rx_wait++;
      if (4'(dut.g_port[0].u_engine.state) == 4'd6 && dut.g_port[0].e_tx_empty) n_tx_wait++;
      if (h2f_full) n_host_full++;
      for (int p = 0; p < NP; p++) if (write_flag[p]) n_write_flag[p]++;
    end
  end

  // ---- host FIFO models ----
  logic [7:0] push_q[$], ans_q[$];
  logic       push_en, pop_en;
  always @(negedge clk) begin
    h2f_push  <= 1'b0;
    f2h_pop   <= 1'b0;
    if (rst_n && push_en && push_q.size() != 0 && !h2f_full) begin
      h2f_push  <= 1'b1;
      h2f_wdata <= push_q.pop_front();
    end
    if (rst_n && pop_en && !f2h_empty) f2h_pop <= 1'b1;
  end
  always @(posedge clk) if (f2h_pop) ans_q.push_back(f2h_rdata);

  spi_cfg_t port_cfg [NP];

  task automatic run_cmd(input spi_host_cmd_t c, output bit ok);
    int n = 0;
    while (host_busy) @(negedge clk);
    @(negedge clk);
    host_cmd = c; host_start = 1'b1;
    @(negedge clk);
    host_start = 1'b0;
    ok = 1'b0;
    while (n < 400000) begin
      @(posedge clk);
      if (host_done) begin ok = 1'b1; break; end
      n++;
    end
    case (c.cmd)
      CMD_CONFIGURE:  n_configure++;
      CMD_WRITE_READ: n_write_read++;
      default:        n_idle++;
    endcase
  endtask

  task automatic configure(input int p, input logic cpol, input logic cpha,
                           input int div, input int cs_line);
    spi_host_cmd_t c;
    bit ok;
    c = '0;
    c.port = 4'(p);
    c.cmd  = CMD_CONFIGURE;
    c.cfg  = '{cs_sel: 4'(cs_line), cs_active: 1'b0, cpol: cpol, cpha: cpha,
               clk_div: DIV_W'(div)};
    if (p < NP) begin
      if (port_cfg[p].cpol != cpol || port_cfg[p].cpha != cpha) n_mode_switch++;
      if (port_cfg[p].clk_div != DIV_W'(div)) n_div_change++;
      if (port_cfg[p].cs_sel != 4'(cs_line)) n_cs_change++;
      port_cfg[p] = c.cfg;
    end
    run_cmd(c, ok);
    check(ok, $sformatf("configure port %0d done", p));
    if (p < NP) begin
      @(negedge clk);
      check(sclk[p] == cpol, "SCLK parked at new idle level");
    end
  endtask

  // Write/Read: nbits bits with the given bytes; answers returned.
  task automatic xfer(input int p, input int nbits, input logic [7:0] tx[$],
                      output logic [7:0] rx[$]);
    spi_host_cmd_t c;
    bit ok;
    int n = 0;
    int unsigned wf0;
    c = '0;
    c.port = 4'(p);
    c.cmd  = CMD_WRITE_READ;
    c.total_bits  = LEN_W'(nbits);
    c.total_bytes = LEN_W'(tx.size());
    ans_q.delete();
    foreach (tx[i]) push_q.push_back(tx[i]);
    wf0 = n_write_flag[p];
    run_cmd(c, ok);
    check(n_write_flag[p] - wf0 == tx.size(), "write flag pulsed once per byte");
    check(ok, $sformatf("write/read on port %0d done", p));
    while (ans_q.size() < tx.size() && n < 100000) begin
      @(posedge clk);
      n++;
    end
    rx = ans_q;
    check(rx.size() == tx.size(), $sformatf("got %0d of %0d answer bytes", rx.size(), tx.size()));
  endtask

  // SCLK period on port 0 during a byte
  int unsigned p0_rise_prev = 0, p0_period_bad = 0, p0_period_checked = 0, cyc = 0;
  int unsigned p0_bits_in_byte = 0;
  logic sclk0_d;
  always @(posedge clk) begin
    cyc++;
    sclk0_d <= sclk[0];
    if (cs[0][0]) p0_bits_in_byte <= 0;
    else if (sclk[0] && !sclk0_d) begin          // rising edge
      if (p0_bits_in_byte % 8 != 0) begin
        p0_period_checked++;
        if (cyc - p0_rise_prev != 2 * int'(port_cfg[0].clk_div)) p0_period_bad++;
      end
      p0_rise_prev = cyc;
      p0_bits_in_byte <= p0_bits_in_byte + 1;
    end
  end

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] tx[$], rx[$];
    logic [15:0] rate [3];
    logic [7:0]  ctrl_addr [4] = '{8'h20, 8'h21, 8'h23, 8'h24};
    logic [7:0]  ctrl_val  [4] = '{8'h07, 8'h09, 8'hB0, 8'h60};
    spi_host_cmd_t c;
    bit ok;
    int unsigned t_sample;

    host_start = 0; host_cmd = '0; push_en = 1; pop_en = 1;
    h2f_wdata = '0;
    for (int p = 0; p < NP; p++) port_cfg[p] = '{cs_sel: '0, cs_active: 1'b0, cpol: 1'b0,
                                              cpha: 1'b0, clk_div: DIV_W'(MIN_DIV)};
    rst_n = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < NP; p++) check(cs[p] == '1, "all chip selects idle after reset");

    // ---- gyroscope on port 0: mode 3 ----
    configure(0, 1'b1, 1'b1, 4, 0);
    for (int i = 0; i < 4; i++) begin
      tx = '{ctrl_addr[i], ctrl_val[i]};
      xfer(0, 16, tx, rx);
      check(gyro.regs[ctrl_addr[i][5:0]] == ctrl_val[i],
            $sformatf("gyro register %h = %h", ctrl_addr[i], gyro.regs[ctrl_addr[i][5:0]]));
    end
    tx = '{8'h8F, 8'h00};
    xfer(0, 16, tx, rx);
    check(rx.size() == 2 && rx[1] == 8'hD3, "WHO_AM_I reads 0xD3");

    for (int round = 0; round < 3; round++) begin
      logic [7:0] bytes [6];
      for (int a = 0; a < 3; a++) rate[a] = 16'($urandom);
      gyro.set_rates(rate[0], rate[1], rate[2]);
      t_sample = cyc;
      for (int r = 0; r < 6; r++) begin
        tx = '{8'hA8 + 8'(r), 8'h00};
        xfer(0, 16, tx, rx);
        bytes[r] = (rx.size() == 2) ? rx[1] : 8'h00;
      end
      // one sample must fit in the 10 ms of the 100 Hz output data rate:
      // 400000 cycles at a 40 MHz system clock
      check(cyc - t_sample < 400000, $sformatf("six register reads took %0d cycles", cyc - t_sample));
      if (round == 0) $display("six 16-bit register reads took %0d cycles", cyc - t_sample);
      for (int a = 0; a < 3; a++)
        check({bytes[2*a+1], bytes[2*a]} == rate[a],
              $sformatf("axis %0d rate %h want %h", a, {bytes[2*a+1], bytes[2*a]}, rate[a]));
      // burst read with auto-increment
      tx = '{8'hE8, 0, 0, 0, 0, 0, 0};
      xfer(0, 56, tx, rx);
      for (int a = 0; a < 3; a++)
        check(rx.size() == 7 && {rx[2*a+2], rx[2*a+1]} == rate[a],
              $sformatf("burst axis %0d", a));
    end
    check(p0_period_checked > 0 && p0_period_bad == 0, "SCLK period is 2 * clk_div on port 0");

    // ---- port 1: slave A (CS 1, mode 0), slave B (CS 2, mode 2) ----
    for (int rep = 0; rep < 2; rep++) begin
      logic [1023:0] pat;
      for (int i = 0; i < 1024; i += 32) pat[i +: 32] = $urandom;
      // slave A
      slave_a.pattern = pat;
      configure(1, 1'b0, 1'b0, 3, 1);
      tx = '{8'($urandom), 8'($urandom), 8'($urandom)};
      xfer(1, 20, tx, rx);
      check(slave_a.rx_count == 20, "slave A saw 20 bits");
      for (int k = 0; k < 20; k++)
        check(slave_a.rx_bits[k] == tx[k / 8][7 - k % 8], "slave A MOSI bit");
      for (int b = 0; b < 3 && b < rx.size(); b++) begin
        logic [7:0] e;
        int nb;
        nb = (b == 2) ? 4 : 8;
        e = '0;
        for (int k = 0; k < nb; k++) e = {e[6:0], pat[b * 8 + k]};
        check(rx[b] == e, $sformatf("slave A answer byte %0d %h want %h", b, rx[b], e));
      end
      // slave B
      slave_b.pattern = ~pat;
      configure(1, 1'b1, 1'b0, 6, 2);
      tx = '{8'($urandom), 8'($urandom)};
      xfer(1, 16, tx, rx);
      check(slave_b.rx_count == 16, "slave B saw 16 bits");
      for (int k = 0; k < 16; k++)
        check(slave_b.rx_bits[k] == tx[k / 8][7 - k % 8], "slave B MOSI bit");
      for (int b = 0; b < 2 && b < rx.size(); b++) begin
        logic [7:0] e;
        e = '0;
        for (int k = 0; k < 8; k++) e = {e[6:0], ~pat[b * 8 + k]};
        check(rx[b] == e, $sformatf("slave B answer byte %0d", b));
      end
    end

    // ---- long transfer with late answer reads, then late host data ----
    begin
      logic [4095:0] pat;
      int nbytes = 200;
      for (int i = 0; i < 4096; i += 32) pat[i +: 32] = $urandom;
      slave_a.pattern = pat;
      configure(1, 1'b0, 1'b0, 2, 1);    // slave A again, fastest clock
      tx.delete();
      for (int b = 0; b < nbytes; b++) tx.push_back(8'($urandom));
      c = '0;
      c.port = 4'd1; c.cmd = CMD_WRITE_READ;
      c.total_bits = LEN_W'(nbytes * 8); c.total_bytes = LEN_W'(nbytes);
      ans_q.delete();
      push_en = 0; pop_en = 0;
      // fill the host FIFO until it is full, the rest follows later
      foreach (tx[i]) push_q.push_back(tx[i]);
      push_en = 1;
      fork
        run_cmd(c, ok);
        begin
          // answers are not read at first: receive FIFOs fill up
          repeat (4000) @(posedge clk);
          pop_en = 1;
          // then the host stops supplying data: transmit FIFOs run dry
          push_en = 0;
          repeat (5000) @(posedge clk);
          push_en = 1;
        end
      join
      check(ok, "long transfer done");
      check(ans_q.size() == nbytes, $sformatf("long transfer answers %0d", ans_q.size()));
      check(slave_a.rx_count == nbytes * 8, "slave A saw all bits of long transfer");
      for (int k = 0; k < nbytes * 8; k++)
        check(slave_a.rx_bits[k] == tx[k / 8][7 - k % 8], "long transfer MOSI bit");
      for (int b = 0; b < nbytes && b < ans_q.size(); b++) begin
        logic [7:0] e;
        e = '0;
        for (int k = 0; k < 8; k++) e = {e[6:0], pat[b * 8 + k]};
        check(ans_q[b] == e, $sformatf("long transfer answer byte %0d", b));
      end
    end

    // ---- Idle command and out-of-range port ----
    c = '0; c.port = 4'd0; c.cmd = CMD_IDLE;
    run_cmd(c, ok);
    check(ok && cs[0] == '1, "idle command");
    begin
      int w0;
      w0 = gyro.writes;
      configure(7, 1'b0, 1'b0, 2, 0);
      n_bad_port++;
      check(cs[0] == '1 && gyro.writes == w0, "out-of-range port touches nothing");
    end

    // ---- every mechanism happened ----
    check(n_configure > 0,   "configure command used");
    check(n_write_read > 0,  "write/read command used");
    check(n_idle > 0,        "idle command used");
    check(n_mode_switch > 0, "clock mode switched on a port");
    check(n_div_change > 0,  "clock divider changed on a port");
    check(n_cs_change > 0,   "chip-select line changed on a port");
    check(n_tx_wait > 0,     "engine waited for transmit data");
    check(n_rx_wait > 0,     "engine waited for receive space");
    check(n_host_full > 0,   "host FIFO ran full");
    check(n_bad_port > 0,    "out-of-range port used");
    $display("mechanisms: configure=%0d write_read=%0d idle=%0d mode_switch=%0d div_change=%0d cs_change=%0d tx_wait=%0d rx_wait=%0d host_full=%0d bad_port=%0d",
             n_configure, n_write_read, n_idle, n_mode_switch, n_div_change, n_cs_change,
             n_tx_wait, n_rx_wait, n_host_full, n_bad_port);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
