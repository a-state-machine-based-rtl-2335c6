// tb_spi_engine: self-checking test of one SPI engine against a
// behavioural slave in all four clock modes.
//
// The testbench plays the multiplexer: it configures the engine (port 1)
// and starts Write/Read transfers of 8 to 29 bits with random data, while
// queues stand in for the transmit and receive FIFOs. The transmit queue is
// sometimes filled late and the receive side sometimes refuses bytes, so
// the engine has to wait in both places. Checked: every MOSI bit the slave
// saw against the bytes sent (MSB first), every received byte against the
// slave's MISO pattern (a partial last byte right-aligned), that only the
// configured CS line is driven to its active level, SCLK idle level, that
// each active SCLK half period lasts exactly clk_div clocks and each idle
// one inside a byte too, that a start for another port is ignored, and
// that an Idle command only reports done. Without FIFO waits a transfer
// must take exactly 2*clk_div*bits + 2*bytes + 8 cycles from the cycle the
// start flag is sampled to the cycle done is seen.
module tb_spi_engine;
  import spi_pkg::*;

  localparam int unsigned NUM_CS = 4;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic                start;
  logic [3:0]          port;
  spi_cmd_e            cmd;
  spi_cfg_t            cfg_in;
  logic [LEN_W-1:0]    total_bits;
  logic                done, busy;
  logic                tx_empty, tx_pop, rx_full, rx_push;
  logic [DATA_W-1:0]   tx_data, rx_data;
  logic                sclk, mosi, miso;
  logic [NUM_CS-1:0]   cs;

  spi_engine #(.PORT_ID(1), .NUM_CS(NUM_CS)) dut (
    .clk, .rst_n, .start, .port, .cmd, .cfg_in, .total_bits, .done, .busy,
    .tx_empty, .tx_data, .tx_pop, .rx_full, .rx_push, .rx_data,
    .sclk, .mosi, .miso, .cs
  );

  logic sel;
  assign sel = (cs[cfg_in.cs_sel] == cfg_in.cs_active);
  spi_slave_model slave (.sel, .sclk, .mosi, .cpol(cfg_in.cpol), .cpha(cfg_in.cpha), .miso);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // transmit FIFO stand-in
  logic [7:0] txq[$];
  logic       tx_hold;       // pretend empty for a while
  assign tx_empty = (txq.size() == 0) || tx_hold;
  assign tx_data  = (txq.size() != 0) ? txq[0] : 8'h00;
  logic [7:0] rxq[$];
  int unsigned tx_wait_events = 0, rx_wait_events = 0;

  always @(posedge clk) begin
    if (tx_pop) void'(txq.pop_front());
    if (rx_push) rxq.push_back(rx_data);
    // engine state codes: 6 = READ_FIFO, 12 = WRITE_FIFO
    if (4'(dut.state) == 4'd6 && tx_empty && busy) tx_wait_events++;
    if (4'(dut.state) == 4'd12 && rx_full) rx_wait_events++;
  end

  // SCLK phase width monitor
  int unsigned phase_len;
  int unsigned edges;
  int unsigned bad_active, bad_idle, idle_checked;
  logic        sclk_d;
  always @(posedge clk) begin
    sclk_d <= sclk;
    if (!rst_n || !sel) begin
      phase_len <= 0;
      edges     <= 0;
    end else if (sclk != sclk_d) begin
      edges <= edges + 1;
      if (sclk == cfg_in.cpol) begin
        if (phase_len + 1 != cfg_in.clk_div) bad_active <= bad_active + 1;
      end else if (edges != 0 && (edges / 2) % 8 != 0) begin
        idle_checked <= idle_checked + 1;
        if (phase_len + 1 != cfg_in.clk_div) bad_idle <= bad_idle + 1;
      end
      phase_len <= 0;
    end else begin
      phase_len <= phase_len + 1;
    end
  end

  // latency: cycles from the start flag being sampled to done being seen
  int unsigned cyc = 0, t_start = 0, t_done = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (start) t_start <= cyc;
    if (done) t_done <= cyc;
  end

  task automatic pulse_start(input logic [3:0] p, input spi_cmd_e c);
    @(negedge clk);
    port = p; cmd = c; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
  endtask

  task automatic wait_done(output bit ok);
    int n = 0;
    ok = 1'b0;
    while (n < 200000) begin
      @(posedge clk);
      if (done) begin ok = 1'b1; break; end
      n++;
    end
  endtask

  task automatic configure(input logic cpol, input logic cpha, input int div,
                           input logic [3:0] cs_sel);
    bit ok;
    cfg_in = '{cs_sel: cs_sel, cs_active: 1'b0, cpol: cpol, cpha: cpha,
               clk_div: DIV_W'(div)};
    pulse_start(4'd1, CMD_CONFIGURE);
    wait_done(ok);
    check(ok, "configure done");
    @(negedge clk);
    check(sclk == cpol, "SCLK idle level after configure");
    check(cs == '1, "all CS inactive after configure");
  endtask

  task automatic transfer(input int nbits, input bit late_tx, input bit slow_rx);
    int nbytes;
    logic [7:0] sent[$];
    logic [1023:0] pat;
    bit ok;
    nbytes = (nbits + 7) / 8;
    for (int i = 0; i < 1024; i += 32) pat[i +: 32] = $urandom;
    slave.pattern = pat;
    rxq.delete();
    for (int b = 0; b < nbytes; b++) sent.push_back(8'($urandom));
    if (late_tx) begin
      txq.push_back(sent[0]);
      tx_hold = 1'b0;
    end else begin
      foreach (sent[b]) txq.push_back(sent[b]);
    end
    total_bits = LEN_W'(nbits);
    bad_active = 0; bad_idle = 0;
    pulse_start(4'd1, CMD_WRITE_READ);
    fork
      begin
        if (late_tx) begin
          for (int b = 1; b < nbytes; b++) begin
            repeat (40 * int'(cfg_in.clk_div)) @(posedge clk);
            @(negedge clk) txq.push_back(sent[b]);
          end
        end
      end
      begin
        if (slow_rx) begin
          while (!done) begin
            @(negedge clk) rx_full = ($urandom % 3) != 0;
          end
        end
      end
      wait_done(ok);
    join
    rx_full = 1'b0;
    check(ok, $sformatf("transfer of %0d bits done", nbits));
    @(negedge clk);
    check(cs == '1, "CS released after transfer");
    check(sclk == cfg_in.cpol, "SCLK back at idle level");
    check(slave.rx_count == nbits, $sformatf("slave saw %0d of %0d bits", slave.rx_count, nbits));
    for (int k = 0; k < nbits; k++) begin
      logic exp_bit;
      exp_bit = sent[k / 8][7 - (k % 8)];
      check(slave.rx_bits[k] == exp_bit, $sformatf("MOSI bit %0d", k));
    end
    check(rxq.size() == nbytes, $sformatf("received %0d of %0d bytes", rxq.size(), nbytes));
    for (int b = 0; b < nbytes && b < rxq.size(); b++) begin
      int nb;
      logic [7:0] exp_byte;
      nb = (b == nbytes - 1 && nbits % 8 != 0) ? nbits % 8 : 8;
      exp_byte = '0;
      for (int k = 0; k < nb; k++) exp_byte = {exp_byte[6:0], pat[b * 8 + k]};
      check(rxq[b] == exp_byte, $sformatf("MISO byte %0d got %h want %h", b, rxq[b], exp_byte));
    end
    if (!late_tx && !slow_rx) begin
      int exp_lat;
      exp_lat = 2 * int'(cfg_in.clk_div) * nbits + 2 * nbytes + 8;
      check(int'(t_done - t_start) == exp_lat,
            $sformatf("latency %0d cycles, expected 2*clk_div*bits + 2*bytes + 8 = %0d",
                      t_done - t_start, exp_lat));
    end
    check(bad_active == 0, "active SCLK half periods last clk_div cycles");
    check(bad_idle == 0, "idle SCLK half periods inside a byte last clk_div cycles");
  endtask

  // selected line stays the only active one during a transfer
  int unsigned cs_bad = 0;
  always @(posedge clk) begin
    if (rst_n && busy) begin
      for (int i = 0; i < NUM_CS; i++)
        if (i != cfg_in.cs_sel && cs[i] != ~cfg_in.cs_active) cs_bad++;
    end
  end

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit ok;
    start = 0; port = 0; cmd = CMD_IDLE; total_bits = '0;
    cfg_in = '0; rx_full = 0; tx_hold = 0;
    bad_active = 0; bad_idle = 0; idle_checked = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // start for another port is ignored
    pulse_start(4'd0, CMD_IDLE);
    repeat (10) @(posedge clk);
    check(!busy && !done, "start for another port ignored");

    // Idle command only reports done
    pulse_start(4'd1, CMD_IDLE);
    wait_done(ok);
    check(ok && cs == '1, "idle command reports done");

    for (int mode = 0; mode < 4; mode++) begin
      configure(mode[1], mode[0], 2 + mode, 4'(mode));
      transfer(8, 0, 0);
      transfer(16, 0, 0);
      transfer(13, 1, 0);
      transfer(29, 0, 1);
    end
    // divider change on the fly, below minimum clamps to 2
    configure(1'b1, 1'b1, 7, 4'd3);
    transfer(16, 0, 0);
    configure(1'b1, 1'b1, 2, 4'd0);
    transfer(24, 1, 1);

    check(tx_wait_events > 0, "engine waited for an empty transmit FIFO");
    check(rx_wait_events > 0, "engine waited for a full receive FIFO");
    check(idle_checked > 0, "idle half periods were measured");
    check(cs_bad == 0, "unselected CS lines stay inactive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
