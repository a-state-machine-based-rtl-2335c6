// tb_spi_mux: self-checking test of the FPGA multiplexer with two ports.
//
// Queues stand in for the two target-scoped FIFOs and for each port's
// transmit and receive FIFOs, and a simple engine stand-in per port takes
// bytes from its transmit queue, returns each byte inverted through its
// receive queue and pulses done after the last one. Checked: a Configure
// command raises the start flag for the named port with the host's
// configuration on the global outputs; a Write/Read sends exactly the
// host's bytes to the named port only, returns the answer bytes to the host
// in order, and reports done only after the last answer byte has reached
// the host FIFO, also when the host FIFO is often full; an Idle command
// reaches the engine; a port number out of range finishes without a start.
module tb_spi_mux;
  import spi_pkg::*;

  localparam int unsigned NP = 2;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic            host_start, host_busy, host_done;
  spi_host_cmd_t   host_cmd;
  logic            h2f_empty, h2f_pop, f2h_full, f2h_push;
  logic [7:0]      h2f_data, f2h_data, tx_data;
  logic            eng_start;
  logic [3:0]      eng_port;
  spi_cmd_e        eng_cmd;
  spi_cfg_t        eng_cfg;
  logic [LEN_W-1:0] eng_total_bits;
  logic [NP-1:0]   eng_done, tx_full, tx_push, rx_empty, rx_pop;
  logic [7:0]      rx_data [NP];

  spi_mux #(.NUM_PORTS(NP)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // FIFO stand-ins
  logic [7:0] h2f_q[$], f2h_q[$];
  logic [7:0] txq0[$], txq1[$], rxq0[$], rxq1[$];
  logic       f2h_block;
  assign h2f_empty  = h2f_q.size() == 0;
  assign h2f_data   = h2f_empty ? 8'h00 : h2f_q[0];
  assign f2h_full   = f2h_block;
  assign tx_full[0] = txq0.size() >= 4;
  assign tx_full[1] = txq1.size() >= 4;
  assign rx_empty[0] = rxq0.size() == 0;
  assign rx_empty[1] = rxq1.size() == 0;
  assign rx_data[0] = rx_empty[0] ? 8'h00 : rxq0[0];
  assign rx_data[1] = rx_empty[1] ? 8'h00 : rxq1[0];

  // engine stand-ins
  int unsigned need [NP];
  logic [NP-1:0] active;
  int unsigned starts [NP];
  spi_cfg_t    last_cfg [NP];
  spi_cmd_e    last_cmd [NP];
  int unsigned f2h_stalls = 0;
  logic        bp_on;

  // host FIFO back-pressure: randomly full while bp_on
  always @(negedge clk) f2h_block <= bp_on && (($urandom % 2) == 0);

  always @(posedge clk) begin
    if (h2f_pop) void'(h2f_q.pop_front());
    if (f2h_push) f2h_q.push_back(f2h_data);
    if (tx_push[0]) txq0.push_back(tx_data);
    if (tx_push[1]) txq1.push_back(tx_data);
    if (rx_pop[0]) void'(rxq0.pop_front());
    if (rx_pop[1]) void'(rxq1.pop_front());
    if (f2h_full && rx_pop == 0 && rx_empty != 2'b11) f2h_stalls++;
    eng_done <= '0;
    for (int p = 0; p < NP; p++) begin
      if (eng_start && eng_port == 4'(p)) begin
        starts[p]++;
        last_cfg[p] = eng_cfg;
        last_cmd[p] = eng_cmd;
        if (eng_cmd == CMD_WRITE_READ) begin
          need[p]   = (int'(eng_total_bits) + 7) / 8;
          active[p] <= 1'b1;
        end else begin
          eng_done[p] <= 1'b1;
        end
      end
    end
    // engines work slowly: one byte every few cycles
    if (active[0] && txq0.size() != 0 && $urandom % 4 == 0) begin
      rxq0.push_back(~txq0.pop_front());
      need[0]--;
      if (need[0] == 0) begin active[0] <= 1'b0; eng_done[0] <= 1'b1; end
    end
    if (active[1] && txq1.size() != 0 && $urandom % 4 == 0) begin
      rxq1.push_back(~txq1.pop_front());
      need[1]--;
      if (need[1] == 0) begin active[1] <= 1'b0; eng_done[1] <= 1'b1; end
    end
  end

  task automatic run_cmd(input spi_host_cmd_t c, output bit ok);
    int n = 0;
    ok = 1'b0;
    while (host_busy && n < 20000) begin
      @(negedge clk);
      n++;
    end
    if (host_busy) begin
      check(1'b0, "multiplexer still busy from the previous command");
      return;
    end
    n = 0;
    @(negedge clk);
    host_cmd = c; host_start = 1'b1;
    @(negedge clk);
    host_start = 1'b0;
    host_cmd = '0;   // the command is captured at start
    ok = 1'b0;
    while (n < 20000) begin
      @(posedge clk);
      if (host_done) begin ok = 1'b1; break; end
      n++;
    end
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spi_host_cmd_t c;
    bit ok;
    host_start = 0; host_cmd = '0; bp_on = 0; eng_done = '0; active = '0;
    for (int p = 0; p < NP; p++) begin starts[p] = 0; need[p] = 0; end
    rst_n = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // Configure each port
    for (int p = 0; p < NP; p++) begin
      c = '0;
      c.port = 4'(p);
      c.cmd  = CMD_CONFIGURE;
      c.cfg  = '{cs_sel: 4'(p + 1), cs_active: 1'b0, cpol: 1'(p), cpha: 1'b1,
                 clk_div: DIV_W'(10 + p)};
      run_cmd(c, ok);
      check(ok, "configure done");
      check(starts[p] == 1 && last_cmd[p] == CMD_CONFIGURE, "configure start flag to port");
      check(last_cfg[p] == c.cfg, "global configuration presented to engine");
    end
    check(starts[0] == 1 && starts[1] == 1, "each port started once");

    // Write/Read on both ports, with and without host FIFO back-pressure
    for (int t = 0; t < 12; t++) begin
      int p, nbits, nbytes;
      logic [7:0] sent[$];
      p = t % 2;
      nbits  = 1 + ($urandom % 60);
      nbytes = (nbits + 7) / 8;
      for (int b = 0; b < nbytes; b++) begin
        sent.push_back(8'($urandom));
        h2f_q.push_back(sent[b]);
      end
      f2h_q.delete();
      c = '0;
      c.port = 4'(p);
      c.cmd  = CMD_WRITE_READ;
      c.total_bits  = LEN_W'(nbits);
      c.total_bytes = LEN_W'(nbytes);
      bp_on = (t >= 6);
      run_cmd(c, ok);
      bp_on = 1'b0;
      check(ok, "write/read done");
      check(h2f_q.size() == 0, "all host bytes forwarded");
      check(txq0.size() == 0 && txq1.size() == 0, "no byte left in a transmit FIFO");
      check(f2h_q.size() == nbytes, $sformatf("host got %0d of %0d bytes", f2h_q.size(), nbytes));
      for (int b = 0; b < nbytes && b < f2h_q.size(); b++)
        check(f2h_q[b] == ~sent[b], "answer byte in order from the right port");
      check(starts[p] == 2 + t / 2, "start flag went to the named port only");
    end
    check(f2h_stalls > 0, "host FIFO back-pressure was exercised");

    // Idle command
    c = '0; c.port = 4'd1; c.cmd = CMD_IDLE;
    run_cmd(c, ok);
    check(ok && last_cmd[1] == CMD_IDLE, "idle command passed to engine");

    // port out of range
    begin
      int s0, s1;
      s0 = starts[0]; s1 = starts[1];
      c = '0; c.port = 4'd5; c.cmd = CMD_CONFIGURE;
      run_cmd(c, ok);
      check(ok && starts[0] == s0 && starts[1] == s1, "bad port finishes without start");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
