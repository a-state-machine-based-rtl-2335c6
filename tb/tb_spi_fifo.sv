// tb_spi_fifo: self-checking test of the byte FIFO.
//
// Random pushes and pops, including attempts to push when full and pop
// when empty (which must be ignored), are compared against a queue
// reference model: the visible head byte, full, empty and count are
// checked every cycle. The default depth of 16 is used.
module tb_spi_fifo;

  localparam int unsigned DEPTH = 16;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic       push, pop, full, empty;
  logic [7:0] push_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  spi_fifo dut (.clk, .rst_n, .push, .push_data, .pop, .rd_data, .full, .empty, .count);

  int checks = 0, failures = 0;
  logic [7:0] model[$];
  int unsigned saw_full = 0, saw_empty = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_data = 0;
    rst_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int bias;
      // phases that mostly fill, then mostly drain
      bias = ((cyc / 300) % 2 == 0) ? 75 : 25;
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() != 0) check(rd_data == model[0], $sformatf("head byte %h want %h", rd_data, model[0]));
      if (full) saw_full++;
      if (empty) saw_empty++;
      // never push into a full or pop from an empty FIFO (assertions)
      push = (($urandom % 100) < bias) && !full;
      pop  = (($urandom % 100) >= bias) && !empty;
      if ($urandom % 5 == 0) begin push = !full; pop = !empty; end
      push_data = 8'($urandom);
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(push_data);
    end
    check(saw_full > 0, "FIFO reached full");
    check(saw_empty > 0, "FIFO reached empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
