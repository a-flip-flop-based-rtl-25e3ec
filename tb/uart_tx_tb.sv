// uart_tx_tb: offers random bytes to the transmitter and decodes its line
// output independently (sampling each bit in its middle). It checks the start
// bit, data bits, stop bit, that a frame lasts 10 bit times and that `ready`
// is low exactly while a frame is being sent.
module uart_tx_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CPB = 16;

  logic       clk = 0, rst_n = 0, valid = 0, ready, txd;
  logic [7:0] data = '0;
  int         checks = 0, failures = 0;

  uart_tx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5000 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b, got;
    int busy_cycles;
    repeat (3) @(negedge clk);
    rst_n <= 1;
    repeat (3) @(negedge clk);
    check(txd == 1'b1 && ready, "line idles high and ready");
    for (int i = 0; i < 30; i++) begin
      b = 8'($urandom);
      data  <= b;
      valid <= 1;
      @(negedge clk);
      valid <= 0;
      // sample in the middle of each bit time, counted from the start bit
      wait (txd == 1'b0);
      repeat (CPB / 2) @(negedge clk);
      check(txd == 1'b0, "start bit");
      for (int k = 0; k < 8; k++) begin
        repeat (CPB) @(negedge clk);
        got[k] = txd;
      end
      repeat (CPB) @(negedge clk);
      check(txd == 1'b1, "stop bit");
      check(got == b, $sformatf("sent %h, line carried %h", b, got));
      check(!ready, "busy during stop bit");
      wait (ready);
      @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // frame length: `ready` is low for exactly 10 bit times after the byte is taken
    data  <= 8'h00;
    valid <= 1;
    @(negedge clk);
    valid <= 0;
    busy_cycles = 0;
    while (!ready) begin
      busy_cycles++;
      @(negedge clk);
    end
    check(busy_cycles == 10 * CPB, $sformatf("frame took %0d cycles", busy_cycles));
    check(txd == 1'b1, "line idle after the frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
