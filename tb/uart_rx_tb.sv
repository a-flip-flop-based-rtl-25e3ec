// uart_rx_tb: sends random 8N1 frames into the receiver and checks each byte
// and its single `valid` pulse; a frame with a bad stop bit must be dropped.
module uart_rx_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CPB = 16;

  logic       clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic       valid;
  int         checks = 0, failures = 0, pulses = 0;
  logic [7:0] last;

  uart_rx #(.CLKS_PER_BIT(CPB)) dut (.*);

  always #5000 clk = ~clk;
  always @(posedge clk) if (valid) begin pulses++; last = data; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send(input logic [7:0] b, input logic stop);
    logic [9:0] f;
    f = {stop, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      rxd = f[i];
      repeat (CPB) @(posedge clk);
    end
    rxd = 1;
    repeat (CPB) @(posedge clk);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    int p0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (CPB) @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      b = 8'($urandom);
      p0 = pulses;
      send(b, 1'b1);
      check(pulses == p0 + 1, $sformatf("one valid pulse for byte %0d", i));
      check(last == b, $sformatf("byte %h received as %h", b, last));
    end
    p0 = pulses;
    send(8'h5a, 1'b0);
    repeat (2 * CPB) @(posedge clk);
    check(pulses == p0, "frame with bad stop bit dropped");
    send(8'hc3, 1'b1);
    check(last == 8'hc3, "receiver recovers after a bad frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
