// ffapuf_top_tb: end-to-end test of the whole design over its UART link.
//
// A host model sends challenges as serial frames, waits for the response
// frames and decodes them. The design runs with an 8-bit, 8-stage array and a
// fast link (16 clock cycles per bit) to keep the run short. Every response
// must equal the reference model's. The challenges are random ones plus a
// subset at Hamming distance 1 from a base challenge (one flipped bit each).
// The test counts how often each mechanism happened: challenge bytes
// received, CLEAR pulses, START edges, response bytes sent, response bits of
// value 0 and of value 1, and responses changed by a single flipped challenge
// bit; each must happen at least once. It also checks the evaluation latency
// from the last challenge byte to the first response start bit.
module ffapuf_top_tb;
  import ffapuf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NB   = 8;
  localparam int unsigned NS   = 8;
  localparam int unsigned SEED = 32'h00c0_ffee;
  localparam int unsigned CPB  = 16;
  localparam int unsigned CHB  = (2 * NS + 7) / 8;
  localparam int unsigned RSB  = (NB + 7) / 8;

  logic clk = 0, rst_n = 0, uart_rxd = 1, uart_txd, busy;
  int   checks = 0, failures = 0;
  int   n_rx_bytes = 0, n_clear = 0, n_start = 0, n_tx_bytes = 0, n_zero = 0, n_one = 0, n_flip = 0;

  ffapuf_top #(
    .N_BITS(NB), .N_STAGES(NS), .DEVICE_SEED(SEED),
    .CLK_HZ(100_000_000), .BAUD(100_000_000 / CPB)
  ) dut (.*);

  always #5000 clk = ~clk;
  always @(posedge dut.rx_valid) n_rx_bytes++;
  always @(posedge dut.puf_clear) n_clear++;
  always @(posedge dut.puf_start) n_start++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic send_byte(input logic [7:0] b);
    logic [9:0] f;
    f = {1'b1, b, 1'b0};
    for (int i = 0; i < 10; i++) begin
      uart_rxd = f[i];
      repeat (CPB) @(negedge clk);
    end
  endtask

  task automatic recv_byte(output logic [7:0] b);
    @(negedge uart_txd);
    repeat (CPB / 2) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      repeat (CPB) @(negedge clk);
      b[i] = uart_txd;
    end
    repeat (CPB) @(negedge clk);
    check(uart_txd == 1'b1, "response stop bit");
    n_tx_bytes++;
  endtask

  task automatic exchange(input logic [MAXC-1:0] c, output logic [NB-1:0] r);
    logic [CHB*8-1:0] cb;
    logic [RSB*8-1:0] rb;
    logic [NB-1:0]    exp_r;
    time t_last, t_resp;
    cb = c[CHB*8-1:0];
    for (int i = 0; i < CHB; i++) send_byte(cb[8*i +: 8]);
    t_last = $time;
    fork
      begin
        for (int i = 0; i < RSB; i++) recv_byte(rb[8*i +: 8]);
      end
      begin
        @(negedge uart_txd);
        t_resp = $time;
      end
    join
    r = rb[NB-1:0];
    for (int i = 0; i < NB; i++) exp_r[i] = resp_bit(SEED, i, NS, c);
    check(r == exp_r, $sformatf("challenge %h: response %h, expected %h", cb, r, exp_r));
    // stop bit end -> rx valid (~0.5 bit), controller 2+1+16+1 cycles, host 1, tx 1
    check((t_resp - t_last) / 10_000 < CPB + 30,
          $sformatf("latency %0d cycles", (t_resp - t_last) / 10_000));
    for (int i = 0; i < NB; i++) if (r[i]) n_one++; else n_zero++;
  endtask

  initial begin
    #500_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXC-1:0] base, c;
    logic [NB-1:0] r0, r;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4 * CPB) @(negedge clk);
    for (int t = 0; t < 12; t++) begin
      exchange(rand_challenge(2 * NS), r);
      repeat ($urandom_range(0, 3 * CPB)) @(negedge clk);
    end
    // subset of challenges one bit away from a base challenge
    base = rand_challenge(2 * NS);
    exchange(base, r0);
    for (int i = 0; i < 2 * NS; i++) begin
      c = base;
      c[i] = ~c[i];
      exchange(c, r);
      if (r != r0) n_flip++;
    end
    $display("mechanisms: rx_bytes=%0d clear=%0d start=%0d tx_bytes=%0d zeros=%0d ones=%0d flips=%0d",
             n_rx_bytes, n_clear, n_start, n_tx_bytes, n_zero, n_one, n_flip);
    check(n_rx_bytes == 29 * CHB, "every challenge byte received");
    check(n_clear == 29 && n_start == 29, "one CLEAR and one START per challenge");
    check(n_tx_bytes == 29 * RSB, "every response byte sent");
    check(n_zero > 0, "a response bit of 0 (upper path faster) occurred");
    check(n_one > 0, "a response bit of 1 (lower path faster) occurred");
    check(n_flip > 0, "a single flipped challenge bit changed the response");
    check(!busy, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
