// host_if_tb: checks the challenge/response byte protocol.
//
// It feeds 16 challenge bytes (least significant first) with random gaps and
// checks that `go` pulses once, right after the last byte, with the assembled
// 128-bit challenge. It then answers with `done` and a random response and
// takes the outgoing bytes with a randomly stalling `ready`, checking that the
// eight bytes come out least significant first and that bytes arriving during
// the evaluation are ignored.
module host_if_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CB = 128, RB = 64;

  logic          clk = 0, rst_n = 0;
  logic [7:0]    rx_data = '0, tx_data;
  logic          rx_valid = 0, tx_valid, tx_ready = 0;
  logic [CB-1:0] challenge;
  logic          go, done = 0;
  logic [RB-1:0] response = '0;
  int            checks = 0, failures = 0, go_count = 0;

  host_if #(.CHAL_BITS(CB), .RESP_BITS(RB)) dut (.*);

  always #5000 clk = ~clk;
  always @(negedge clk) if (go) go_count++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic rx_byte(input logic [7:0] b);
    rx_data  = b;
    rx_valid = 1;
    @(negedge clk);
    rx_valid = 0;
    repeat ($urandom_range(0, 4)) @(negedge clk);
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CB-1:0] chal;
    logic [RB-1:0] resp, got;
    int g0, nb;
    repeat (3) @(negedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int t = 0; t < 8; t++) begin
      chal = {$urandom, $urandom, $urandom, $urandom};
      g0 = go_count;
      for (int i = 0; i < CB / 8; i++) begin
        if (i == CB / 8 - 1) begin
          rx_data  = chal[8*i +: 8];
          rx_valid = 1;
          @(negedge clk);
          rx_valid = 0;
          check(go == 1'b1, "go right after the last challenge byte");
        end else begin
          rx_byte(chal[8*i +: 8]);
          check(go_count == g0, "no go before the challenge is complete");
        end
      end
      @(negedge clk);
      check(go_count == g0 + 1, "one go per challenge");
      check(challenge == chal, $sformatf("challenge %h, expected %h", challenge, chal));
      // a stray byte during the evaluation is ignored
      rx_byte(8'hff);
      check(challenge == chal, "challenge stable during evaluation");
      resp = {$urandom, $urandom};
      response <= resp;
      done <= 1;
      @(negedge clk);
      done <= 0;
      response <= '0;
      nb = 0;
      got = '0;
      while (nb < RB / 8) begin
        tx_ready <= 1'($urandom);
        @(posedge clk);
        if (tx_valid && tx_ready) begin
          got[8*nb +: 8] = tx_data;
          nb++;
        end
        @(negedge clk);
      end
      tx_ready <= 0;
      @(negedge clk);
      check(!tx_valid, "nothing more to send");
      check(got == resp, $sformatf("response bytes %h, expected %h", got, resp));
    end
    check(go_count == 8, "eight evaluations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
