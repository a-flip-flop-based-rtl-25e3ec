// puf_controller_tb: checks the evaluation sequence.
//
// A stand-in for the PUF array answers each START rising edge with a new
// random response after a few nanoseconds, and answers nothing unless it was
// cleared first. The test checks the CLEAR pulse length, the one-cycle gap
// before START, that CLEAR and START never overlap, that `done` comes exactly
// CLEAR_CYCLES + SETTLE_CYCLES + 2 cycles after `go`, that the captured
// response is the stand-in's, and that `go` is ignored while busy.
module puf_controller_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N      = 64;
  localparam int unsigned CLRC   = 2;
  localparam int unsigned SETTLE = 16;

  logic         clk = 0, rst_n = 0, go = 0;
  logic         busy, done, puf_clear, puf_start;
  logic [N-1:0] puf_resp, response, expected;
  bit           was_cleared;
  int           checks = 0, failures = 0;
  int           clear_len, cycle = 0;

  puf_controller #(.N_BITS(N), .CLEAR_CYCLES(CLRC), .SETTLE_CYCLES(SETTLE)) dut (.*);

  always #5000 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // PUF array stand-in
  initial begin
    puf_resp = '0;
    was_cleared = 0;
    forever begin
      @(posedge puf_clear or posedge puf_start);
      if (puf_clear) begin
        puf_resp = '1;
        was_cleared = 1;
      end else if (was_cleared) begin
        expected = {$urandom, $urandom};
        #3000 puf_resp = expected;
        was_cleared = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) check(!(puf_clear && puf_start), "CLEAR and START overlap");

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_go, c_clr_fall, c_start, c_done;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int i = 0; i < 10; i++) begin
      check(!busy && !puf_start, "idle before go");
      go <= 1;
      @(posedge clk);
      c_go = cycle;
      go <= 0;
      @(posedge clk);
      check(busy, "busy after go");
      go <= 1;  // must be ignored while busy
      @(posedge clk);
      go <= 0;
      wait (!puf_clear);
      c_clr_fall = cycle;
      @(posedge puf_start);
      c_start = cycle;
      @(posedge done);
      c_done = cycle;
      @(negedge clk);
      check(c_clr_fall - c_go == CLRC + 1, $sformatf("CLEAR lasted %0d cycles", c_clr_fall - c_go - 1));
      check(c_start - c_clr_fall == 1, "one cycle between CLEAR and START");
      check(c_done - c_go == CLRC + SETTLE + 2,
            $sformatf("done %0d cycles after go, expected %0d", c_done - c_go, CLRC + SETTLE + 2));
      check(response == expected, $sformatf("response %h, expected %h", response, expected));
      check(!puf_start && !busy, "START low and idle after done");
      @(negedge clk);
      check(!done, "done is a single pulse");
      repeat (3) @(posedge clk);
    end
    check(!busy, "no second evaluation from go while busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
