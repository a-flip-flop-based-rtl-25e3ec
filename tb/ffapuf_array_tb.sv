// ffapuf_array_tb: checks the N-bit array against the reference model.
//
// A 16-bit, 16-stage array is evaluated for random challenges; every response
// bit must match the faster path of its own cell in the reference model.
// Different cells must not all answer alike (each cell has its own delays).
module ffapuf_array_tb;
  import ffapuf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned NB   = 16;
  localparam int unsigned NS   = 16;
  localparam int unsigned SEED = 32'h0bad_cafe;

  logic            clear, start;
  logic [2*NS-1:0] challenge;
  logic [NB-1:0]   response;
  int              checks = 0, failures = 0, mixed = 0;

  ffapuf_array #(.N_BITS(NB), .N_STAGES(NS), .DEVICE_SEED(SEED)) dut (.*);

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
    logic [MAXC-1:0] c;
    logic [NB-1:0] exp_r;
    clear = 0; start = 0; challenge = '0;
    #1000;
    for (int t = 0; t < 50; t++) begin
      c = rand_challenge(2 * NS);
      challenge = c[2*NS-1:0];
      clear = 1; #1000; clear = 0; #1000;
      check(response == '1, "all arbiters idle after clear");
      start = 1;
      #20_000;  // far beyond 16 stages of about 0.4 ns
      for (int i = 0; i < NB; i++) exp_r[i] = resp_bit(SEED, i, NS, c);
      check(response == exp_r, $sformatf("response %h, expected %h", response, exp_r));
      if (response != '0 && response != '1) mixed++;
      start = 0; #1000;
    end
    check(mixed > 0, "cells answer differently");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
