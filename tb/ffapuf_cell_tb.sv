// ffapuf_cell_tb: checks the 1-bit response cell at its full 64 stages.
//
// For random challenges and for a subset of challenges at Hamming distance 1
// from a base challenge, it clears the cell, raises START, and measures when
// Q^U and Q^L rise. Both arrival times must equal the sums of the selected
// segment delays worked out by the reference model, and the response must
// name the faster path (0 = upper). Both response values must occur.
module ffapuf_cell_tb;
  import ffapuf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned N    = 64;
  localparam int unsigned SEED = 32'h1234_5678;
  localparam int unsigned CID  = 5;

  logic           clear, start, q_u, q_l, response;
  logic [2*N-1:0] challenge;
  int             checks = 0, failures = 0, ones = 0, zeros = 0;

  ffapuf_cell #(.N_STAGES(N), .DEVICE_SEED(SEED), .CELL_ID(CID)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_one(input logic [MAXC-1:0] c);
    time t0, tu, tl;
    int unsigned eu, el;
    challenge = c[2*N-1:0];
    clear = 1; #1000; clear = 0; #1000;
    check(!q_u && !q_l && response, "cleared state");
    eu = path_ps(SEED, CID, N, c, 1'b0);
    el = path_ps(SEED, CID, N, c, 1'b1);
    t0 = $time;
    start = 1;
    fork
      begin @(posedge q_u); tu = $time - t0; end
      begin @(posedge q_l); tl = $time - t0; end
    join
    #100;
    check(tu == eu, $sformatf("T^U %0t, expected %0d", tu, eu));
    check(tl == el, $sformatf("T^L %0t, expected %0d", tl, el));
    check(response == resp_bit(SEED, CID, N, c), $sformatf("response %b", response));
    if (response) ones++; else zeros++;
    start = 0; #1000;
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXC-1:0] base, c;
    clear = 0; start = 0; challenge = '0;
    #1000;
    for (int i = 0; i < 40; i++) run_one(rand_challenge(2 * N));
    base = rand_challenge(2 * N);
    run_one(base);
    for (int i = 0; i < 2 * N; i += 7) begin
      c = base;
      c[i] = ~c[i];
      run_one(c);
    end
    check(ones > 0 && zeros > 0, $sformatf("both response values seen (%0d ones, %0d zeros)", ones, zeros));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
