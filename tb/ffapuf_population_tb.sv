// ffapuf_population_tb: uniqueness and min-entropy over a population of
// simulated chips, a reduced version of the population evaluation.
//
// K = 22 arrays, each a different simulated chip (its own DEVICE_SEED), get
// the same challenges: all 16 of the 4-bit challenge space. For each
// challenge the test checks every chip's response against the reference
// model, then computes from the responses
// - uniqueness: the mean pairwise Hamming distance in percent,
//   2/(K(K-1)) * sum_{i<j} HD(R_i, R_j)/N * 100, and
// - min-entropy per bit: -(1/N) * sum_b log2(p_b,max), where p_b,max is the
//   larger of the fractions of chips answering 0 and 1 at bit b,
// and compares both with the same figures computed from the reference model.
// The figures describe the invented delay model, not measured silicon; they
// are printed for information. Arrays are 4 bits x 2 stages to keep the
// build small.
module ffapuf_population_tb;
  import ffapuf_ref_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned K  = 22;
  localparam int unsigned NB = 4;
  localparam int unsigned NS = 2;
  localparam int unsigned SEED0 = 32'h5eed_0000;

  logic            clear, start;
  logic [2*NS-1:0] challenge;
  logic [NB-1:0]   resp [K];
  int              checks = 0, failures = 0;

  for (genvar d = 0; d < K; d++) begin : g_dev
    ffapuf_array #(.N_BITS(NB), .N_STAGES(NS), .DEVICE_SEED(SEED0 + d)) u_dev (
      .clear(clear), .start(start), .challenge(challenge), .response(resp[d])
    );
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic real uniqueness(input logic [NB-1:0] r [K]);
    real s;
    s = 0.0;
    for (int i = 0; i < K - 1; i++)
      for (int j = i + 1; j < K; j++) s += real'($countones(r[i] ^ r[j])) / NB;
    return 2.0 * s / (K * (K - 1)) * 100.0;
  endfunction

  function automatic real min_entropy(input logic [NB-1:0] r [K]);
    real h, pmax;
    int hw;
    h = 0.0;
    for (int b = 0; b < NB; b++) begin
      hw = 0;
      for (int d = 0; d < K; d++) hw += int'(r[d][b]);
      pmax = (hw > K / 2) ? real'(hw) / K : real'(K - hw) / K;
      h += -$ln(pmax) / $ln(2.0);
    end
    return h / NB;
  endfunction

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [MAXC-1:0] c;
    logic [NB-1:0]   model [K];
    real u_dut, u_ref, h_dut, h_ref, u_sum, h_sum;
    int unsigned T = 16;  // every 4-bit challenge
    clear = 0; start = 0; challenge = '0;
    u_sum = 0.0; h_sum = 0.0;
    #1000;
    for (int t = 0; t < T; t++) begin
      c = '0;
      c[2*NS-1:0] = (2 * NS)'(t);
      challenge = c[2*NS-1:0];
      clear = 1; #1000; clear = 0; #1000;
      start = 1; #10_000;
      for (int d = 0; d < K; d++) begin
        for (int b = 0; b < NB; b++) model[d][b] = resp_bit(SEED0 + d, b, NS, c);
        check(resp[d] == model[d], $sformatf("chip %0d: %h, expected %h", d, resp[d], model[d]));
      end
      u_dut = uniqueness(resp);  u_ref = uniqueness(model);
      h_dut = min_entropy(resp); h_ref = min_entropy(model);
      check(u_dut == u_ref && h_dut == h_ref, "population figures match the model");
      u_sum += u_dut; h_sum += h_dut;
      start = 0; #1000;
    end
    $display("population of %0d chips, %0d challenges: mean uniqueness %0.2f %%, mean min-entropy %0.3f bit/bit",
             K, T, u_sum / T, h_sum / T);
    check(u_sum > 0.0, "chips differ");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
