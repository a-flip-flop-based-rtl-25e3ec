// ffapuf_slice_tb: checks one delay stage.
//
// With known segment delays it clears the slice, raises `launch` and measures
// when `edge_out` rises, for every pair of select bits: the delay must be the
// one of the selected flip-flop. It also checks that CLEAR pulls every
// flip-flop low and that one launch edge sets all four flip-flops.
module ffapuf_slice_tb;
  timeunit 1ps;
  timeprecision 1ps;

  localparam logic [3:0][15:0] DLY = {16'd430, 16'd410, 16'd390, 16'd370};

  logic clear, launch, sel_lo, sel_hi, edge_out;
  int   checks = 0, failures = 0;

  ffapuf_slice #(.SEG_DLY_PS(DLY)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    int unsigned expect_ps;
    clear = 0; launch = 0; sel_lo = 0; sel_hi = 0;
    #1000;
    for (int sel = 0; sel < 4; sel++) begin
      {sel_hi, sel_lo} = 2'(sel);
      expect_ps = (sel == 0) ? 370 : (sel == 1) ? 390 : (sel == 2) ? 410 : 430;
      clear = 1; #200; clear = 0; #1000;
      check(edge_out == 1'b0, $sformatf("output low after clear, sel=%0d", sel));
      t0 = $time;
      launch = 1;
      @(posedge edge_out);
      check(($time - t0) == expect_ps,
            $sformatf("sel=%0d delay %0t ps, expected %0d", sel, $time - t0, expect_ps));
      #2000;
      // every flip-flop was set by the same edge
      for (int k = 0; k < 4; k++) begin
        {sel_hi, sel_lo} = 2'(k);
        #1;
        check(edge_out == 1'b1, $sformatf("flip-flop %0d set after launch", k));
      end
      {sel_hi, sel_lo} = 2'(sel);
      launch = 0; #1000;
      check(edge_out == 1'b1, "falling launch does not clear");
    end
    // clear while launch is high clears the outputs after their delays
    clear = 1; #1000;
    for (int k = 0; k < 4; k++) begin
      {sel_hi, sel_lo} = 2'(k);
      #1;
      check(edge_out == 1'b0, $sformatf("flip-flop %0d cleared", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
