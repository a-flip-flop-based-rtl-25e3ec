// nand_arbiter_tb: checks the cross-coupled NAND arbiter.
//
// Both inputs low must give Z0 = Z1 = 1. Over many random races the first
// input to rise decides: upper first gives Z0 = 0, Z1 = 1, lower first gives
// Z0 = 1, Z1 = 0, and the decision holds after the second input rises.
module nand_arbiter_tb;
  timeunit 1ps;
  timeprecision 1ps;

  logic q_u, q_l, z0, z1;
  int   checks = 0, failures = 0;
  int   wins_u = 0, wins_l = 0;

  nand_arbiter dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned du, dl;
    q_u = 0; q_l = 0;
    #100;
    for (int i = 0; i < 200; i++) begin
      q_u = 0; q_l = 0;
      #100;
      check(z0 && z1, "both outputs high while inputs low");
      du = 1 + $urandom_range(0, 50);
      dl = 1 + $urandom_range(0, 50);
      if (du == dl) dl++;
      fork
        begin #(du); q_u = 1; end
        begin #(dl); q_l = 1; end
      join
      #10;
      if (du < dl) begin
        wins_u++;
        check(!z0 && z1, $sformatf("upper first (%0d < %0d): z0=%b z1=%b", du, dl, z0, z1));
      end else begin
        wins_l++;
        check(z0 && !z1, $sformatf("lower first (%0d > %0d): z0=%b z1=%b", du, dl, z0, z1));
      end
    end
    check(wins_u > 0 && wins_l > 0, "both outcomes exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
