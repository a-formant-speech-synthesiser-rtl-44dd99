// tb_dff2ph - self-checking test of the two-phase master-slave flip-flop.
//
// Drives phi1 and phi2 as non-overlapping pulses and, within each bit period,
// wiggles d while phi1 is high, in both gaps and while phi2 is high. The
// expected q is worked out from the clocking rule alone: q takes the value d
// had when phi1 fell, changes only while phi2 is high, and ignores d at every
// other time. Checks are made in each interval of each period.
module tb_dff2ph;

  logic d = 1'b0, phi1 = 1'b0, phi2 = 1'b0, q;
  int   checks = 0, failures = 0;
  int   periods = 0;

  dff2ph dut (.d(d), .phi1(phi1), .phi2(phi2), .q(q));

  task automatic check(input logic exp, input string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL period %0d %s: q=%b expected %b", periods, what, q, exp);
    end
  endtask

  // One bit period that loads val; prev is the value q must show until phi2.
  task automatic bit_period(input logic val, input logic prev, input bit known);
    // phi1 high: d moves, settles on val before phi1 falls
    phi1 = 1'b1;
    d = ~val; #2;
    if (known) check(prev, "during phi1, d=~val");
    d = val;  #2;
    if (known) check(prev, "during phi1, d=val");
    d = ~val; #1;
    d = val;  #2;
    phi1 = 1'b0; #1;
    // first gap: d changes, nothing should move
    d = ~val; #2;
    if (known) check(prev, "gap after phi1");
    // phi2 high: q takes the captured value even though d is now ~val
    phi2 = 1'b1; #2;
    check(val, "during phi2");
    d = 1'($urandom_range(0, 1)); #2;
    check(val, "during phi2 after d change");
    phi2 = 1'b0; #1;
    // second gap
    d = ~val; #2;
    check(val, "gap after phi2");
    periods++;
  endtask

  initial begin
    logic prev, val;
    #5;
    // first period: q before phi2 is unknown (no reset)
    val = 1'b1;
    bit_period(val, 1'b0, 1'b0);
    prev = val;
    // fixed patterns, then random
    foreach (pat[i]) begin
      bit_period(pat[i], prev, 1'b1);
      prev = pat[i];
    end
    repeat (200) begin
      val = 1'($urandom_range(0, 1));
      bit_period(val, prev, 1'b1);
      prev = val;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic pat [8] = '{1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1};

  // Watchdog.
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
