// tb_clkgen_2ph - self-checking test of the two-phase clock generator.
//
// Two generators run side by side: one with the default interval lengths and
// one with uneven lengths (phi1 2, phi2 3, gaps 2 master cycles). A reference
// counter in the testbench, restarted at every reset release, gives the
// expected phi1, phi2 and bit_tick for each master cycle; the testbench also
// checks that the phases never overlap, measures the bit period from one phi1
// rise to the next, and checks that a reset in mid-period forces both phases
// low and restarts the sequence.
module tb_clkgen_2ph;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Default generator
  logic a_phi1, a_phi2, a_tick;
  clkgen_2ph dut_a (.clk(clk), .rst_n(rst_n), .phi1(a_phi1), .phi2(a_phi2), .bit_tick(a_tick));

  // Uneven generator
  localparam int B_P1 = 2, B_P2 = 3, B_G = 2;
  logic b_phi1, b_phi2, b_tick;
  clkgen_2ph #(.PHI1_CYCLES(B_P1), .PHI2_CYCLES(B_P2), .GAP_CYCLES(B_G)) dut_b (
    .clk(clk), .rst_n(rst_n), .phi1(b_phi1), .phi2(b_phi2), .bit_tick(b_tick));

  // Expected outputs for the k-th master cycle after reset release (k from 0).
  function automatic logic [2:0] expect_out(int k, int p1, int p2, int g);
    int per = p1 + p2 + 2 * g;
    int m   = k % per;
    logic e1 = (m < p1);
    logic e2 = (m >= p1 + g) && (m < p1 + g + p2);
    logic et = (m == per - 1);
    return {e1, e2, et};
  endfunction

  int k = -1;            // master cycles since release; -1 while in reset
  int a_last_rise = -1, a_periods = 0;
  int b_last_rise = -1, b_periods = 0;
  logic a_phi1_d = 1'b0, b_phi1_d = 1'b0;

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %b expected %b", k, what, got, exp);
    end
  endtask

  // Sample in the middle of each master cycle.
  always @(negedge clk) begin
    if (!rst_n) begin
      chk(a_phi1, 1'b0, "A phi1 in reset");
      chk(a_phi2, 1'b0, "A phi2 in reset");
      chk(b_phi1, 1'b0, "B phi1 in reset");
      chk(b_phi2, 1'b0, "B phi2 in reset");
      a_last_rise = -1; b_last_rise = -1;
    end else if (k >= 0) begin
      logic [2:0] ea, eb;
      ea = expect_out(k, 1, 1, 1);
      eb = expect_out(k, B_P1, B_P2, B_G);
      chk(a_phi1, ea[2], "A phi1"); chk(a_phi2, ea[1], "A phi2"); chk(a_tick, ea[0], "A bit_tick");
      chk(b_phi1, eb[2], "B phi1"); chk(b_phi2, eb[1], "B phi2"); chk(b_tick, eb[0], "B bit_tick");
      chk(a_phi1 & a_phi2, 1'b0, "A overlap");
      chk(b_phi1 & b_phi2, 1'b0, "B overlap");
      // bit period measured between phi1 rises
      if (a_phi1 && !a_phi1_d) begin
        if (a_last_rise >= 0) begin
          checks++; a_periods++;
          if (k - a_last_rise != 4) begin
            failures++; $display("FAIL A period %0d cycles, expected 4", k - a_last_rise);
          end
        end
        a_last_rise = k;
      end
      if (b_phi1 && !b_phi1_d) begin
        if (b_last_rise >= 0) begin
          checks++; b_periods++;
          if (k - b_last_rise != B_P1 + B_P2 + 2 * B_G) begin
            failures++; $display("FAIL B period %0d cycles", k - b_last_rise);
          end
        end
        b_last_rise = k;
      end
    end
    a_phi1_d = a_phi1;
    b_phi1_d = b_phi1;
  end

  // Reference counter: the first rising edge after release is cycle 0.
  always @(posedge clk) begin
    if (!rst_n) k <= -1;
    else        k <= k + 1;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (100) @(posedge clk);
    // reset in mid-period, asynchronously
    #3 rst_n = 1'b0;
    #1;
    chk(a_phi1 | a_phi2 | b_phi1 | b_phi2, 1'b0, "phases low right after async reset");
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (57) @(posedge clk);
    @(negedge clk);
    checks++;
    if (a_periods < 10 || b_periods < 5) begin
      failures++; $display("FAIL too few periods seen: %0d %0d", a_periods, b_periods);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
