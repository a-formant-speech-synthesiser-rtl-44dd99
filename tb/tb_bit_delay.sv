// tb_bit_delay - self-checking test of the bit-serial delay element.
//
// A one-stage (default) and a five-stage delay element share phi1/phi2
// pulses generated here. A random serial stream is applied, changing d once
// per bit period in the gap after phi2, with extra wiggles while phi2 is high
// that must not be taken in. After each period q must equal the bit sent N
// periods earlier, and q must not move while phi1 is high.
module tb_bit_delay;

  localparam int NB = 5;
  localparam int NBITS = 300;

  logic d = 1'b0, phi1 = 1'b0, phi2 = 1'b0;
  logic q1, qn;
  int   checks = 0, failures = 0;
  logic stream [NBITS];

  bit_delay           dut_1 (.d(d), .phi1(phi1), .phi2(phi2), .q(q1));
  bit_delay #(.N(NB)) dut_n (.d(d), .phi1(phi1), .phi2(phi2), .q(qn));

  task automatic chk(input logic got, input logic exp, input string what, input int p);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL period %0d %s: got %b expected %b", p, what, got, exp);
    end
  endtask

  initial begin
    logic q1_before, qn_before;
    foreach (stream[i]) stream[i] = 1'($urandom_range(0, 1));
    #3;
    for (int p = 0; p < NBITS; p++) begin
      d = stream[p]; #2;
      q1_before = q1; qn_before = qn;
      phi1 = 1'b1; #3;
      chk(q1, q1_before, "N=1 q moved during phi1", p);
      chk(qn, qn_before, "N=5 q moved during phi1", p);
      phi1 = 1'b0; #2;
      phi2 = 1'b1; #1;
      d = ~d; #2;                       // must be ignored
      phi2 = 1'b0; #2;
      chk(q1, stream[p], "N=1 output", p);
      if (p >= NB - 1) chk(qn, stream[p - NB + 1], "N=5 output", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
