// tb_mfss_top - end-to-end test of the chip frame at its default parameters.
//
// The testbench plays the synthesiser core by looping core_sdi straight back
// to core_sdo, so a bit travels: input pad delay element -> core ports ->
// output pad delay element -> sdo. A random serial stream is presented on
// sdi, one bit per bit period, set in the gap before phi1 and replaced by
// junk while phi2 is high (which the pads must ignore). The testbench checks,
// every master cycle, that phi1 and phi2 never overlap and follow the
// phi1-gap-phi2-gap order; each period that core_sdi holds the bit sampled at
// that period's phi1 and that sdo holds the previous period's bit; and, with
// master-cycle stamps, that a bit reaches sdo 6 master cycles after its phi1
// began (bit period 4 master cycles). A reset in mid-stream stops both phases
// and must not disturb the data held in the pads.
// Mechanisms counted and required at least once: phi1 pulses, phi2 pulses,
// input pad transfers, output pad transfers, bits ignored while phi2 was high,
// and a reset with restart.
module tb_mfss_top;

  localparam int NBITS   = 400;
  localparam int PERIOD  = 4;   // master cycles per bit with default intervals
  localparam int LATENCY = 6;   // master cycles from phi1 rise to sdo change

  logic clk = 1'b0, rst_n = 1'b0, sdi = 1'b0;
  logic sdo, phi1, phi2, bit_tick, core_sdi, core_sdo;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  mfss_top dut (
    .clk(clk), .rst_n(rst_n), .sdi(sdi), .sdo(sdo),
    .phi1(phi1), .phi2(phi2), .bit_tick(bit_tick),
    .core_sdi(core_sdi), .core_sdo(core_sdo)
  );

  assign core_sdo = core_sdi;   // stand-in for the synthesiser core

  // Mechanism counters
  int n_phi1 = 0, n_phi2 = 0, n_in_xfer = 0, n_out_xfer = 0, n_junk = 0, n_reset = 0;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t %s", $time, what);
    end
  endtask

  // Cycle count and phase sequence monitor (sampled mid-cycle).
  int     cyc = 0;
  logic   p1_d = 1'b0, p2_d = 1'b0;
  int     last_phase = 0;          // 1: last pulse was phi1, 2: phi2
  int     phi1_rise_cyc = 0;
  always @(negedge clk) begin
    cyc++;
    chk(!(phi1 && phi2), "phi1 and phi2 overlap");
    if (phi1 && !p1_d) begin
      n_phi1++;
      chk(last_phase != 1, "two phi1 pulses without phi2 between");
      chk(!p2_d, "phi1 rose right after phi2 without a gap");
      // one bit period between rises, longer only across the mid-stream reset
      if (n_phi1 > 1)
        chk((cyc - phi1_rise_cyc == PERIOD) || (n_reset > 0 && cyc - phi1_rise_cyc > PERIOD),
            "bit period length");
      phi1_rise_cyc = cyc;
      last_phase = 1;
    end
    if (phi2 && !p2_d) begin
      n_phi2++;
      chk(last_phase == 1, "phi2 pulse without phi1 before it");
      chk(!p1_d, "phi2 rose right after phi1 without a gap");
      last_phase = 2;
    end
    p1_d = phi1; p2_d = phi2;
  end

  // Stimulus and scoreboard.
  logic   sent [NBITS];
  int     start_cyc [NBITS];
  initial begin
    logic prev_sdo;
    foreach (sent[i]) sent[i] = 1'($urandom_range(0, 1));
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NBITS; p++) begin
      // gap before phi1: present the bit
      sdi = sent[p];
      @(negedge clk);                      // phi1 cycle
      chk(phi1, "phi1 expected");
      start_cyc[p] = cyc;
      @(negedge clk);                      // gap
      @(negedge clk);                      // phi2 cycle
      chk(phi2, "phi2 expected");
      sdi = ~sent[p];                      // junk while phi2 is high
      n_junk++;
      // input pad: core_sdi now holds this period's bit
      chk(core_sdi == sent[p], $sformatf("core_sdi bit %0d", p));
      if (core_sdi == sent[p]) n_in_xfer++;
      // output pad: sdo holds the previous period's bit
      if (p > 0) begin
        chk(sdo == sent[p-1], $sformatf("sdo bit %0d", p - 1));
        if (p != NBITS / 2 + 1)            // the reset stretched this one
          chk(cyc - start_cyc[p-1] == LATENCY, "latency from phi1 to sdo");
        if (sdo == sent[p-1]) n_out_xfer++;
      end
      @(negedge clk);                      // gap with bit_tick
      chk(bit_tick, "bit_tick expected");
      chk(core_sdi == sent[p], "core_sdi held through gap");
      // mid-stream reset: phases stop, data in the pads stays
      if (p == NBITS / 2) begin
        prev_sdo = sdo;
        rst_n = 1'b0;
        n_reset++;
        repeat (5) begin
          @(negedge clk);
          chk(!phi1 && !phi2, "phases low during reset");
          sdi = 1'($urandom_range(0, 1));
          chk(core_sdi == sent[p] && sdo == prev_sdo, "pad data held during reset");
        end
        rst_n = 1'b1;                      // phi1 rises at the next master edge
        last_phase = 2;
      end
    end
    // Every mechanism must have happened.
    chk(n_phi1 > 0,     "phi1 pulses never seen");
    chk(n_phi2 > 0,     "phi2 pulses never seen");
    chk(n_in_xfer > 0,  "no input pad transfer");
    chk(n_out_xfer > 0, "no output pad transfer");
    chk(n_junk > 0,     "phi2 junk never applied");
    chk(n_reset > 0,    "reset never applied");
    $display("mechanisms: phi1=%0d phi2=%0d in_pad=%0d out_pad=%0d phi2_junk=%0d reset=%0d",
             n_phi1, n_phi2, n_in_xfer, n_out_xfer, n_junk, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
