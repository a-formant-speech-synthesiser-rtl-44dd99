// clkgen_2ph - non-overlapping two-phase clock generator.
//
// Every bit-serial primitive is clocked by two phases, phi1 and phi2, that are
// never high together. This block derives them from one master clock with a
// small counter that walks through four intervals per bit period:
//   phi1 high (PHI1_CYCLES) - gap (GAP_CYCLES) - phi2 high (PHI2_CYCLES) - gap (GAP_CYCLES)
// Both phases are registered, so they change only on the master clock's rising
// edge and are free of glitches. bit_tick is high during the last master cycle
// of each bit period (the second gap), and marks the moment after which a new
// bit may be presented to the first primitive.
//
// Interface: clk, rst_n (active low, asynchronous) in; phi1, phi2, bit_tick out.
// Timing: one bit period is PHI1_CYCLES + PHI2_CYCLES + 2*GAP_CYCLES master
// cycles (4 with the defaults). During reset both phases are low; the first
// master edge after reset is released raises phi1.
//
// The use of two non-overlapping phases follows the published clocking
// scheme. How they are generated, the interval lengths and the reset are
// choices of this design: the simplest counter that produces the scheme.
module clkgen_2ph #(
  parameter int unsigned PHI1_CYCLES = 1,
  parameter int unsigned PHI2_CYCLES = 1,
  parameter int unsigned GAP_CYCLES  = 1
) (
  input  logic clk,
  input  logic rst_n,
  output logic phi1,
  output logic phi2,
  output logic bit_tick
);

  localparam int unsigned PERIOD = PHI1_CYCLES + PHI2_CYCLES + 2 * GAP_CYCLES;
  localparam int unsigned CW     = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  // Boundaries of the four intervals within a period (counter values).
  localparam int unsigned PHI1_END = PHI1_CYCLES;                 // phi1: [0, PHI1_END)
  localparam int unsigned PHI2_BEG = PHI1_END + GAP_CYCLES;       // phi2: [PHI2_BEG, PHI2_END)
  localparam int unsigned PHI2_END = PHI2_BEG + PHI2_CYCLES;

  initial begin
    assert (PHI1_CYCLES > 0 && PHI2_CYCLES > 0 && GAP_CYCLES > 0)
      else $error("clkgen_2ph: every interval must last at least one master cycle");
  end

  logic [CW-1:0] cnt;        // position in the period of the next cycle
  logic [CW-1:0] cnt_next;

  always_comb begin
    if (cnt == CW'(PERIOD - 1)) cnt_next = '0;
    else                        cnt_next = cnt + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= '0;
      phi1     <= 1'b0;
      phi2     <= 1'b0;
      bit_tick <= 1'b0;
    end else begin
      // Outputs are registered from the counter value of the cycle they cover.
      phi1     <= (32'(cnt) < PHI1_END);
      phi2     <= (32'(cnt) >= PHI2_BEG) && (32'(cnt) < PHI2_END);
      bit_tick <= (cnt == CW'(PERIOD - 1));
      cnt      <= cnt_next;
    end
  end

  // The two phases must never be high together.
  assert property (@(posedge clk) !(phi1 && phi2))
    else $error("clkgen_2ph: phi1 and phi2 overlap");

endmodule
