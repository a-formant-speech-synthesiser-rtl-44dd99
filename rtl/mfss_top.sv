// mfss_top - chip frame of the bit-serial formant synthesiser.
//
// All primitives on the chip are clocked by the same two non-overlapping
// phases, generated here from one master clock (clkgen_2ph) so that no clock
// pads beyond the master clock are needed. Serial data enters through the
// input pad, passes a one-bit delay element (bit_delay) and is handed to the
// synthesiser core on core_sdi; the core's serial result returns on core_sdo
// and passes a second delay element before leaving through the output pad on
// sdo. The pad delay elements retime pad data to the phi1/phi2 discipline, so
// that data always enters a primitive on phi1 and leaves on phi2.
//
// Interface: clk, rst_n, sdi, core_sdo in; sdo, core_sdi, phi1, phi2,
// bit_tick out. phi1/phi2 are brought out for the core. A new input bit is
// taken at each phi1; core_sdi changes at the following phi2. With the core
// wired straight back (core_sdo = core_sdi) a bit appears on sdo two bit
// periods after it was sampled from sdi.
//
// The core itself is not part of this RTL: its ports are the core_* signals.
// The shared two-phase clocking and the delay element in the pads follow the
// published design; the pad delay length and the clock generator are this
// design's choices.
module mfss_top #(
  parameter int unsigned PHI1_CYCLES    = 1,
  parameter int unsigned PHI2_CYCLES    = 1,
  parameter int unsigned GAP_CYCLES     = 1,
  parameter int unsigned PAD_DELAY_BITS = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sdi,
  output logic sdo,
  output logic phi1,
  output logic phi2,
  output logic bit_tick,
  output logic core_sdi,
  input  logic core_sdo
);

  clkgen_2ph #(
    .PHI1_CYCLES(PHI1_CYCLES),
    .PHI2_CYCLES(PHI2_CYCLES),
    .GAP_CYCLES (GAP_CYCLES)
  ) u_clkgen (
    .clk     (clk),
    .rst_n   (rst_n),
    .phi1    (phi1),
    .phi2    (phi2),
    .bit_tick(bit_tick)
  );

  // Input pad delay element.
  bit_delay #(.N(PAD_DELAY_BITS)) u_pad_in (
    .d   (sdi),
    .phi1(phi1),
    .phi2(phi2),
    .q   (core_sdi)
  );

  // Output pad delay element.
  bit_delay #(.N(PAD_DELAY_BITS)) u_pad_out (
    .d   (core_sdo),
    .phi1(phi1),
    .phi2(phi2),
    .q   (sdo)
  );

endmodule
