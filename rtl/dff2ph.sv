// dff2ph - two-phase master-slave D flip-flop, the storage cell of the
// bit-serial primitives.
//
// The cell is two level-sensitive latches in series. The master latch is
// transparent while phi1 is high and captures d; the slave latch is
// transparent while phi2 is high and passes the master's value to q. With
// non-overlapping phases there is never a transparent path from d to q, so a
// chain of these cells (one per bit of delay) shifts a serial stream by
// exactly one bit per phi1/phi2 pair, whatever the wire delays between them.
//
// Interface: d, phi1, phi2 in; q out. Timing: q takes the value d had at the
// fall of phi1, when phi2 next rises, and holds it until the following phi2.
// phi1 and phi2 must never be high together.
//
// The two-latch structure and the rule "take data in on phi1, hand it on at
// phi2" follow the published design. The cell has no reset, as in the
// published schematic; the gate-level form of each latch is left to
// synthesis instead of being drawn out gate by gate.
//
// The two latches are intended: this is a latch-based cell and the latch
// warnings a linter gives for it describe the design, not a fault.
module dff2ph (
  input  logic d,
  input  logic phi1,
  input  logic phi2,
  output logic q
);

  logic master;
  logic slave;

  // Master: open while phi1 is high.
  always_latch begin
    if (phi1) master = d;
  end

  // Slave: open while phi2 is high.
  always_latch begin
    if (phi2) slave = master;
  end

  assign q = slave;

endmodule
