// bit_delay - bit-serial delay element of N bit periods.
//
// A chain of N two-phase flip-flops (dff2ph). Each stage takes its input on
// phi1 and hands it on at phi2, so one stage's output is settled on the data
// line before the next stage samples it on the following phi1. A serial
// stream therefore leaves q exactly N bit periods after it entered d.
//
// Interface: d, phi1, phi2 in; q out. With N = 1 (the default) this is the
// one-bit delay element placed in an I/O pad.
//
// Chaining flip-flops with shared phi1/phi2 follows the published clocking
// scheme; that delay elements are built this way, and the default length,
// are choices of this design. The stages have no reset: the first N bits
// out are whatever the chain held before.
module bit_delay #(
  parameter int unsigned N = 1
) (
  input  logic d,
  input  logic phi1,
  input  logic phi2,
  output logic q
);

  logic [N:0] tap;  // tap[0] is the input, tap[i] the output of stage i

  assign tap[0] = d;

  for (genvar i = 0; i < N; i++) begin : g_stage
    dff2ph u_dff (
      .d   (tap[i]),
      .phi1(phi1),
      .phi2(phi2),
      .q   (tap[i+1])
    );
  end

  assign q = tap[N];

endmodule
