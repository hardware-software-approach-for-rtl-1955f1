// clock_gate: glitch-free clock gate used by the synchronizer to pause a core.
//
// The enable is sampled by a latch that is transparent while clk is low, and
// the output clock is clk AND the latched enable, so an enable that changes
// during the high phase cannot shorten a pulse. An enable computed
// combinationally during a cycle therefore decides whether the next rising
// edge reaches the core. This is the usual integrated clock-gating cell; in a
// real implementation it is replaced by the library's ICG cell. The latch is
// intentional and is the only one in the design.
module clock_gate (
  input  logic clk,
  input  logic en,
  output logic gclk
);

  logic en_l;

  always_latch begin
    if (!clk) en_l = en;
  end

  assign gclk = clk & en_l;

endmodule
