// clock_gate: hold mode by masking the clock of the state register.
//
// The state register can be frozen by AND-ing its clock with the
// hold/load signal: while `en` is 0 the register sees no clock edge and
// keeps its value. The AND gate follows the method; the enable latch in
// front of it is this design's addition, the usual form of such a gate: it
// is transparent while the clock is low and closed while it is high, so an
// enable that changes during the high phase cannot cut or create a clock
// pulse. The latch is intended; it is the only storage in this module.
//
// Timing: `en` must be stable before the rising edge of `clk` it is meant
// to pass or suppress, like any synchronous input.
module clock_gate (
  input  logic clk,   // free-running clock of the controller
  input  logic en,    // hold/load: 1 passes the clock, 0 masks it
  output logic gclk   // gated clock for the state register
);

  logic en_lat;

  always_latch begin
    if (!clk) en_lat = en;
  end

  assign gclk = clk & en_lat;

endmodule
