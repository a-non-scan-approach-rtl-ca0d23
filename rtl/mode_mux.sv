// mode_mux: the multiplexer placed in front of the state register.
//
// The mode switching signal t selects what the state register loads next:
// the controller's own next state (t = 0, normal operation and application
// of test patterns) or the output of the invalid test state generator
// (t = 1, only while moving to an invalid test state). The selected value
// is also brought out as t_out, the observation point in front of the
// state register: with t = 0 it shows the response of the combinational
// logic to the pattern being applied, with t = 1 it shows the state the
// ISG generates, which checks the ISG itself. Purely combinational.
module mode_mux #(
  parameter int unsigned N_FF_P = dft_pkg::N_FF
) (
  input  logic              t,       // mode switching signal
  input  logic [N_FF_P-1:0] cc_ns,   // next state from the controller logic
  input  logic [N_FF_P-1:0] isg_ns,  // next state from the ISG
  output logic [N_FF_P-1:0] d,       // value offered to the state register
  output logic [N_FF_P-1:0] t_out    // observation point
);

  always_comb begin
    d     = t ? isg_ns : cc_ns;
    t_out = d;
  end

endmodule
