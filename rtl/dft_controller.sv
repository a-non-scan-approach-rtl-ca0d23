// dft_controller: the example controller augmented for non-scan test.
//
// The controller (combinational logic example_cc plus state register) is
// made fully testable without a scan chain. Every test pattern for its
// combinational logic is a primary input value plus a state register
// value. Patterns whose state is reachable are applied through normal
// state transitions; patterns whose state is unreachable (an invalid test
// state) are applied after the invalid test state generator (ISG) has
// loaded that state. Four additions do this, and none of them changes the
// controller's own logic:
//
//   mode_mux        t = 0 loads the controller's next state, t = 1 the
//                   ISG's; its output is the observation point t_out.
//   isg             generates the invalid test states in a fixed order
//                   from reset (S0 -> IS1 -> IS2 -> IS3 -> S0 by default).
//   state_register  hold mode (load = 0) keeps a state while several
//                   input values are applied, one per clock.
//   tout_observe    shows t_out on the data path's output pins in test.
//
// In normal operation t = 0, load = 1 and test_mode = 0, and the block
// behaves as the plain controller, one state transition per clock. t_out
// is also brought out on its own pins.
//
// Parameters: HOLD_BY_CLOCK picks the multiplexer (0) or clock gating (1)
// form of hold mode; PI_CTRL_MASK marks state bits that the ISG takes from
// the primary inputs instead of generating them (0: none, as in the
// method's main description); DP_W is the number of data path output
// pins, a value this design assumes since the data path is not given.
//
// Timing: t_out, po and po_pins are combinational from x, t and the state;
// the state changes at the rising clock edge where rst or load is 1.
module dft_controller
  import dft_pkg::*;
#(
  parameter bit          HOLD_BY_CLOCK = 1'b0,
  parameter sr_t         PI_CTRL_MASK  = '0,
  parameter int unsigned DP_W          = 2
) (
  input  logic            clk,
  input  logic            rst,        // reset to S0
  input  pi_t             x,          // primary inputs
  input  logic            t,          // mode switching signal (1: ISG)
  input  logic            load,       // hold/load (0: hold the state)
  input  logic            test_mode,  // 1: data path pins show t_out
  input  logic [DP_W-1:0] dp_po,      // data path primary outputs
  output po_t             po,         // controller primary outputs
  output sr_t             t_out,      // observation point in front of the SR
  output logic [DP_W-1:0] po_pins     // data path pins after the test MUX
);

  sr_t ps, cc_ns, isg_ns, d;

  example_cc u_cc (
    .x  (x),
    .ps (ps),
    .ns (cc_ns),
    .po (po)
  );

  isg #(
    .PI_CTRL_MASK (PI_CTRL_MASK)
  ) u_isg (
    .ps     (ps),
    .x      (x),
    .isg_ns (isg_ns)
  );

  mode_mux u_mux (
    .t      (t),
    .cc_ns  (cc_ns),
    .isg_ns (isg_ns),
    .d      (d),
    .t_out  (t_out)
  );

  state_register #(
    .HOLD_BY_CLOCK (HOLD_BY_CLOCK)
  ) u_sr (
    .clk  (clk),
    .rst  (rst),
    .load (load),
    .d    (d),
    .q    (ps)
  );

  tout_observe #(
    .DP_W (DP_W)
  ) u_obs (
    .test_mode (test_mode),
    .t_out     (t_out),
    .dp_po     (dp_po),
    .po_pins   (po_pins)
  );

endmodule
