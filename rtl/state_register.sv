// state_register: the controller's state register (SR) with hold mode.
//
// A bank of N_FF_P flip-flops with a synchronous, active-high reset to the
// reset state and a hold mode, used in test to keep one state in the SR
// while several primary input values are applied to the logic in front of
// it ("freezing" the SR clock). The hold mode is built one of two ways,
// both offered by the method:
//
//   HOLD_BY_CLOCK = 0: a multiplexer in front of the flip-flops selects the
//                      new value (load = 1) or the present one (load = 0).
//   HOLD_BY_CLOCK = 1: the clock of the flip-flops is AND-ed with load
//                      (see clock_gate), so they see no edge while held.
//
// Reset wins over hold in both forms, so the reset signal brings the
// controller to its reset state from any state as the FSM model requires;
// that priority is this design's choice. Timing: q takes d (or the reset
// state) at the rising edge of clk where load (or rst) is 1.
module state_register #(
  parameter int unsigned       N_FF_P        = dft_pkg::N_FF,
  parameter logic [N_FF_P-1:0] RESET_P       = dft_pkg::RESET_STATE,
  parameter bit                HOLD_BY_CLOCK = 1'b0
) (
  input  logic              clk,
  input  logic              rst,    // synchronous reset to RESET_P
  input  logic              load,   // hold/load: 1 load d, 0 hold
  input  logic [N_FF_P-1:0] d,
  output logic [N_FF_P-1:0] q
);

  if (HOLD_BY_CLOCK) begin : g_clock_hold
    logic gclk;

    clock_gate u_cg (
      .clk  (clk),
      .en   (load | rst),
      .gclk (gclk)
    );

    always_ff @(posedge gclk) begin
      if (rst) q <= RESET_P;
      else     q <= d;
    end
  end else begin : g_mux_hold
    always_ff @(posedge clk) begin
      if (rst)       q <= RESET_P;
      else if (load) q <= d;
    end
  end

  // A held register keeps its value.
  a_hold : assert property (@(posedge clk) !rst && !load |=> $stable(q));
  // A reset register holds the reset state.
  a_reset : assert property (@(posedge clk) rst |=> q == RESET_P);

endmodule
