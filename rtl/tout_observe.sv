// tout_observe: observing t_out through the data path's output pins.
//
// The state register's input (t_out) must be visible during test, but
// dedicated output pins for it may not be available. While the controller
// is tested the data path is idle, so its primary output pins can carry
// t_out instead: an extra multiplexer in front of those pins switches them
// from the data path (test_mode = 0) to t_out (test_mode = 1).
//
// If there are at least as many pins as t_out bits (DP_W >= N_FF_P), bit i
// of t_out drives pin i and any further pins keep their data path value.
// If there are fewer, pins 0..DP_W-2 carry t_out bits 0..DP_W-2 and the
// last pin carries the parity (XOR tree) of all remaining t_out bits; with
// a single pin that is the parity of all of t_out. A parity pin reveals an
// error on an odd number of its bits only. Sharing the pins that are
// available between direct bits and one parity bit is this design's
// choice; the method names the pin multiplexer and the parity as the two
// means. Purely combinational.
module tout_observe #(
  parameter int unsigned N_FF_P = dft_pkg::N_FF,
  parameter int unsigned DP_W   = 2     // data path primary output pins
) (
  input  logic              test_mode,  // 1: pins show t_out
  input  logic [N_FF_P-1:0] t_out,
  input  logic [DP_W-1:0]   dp_po,      // data path primary outputs
  output logic [DP_W-1:0]   po_pins     // chip output pins
);

  if (DP_W >= N_FF_P) begin : g_direct
    always_comb begin
      po_pins = dp_po;
      if (test_mode) po_pins[N_FF_P-1:0] = t_out;
    end
  end else begin : g_parity
    always_comb begin
      po_pins = dp_po;
      if (test_mode) begin
        for (int unsigned i = 0; i + 1 < DP_W; i++) po_pins[i] = t_out[i];
        po_pins[DP_W-1] = ^t_out[N_FF_P-1:DP_W-1];
      end
    end
  end

endmodule
