// isg: invalid test state generator.
//
// Some test patterns for the controller's combinational logic need a state
// register value that normal operation can never reach (an invalid test
// state). The ISG is extra combinational logic, used only in test, that
// walks the state register through those values: it implements one fixed
// traversal
//
//   RESET_STATE -> ISG_SEQ[0] -> ISG_SEQ[1] -> ... -> ISG_SEQ[N_IS-1] -> RESET_STATE
//
// so from reset, N_IS loads with the mode switching signal t = 1 visit every
// invalid test state once. The output goes through the mode multiplexer to
// the state register; the controller's own logic is not touched.
//
// Flip-flops that can be set straight from primary inputs need no
// generated value: every bit set in PI_CTRL_MASK is taken from the primary
// inputs instead (the lowest set mask bit from x[0], the next from x[1],
// and so on), and only the other bits come from the traversal table. With
// PI_CTRL_MASK = 0 the ISG uses no primary inputs; with every FF covered
// it is wiring only. The present state is matched on all bits, so the
// traversal may revisit the same generated part with different
// PI-controlled bits.
//
// The traversal order and the value produced from a present state that is
// not on the traversal (the first table entry) are free choices; this
// module takes the order it is given. It is purely combinational.
module isg
  import dft_pkg::*;
#(
  parameter int unsigned       N_FF_P       = N_FF,
  parameter int unsigned       N_PI_P       = N_PI,
  parameter int unsigned       N_IS_P       = N_IS,
  parameter logic [N_FF_P-1:0] RESET_P      = RESET_STATE,
  parameter logic [N_FF_P-1:0] SEQ_P [N_IS_P] = ISG_SEQ,
  parameter logic [N_FF_P-1:0] PI_CTRL_MASK = '0
) (
  input  logic [N_FF_P-1:0] ps,      // present state of the SR
  input  logic [N_PI_P-1:0] x,       // primary inputs (used only under PI_CTRL_MASK)
  output logic [N_FF_P-1:0] isg_ns   // next invalid test state
);

  initial begin
    assert ($countones(PI_CTRL_MASK) <= N_PI_P)
      else $error("isg: PI_CTRL_MASK selects more FFs than there are primary inputs");
    assert (N_IS_P >= 1)
      else $error("isg: at least one invalid test state is needed");
  end

  logic [N_FF_P-1:0] gen;   // successor taken from the traversal table

  always_comb begin
    gen = SEQ_P[0];
    for (int unsigned k = 0; k < N_IS_P; k++) begin
      if (ps == SEQ_P[k]) begin
        gen = (k == N_IS_P - 1) ? RESET_P : SEQ_P[k + 1];
      end
    end
  end

  always_comb begin
    int unsigned j;
    j = 0;
    isg_ns = gen;
    for (int unsigned i = 0; i < N_FF_P; i++) begin
      if (PI_CTRL_MASK[i]) begin
        isg_ns[i] = (j < N_PI_P) ? x[j] : 1'b0;
        j++;
      end
    end
  end

endmodule
