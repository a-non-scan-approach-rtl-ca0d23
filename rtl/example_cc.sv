// example_cc: combinational logic block (CC) of the example controller.
//
// This is the part of the controller that the test patterns target: with
// the state register cut open it is the combinational test generation
// model, whose pseudo primary inputs (PPIs) are the present state `ps` and
// whose pseudo primary outputs are the next state `ns`. It has no clock.
//
// The example FSM has ten states S0..S9 with S0 the reset state, as in the
// worked example of the method. The method's example uses the transitions
// S0->S1, S1->S4, S4->S0, S0->S2, S2->S5 and S5->S9; those are kept here.
// All other transitions, the output function and the two-bit input and
// output widths are this design's own choices, made so that every state is
// reachable from S0 and S3, S5, S6, S7, S8 are passed through on the way:
//
//   state  x=00  x=01  x=10  x=11     po[0]        po[1]
//   S0     S0    S1    S2    S3       0            x[0]
//   S1     S1    S4    S0    S6       0            x[1]
//   S2     S2    S5    S0    S7       0            x[0]
//   S3     S3    S8    S0    S0       0            x[1]
//   S4     S4    S0    S9    S9       1            x[0]
//   S5     S5    S9    S0    S0       0            x[1]
//   S6     S6    S0    S0    S0       0            x[0]
//   S7     S7    S8    S0    S0       0            x[1]
//   S8     S8    S9    S0    S0       0            x[0]
//   S9     S9    S0    S0    S0       1            x[1]
//   ISk    S0    S0    S0    S0       x[1]         x[0]
//
// The six unreachable SR values (IS1..IS6) decode to "go to S0" with the
// inputs swapped onto the outputs: this is the logic that only invalid
// test patterns can exercise.
module example_cc
  import dft_pkg::*;
(
  input  pi_t x,    // primary inputs
  input  sr_t ps,   // present state (PPIs)
  output sr_t ns,   // next state (PPOs)
  output po_t po    // primary outputs
);

  always_comb begin
    ns = sr_t'(S0);
    po = '0;
    unique case (ps)
      S0: ns = (x == 2'b00) ? sr_t'(S0) : (x == 2'b01) ? sr_t'(S1) :
               (x == 2'b10) ? sr_t'(S2) : sr_t'(S3);
      S1: ns = (x == 2'b00) ? sr_t'(S1) : (x == 2'b01) ? sr_t'(S4) :
               (x == 2'b10) ? sr_t'(S0) : sr_t'(S6);
      S2: ns = (x == 2'b00) ? sr_t'(S2) : (x == 2'b01) ? sr_t'(S5) :
               (x == 2'b10) ? sr_t'(S0) : sr_t'(S7);
      S3: ns = (x == 2'b00) ? sr_t'(S3) : (x == 2'b01) ? sr_t'(S8) : sr_t'(S0);
      S4: ns = (x == 2'b00) ? sr_t'(S4) : (x == 2'b01) ? sr_t'(S0) : sr_t'(S9);
      S5: ns = (x == 2'b00) ? sr_t'(S5) : (x == 2'b01) ? sr_t'(S9) : sr_t'(S0);
      S6: ns = (x == 2'b00) ? sr_t'(S6) : sr_t'(S0);
      S7: ns = (x == 2'b00) ? sr_t'(S7) : (x == 2'b01) ? sr_t'(S8) : sr_t'(S0);
      S8: ns = (x == 2'b00) ? sr_t'(S8) : (x == 2'b01) ? sr_t'(S9) : sr_t'(S0);
      S9: ns = (x == 2'b00) ? sr_t'(S9) : sr_t'(S0);
      default: ns = sr_t'(S0);
    endcase

    if (ps >= sr_t'(N_STATES)) begin
      po = {x[0], x[1]};
    end else begin
      po[0] = (ps == sr_t'(S4)) || (ps == sr_t'(S9));
      po[1] = ps[0] ? x[1] : x[0];
    end
  end

endmodule
