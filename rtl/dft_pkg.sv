// dft_pkg: shared constants of the example controller and its test logic.
//
// The example controller is a 10-state FSM (S0..S9, S0 the reset state)
// whose state register (SR) holds 4 flip-flops, so 6 of the 16 SR values
// are unreachable (invalid) states IS1..IS6. The state count and the FF
// count follow the worked example of the method; the binary state
// assignment (Sk = k, ISk = 9 + k), the 2 primary inputs and the 2 primary
// outputs are this design's own choices.
//
// The invalid test states of the example are {IS1, IS2, IS3} and the
// invalid test state generator (ISG) walks S0 -> IS1 -> IS2 -> IS3 -> S0.
// The valid test states are {S0, S1, S2, S4, S9}.
package dft_pkg;

  localparam int unsigned N_FF     = 4;   // flip-flops in the state register
  localparam int unsigned N_STATES = 10;  // valid (reachable) states
  localparam int unsigned N_PI     = 2;   // primary inputs of the controller
  localparam int unsigned N_PO     = 2;   // primary outputs of the controller

  typedef logic [N_FF-1:0] sr_t;
  typedef logic [N_PI-1:0] pi_t;
  typedef logic [N_PO-1:0] po_t;

  // State assignment: binary, valid states first.
  typedef enum logic [N_FF-1:0] {
    S0  = 4'd0,  S1  = 4'd1,  S2  = 4'd2,  S3  = 4'd3,  S4  = 4'd4,
    S5  = 4'd5,  S6  = 4'd6,  S7  = 4'd7,  S8  = 4'd8,  S9  = 4'd9,
    IS1 = 4'd10, IS2 = 4'd11, IS3 = 4'd12, IS4 = 4'd13, IS5 = 4'd14,
    IS6 = 4'd15
  } state_e;

  localparam sr_t RESET_STATE = S0;

  // Invalid test states in the order the ISG generates them.
  localparam int unsigned N_IS = 3;
  typedef sr_t isg_seq_t [N_IS];
  localparam isg_seq_t ISG_SEQ = '{IS1, IS2, IS3};

endpackage
