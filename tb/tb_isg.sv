// tb_isg: check of the invalid test state generator.
//
// Three configurations, each checked for every present state and input:
//   u_gen  : the example's ISG, no primary inputs used. From S0 it must
//            walk IS1 -> IS2 -> IS3 -> S0; from any state off that walk
//            it returns IS1.
//   u_half : the two low state bits come from the primary inputs, the two
//            high bits from the walk.
//   u_pi   : every state bit comes from a primary input (no generated
//            bits at all).
// It also walks the example sequence from S0 by feeding the output back,
// as the state register does with t = 1.
module tb_isg;
  import tb_ref_pkg::*;

  logic [3:0] ps, o_gen, o_half, o_pi;
  logic [1:0] x2;
  logic [3:0] x4;
  int checks = 0, failures = 0;

  isg u_gen (.ps(ps), .x(x2), .isg_ns(o_gen));
  isg #(.PI_CTRL_MASK(4'b0011)) u_half (.ps(ps), .x(x2), .isg_ns(o_half));
  isg #(.N_PI_P(4), .PI_CTRL_MASK(4'b1111)) u_pi (.ps(ps), .x(x4), .isg_ns(o_pi));

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: ps=%0d x=%0d got %0d want %0d", what, ps, x4, got, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    for (int p = 0; p < 16; p++) begin
      for (int xi = 0; xi < 16; xi++) begin
        ps = 4'(p); x4 = 4'(xi); x2 = 2'(xi);
        #1;
        check("gen",  int'(o_gen),  ref_isg(p));
        check("half", int'(o_half), (ref_isg(p) & 12) | (xi & 3));
        check("pi",   int'(o_pi),   xi);
      end
    end
    // Feedback walk from the reset state.
    s = 0;
    for (int step = 0; step < 4; step++) begin
      ps = 4'(s); x2 = '0;
      #1;
      check("walk", int'(o_gen), (step == 3) ? 0 : IS_SEQ[step]);
      s = int'(o_gen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
