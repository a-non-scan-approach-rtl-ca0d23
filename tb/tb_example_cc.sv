// tb_example_cc: exhaustive check of the example controller's logic.
//
// Applies every (state, input) pair, all 16 x 4 of them including the six
// unreachable states, and compares next state and outputs with the
// reference table. Purely combinational; a watchdog bounds the run.
module tb_example_cc;
  import dft_pkg::*;
  import tb_ref_pkg::*;

  pi_t x;
  sr_t ps, ns;
  po_t po;
  int  checks = 0, failures = 0;

  example_cc dut (.x(x), .ps(ps), .ns(ns), .po(po));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int xi = 0; xi < 4; xi++) begin
        ps = sr_t'(s);
        x  = pi_t'(xi);
        #1;
        checks += 2;
        if (int'(ns) != ref_ns(s, xi)) begin
          failures++;
          $display("ns mismatch s=%0d x=%0d: got %0d want %0d", s, xi, ns, ref_ns(s, xi));
        end
        if (int'(po) != ref_po(s, xi)) begin
          failures++;
          $display("po mismatch s=%0d x=%0d: got %0d want %0d", s, xi, po, ref_po(s, xi));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
