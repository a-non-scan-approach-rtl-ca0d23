// tb_mode_mux: exhaustive check of the mode multiplexer.
//
// For both values of t and random next-state pairs, checks that the
// register input and the observation point t_out both carry the
// controller's next state when t = 0 and the ISG's when t = 1.
module tb_mode_mux;
  logic       t;
  logic [3:0] cc_ns, isg_ns, d, t_out;
  int         checks = 0, failures = 0;

  mode_mux dut (.t(t), .cc_ns(cc_ns), .isg_ns(isg_ns), .d(d), .t_out(t_out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++) begin
      for (int b = 0; b < 16; b++) begin
        for (int m = 0; m < 2; m++) begin
          t = logic'(m); cc_ns = 4'(a); isg_ns = 4'(b);
          #1;
          checks += 2;
          if (int'(d) != ((m != 0) ? b : a)) begin
            failures++;
            $display("d mismatch t=%0d cc=%0d isg=%0d got %0d", m, a, b, d);
          end
          if (t_out != d) begin
            failures++;
            $display("t_out differs from d");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
