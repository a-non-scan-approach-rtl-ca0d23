// tb_dft_controller_full: complete test application on the default build.
//
// The controller with its test logic, at its default parameters (hold by
// multiplexer, ISG without input-controlled bits, 2 data path pins), is
// first run in normal operation against the reference model, then given a
// complete test set: every input value with every valid test state
// {S0,S1,S2,S4,S9} (along the traversing sequence S0 -> S1 -> S4 -> S0 ->
// S2 -> S5 -> S9, holding each test state while its patterns are applied)
// and with every invalid test state {IS1,IS2,IS3} (loaded from reset by
// the ISG with t = 1). Every cycle t_out, the outputs and the pins are
// checked; the test must take L_vt + N_is + N_pat + 2 = 43 cycles.
module tb_dft_controller_full;
  import tb_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, t, load, test_mode;
  logic [1:0] x;
  logic [1:0] dp_po;
  logic [1:0] po_mux;
  logic [3:0] to_mux;
  logic [1:0] pins_mux;

  int checks = 0, failures = 0;
  int ref_ps;
  int test_cycles;
  int n_reset = 0, n_trans = 0, n_hold = 0, n_isg = 0;
  int n_pinmux = 0, n_parity = 0, n_normal = 0;

  dft_controller u_mux (
    .clk(clk), .rst(rst), .x(x), .t(t), .load(load), .test_mode(test_mode),
    .dp_po(dp_po[1:0]), .po(po_mux), .t_out(to_mux), .po_pins(pins_mux));



  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%0t %s: state=%0d x=%0d t=%0d load=%0d got %0d want %0d",
               $time, what, ref_ps, x, t, load, got, want);
    end
  endtask

  // One clock cycle: drive after the falling edge, check the combinational
  // outputs, then let the rising edge update the state.
  task automatic cycle(bit r, int xi, bit tt, bit ld, bit tm);
    int want_d, nxt;
    @(negedge clk);
    rst = r; x = 2'(xi); t = tt; load = ld; test_mode = tm;
    dp_po = 2'($urandom);
    #1;
    want_d    = tt ? ref_isg(ref_ps) : ref_ns(ref_ps, xi);
    check("po mux",   int'(po_mux), ref_po(ref_ps, xi));
    check("t_out mux", int'(to_mux), want_d);
    if (tm) begin
      check("pins mux", int'(pins_mux), (parity(want_d >> 1) << 1) | (want_d & 1));
      n_pinmux++; n_parity++;
    end else begin
      check("pins mux dp", int'(pins_mux), int'(dp_po[1:0]));
    end
    if (tt && !r) n_isg++;
    if (r)            begin nxt = 0; n_reset++; end
    else if (!ld)     begin nxt = ref_ps; n_hold++; end
    else if (tt)      nxt = want_d;
    else              begin nxt = want_d; if (tm) n_trans++; else n_normal++; end
    if (tm) test_cycles++;
    @(posedge clk);
    ref_ps = nxt;
  endtask

  localparam int VT_SEQ   [7] = '{0, 1, 4, 0, 2, 5, 9};
  localparam int VT_INPUT [6] = '{1, 1, 1, 2, 1, 1};
  localparam int VT_SET   [5] = '{0, 1, 2, 4, 9};

  initial begin
    automatic bit done [16] = '{default: 1'b0};
    automatic int n_pat = 0;
    ref_ps = 0;
    rst = 1'b1; t = 1'b0; load = 1'b1; test_mode = 1'b0; x = '0; dp_po = '0;

    // Phase 1: normal operation.
    cycle(1, 0, 0, 1, 0);
    for (int i = 0; i < 300; i++)
      cycle($urandom_range(0, 19) == 0, $urandom_range(0, 3), 0, 1, 0);

    // Phase 2a: valid test patterns along the traversing sequence.
    test_cycles = 0;
    cycle(1, 0, 0, 1, 1);
    for (int k = 0; k < 7; k++) begin
      check("on traversal", ref_ps, VT_SEQ[k]);
      if (!done[VT_SEQ[k]] && (VT_SEQ[k] inside {VT_SET})) begin
        for (int xi = 0; xi < 4; xi++) begin
          cycle(0, xi, 0, 0, 1);
          n_pat++;
        end
        done[VT_SEQ[k]] = 1'b1;
      end
      if (k < 6) cycle(0, VT_INPUT[k], 0, 1, 1);
    end

    // Phase 2b: invalid test patterns through the ISG.
    cycle(1, 0, 0, 1, 1);
    for (int k = 0; k < 3; k++) begin
      cycle(0, IS_SEQ[k] & 3, 1, 1, 1);
      check("ISG reached", ref_ps, IS_SEQ[k]);
      for (int xi = 0; xi < 4; xi++) begin
        cycle(0, xi, 0, 0, 1);
        n_pat++;
      end
      done[IS_SEQ[k]] = 1'b1;
    end

    // Test application time of the method: L_vt + N_is + N_pat + 2.
    check("patterns applied", n_pat, 32);
    check("test application cycles", test_cycles, 6 + 3 + 32 + 2);
    for (int s = 0; s < 16; s++)
      check("test state covered", int'(done[s]), int'(s inside {VT_SET} || s inside {IS_SEQ}));

    $display("mechanisms: reset=%0d normal=%0d test_transition=%0d hold=%0d isg_load=%0d pin_mux=%0d parity=%0d",
             n_reset, n_normal, n_trans, n_hold, n_isg, n_pinmux, n_parity);
    if (n_reset == 0 || n_normal == 0 || n_trans == 0 || n_hold == 0 || n_isg == 0 ||
        n_pinmux == 0 || n_parity == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    checks++;
    $display("test application took %0d cycles", test_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
