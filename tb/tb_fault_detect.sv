// tb_fault_detect: stuck-at faults caught by the non-scan test sequence.
//
// The complete test application (reset, walk over the valid test states
// with hold, reset, ISG walk over the invalid test states; 43 cycles) is
// run once on the fault-free default build and then once per injected
// single stuck-at fault. The responses on po and t_out are compared with
// the fault-free reference model every cycle; a fault counts as detected
// when at least one cycle differs. The faults are both stuck-at values on
// every bit of the controller logic's next state and outputs, of the
// present state (the logic's state inputs) and of the ISG output: 28
// faults.
// Every one must be detected, except an ISG fault that leaves all the
// invalid test states it loads intact (harmless, since the ISG is not used
// in normal operation); the fault-free run must match exactly.
// Faults inside the controller logic's gates are not modelled here: the
// RTL has no gate netlist.
module tb_fault_detect;
  import tb_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst, t, load, test_mode;
  logic [1:0] x, dp_po, po, pins;
  logic       unused_pins;
  logic [3:0] t_out;

  int checks = 0, failures = 0;
  int ref_ps, mism, test_cycles;

  dft_controller dut (
    .clk(clk), .rst(rst), .x(x), .t(t), .load(load), .test_mode(test_mode),
    .dp_po(dp_po), .po(po), .t_out(t_out), .po_pins(pins));

  always #5 clk = ~clk;
  assign unused_pins = ^pins;   // the pins are checked by other testbenches

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cycle(bit r, int xi, bit tt, bit ld);
    int want_d, nxt;
    @(negedge clk);
    rst = r; x = 2'(xi); t = tt; load = ld; test_mode = 1'b1; dp_po = '0;
    #1;
    want_d = tt ? ref_isg(ref_ps) : ref_ns(ref_ps, xi);
    if (int'(po) != ref_po(ref_ps, xi) || int'(t_out) != want_d) mism++;
    if (r)        nxt = 0;
    else if (!ld) nxt = ref_ps;
    else          nxt = want_d;
    test_cycles++;
    @(posedge clk);
    ref_ps = nxt;
  endtask

  localparam int VT_SEQ   [7] = '{0, 1, 4, 0, 2, 5, 9};
  localparam int VT_INPUT [6] = '{1, 1, 1, 2, 1, 1};

  // The whole test: returns the number of cycles whose response differs.
  task automatic apply_test(output int n_mism);
    bit done [16] = '{default: 1'b0};
    mism = 0; test_cycles = 0;
    cycle(1, 0, 0, 1);
    for (int k = 0; k < 7; k++) begin
      if (!done[VT_SEQ[k]] && VT_SEQ[k] inside {0, 1, 2, 4, 9}) begin
        for (int xi = 0; xi < 4; xi++) cycle(0, xi, 0, 0);
        done[VT_SEQ[k]] = 1'b1;
      end
      if (k < 6) cycle(0, VT_INPUT[k], 0, 1);
    end
    cycle(1, 0, 0, 1);
    for (int k = 0; k < 3; k++) begin
      cycle(0, 0, 1, 1);
      for (int xi = 0; xi < 4; xi++) cycle(0, xi, 0, 0);
    end
    n_mism = mism;
  endtask

  // An ISG output fault matters only if it changes one of the invalid test
  // states the ISG is used to load (IS1, IS2, IS3); the ISG is idle in
  // normal operation, so any other ISG fault cannot affect the controller.
  function automatic bit isg_fault_matters(int f);
    int b = f / 2 - 10;
    for (int k = 0; k < 3; k++)
      if (((IS_SEQ[k] >> b) & 1) != (f % 2)) return 1'b1;
    return 1'b0;
  endfunction

  // Fault f: signal f / 2, stuck at f % 2.
  task automatic inject(int f);
    bit v = bit'(f % 2);
    case (f / 2)
      0:  force dut.cc_ns[0]     = v;
      1:  force dut.cc_ns[1]     = v;
      2:  force dut.cc_ns[2]     = v;
      3:  force dut.cc_ns[3]     = v;
      4:  force dut.po[0]        = v;
      5:  force dut.po[1]        = v;
      6:  force dut.ps[0]        = v;
      7:  force dut.ps[1]        = v;
      8:  force dut.ps[2]        = v;
      9:  force dut.ps[3]        = v;
      10: force dut.isg_ns[0]    = v;
      11: force dut.isg_ns[1]    = v;
      12: force dut.isg_ns[2]    = v;
      default: force dut.isg_ns[3] = v;
    endcase
  endtask

  task automatic release_all();
    release dut.cc_ns[0]; release dut.cc_ns[1]; release dut.cc_ns[2]; release dut.cc_ns[3];
    release dut.po[0];    release dut.po[1];
    release dut.ps[0];    release dut.ps[1];    release dut.ps[2];    release dut.ps[3];
    release dut.isg_ns[0]; release dut.isg_ns[1]; release dut.isg_ns[2]; release dut.isg_ns[3];
  endtask

  initial begin
    int n, detected, harmless;
    ref_ps = 0; detected = 0; harmless = 0;
    rst = 1'b1; t = 1'b0; load = 1'b1; test_mode = 1'b1; x = '0; dp_po = '0;

    apply_test(n);
    checks += 2;
    if (n != 0) begin failures++; $display("fault-free run differs in %0d cycles", n); end
    if (test_cycles != 6 + 3 + 32 + 2) begin
      failures++; $display("test took %0d cycles, expected 43", test_cycles);
    end

    // A forced fault breaks the register's own assertions on purpose.
    $assertoff(0, dut);
    for (int f = 0; f < 28; f++) begin
      inject(f);
      apply_test(n);
      release_all();
      checks++;
      if (n == 0 && f >= 20 && !isg_fault_matters(f)) begin
        harmless++;
        $display("fault %0d (ISG bit %0d stuck-at-%0d) leaves every generated state intact",
                 f, f / 2 - 10, f % 2);
      end else if (n == 0) begin
        failures++;
        $display("fault %0d (signal %0d stuck-at-%0d) not detected", f, f / 2, f % 2);
      end else detected++;
      // Bring the fault-free design back to a known state.
      cycle(1, 0, 0, 1);
    end
    $display("detected %0d of 28 injected faults, %0d harmless ISG faults", detected, harmless);
    checks++;
    if (detected + harmless != 28) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
