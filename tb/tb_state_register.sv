// tb_state_register: check of the state register and both hold forms.
//
// Two registers, one holding by multiplexer and one by clock gating, get
// the same random reset, hold/load and data. After every rising edge each
// must equal a reference register: reset state on reset, the data on load,
// the old value on hold. This also checks the one-cycle load latency.
module tb_state_register;
  logic       clk = 1'b0;
  logic       rst, load;
  logic [3:0] d, q_mux, q_clk;
  logic [3:0] q_ref;
  int checks = 0, failures = 0, holds = 0, loads = 0, resets = 0;

  state_register #(.HOLD_BY_CLOCK(1'b0)) u_mux (.clk(clk), .rst(rst), .load(load), .d(d), .q(q_mux));
  state_register #(.HOLD_BY_CLOCK(1'b1)) u_clk (.clk(clk), .rst(rst), .load(load), .d(d), .q(q_clk));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0; d = 4'hf;
    q_ref = 4'h0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      if (i > 0) begin
        rst  = ($urandom_range(0, 15) == 0);
        load = $urandom_range(0, 1) == 1;
        d    = 4'($urandom);
      end
      if (rst) begin q_ref = 4'h0; resets++; end
      else if (load) begin q_ref = d; loads++; end
      else holds++;
      @(posedge clk);
      #1;
      checks += 2;
      if (q_mux !== q_ref) begin
        failures++;
        $display("mux form: cycle %0d got %0h want %0h", i, q_mux, q_ref);
      end
      if (q_clk !== q_ref) begin
        failures++;
        $display("clock form: cycle %0d got %0h want %0h", i, q_clk, q_ref);
      end
    end
    checks++;
    if (holds == 0 || loads == 0 || resets < 2) begin
      failures++;
      $display("stimulus missed a case: holds=%0d loads=%0d resets=%0d", holds, loads, resets);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
