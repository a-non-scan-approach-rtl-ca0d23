// tb_tout_observe: check of the t_out observation multiplexer.
//
// Four pin counts: 1 (parity of all four t_out bits), 2 (one direct bit,
// parity of three), 4 (all bits direct) and 6 (all bits direct, two pins
// left to the data path). For every t_out value, random data path values
// and both modes, the pins are compared with values computed here.
module tb_tout_observe;
  import tb_ref_pkg::*;

  logic       tm;
  logic [3:0] tout;
  logic [5:0] dp;
  logic [0:0] p1;
  logic [1:0] p2;
  logic [3:0] p4;
  logic [5:0] p6;
  int checks = 0, failures = 0;

  tout_observe #(.DP_W(1)) u1 (.test_mode(tm), .t_out(tout), .dp_po(dp[0:0]), .po_pins(p1));
  tout_observe #(.DP_W(2)) u2 (.test_mode(tm), .t_out(tout), .dp_po(dp[1:0]), .po_pins(p2));
  tout_observe #(.DP_W(4)) u4 (.test_mode(tm), .t_out(tout), .dp_po(dp[3:0]), .po_pins(p4));
  tout_observe #(.DP_W(6)) u6 (.test_mode(tm), .t_out(tout), .dp_po(dp),      .po_pins(p6));

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("%s: tm=%0d t_out=%0h dp=%0h got %0h want %0h", what, tm, tout, dp, got, want);
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
    for (int v = 0; v < 16; v++) begin
      for (int r = 0; r < 4; r++) begin
        for (int m = 0; m < 2; m++) begin
          tm = logic'(m); tout = 4'(v); dp = 6'($urandom);
          #1;
          if (m == 0) begin
            check("dp1", int'(p1), int'(dp[0:0]));
            check("dp2", int'(p2), int'(dp[1:0]));
            check("dp4", int'(p4), int'(dp[3:0]));
            check("dp6", int'(p6), int'(dp));
          end else begin
            check("par1", int'(p1), parity(v));
            check("par2", int'(p2), (parity(v >> 1) << 1) | (v & 1));
            check("dir4", int'(p4), v);
            check("dir6", int'(p6), (int'(dp[5:4]) << 4) | v);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
