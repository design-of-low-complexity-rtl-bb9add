// tb_tf4_mb: self-checking test of the shared multiplier block.
//
// Drives w1 with the extreme values, small values and random values over the
// full signed range and compares each of the ten outputs with the plain
// product w1 * coefficient, computed here by integer multiplication from the
// coefficient table, independent of the block's shift-add decomposition.
// The block is combinational; the testbench steps one value per 10 ns.
module tb_tf4_mb;
  import tf4_pkg::*;

  localparam int W  = W1_W;
  localparam int PW = W + COEF_FRAC + 1;

  logic signed [W-1:0]  w1;
  logic signed [PW-1:0] pb [NB];
  logic signed [PW-1:0] pa [NA];

  int checks = 0;
  int failures = 0;

  tf4_mb dut (.w1(w1), .pb(pb), .pa(pa));

  task automatic check_value(input longint v);
    longint exp;
    w1 = W'(v);
    #10;
    for (int k = 0; k < NB; k++) begin
      exp = longint'(w1) * longint'(B_COEF[k]);
      checks++;
      if (longint'(pb[k]) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL w1=%0d b%0d: got %0d expected %0d", w1, k, pb[k], exp);
      end
    end
    for (int k = 0; k < NA; k++) begin
      exp = longint'(w1) * longint'(A_COEF[k]);
      checks++;
      if (longint'(pa[k]) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL w1=%0d a%0d: got %0d expected %0d", w1, k + 1, pa[k], exp);
      end
    end
  endtask

  // watchdog
  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_value(0);
    check_value(1);
    check_value(-1);
    check_value((longint'(1) << (W - 1)) - 1);
    check_value(-(longint'(1) << (W - 1)));
    for (int i = 0; i < 2000; i++) begin
      check_value(longint'($signed(W'($urandom()))));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
