// tb_iir_tf4: end-to-end test of the test-filter-4 IIR filter at its default
// sizes.
//
// A bit-exact reference model runs in the testbench: it keeps the past w1
// values, forms sum a_k w1(n-k) and sum b_k w1(n-k) by integer multiplication
// with the coefficient table, truncates at the same two points as the filter
// and predicts every output. Unbounded (64-bit) arithmetic is used, and a
// model value that would not fit the filter's widths counts as a failure.
//
// Phases: reset; an impulse (checks y(0) = b0 * x independently, and that the
// recursive tail keeps ringing after the input is zero); a full-scale step
// (checks the DC gain B(1)/A(1) = 73/2918 independently); the input sequence
// of largest possible |w1| (sign-matched to the impulse response of 1/A(z),
// which pushes w1 into its headroom bits); random full-scale samples with
// random gaps in in_valid (stalls); a reset in the middle of a run.
// Every accepted sample must produce out_valid exactly one clock later.
module tb_iir_tf4;
  import tf4_pkg::*;

  logic                  clk = 0;
  logic                  rst_n;
  logic                  in_valid;
  logic signed [X_W-1:0] x;
  logic                  out_valid;
  logic signed [Y_W-1:0] y;

  int checks = 0;
  int failures = 0;
  int n_samples = 0;
  int n_stalls = 0;
  int n_tail = 0;        // nonzero outputs produced from zero input (feedback)
  int n_headroom = 0;    // samples whose |w1| used the headroom bits
  int n_resets = 0;

  // reference state: mw[k] = w1(n-1-k)
  longint mw [NA];
  longint exp_y;

  iir_tf4 dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y(y)
  );

  always #5 clk = ~clk;

  task automatic model_reset();
    foreach (mw[k]) mw[k] = 0;
  endtask

  // advance the model by one sample and return its output
  function automatic longint model_step(input longint xin);
    longint sa = 0;
    longint w;
    longint yf;
    for (int k = 0; k < NA; k++) sa += longint'(A_COEF[k]) * mw[k];
    w = (xin <<< GUARD) - (sa >>> COEF_FRAC);
    yf = longint'(B_COEF[0]) * w;
    for (int k = 1; k < NB; k++) yf += longint'(B_COEF[k]) * mw[k-1];
    for (int k = NA - 1; k > 0; k--) mw[k] = mw[k-1];
    mw[0] = w;
    checks++;
    if (w >= (longint'(1) << (W1_W - 1)) || w < -(longint'(1) << (W1_W - 1))) begin
      failures++;
      $display("FAIL model w1=%0d does not fit %0d bits", w, W1_W);
    end
    if (w >= (longint'(1) << (X_W + GUARD - 1)) || w < -(longint'(1) << (X_W + GUARD - 1)))
      n_headroom++;
    return yf >>> (GUARD + COEF_FRAC);
  endfunction

  // send one sample and check the output one clock later
  task automatic send(input longint xin);
    x = X_W'(xin);
    in_valid = 1;
    exp_y = model_step(xin);
    @(posedge clk);
    #1;
    in_valid = 0;
    n_samples++;
    checks++;
    if (!out_valid) begin
      failures++;
      $display("FAIL out_valid missing one clock after sample %0d", n_samples);
    end
    checks++;
    if (exp_y >= (longint'(1) << (Y_W - 1)) || exp_y < -(longint'(1) << (Y_W - 1))) begin
      failures++;
      $display("FAIL model y=%0d does not fit %0d bits", exp_y, Y_W);
    end else if (longint'(y) != exp_y) begin
      failures++;
      if (failures < 20) $display("FAIL sample %0d: y=%0d expected %0d", n_samples, y, exp_y);
    end
  endtask

  task automatic idle(input int cycles);
    for (int i = 0; i < cycles; i++) begin
      in_valid = 0;
      x = X_W'($urandom());   // ignored while in_valid is low
      @(posedge clk);
      #1;
      n_stalls++;
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL out_valid without a sample");
      end
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    in_valid = 0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    model_reset();
    n_resets++;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real hw [300];
    real acc;
    longint s;
    longint first_y;

    x = '0;
    in_valid = 0;
    model_reset();
    do_reset();

    // impulse: y(0) = b0 * x exactly; the tail must come from the feedback
    send(16384);
    first_y = longint'(y);
    checks++;
    if (first_y != (16384 * 331) / 1024) begin
      failures++;
      $display("FAIL impulse y(0)=%0d expected %0d", first_y, (16384 * 331) / 1024);
    end
    for (int i = 0; i < 80; i++) begin
      send(0);
      if (y != 0) n_tail++;
    end

    // full-scale step: DC gain 73/2918
    do_reset();
    for (int i = 0; i < 400; i++) send(32767);
    checks++;
    acc = 32767.0 * 73.0 / 2918.0;
    if (real'(y) < acc - 3.0 || real'(y) > acc + 3.0) begin
      failures++;
      $display("FAIL step settles at %0d, expected about %0f", y, acc);
    end

    // worst case for |w1|: input signs follow the reversed impulse response of 1/A
    for (int n = 0; n < 300; n++) begin
      acc = (n == 0) ? 1.0 : 0.0;
      for (int k = 1; k <= NA; k++)
        if (n - k >= 0) acc -= real'(A_COEF[k-1]) / 1024.0 * hw[n-k];
      hw[n] = acc;
    end
    do_reset();
    for (int n = 299; n >= 0; n--) send(hw[n] >= 0.0 ? 32767 : -32768);

    // random full-scale samples with random stalls
    for (int i = 0; i < 20000; i++) begin
      s = longint'($signed(X_W'($urandom())));
      send(s);
      if ($urandom_range(0, 3) == 0) idle($urandom_range(1, 3));
      if (i == 10000) begin
        do_reset();
        send(1000);
        checks++;
        if (y != 1000 * 331 / 1024) begin
          failures++;
          $display("FAIL state not cleared by reset, y=%0d", y);
        end
      end
    end

    $display("samples=%0d stalls=%0d feedback_tail=%0d headroom=%0d resets=%0d",
             n_samples, n_stalls, n_tail, n_headroom, n_resets);
    checks++;
    if (n_stalls == 0)   begin failures++; $display("FAIL no stall exercised");        end
    checks++;
    if (n_tail == 0)     begin failures++; $display("FAIL no feedback tail seen");     end
    checks++;
    if (n_headroom == 0) begin failures++; $display("FAIL headroom never exercised");  end
    checks++;
    if (n_resets < 2)    begin failures++; $display("FAIL mid-run reset not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
