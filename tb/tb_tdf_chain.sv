// tb_tdf_chain: self-checking test of the transposed delay chain.
//
// Feeds random products with a random clock enable and keeps, in the
// testbench, the history of the products of every accepted sample. After
// each edge the chain output must equal sum_k p[k](n-1-k) over that history,
// which checks the tap order, the enable (stalls) and the reset to zero.
// The output is registered: it changes only on an enabled edge.
module tb_tdf_chain;
  localparam int TAPS = 5;
  localparam int W    = tf4_pkg::P_W;

  logic                clk = 0;
  logic                rst_n;
  logic                en;
  logic signed [W-1:0] p [TAPS];
  logic signed [W-1:0] sum;

  // hist[j][k] = product for tap k of the sample accepted j samples ago
  longint hist [TAPS][TAPS];
  int checks = 0;
  int failures = 0;
  int stalls = 0;

  tdf_chain dut (.clk(clk), .rst_n(rst_n), .en(en), .p(p), .sum(sum));

  always #5 clk = ~clk;

  function automatic longint expected();
    longint s = 0;
    for (int k = 0; k < TAPS; k++) s += hist[k][k];
    return s;
  endfunction

  initial begin
    #200_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    en = 0;
    foreach (p[k]) p[k] = '0;
    foreach (hist[j, k]) hist[j][k] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (sum != 0) begin
      failures++;
      $display("FAIL sum not cleared by reset");
    end
    for (int i = 0; i < 3000; i++) begin
      en = ($urandom_range(0, 3) != 0);
      // products kept to 20 bits so the sums of TAPS terms do not wrap
      foreach (p[k]) p[k] = W'($signed(($urandom() & 32'h000F_FFFF)) - 32'sh0008_0000);
      @(posedge clk);
      if (en) begin
        for (int j = TAPS - 1; j > 0; j--) hist[j] = hist[j-1];
        foreach (p[k]) hist[0][k] = longint'(p[k]);
      end else begin
        stalls++;
      end
      #1;
      checks++;
      if (longint'(sum) != expected()) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: got %0d expected %0d", i, sum, expected());
      end
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("FAIL no stall cycle was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
