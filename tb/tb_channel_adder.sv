// tb_channel_adder: self-checking testbench for channel_adder.
//
// Checks the registered sum of eight channels with one-hot inputs (the way
// the amplifier drives them), with all channels at the extremes (no overflow)
// and with random inputs, and the one-clock latency.
module tb_channel_adder;
  localparam int W = 17;
  localparam int N = 8;

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0]   din [N];
  logic signed [W+2:0]   sum;

  channel_adder #(.W(W), .OUT_W(W + 3)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int v[N], input string what);
    int e = 0;
    foreach (v[k]) e += v[k];
    @(negedge clk);
    foreach (v[k]) din[k] = W'(v[k]);
    #1;
    @(negedge clk);
    checks++;
    if (int'(sum) != e) begin
      failures++;
      $display("FAIL %s: sum %0d expected %0d", what, sum, e);
    end
  endtask

  int v[N];
  localparam int MAXV = (1 << (W - 1)) - 1;
  initial begin
    rst = 1'b1;
    foreach (din[k]) din[k] = W'(k + 1);
    repeat (2) @(negedge clk);
    checks++;
    if (sum != 0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;
    for (int p = 0; p < N; p++) begin
      foreach (v[k]) v[k] = (k == p) ? 22 : 0;
      apply(v, "one-hot");
      foreach (v[k]) v[k] = (k == p) ? -MAXV : 0;
      apply(v, "one-hot negative");
    end
    foreach (v[k]) v[k] = MAXV;
    apply(v, "all max");
    foreach (v[k]) v[k] = -MAXV - 1;
    apply(v, "all min");
    // latency
    @(negedge clk);
    foreach (din[k]) din[k] = W'(k);
    #1;
    checks++;
    if (int'(sum) != -8 * (MAXV + 1)) begin failures++; $display("FAIL sum changed before the clock"); end
    for (int t = 0; t < 300; t++) begin
      foreach (v[k]) v[k] = int'($signed(W'($urandom)));
      apply(v, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
