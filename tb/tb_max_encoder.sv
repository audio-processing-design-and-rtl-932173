// tb_max_encoder: self-checking testbench for max_encoder.
//
// Applies bin sets and checks sel one clock later against an argmax of
// |re| + |im| computed here (lowest position on a tie). Cases: the document's
// example (13 on input 8, zeros elsewhere, gives sel 7), a single strong bin
// at every position, negative and imaginary-only maxima, ties, and random
// sets. Also checks that sel holds the registered value for one clock.
module tb_max_encoder;
  localparam int W = 19;
  localparam int N = 8;

  logic clk = 1'b0;
  logic rst;
  logic signed [W-1:0] din_r [N];
  logic signed [W-1:0] din_i [N];
  logic [2:0] sel;

  max_encoder #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int ref_sel(input int r[N], input int i[N]);
    int best = -1, idx = 0;
    for (int k = 0; k < N; k++) begin
      if (absi(r[k]) + absi(i[k]) > best) begin
        best = absi(r[k]) + absi(i[k]);
        idx  = k;
      end
    end
    return idx;
  endfunction

  task automatic apply(input int r[N], input int i[N], input string what);
    int e;
    e = ref_sel(r, i);
    @(negedge clk);
    for (int k = 0; k < N; k++) begin
      din_r[k] = W'(r[k]);
      din_i[k] = W'(i[k]);
    end
    @(negedge clk);
    checks++;
    if (int'(sel) != e) begin
      failures++;
      $display("FAIL %s: sel %0d, expected %0d", what, sel, e);
    end
  endtask

  int r[N], i[N];
  localparam int MAXV = (1 << (W - 1)) - 1;
  initial begin
    rst = 1'b1;
    foreach (din_r[k]) begin din_r[k] = '0; din_i[k] = '0; end
    repeat (2) @(negedge clk);
    checks++;
    if (sel != 0) begin failures++; $display("FAIL reset value"); end
    rst = 1'b0;

    foreach (r[k]) begin r[k] = (k == 7) ? 13 : 0; i[k] = 0; end
    apply(r, i, "document example");
    checks++;
    if (sel != 3'd7) begin failures++; $display("FAIL document example is not 7"); end

    // Latency: change inputs and look before the next edge.
    foreach (r[k]) begin r[k] = (k == 2) ? 50 : 0; i[k] = 0; end
    @(negedge clk);
    foreach (din_r[k]) begin din_r[k] = W'(r[k]); din_i[k] = W'(i[k]); end
    #1;
    checks++;
    if (sel != 3'd7) begin failures++; $display("FAIL sel changed before the clock"); end
    @(negedge clk);
    checks++;
    if (sel != 3'd2) begin failures++; $display("FAIL sel after one clock: %0d", sel); end

    for (int p = 0; p < N; p++) begin
      foreach (r[k]) begin r[k] = (k == p) ? -MAXV : 1000; i[k] = 0; end
      apply(r, i, "negative maximum");
      foreach (r[k]) begin r[k] = 100; i[k] = (k == p) ? MAXV : -200; end
      apply(r, i, "imaginary maximum");
      foreach (r[k]) begin r[k] = (k == p) ? 300 : 299; i[k] = (k == p) ? -300 : 301; end
      apply(r, i, "|re|+|im| measure");
    end
    // Most negative value in each position.
    for (int p = 0; p < N; p++) begin
      foreach (r[k]) begin r[k] = (k == p) ? -MAXV - 1 : MAXV - 1; i[k] = 0; end
      apply(r, i, "most negative value");
    end
    // Ties: lowest position wins.
    foreach (r[k]) begin r[k] = (k == 3 || k == 6) ? 500 : 1; i[k] = 0; end
    apply(r, i, "tie");
    foreach (r[k]) begin r[k] = 0; i[k] = 0; end
    apply(r, i, "all zero");
    for (int t = 0; t < 300; t++) begin
      foreach (r[k]) begin
        r[k] = int'($signed(W'($urandom))) / 2;
        i[k] = int'($signed(W'($urandom))) / 2;
        if (t % 4 == 0) i[k] = 0;
      end
      apply(r, i, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
