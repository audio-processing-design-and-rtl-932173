// tb_freq_separator: self-checking testbench for freq_separator.
//
// Feeds serial frames of eight bins starting with a start pulse and checks
// that the parallel outputs show bin k on output k, that they change exactly
// at the end of the cycle in which the count reaches 8 (valid high in the
// ninth cycle after start), that they hold between frames, that back-to-back
// frames (start again in the count-8 cycle) are all captured, and that a
// start inside a frame is ignored. Also runs the document's example: bin
// values 0 ... 0, 13 give 13 on output 8.
module tb_freq_separator;
  localparam int W = 19;
  localparam int N = 8;

  logic clk = 1'b0;
  logic rst, start;
  logic signed [W-1:0] din_r, din_i;
  logic signed [W-1:0] dout_r [N];
  logic signed [W-1:0] dout_i [N];
  logic valid;

  freq_separator #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fr[$][N], fi[$][N];
  int cur_r[N], cur_i[N];

  task automatic check_out(input int er[N], input int ei[N], input string what);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (dout_r[k] != W'(er[k]) || dout_i[k] != W'(ei[k])) begin
        failures++;
        $display("FAIL %s: output %0d = (%0d,%0d), expected (%0d,%0d)", what, k + 1,
                 dout_r[k], dout_i[k], er[k], ei[k]);
      end
    end
  endtask

  // Send one frame starting at the next negedge; mid_start puts a stray start
  // on bin 3. Returns with the last bin driven.
  task automatic send(input int br[N], input int bi[N], input bit mid_start);
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      start = (k == 0) || (mid_start && k == 3);
      din_r = W'(br[k]);
      din_i = W'(bi[k]);
    end
  endtask

  int br[N], bi[N], prev_r[N], prev_i[N];
  initial begin
    rst = 1'b1; start = 1'b0; din_r = '0; din_i = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (prev_r[k]) begin prev_r[k] = 0; prev_i[k] = 0; end

    // Document example: 13 at the last position, 0 elsewhere.
    foreach (br[k]) begin br[k] = (k == N - 1) ? 13 : 0; bi[k] = 0; end
    send(br, bi, 1'b0);
    // cycle of bin 7 = T+7; count 8 in cycle T+8; outputs new in T+9
    @(negedge clk); start = 1'b0; din_r = W'(99); din_i = W'(99);   // T+8
    checks++;
    if (valid) begin failures++; $display("FAIL valid early"); end
    check_out(prev_r, prev_i, "hold before count 8");
    @(negedge clk);                                                // T+9
    checks++;
    if (!valid) begin failures++; $display("FAIL valid missing in cycle T+9"); end
    check_out(br, bi, "example 13 at position 8");
    @(negedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid longer than one cycle"); end
    prev_r = br; prev_i = bi;

    // Idle: outputs hold.
    repeat (10) @(negedge clk);
    check_out(prev_r, prev_i, "hold while idle");

    // Back-to-back random frames: start every 8 cycles (the FFT's pattern).
    for (int f = 0; f < 20; f++) begin
      int nr[N], ni[N];
      foreach (nr[k]) begin
        nr[k] = int'($signed(W'($urandom)));
        ni[k] = int'($signed(W'($urandom)));
      end
      send(nr, ni, f == 5);
      if (f > 0) begin
        // outputs of frame f-1 appeared in cycle T(f-1)+9 = T(f)+1; check now
        check_out(br, bi, "back-to-back frame");
      end
      br = nr; bi = ni;
    end
    @(negedge clk); start = 1'b0;
    @(negedge clk);
    check_out(br, bi, "last back-to-back frame");
    checks++;
    if (!valid) begin failures++; $display("FAIL valid missing for last frame"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
