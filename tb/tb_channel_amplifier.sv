// tb_channel_amplifier: self-checking testbench for channel_amplifier.
//
// Checks the document's example (sel 5, input 11: output 6 carries 22, the
// others 0), every select value with random and extreme inputs, the one-clock
// latency, and that never more than one channel is non-zero.
module tb_channel_amplifier;
  localparam int IN_W = 16;
  localparam int N    = 8;

  logic clk = 1'b0;
  logic rst;
  logic signed [IN_W-1:0] din;
  logic [2:0]             sel;
  logic signed [IN_W:0]   dout [N];

  channel_amplifier #(.IN_W(IN_W), .GAIN(2), .OUT_W(IN_W + 1)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int s, input int d, input string what);
    for (int k = 0; k < N; k++) begin
      checks++;
      if (int'(dout[k]) != ((k == s) ? 2 * d : 0)) begin
        failures++;
        $display("FAIL %s: dout%0d = %0d with sel %0d din %0d", what, k + 1, dout[k], s, d);
      end
    end
  endtask

  task automatic apply(input int s, input int d, input string what);
    @(negedge clk);
    sel = 3'(s);
    din = IN_W'(d);
    #1;
    @(negedge clk);
    check(s, d, what);
  endtask

  initial begin
    rst = 1'b1; sel = '0; din = '0;
    repeat (2) @(negedge clk);
    check(0, 0, "reset");
    rst = 1'b0;
    apply(5, 11, "document example");
    // latency: new inputs are not visible before the clock
    @(negedge clk);
    sel = 3'd2; din = 16'sd100;
    #1;
    check(5, 11, "before the clock");
    @(negedge clk);
    check(2, 100, "after the clock");
    for (int s = 0; s < N; s++) begin
      apply(s, 32767, "max positive");
      apply(s, -32768, "max negative");
      for (int t = 0; t < 20; t++) apply(s, int'($signed(16'($urandom))), "random");
    end
    for (int t = 0; t < 200; t++)
      apply(int'($urandom_range(0, 7)), int'($signed(16'($urandom))), "random select");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
