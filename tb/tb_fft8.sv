// tb_fft8: self-checking testbench for fft8.
//
// Sends frames of eight complex samples and compares every output bin with a
// DFT computed here in floating point (tolerance 3 LSB, for the Q15 twiddle
// rounding). Frames: the constant 15 frame (bin 0 must be exactly 120, the
// others exactly 0), single-bin complex exponentials, impulses, full-scale
// real frames, and random complex frames, sent both back to back (ed high
// every cycle) and with idle cycles between samples. It also checks that rdy
// comes 3 clocks after the edge that takes the last sample, that bins leave on
// consecutive clocks in natural order, and that rdy is not seen otherwise.
module tb_fft8;
  localparam int IN_W  = 16;
  localparam int OUT_W = IN_W + 3;
  localparam int N     = 8;

  logic clk = 1'b0;
  logic rst, start, ed;
  logic signed [IN_W-1:0]  dir, dii;
  logic signed [OUT_W-1:0] dor, doi;
  logic rdy;

  fft8 #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  typedef struct { int re[N]; int im[N]; } frame_t;
  frame_t      exp_q[$];
  int          last_q[$];
  int          frames_checked = 0;

  function automatic frame_t dft(input int xr[N], input int xi[N]);
    frame_t f;
    real sr, si, a;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        a  = -2.0 * 3.14159265358979 * real'(n * k) / real'(N);
        sr = sr + real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        si = si + real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
      f.re[k] = $rtoi(sr + (sr >= 0.0 ? 0.5 : -0.5));
      f.im[k] = $rtoi(si + (si >= 0.0 ? 0.5 : -0.5));
    end
    return f;
  endfunction

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  // Drive one frame; gap = idle cycles (ed low) after each sample.
  task automatic send(input int xr[N], input int xi[N], input int gap);
    exp_q.push_back(dft(xr, xi));
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      start = (n == 0);
      ed    = 1'b1;
      dir   = IN_W'(xr[n]);
      dii   = IN_W'(xi[n]);
      if (n == N - 1) last_q.push_back(cyc + 1);
      for (int g = 0; g < gap; g++) begin
        @(negedge clk);
        start = 1'b0;
        ed    = 1'b0;
        dir   = IN_W'($urandom);   // ignored while ed is low
        dii   = IN_W'($urandom);
      end
    end
    @(negedge clk);
    start = 1'b0;
    ed    = 1'b0;
  endtask

  // Collector: samples outputs in the middle of each cycle.
  initial begin
    frame_t e;
    int     lc;
    forever begin
      @(negedge clk);
      if (!rst && rdy) begin
        e  = exp_q.pop_front();
        lc = last_q.pop_front();
        checks++;
        if (cyc - lc != 3) begin
          failures++;
          $display("FAIL latency: rdy %0d cycles after last sample, expected 3", cyc - lc);
        end
        for (int k = 0; k < N; k++) begin
          if (k > 0) begin
            @(negedge clk);
            checks++;
            if (rdy) begin
              failures++;
              $display("FAIL rdy high during bin %0d", k);
            end
          end
          checks++;
          if (absi(int'(dor) - e.re[k]) > 3 || absi(int'(doi) - e.im[k]) > 3) begin
            failures++;
            $display("FAIL bin %0d: got (%0d,%0d) expected (%0d,%0d)", k, dor, doi, e.re[k], e.im[k]);
          end
        end
        frames_checked++;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr[N], xi[N];
  int sent = 0;
  initial begin
    rst = 1'b1; start = 1'b0; ed = 1'b0; dir = '0; dii = '0;
    repeat (3) @(negedge clk);
    rst = 1'b0;

    // Constant 15: X[0] = 120 exactly, others 0.
    foreach (xr[n]) begin xr[n] = 15; xi[n] = 0; end
    send(xr, xi, 0); sent++;
    // The collector allows 3 LSB; check this case for exact values too.
    begin
      while (!rdy) @(negedge clk);
      checks++;
      if (dor != 120 || doi != 0) begin
        failures++;
        $display("FAIL constant 15: bin 0 = (%0d,%0d), expected 120", dor, doi);
      end
      for (int k = 1; k < N; k++) begin
        @(negedge clk);
        checks++;
        if (dor != 0 || doi != 0) begin
          failures++;
          $display("FAIL constant 15: bin %0d = (%0d,%0d), expected 0", k, dor, doi);
        end
      end
    end

    // Impulses at each position.
    for (int p = 0; p < N; p++) begin
      foreach (xr[n]) begin xr[n] = (n == p) ? 1000 : 0; xi[n] = 0; end
      send(xr, xi, 0); sent++;
    end
    // Complex exponentials, one per bin, back to back.
    for (int b = 0; b < N; b++) begin
      foreach (xr[n]) begin
        xr[n] = $rtoi(8000.0 * $cos(2.0 * 3.14159265358979 * real'(b * n) / 8.0));
        xi[n] = $rtoi(8000.0 * $sin(2.0 * 3.14159265358979 * real'(b * n) / 8.0));
      end
      send(xr, xi, 0); sent++;
    end
    // Full-scale real frames (no overflow allowed).
    foreach (xr[n]) begin xr[n] = 32767; xi[n] = 0; end
    send(xr, xi, 0); sent++;
    foreach (xr[n]) begin xr[n] = (n % 2 != 0) ? -32768 : 32767; xi[n] = 0; end
    send(xr, xi, 0); sent++;
    // Random complex frames with and without gaps.
    for (int f = 0; f < 40; f++) begin
      foreach (xr[n]) begin
        xr[n] = int'($signed(16'($urandom))) / 2;
        xi[n] = int'($signed(16'($urandom))) / 2;
      end
      send(xr, xi, (f % 3 == 0) ? int'($urandom_range(0, 2)) : 0); sent++;
    end
    repeat (30) @(negedge clk);
    checks++;
    if (frames_checked != sent || exp_q.size() != 0) begin
      failures++;
      $display("FAIL frames: %0d checked by collector, %0d sent", frames_checked, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
