// tb_cis_audio_stream: runs a continuous synthetic speech-like signal through
// the CIS processor at its default parameters, the way a recorded audio file
// is streamed in: 16-bit real samples, one per clock, frames of eight back to
// back with START on every eighth sample.
//
// The signal is a "voiced" tone with two harmonics whose pitch glides from
// low to high and back, under a slowly varying loudness envelope, plus noise.
// For a real signal, bins k and 8-k have equal size, so for each frame the
// check accepts either channel of the mirror pair holding the strongest bin of
// a floating-point DFT (frames whose two strongest pairs are within 16 are not
// checked). Every clock it also checks that only the selected channel carries
// 2 * DIR and that audio_out is the sum of the channels. It fails if fewer
// than three different channel pairs were used over the stream.
module tb_cis_audio_stream;
  localparam int IN_W   = 16;
  localparam int N      = 8;
  localparam int FRAMES = 400;
  localparam real PI    = 3.14159265358979;

  logic clk_i = 1'b0;
  logic rst_i;
  logic signed [IN_W-1:0] DIR, DII;
  logic ED, START, RDY;
  logic [2:0] sel;
  logic signed [IN_W:0]   dout [N];
  logic signed [IN_W+3:0] audio_out;

  cis_processor dut (.*);

  always #5 clk_i = ~clk_i;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk_i) cyc <= cyc + 1;

  typedef struct { int sel_cyc; int pair; bit ambiguous; } expect_t;
  expect_t pend[$];
  int pair_hits[5];
  int n_rdy = 0;

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic int pair_of(input int k);
    return (k > N / 2) ? N - k : k;
  endfunction

  function automatic expect_t model(input int x[N]);
    expect_t e;
    real sr, si, a;
    int  m[5];
    int  b1 = -1, b2 = -1, idx = 0;
    for (int k = 0; k <= N / 2; k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        a  = -2.0 * PI * real'(n * k) / real'(N);
        sr = sr + real'(x[n]) * $cos(a);
        si = si + real'(x[n]) * $sin(a);
      end
      m[k] = absi($rtoi(sr)) + absi($rtoi(si));
    end
    for (int k = 0; k <= N / 2; k++) if (m[k] > b1) begin b1 = m[k]; idx = k; end
    for (int k = 0; k <= N / 2; k++) if (k != idx && m[k] > b2) b2 = m[k];
    e.pair      = idx;
    e.ambiguous = (b1 - b2) <= 16;
    return e;
  endfunction

  // per-frame check of sel: last sample at edge c, RDY 3 later, sel 10 after RDY
  initial begin
    forever begin
      @(negedge clk_i);
      if (!rst_i) begin
        if (RDY) n_rdy++;
        if (pend.size() > 0 && cyc == pend[0].sel_cyc) begin
          if (!pend[0].ambiguous) begin
            checks++;
            if (pair_of(int'(sel)) != pend[0].pair) begin
              failures++;
              $display("FAIL sel %0d, strongest bin pair %0d", sel, pend[0].pair);
            end else begin
              pair_hits[pend[0].pair]++;
            end
          end
          void'(pend.pop_front());
        end
      end
    end
  end

  // per-cycle check of the channels and the adder
  logic [2:0]             sel_d;
  logic signed [IN_W-1:0] dir_e;
  int                     sum_d;
  bit                     armed = 1'b0;
  always @(posedge clk_i) dir_e <= DIR;
  initial begin
    forever begin
      @(negedge clk_i);
      if (!rst_i) begin
        automatic int nz = 0;
        automatic int s  = 0;
        if (armed) begin
          for (int k = 0; k < N; k++) begin
            checks++;
            if (int'(dout[k]) != ((k == int'(sel_d)) ? 2 * int'(dir_e) : 0)) begin
              failures++;
              $display("FAIL dout%0d = %0d, sel was %0d, DIR was %0d", k + 1, dout[k], sel_d, dir_e);
            end
          end
          checks++;
          if (int'(audio_out) != sum_d) begin
            failures++;
            $display("FAIL audio_out %0d, expected %0d", audio_out, sum_d);
          end
        end
        for (int k = 0; k < N; k++) begin
          if (dout[k] != 0) nz++;
          s += int'(dout[k]);
        end
        checks++;
        if (nz > 1) begin failures++; $display("FAIL %0d channels active at once", nz); end
        sel_d = sel;
        sum_d = s;
        armed = 1'b1;
      end
    end
  end

  initial begin
    repeat (FRAMES * N + 2000) @(posedge clk_i);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real phase = 0.0;
  initial begin
    int  x[N];
    real f, env, v;
    expect_t e;
    rst_i = 1'b1; START = 1'b0; ED = 1'b0; DIR = '0; DII = '0;
    foreach (pair_hits[k]) pair_hits[k] = 0;
    repeat (3) @(negedge clk_i);
    rst_i = 1'b0;
    for (int fr = 0; fr < FRAMES; fr++) begin
      for (int n = 0; n < N; n++) begin
        // pitch in cycles per sample: glides 0.01 -> 0.45 -> 0.01
        f     = 0.01 + 0.44 * (1.0 - absi(2 * fr - FRAMES) / real'(FRAMES));
        env   = 0.55 + 0.45 * $sin(2.0 * PI * real'(fr * N + n) / 900.0);
        phase = phase + 2.0 * PI * f;
        v     = env * (9000.0 * $sin(phase) + 2500.0 * $sin(2.0 * phase) + 1200.0 * $sin(3.0 * phase))
              + real'(int'($urandom_range(0, 800)) - 400);
        x[n]  = $rtoi(v);
        @(negedge clk_i);
        START = (n == 0);
        ED    = 1'b1;
        DIR   = IN_W'(x[n]);
        if (n == N - 1) begin
          e = model(x);
          e.sel_cyc = cyc + 1 + 3 + 10;
          pend.push_back(e);
        end
      end
    end
    @(negedge clk_i);
    START = 1'b0; ED = 1'b0;
    repeat (20) @(negedge clk_i);
    checks++;
    if (n_rdy != FRAMES) begin failures++; $display("FAIL %0d FFT frames for %0d sent", n_rdy, FRAMES); end
    begin
      automatic int used = 0;
      for (int k = 0; k <= N / 2; k++) begin
        $display("bin pair %0d/%0d strongest and selected in %0d frames", k, (N - k) % N, pair_hits[k]);
        if (pair_hits[k] > 0) used++;
      end
      checks++;
      if (used < 3) begin failures++; $display("FAIL only %0d channel pairs used", used); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
