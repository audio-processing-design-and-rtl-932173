// tb_cis_processor: end-to-end self-checking testbench for the CIS processor
// at its default parameters (16-bit samples).
//
// Streams frames of eight samples into the top, mostly back to back (ED high
// every cycle), some with idle cycles between samples. Frame contents: the
// constant 15 frame (its bin 0 must be 120 and it selects channel 1), complex
// tones placed on each of the eight bins with noise added (each must select
// its own channel), and random real audio frames. For every frame it checks,
// against a floating-point DFT computed here:
//   - RDY comes 3 clocks after the edge that takes the last sample;
//   - the separated bins (read inside the design) match the DFT within 3 LSB,
//     9 cycles after RDY;
//   - sel is the strongest bin by |re| + |im|, 10 cycles after RDY (random
//     frames whose two strongest bins are within 8 of each other are skipped);
// and on every clock:
//   - dout carries 2 * DIR on channel sel (one clock late) and 0 elsewhere;
//   - at most one channel is non-zero (channels never overlap);
//   - audio_out equals the sum of the channels one clock earlier.
// It counts each mechanism (FFT frames, separator updates, each of the eight
// channels selected, channel switches, frames with gaps, back-to-back frames)
// and fails if one never happened.
module tb_cis_processor;
  localparam int IN_W = 16;
  localparam int N    = 8;
  localparam real PI  = 3.14159265358979;

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

  typedef struct {
    int rdy_cyc;
    int re[N];
    int im[N];
    int sel;
    bit ambiguous;
  } expect_t;
  expect_t pend[$];

  // mechanism counters
  int n_rdy = 0, n_sep = 0, n_switch = 0, n_gap_frames = 0, n_b2b = 0, n_sum_nz = 0;
  int n_chan[N];

  function automatic int absi(input int v);
    return v < 0 ? -v : v;
  endfunction

  function automatic expect_t model(input int xr[N], input int xi[N]);
    expect_t e;
    real sr, si, a;
    int  m[N];
    int  b1 = -1, b2 = -1, idx = 0;
    for (int k = 0; k < N; k++) begin
      sr = 0.0; si = 0.0;
      for (int n = 0; n < N; n++) begin
        a  = -2.0 * PI * real'(n * k) / real'(N);
        sr = sr + real'(xr[n]) * $cos(a) - real'(xi[n]) * $sin(a);
        si = si + real'(xr[n]) * $sin(a) + real'(xi[n]) * $cos(a);
      end
      e.re[k] = $rtoi(sr + (sr >= 0.0 ? 0.5 : -0.5));
      e.im[k] = $rtoi(si + (si >= 0.0 ? 0.5 : -0.5));
      m[k]    = absi(e.re[k]) + absi(e.im[k]);
    end
    for (int k = 0; k < N; k++) if (m[k] > b1) begin b1 = m[k]; idx = k; end
    for (int k = 0; k < N; k++) if (k != idx && m[k] > b2) b2 = m[k];
    e.sel       = idx;
    e.ambiguous = (b1 - b2) <= 8;
    return e;
  endfunction

  // ---------------- stimulus ----------------
  task automatic send(input int xr[N], input int xi[N], input int gap);
    expect_t e;
    e = model(xr, xi);
    for (int n = 0; n < N; n++) begin
      @(negedge clk_i);
      START = (n == 0);
      ED    = 1'b1;
      DIR   = IN_W'(xr[n]);
      DII   = IN_W'(xi[n]);
      if (n == N - 1) begin
        e.rdy_cyc = cyc + 1 + 3;
        pend.push_back(e);
      end
      for (int g = 0; g < gap; g++) begin
        @(negedge clk_i);
        START = 1'b0;
        ED    = 1'b0;
        DIR   = IN_W'($urandom);
        DII   = IN_W'($urandom);
      end
    end
    if (gap > 0) n_gap_frames++;
  endtask

  task automatic idle(input int cycles);
    repeat (cycles) begin
      @(negedge clk_i);
      START = 1'b0;
      ED    = 1'b0;
      DIR   = IN_W'($urandom);
      DII   = '0;
    end
  endtask

  // ---------------- per-frame checks ----------------
  initial begin
    forever begin
      @(negedge clk_i);
      if (!rst_i) begin
        if (RDY) n_rdy++;
        if (dut.bins_valid) n_sep++;
        for (int p = 0; p < pend.size(); p++) begin
          if (cyc == pend[p].rdy_cyc) begin
            checks++;
            if (!RDY) begin failures++; $display("FAIL RDY missing at cycle %0d", cyc); end
          end
          if (cyc == pend[p].rdy_cyc + 9) begin
            for (int k = 0; k < N; k++) begin
              checks++;
              if (absi(int'(dut.bin_r[k]) - pend[p].re[k]) > 3 ||
                  absi(int'(dut.bin_i[k]) - pend[p].im[k]) > 3) begin
                failures++;
                $display("FAIL bin %0d = (%0d,%0d), expected (%0d,%0d)", k,
                         dut.bin_r[k], dut.bin_i[k], pend[p].re[k], pend[p].im[k]);
              end
            end
          end
          if (cyc == pend[p].rdy_cyc + 10 && !pend[p].ambiguous) begin
            checks++;
            if (int'(sel) != pend[p].sel) begin
              failures++;
              $display("FAIL sel %0d, expected %0d (cycle %0d)", sel, pend[p].sel, cyc);
            end else begin
              n_chan[sel]++;
            end
          end
        end
        while (pend.size() > 0 && cyc >= pend[0].rdy_cyc + 10) void'(pend.pop_front());
      end
    end
  end

  // ---------------- per-cycle checks ----------------
  logic [2:0]             sel_d;
  logic signed [IN_W-1:0] dir_e;   // DIR as taken by the last clock edge
  always @(posedge clk_i) dir_e <= DIR;
  int                     sum_d;
  bit                     armed = 1'b0;
  initial begin
    forever begin
      @(negedge clk_i);
      if (!rst_i) begin
        automatic int nz = 0;
        automatic int s = 0;
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
          if (sel != sel_d) n_switch++;
        end
        for (int k = 0; k < N; k++) begin
          if (dout[k] != 0) nz++;
          s += int'(dout[k]);
        end
        checks++;
        if (nz > 1) begin failures++; $display("FAIL %0d channels active at once", nz); end
        if (audio_out != 0) n_sum_nz++;
        sel_d = sel;
        sum_d = s;
        armed = 1'b1;
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk_i);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xr[N], xi[N];
  int sent = 0;
  initial begin
    rst_i = 1'b1; START = 1'b0; ED = 1'b0; DIR = '0; DII = '0;
    foreach (n_chan[k]) n_chan[k] = 0;
    repeat (3) @(negedge clk_i);
    rst_i = 1'b0;

    // Constant 15: bin 0 = 120, channel 1 (sel 0).
    foreach (xr[n]) begin xr[n] = 15; xi[n] = 0; end
    send(xr, xi, 0); sent++;
    idle(16);
    checks++;
    if (dut.bin_r[0] != 120 || sel != 0) begin
      failures++;
      $display("FAIL constant 15: bin 0 = %0d, sel %0d", dut.bin_r[0], sel);
    end

    // Tones on each bin, back to back, then again with gaps, twice each.
    for (int rep = 0; rep < 2; rep++) begin
      for (int b = N - 1; b >= 0; b--) begin
        for (int n = 0; n < N; n++) begin
          xr[n] = $rtoi(6000.0 * $cos(2.0 * PI * real'(b * n) / 8.0)) + int'($urandom_range(0, 600)) - 300;
          xi[n] = $rtoi(6000.0 * $sin(2.0 * PI * real'(b * n) / 8.0)) + int'($urandom_range(0, 600)) - 300;
        end
        send(xr, xi, rep);
        sent++;
        if (rep == 0) n_b2b++;
      end
      idle(20);
    end

    // Random real audio frames, back to back.
    for (int f = 0; f < 60; f++) begin
      foreach (xr[n]) begin xr[n] = int'($signed(16'($urandom))); xi[n] = 0; end
      send(xr, xi, 0); sent++;
      n_b2b++;
    end
    idle(20);

    checks++;
    if (n_rdy != sent) begin failures++; $display("FAIL RDY seen %0d times for %0d frames", n_rdy, sent); end
    checks++;
    if (n_sep != sent) begin failures++; $display("FAIL separator updated %0d times for %0d frames", n_sep, sent); end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (n_chan[k] == 0) begin failures++; $display("FAIL channel %0d never selected", k + 1); end
    end
    checks++;
    if (n_switch == 0 || n_gap_frames == 0 || n_b2b == 0 || n_sum_nz == 0) begin
      failures++;
      $display("FAIL mechanism missing: switches %0d gap frames %0d back-to-back %0d adder active %0d",
               n_switch, n_gap_frames, n_b2b, n_sum_nz);
    end
    $display("frames %0d, separator updates %0d, channel switches %0d, frames with gaps %0d, back-to-back %0d",
             n_rdy, n_sep, n_switch, n_gap_frames, n_b2b);
    for (int k = 0; k < N; k++) $display("channel %0d selected in %0d checked frames", k + 1, n_chan[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
