// fft8: 8-point radix-2 decimation-in-time FFT with a serial sample interface.
//
// Function: a frame of eight complex samples (dir + j*dii) enters one sample per
// cycle in which ed is high. START marks the first sample of a frame: it clears
// the sample counter, and a sample given in the same cycle as START (with ed
// high) is sample 0. When the eighth sample has been taken, the frame is copied
// in bit-reversed order into the butterfly registers and the eight bins
// X[k] = sum_n x[n] * exp(-j*2*pi*n*k/8) are computed without scaling, so a
// frame of eight samples of 15 gives X[0] = 120.
//
// Insides: the butterfly registers are updated once per clock, one radix-2
// stage per clock (spans 1, 2 and 4). Each stage multiplies the lower input of
// every butterfly by its twiddle factor W8^e, e in 0..3: W^0 and W^2 = -j are
// exact sign/swap operations, W^1 and W^3 use a multiply by cos(pi/4) in Q15
// with rounding. After the third stage the bins are loaded into an output
// shift register and leave in natural order, bin 0 first, one per clock.
//
// Timing: if the eighth sample is taken at clock edge c, rdy is high in the
// cycle after edge c+3 and dor/doi then hold bin 0; bin k follows k cycles
// later. A new frame can follow back to back (ed high every cycle): the output
// of one frame ends exactly when the next frame's bin 0 appears.
//
// Widths: the input width follows the document (16-bit real and imaginary
// inputs). The document does not give the output width; the output is three
// bits wider than the input (the growth of an 8-point FFT), which holds every
// result of a real input frame exactly. A complex input frame can exceed it
// by up to a factor sqrt(2); such results saturate. Reset is synchronous and
// active high; it clears the counters and rdy.
module fft8 import cis_pkg::*; #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = IN_W + 3
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    start,
  input  logic                    ed,
  input  logic signed [IN_W-1:0]  dir,
  input  logic signed [IN_W-1:0]  dii,
  output logic signed [OUT_W-1:0] dor,
  output logic signed [OUT_W-1:0] doi,
  output logic                    rdy
);
  // Internal width: 3 bits of butterfly growth plus 2 guard bits for the
  // twiddle sums (re +/- im) before the cos(pi/4) multiply.
  localparam int unsigned WI = IN_W + 5;
  // cos(pi/4) = sin(pi/4), the only non-trivial twiddle magnitude of an
  // 8-point FFT, in Q15: round(0.70710678 * 2**15) = 23170.
  localparam int unsigned TW_FRAC = 15;
  localparam int unsigned TW_C    = 23170;
  typedef logic signed [WI-1:0] word_t;
  typedef struct packed { word_t re; word_t im; } cpx_t;

  // ---------------- input side ----------------
  logic signed [IN_W-1:0] in_r [NCH-1];  // samples 0..6 of the current frame
  logic signed [IN_W-1:0] in_i [NCH-1];
  logic [SEL_W-1:0]       in_cnt;
  logic [SEL_W-1:0]       idx;
  logic                   frame_done;

  assign idx        = start ? '0 : in_cnt;
  assign frame_done = ed && (idx == SEL_W'(NCH - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      in_cnt <= '0;
    end else if (ed) begin
      in_cnt <= idx + 1'b1;
    end else if (start) begin
      in_cnt <= '0;
    end
    if (ed && !frame_done) begin
      in_r[idx] <= dir;
      in_i[idx] <= dii;
    end
  end

  // ---------------- butterfly stages ----------------
  cpx_t          work [NCH];
  cpx_t          nxt  [NCH];
  logic [1:0]    stage;
  logic          busy;

  function automatic word_t mul_c(input word_t x);
    logic signed [WI+15:0] p;
    p = x * $signed({1'b0, 16'(TW_C)});
    p = p + (1 <<< (TW_FRAC - 1));
    return word_t'(p >>> TW_FRAC);
  endfunction

  // x * W8^e for e = 0..3, W8 = exp(-j*2*pi/8)
  function automatic cpx_t twiddle(input cpx_t x, input logic [1:0] e);
    cpx_t y;
    unique case (e)
      2'd0: y = x;
      2'd1: begin y.re = mul_c(x.re + x.im); y.im = mul_c(x.im - x.re); end
      2'd2: begin y.re = x.im;               y.im = -x.re;              end
      2'd3: begin y.re = mul_c(x.im - x.re); y.im = -mul_c(x.re + x.im); end
    endcase
    return y;
  endfunction

  function automatic logic [SEL_W-1:0] bitrev(input logic [SEL_W-1:0] i);
    for (int b = 0; b < SEL_W; b++) bitrev[b] = i[SEL_W-1-b];
  endfunction

  always_comb begin
    int unsigned span;
    cpx_t t;
    span = 1 << stage;
    nxt  = work;
    for (int j = 0; j < NCH; j++) begin
      if ((j & span) == 0) begin
        t = twiddle(work[j + span], 2'((j % span) * ((NCH / 2) / span)));
        nxt[j].re        = work[j].re + t.re;
        nxt[j].im        = work[j].im + t.im;
        nxt[j + span].re = work[j].re - t.re;
        nxt[j + span].im = work[j].im - t.im;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      stage <= '0;
    end else if (frame_done) begin
      busy  <= 1'b1;
      stage <= '0;
    end else if (busy) begin
      stage <= stage + 1'b1;
      if (stage == 2'd2) busy <= 1'b0;
    end
    if (frame_done) begin
      for (int n = 0; n < NCH; n++) begin
        if (n == NCH - 1) begin
          work[bitrev(SEL_W'(n))].re <= word_t'(dir);
          work[bitrev(SEL_W'(n))].im <= word_t'(dii);
        end else begin
          work[bitrev(SEL_W'(n))].re <= word_t'(in_r[n]);
          work[bitrev(SEL_W'(n))].im <= word_t'(in_i[n]);
        end
      end
    end else if (busy) begin
      work <= nxt;
    end
  end

  // ---------------- output shift register ----------------
  function automatic logic signed [OUT_W-1:0] sat(input word_t x);
    localparam word_t MAXV = word_t'((1 <<< (OUT_W - 1)) - 1);
    localparam word_t MINV = -word_t'(1 <<< (OUT_W - 1));
    if (x > MAXV)      return OUT_W'(MAXV);
    else if (x < MINV) return OUT_W'(MINV);
    else               return OUT_W'(x);
  endfunction

  logic signed [OUT_W-1:0] out_r [NCH];
  logic signed [OUT_W-1:0] out_i [NCH];
  logic                    last_stage;
  assign last_stage = busy && (stage == 2'd2);

  always_ff @(posedge clk) begin
    if (rst) begin
      rdy <= 1'b0;
    end else begin
      rdy <= last_stage;
    end
    for (int k = 0; k < NCH; k++) begin
      if (last_stage) begin
        out_r[k] <= sat(nxt[k].re);
        out_i[k] <= sat(nxt[k].im);
      end else if (k < NCH - 1) begin
        out_r[k] <= out_r[k + 1];
        out_i[k] <= out_i[k + 1];
      end else begin
        out_r[k] <= '0;
        out_i[k] <= '0;
      end
    end
  end

  assign dor = out_r[0];
  assign doi = out_i[0];

  // A frame must not complete while the previous one is still in the stages.
  a_no_overrun: assert property (@(posedge clk) disable iff (rst) frame_done |-> !busy);
endmodule
