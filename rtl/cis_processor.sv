// cis_processor: continuous interleaved sampling (CIS) speech processor for a
// cochlear implant, the top level.
//
// Audio samples enter on DIR (real part; DII is the imaginary part, zero for
// audio) one per clock with ED high, in frames of eight started by START.
// The chain is:
//   fft8            8-point FFT, bins leave serially with RDY on bin 0
//   freq_separator  collects the eight bins (start = RDY) and holds them in
//                   parallel
//   max_encoder     sel = position 0..7 of the strongest bin
//   channel_amplifier  drives 2 * DIR on channel sel, zero on the others
//   channel_adder   sums the eight channels for the audio output and display
// As in the document's schematic, the amplifier amplifies the incoming audio
// sample DIR itself; the spectrum only decides which electrode channel
// carries it, so the channels never carry a signal at the same time.
//
// The microphone capture, the board's audio output and the VGA display are
// board parts outside this RTL: samples come in on the ports, and the eight
// channels (dout) and their sum (audio_out) go out on ports.
//
// Timing (ED high every cycle): the eighth sample of a frame at clock edge c
// gives RDY in the cycle after edge c+3; the separator outputs change 8
// cycles after RDY, sel one cycle later, and dout and audio_out follow the
// new sel one and two cycles after that. Within a channel assignment, dout
// and audio_out follow DIR with latencies of 1 and 2 cycles.
// Reset (rst_i) is synchronous and active high.
//
// The separator's valid pulse (bins_valid) is left unused here: the encoder
// samples its inputs on every clock and needs no strobe. Lint reports it as
// an unused signal; it stays so that a testbench can count frames.
module cis_processor import cis_pkg::*; #(
  parameter int unsigned IN_W = 16
) (
  input  logic                      clk_i,
  input  logic                      rst_i,
  input  logic signed [IN_W-1:0]    DIR,
  input  logic signed [IN_W-1:0]    DII,
  input  logic                      ED,
  input  logic                      START,
  output logic                      RDY,
  output logic [SEL_W-1:0]          sel,
  output logic signed [IN_W:0]      dout [NCH],
  output logic signed [IN_W+3:0]    audio_out
);
  localparam int unsigned F_W   = IN_W + 3;   // FFT bin width
  localparam int unsigned AMP_W = IN_W + 1;   // amplifier output width

  logic signed [F_W-1:0] fft_r, fft_i;
  logic signed [F_W-1:0] bin_r [NCH];
  logic signed [F_W-1:0] bin_i [NCH];
  logic                  bins_valid;

  fft8 #(.IN_W(IN_W), .OUT_W(F_W)) u_fft (
    .clk(clk_i), .rst(rst_i), .start(START), .ed(ED),
    .dir(DIR), .dii(DII), .dor(fft_r), .doi(fft_i), .rdy(RDY)
  );

  freq_separator #(.W(F_W)) u_sep (
    .clk(clk_i), .rst(rst_i), .start(RDY), .din_r(fft_r), .din_i(fft_i),
    .dout_r(bin_r), .dout_i(bin_i), .valid(bins_valid)
  );

  max_encoder #(.W(F_W)) u_enc (
    .clk(clk_i), .rst(rst_i), .din_r(bin_r), .din_i(bin_i), .sel(sel)
  );

  channel_amplifier #(.IN_W(IN_W), .GAIN(2), .OUT_W(AMP_W)) u_amp (
    .clk(clk_i), .rst(rst_i), .din(DIR), .sel(sel), .dout(dout)
  );

  channel_adder #(.W(AMP_W), .OUT_W(IN_W + 4)) u_add (
    .clk(clk_i), .rst(rst_i), .din(dout), .sum(audio_out)
  );
endmodule
