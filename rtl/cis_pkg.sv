// cis_pkg: constants shared by the blocks of the CIS (continuous interleaved
// sampling) audio processor.
//
// The processor works on frames of eight samples: an 8-point FFT gives eight
// frequency bins, and each bin is one electrode channel, so the channel count
// and the FFT length are the same number. A channel is named by a 3-bit select
// value 0..7; the document numbers the channel outputs 1..8, so select value s
// drives output s+1.
package cis_pkg;
  localparam int unsigned NCH     = 8;             // FFT points = channels
  localparam int unsigned SEL_W   = $clog2(NCH);   // 3-bit select line
endpackage
