// channel_amplifier: amplifies the input sample onto the selected electrode
// channel.
//
// Function: every clock, output channel sel (the document's dout(sel+1)) is
// loaded with GAIN * din and the other seven channels with zero. Only one
// channel is ever non-zero, so the channel signals never overlap in time,
// which is the point of continuous interleaved sampling. The gain of 2 comes
// from the document's example (input 11 gives 22); the input is the raw audio
// sample, as the document's schematic wires it. The output is wide enough
// that GAIN * din never overflows. Reset is synchronous, active high, and
// clears all channels. Latency: one clock.
module channel_amplifier import cis_pkg::*; #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned GAIN  = 2,
  parameter int unsigned OUT_W = IN_W + $clog2(GAIN)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  din,
  input  logic [SEL_W-1:0]        sel,
  output logic signed [OUT_W-1:0] dout [NCH]
);
  logic signed [OUT_W-1:0] amp;
  assign amp = OUT_W'(din) * $signed(OUT_W'(GAIN));

  always_ff @(posedge clk) begin
    for (int k = 0; k < NCH; k++) begin
      if (rst)                  dout[k] <= '0;
      else if (sel == SEL_W'(k)) dout[k] <= amp;
      else                      dout[k] <= '0;
    end
  end

  // Non-overlap rule: at most one channel carries a signal.
  logic [NCH-1:0] nz;
  always_comb for (int k = 0; k < NCH; k++) nz[k] = (dout[k] != '0);
  a_one_channel: assert property (@(posedge clk) $onehot0(nz));
endmodule
