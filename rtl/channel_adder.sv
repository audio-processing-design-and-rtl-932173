// channel_adder: sums the eight electrode channels into one signal.
//
// Function: sum = din[0] + ... + din[7], registered. The sum feeds the board's
// audio output and the VGA display. Since the amplifier drives one channel at
// a time the sum equals that channel, but the adder is a full eight-input
// adder and its output is three bits wider than a channel so that it cannot
// overflow for any inputs. Reset is synchronous, active high, and clears the
// sum. Latency: one clock.
module channel_adder import cis_pkg::*; #(
  parameter int unsigned W     = 17,
  parameter int unsigned OUT_W = W + SEL_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [W-1:0]     din [NCH],
  output logic signed [OUT_W-1:0] sum
);
  logic signed [OUT_W-1:0] acc;
  always_comb begin
    acc = '0;
    for (int k = 0; k < NCH; k++) acc = acc + OUT_W'(din[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) sum <= '0;
    else     sum <= acc;
  end
endmodule
