// freq_separator: serial-to-parallel converter between the FFT and the encoder.
//
// Function: the FFT delivers its eight bins one per clock. When start goes high
// (it is driven by the FFT's rdy, which marks bin 0), the separator stores the
// sample on din_r/din_i and counts; it keeps storing one sample per clock
// until the count reaches 8. In the cycle in which count is 8 the eight stored
// bins are copied to the parallel outputs dout_r[0..7] / dout_i[0..7] (the
// document's dout1..dout8), where they stay until the next frame replaces
// them. valid pulses for one clock with each update; it is this design's
// addition for testbenches and is not used downstream.
//
// Counting 0..8 and releasing the outputs at 8 follow the document. If start
// is high again in the cycle in which count is 8 (frames back to back), that
// sample is stored as bin 0 of the next frame, so no frame is lost; start
// while a frame is being collected is ignored. Reset is synchronous, active
// high, and clears the count and the outputs.
//
// Timing: start at cycle T; the outputs change at the edge that ends cycle T+8
// and valid is high in cycle T+9.
module freq_separator import cis_pkg::*; #(
  parameter int unsigned W = 19
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,
  input  logic signed [W-1:0] din_r,
  input  logic signed [W-1:0] din_i,
  output logic signed [W-1:0] dout_r [NCH],
  output logic signed [W-1:0] dout_i [NCH],
  output logic                valid
);
  logic signed [W-1:0] buf_r [NCH];
  logic signed [W-1:0] buf_i [NCH];
  logic [SEL_W:0]      count;           // 0..8

  always_ff @(posedge clk) begin
    if (rst) begin
      count <= '0;
      valid <= 1'b0;
      for (int k = 0; k < NCH; k++) begin
        dout_r[k] <= '0;
        dout_i[k] <= '0;
      end
    end else begin
      valid <= 1'b0;
      if (count == (SEL_W + 1)'(NCH)) begin
        dout_r <= buf_r;
        dout_i <= buf_i;
        valid  <= 1'b1;
        count  <= '0;
      end else if (count != 0) begin
        count <= count + 1'b1;
      end
      if ((count == 0 || count == (SEL_W + 1)'(NCH)) && start) begin
        buf_r[0] <= din_r;
        buf_i[0] <= din_i;
        count    <= (SEL_W + 1)'(1);
      end else if (count != 0 && count != (SEL_W + 1)'(NCH)) begin
        buf_r[SEL_W'(count)] <= din_r;
        buf_i[SEL_W'(count)] <= din_i;
      end
    end
  end
endmodule
