// max_encoder: picks the strongest of the eight separated frequency bins.
//
// Function: every clock, sel is loaded with the position 0..7 of the bin with
// the largest magnitude among din_r[k] + j*din_i[k]. Position p corresponds
// to the document's input p+1, so a largest value on input 8 gives sel = 7.
// Choosing the maximum and the 3-bit select line follow the document.
//
// The document does not say how a complex bin's size is measured; this design
// uses |re| + |im|, which needs no multiplier and equals |re| for a real bin.
// On a tie the lower position wins. The comparison is a combinational scan;
// sel is registered, so it follows the inputs with one clock of latency.
// Reset is synchronous, active high, and sets sel to 0.
module max_encoder import cis_pkg::*; #(
  parameter int unsigned W = 19
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] din_r [NCH],
  input  logic signed [W-1:0] din_i [NCH],
  output logic [SEL_W-1:0]    sel
);
  typedef logic [W:0] mag_t;   // |re| + |im| needs one more bit

  // Sign-extend first so that the most negative input has a valid magnitude.
  function automatic mag_t absval(input logic signed [W-1:0] x);
    logic signed [W:0] xe;
    xe = {x[W-1], x};
    return xe[W] ? mag_t'(-xe) : mag_t'(xe);
  endfunction

  mag_t             mag [NCH];
  mag_t             best;
  logic [SEL_W-1:0] best_idx;

  always_comb begin
    for (int k = 0; k < NCH; k++) begin
      mag[k] = absval(din_r[k]) + absval(din_i[k]);
    end
    best     = mag[0];
    best_idx = '0;
    for (int k = 1; k < NCH; k++) begin
      if (mag[k] > best) begin
        best     = mag[k];
        best_idx = SEL_W'(k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) sel <= '0;
    else     sel <= best_idx;
  end
endmodule
