// ant_decision: error-control (decision) block of the algorithmic noise-tolerant
// (ANT) scheme.
//
// It compares the main block's product ya with the replica's estimate yr. When
// |ya - yr| <= TH the main product is trusted and passed on; otherwise the main
// product is taken to hold a timing (soft) error and the replica's estimate is
// output instead:
//   y = ya  if |ya - yr| <= TH,   y = yr  otherwise.
// TH must be the largest difference a correct ya can have from yr, so that error-free
// products are never replaced.
//
// Interface: ya_i, yr_i are W-bit unsigned products; y_o is the selected product;
// sel_rpr_o is 1 when the replica was selected (an error was detected).
// Timing: purely combinational.
//
// The selection rule and the definition of TH follow the source design; the
// subtract-and-compare realisation is this design's own.
module ant_decision
  import ant_pkg::*;
#(
  parameter int unsigned W  = 2 * ANT_N,
  parameter int unsigned TH = ANT_TH
) (
  input  logic [W-1:0] ya_i,
  input  logic [W-1:0] yr_i,
  output logic [W-1:0] y_o,
  output logic         sel_rpr_o
);

  logic [W-1:0] diff;

  always_comb begin
    diff      = (ya_i >= yr_i) ? (ya_i - yr_i) : (yr_i - ya_i);
    sel_rpr_o = diff > W'(TH);
    y_o       = sel_rpr_o ? yr_i : ya_i;
  end

endmodule
