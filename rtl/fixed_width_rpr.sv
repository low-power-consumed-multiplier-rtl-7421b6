// fixed_width_rpr: fixed-width reduced-precision replica (RPR) of the N x N
// multiplier, with truncation-error compensation from the input correction vector
// (ICV) and the minor input correction vector (MICV).
//
// The replica multiplies only the H most significant bits of each operand of the
// N x N main multiplier and keeps only the H most significant bits of their product,
// which stand for product weights 2^(2N-H) .. 2^(2N-1). In the reference design
// N = 12 and H = N/2 = 6, so the kept weights are 2^18 .. 2^23. With local indices
// a, b (bit a of xh_i is x[N-H+a], bit b of yh_i is y[N-H+b]) the H x H
// partial-product array splits into
//   MSP  : a + b >= H      kept and summed,
//   ICV  : a + b == H - 1  the H bits of highest weight below the MSP,
//   MICV : a + b == H - 2  the next H-1 bits,
//   LSP  : the rest, dropped.
// Compensation: the ICV bits C1 .. C(H-1) (C_k = xh[H-k] & yh[k-1]) are injected
// unchanged as carry-ins into the lowest kept column, i.e. each with twice its own
// weight, so the array adds beta = sum(ICV). The last ICV bit xh[0] & yh[H-1] enters
// that column through a two-input OR whose other input is Cm = Cm1 & Cm2, with Cm1 = NOR of
// C1 .. C(H-1) (beta is zero) and Cm2 = OR of the MICV bits (beta1 > 0). The replica
// output is therefore
//   yr = MSP + (beta + [beta == 0 and beta1 > 0]) * 2^(2N-H).
// Only the wiring of the ICV and one OR, one NOR and one AND gate are added to the
// truncated array, and they all sit at the bottom of the lowest column, away from
// the critical path.
//
// Interface: xh_i, yh_i are the H MSBs of the operands; yr_o holds product bits
// 2N-1 .. 2N-H of the estimate (its lower bits are zero); the module itself does not
// depend on N, only on the word length H; cm_o shows that the conditional carry-in Cm was injected.
// Timing: purely combinational.
//
// The subsets, the compensation function and its gates follow the source design,
// which fixes H = N/2 = 6 after comparing word lengths 5 to 10; H is a parameter here
// so that those word lengths can be built as well.
// The MSP bits are summed here with a word-level adder per row, leaving the choice
// of adder cells to synthesis, rather than with a hand-placed full-adder array.
module fixed_width_rpr
  import ant_pkg::*;
#(
  parameter int unsigned H = ANT_N / 2
) (
  input  logic [H-1:0] xh_i,
  input  logic [H-1:0] yh_i,
  output logic [H-1:0] yr_o,
  output logic         cm_o
);

  logic [H-1:0] icv;     // icv[k-1] = C_k, k = 1 .. H
  logic [H-2:0] micv;    // micv[k]  = xh[H-2-k] & yh[k]
  logic         cm1, cm2, cm;
  logic         c_last;  // C_H after the compensation OR gate
  logic [H+1:0] sum;     // one spare bit to catch an impossible overflow

  // Compensation vectors.
  always_comb begin
    for (int k = 1; k <= H; k++) icv[k-1] = xh_i[H-k] & yh_i[k-1];
    for (int k = 0; k <= H - 2; k++) micv[k] = xh_i[H-2-k] & yh_i[k];
  end

  assign cm1    = ~|icv[H-2:0];
  assign cm2    = |micv;
  assign cm     = cm1 & cm2;
  assign c_last = icv[H-1] | cm;
  assign cm_o   = cm;

  // MSP array: row b adds xh[a] for a >= H - b at column weight a + b - H, and the
  // compensation bits enter the lowest column.
  always_comb begin
    logic [H+1:0] row;
    sum = '0;
    for (int b = 1; b < H; b++) begin
      row = '0;
      for (int a = H - b; a < H; a++) row[a+b-H] = xh_i[a] & yh_i[b];
      sum = sum + row;
    end
    for (int k = 0; k < H - 1; k++) sum = sum + (H+2)'(icv[k]);
    sum = sum + (H+2)'(c_last);
  end

  assign yr_o = sum[H-1:0];

  always_comb begin
    assert (sum[H+1:H] == '0)
      else $error("fixed_width_rpr: replica estimate exceeds the product range");
  end

endmodule
