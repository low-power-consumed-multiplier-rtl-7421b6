// ant_multiplier: N x N unsigned multiplier protected by algorithmic noise tolerance
// (ANT) with a fixed-width reduced-precision replica (RPR).
//
// The main multiplier (mdsp_multiplier) is meant to run at an overscaled (too low)
// supply voltage, where its longest paths miss the sampling edge and its product ya
// picks up input-dependent soft errors. The replica (fixed_width_rpr) multiplies only
// the upper halves of the operands and keeps only the upper half of the product, so
// its paths are short enough to stay correct at the same voltage; its compensated
// estimate yr is within TH of the exact product for every input. The decision block
// (ant_decision) outputs ya unless it differs from yr by more than TH, in which case
// yr is output.
//
// Pipeline (one product per cycle):
//   cycle 0  x_i, y_i, in_valid_i presented; MDSP and RPR evaluate;
//   edge 1   ya and yr sampled into registers (the sampling edge that a late MDSP
//            misses under voltage overscaling);
//   edge 2   decision result registered: p_o, sel_rpr_o, out_valid_o, together
//            with the two products it chose between (ya_o, yr_o) for observation.
//            The lower 2N-H bits of yr_o are always zero: the replica is fixed-width.
// Latency is 2 clock cycles, throughput one product per cycle.
//
// Soft-error port: logic simulation cannot reproduce late paths, so mdsp_err_i is
// XORed into the MDSP product as it is sampled. It stands for the bit flips that
// voltage overscaling causes; tie it to zero in an implementation.
//
// Parameters: N is the operand width, H the replica word length (the replica uses
// the H MSBs of each operand), TH the detection threshold. TH must equal the largest
// |x*y - yr| over all inputs for the chosen N and H; the default ANT_TH belongs to
// N = 12, H = 6. For N = 12 and H = 5, 7, 8, 9, 10 it is 861441, 241633, 128177,
// 66681 and 33680.
//
// Reset: rst_ni is synchronous and active low and clears all registers.
//
// The architecture (MDSP + fixed-width RPR + decision with threshold) follows the
// source design; the register placement, the valid signals, the reset and the
// soft-error port are this design's own.
module ant_multiplier
  import ant_pkg::*;
#(
  parameter int unsigned N  = ANT_N,
  parameter int unsigned H  = N / 2,
  parameter int unsigned TH = ANT_TH
) (
  input  logic           clk_i,
  input  logic           rst_ni,
  input  logic           in_valid_i,
  input  logic [N-1:0]   x_i,
  input  logic [N-1:0]   y_i,
  input  logic [2*N-1:0] mdsp_err_i,
  output logic           out_valid_o,
  output logic [2*N-1:0] p_o,
  output logic           sel_rpr_o,
  output logic [2*N-1:0] ya_o,
  output logic [2*N-1:0] yr_o
);

  logic [2*N-1:0] ya_d, ya_q, yr_q, y_d;
  logic [H-1:0]   rpr_d;
  logic           sel_d;
  logic           v1_q;

  mdsp_multiplier #(.N(N)) u_mdsp (
    .x_i (x_i),
    .y_i (y_i),
    .p_o (ya_d)
  );

  fixed_width_rpr #(.H(H)) u_rpr (
    .xh_i (x_i[N-1:N-H]),
    .yh_i (y_i[N-1:N-H]),
    .yr_o (rpr_d),
    .cm_o ()
  );

  // Sampling registers of the two products.
  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      v1_q <= 1'b0;
      ya_q <= '0;
      yr_q <= '0;
    end else begin
      v1_q <= in_valid_i;
      ya_q <= ya_d ^ mdsp_err_i;
      yr_q <= {rpr_d, {(2*N-H){1'b0}}};
    end
  end

  ant_decision #(.W(2*N), .TH(TH)) u_dec (
    .ya_i      (ya_q),
    .yr_i      (yr_q),
    .y_o       (y_d),
    .sel_rpr_o (sel_d)
  );

  // Output register.
  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      out_valid_o <= 1'b0;
      p_o         <= '0;
      sel_rpr_o   <= 1'b0;
      ya_o        <= '0;
      yr_o        <= '0;
    end else begin
      out_valid_o <= v1_q;
      p_o         <= y_d;
      sel_rpr_o   <= sel_d;
      ya_o        <= ya_q;
      yr_o        <= yr_q;
    end
  end

endmodule
