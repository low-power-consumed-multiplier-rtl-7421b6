// mdsp_multiplier: main DSP block (MDSP) of the ANT multiplier, an N x N unsigned
// array multiplier giving the full-length 2N-bit product.
//
// The partial-product bits x[i] & y[j] are summed by a carry-save array of full
// adders, one row per multiplier bit y[j]: each row adds its partial products to the
// sum bits of the previous row (shifted one place) and to the carries of the previous
// row, and retires one product bit. The last row's sums and carries are merged by a
// ripple-carry adder into the upper N product bits. This is the classic unsigned
// (Braun) array; the long ripple through rows and the final adder is the critical path
// that voltage overscaling violates, which the replica block then covers.
//
// Interface: x_i, y_i unsigned N-bit operands; p_o = x_i * y_i (2N bits).
// Timing: purely combinational; the enclosing design samples p_o in a register.
//
// The operand width and the unsigned array organisation follow the source design;
// the exact cell arrangement of its array is not specified, so the regular Braun
// arrangement is used here.
module mdsp_multiplier
  import ant_pkg::*;
#(
  parameter int unsigned N = ANT_N
) (
  input  logic [N-1:0]   x_i,
  input  logic [N-1:0]   y_i,
  output logic [2*N-1:0] p_o
);

  always_comb begin
    logic [N:0]   s_prev;   // sums of the previous row, bit N is zero
    logic [N-1:0] c_prev;   // carries of the previous row
    logic [N:0]   s_row;
    logic [N-1:0] c_row;
    logic [1:0]   fa;
    logic         rc;       // ripple carry of the final adder

    p_o    = '0;
    // Row 0: plain partial products, no adders.
    for (int i = 0; i < N; i++) s_prev[i] = x_i[i] & y_i[0];
    s_prev[N] = 1'b0;
    c_prev    = '0;
    p_o[0]    = s_prev[0];

    // Rows 1 .. N-1: carry-save full-adder rows.
    for (int j = 1; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        fa       = full_add(x_i[i] & y_i[j], s_prev[i+1], c_prev[i]);
        s_row[i] = fa[0];
        c_row[i] = fa[1];
      end
      s_row[N] = 1'b0;
      p_o[j]   = s_row[0];
      s_prev   = s_row;
      c_prev   = c_row;
    end

    // Final ripple-carry adder for the upper N bits.
    rc = 1'b0;
    for (int i = 0; i < N; i++) begin
      fa         = full_add(s_prev[i+1], c_prev[i], rc);
      p_o[N+i]   = fa[0];
      rc         = fa[1];
    end
  end

endmodule
