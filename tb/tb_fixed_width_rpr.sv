// tb_fixed_width_rpr: exhaustive self-checking test of the compensated fixed-width
// replica over all 2^(2H) operand-MSB pairs.
// Checks the estimate against ant_ref_pkg::rpr_ref, checks the Cm flag against the
// condition "none of C1 .. C(H-1) set and some MICV bit set", and recomputes the detection
// threshold max |x*y - yr| over all full operands (the extremes of the lower operand
// bits bound it) to confirm ant_pkg::ANT_TH. The compensation cases (beta > 0,
// Cm injected, no compensation) are counted and must all occur.
module tb_fixed_width_rpr;
  import ant_pkg::*;
  import ant_ref_pkg::*;
  localparam int unsigned N = ANT_N;
  localparam int unsigned H = N / 2;

  logic [H-1:0] xh, yh, yr;
  logic         cm;
  int checks = 0, failures = 0;
  int n_beta = 0, n_cm = 0, n_none = 0;
  logic clk = 1'b0;

  fixed_width_rpr #(.H(H)) dut (.xh_i(xh), .yh_i(yh), .yr_o(yr), .cm_o(cm));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned exp, lowmask;
    longint pt, pmax, pmin, max_pos, max_neg, th_calc;
    int beta, beta_direct, beta1;
    max_pos = 0;
    max_neg = 0;
    lowmask = (64'd1 << (N - H)) - 1;
    for (int unsigned a = 0; a < (1 << H); a++)
      for (int unsigned b = 0; b < (1 << H); b++) begin
        xh = H'(a);
        yh = H'(b);
        #1;
        exp = rpr_ref(H, 64'(a), 64'(b));
        checks++;
        if (64'(yr) != exp) begin
          failures++;
          if (failures < 10) $display("FAIL xh=%0d yh=%0d yr=%0d exp=%0d", a, b, yr, exp);
        end
        beta  = 0;
        beta1 = 0;
        beta_direct = 0;
        for (int k = 0; k < H; k++) begin
          beta  += int'({1'b0, xh[H-1-k] & yh[k]});
          if (k < H - 1) beta_direct += int'({1'b0, xh[H-1-k] & yh[k]});
          if (k < H - 1) beta1 += int'({1'b0, xh[H-2-k] & yh[k]});
        end
        checks++;
        if (cm != (beta_direct == 0 && beta1 > 0)) begin
          failures++;
          $display("FAIL cm xh=%0d yh=%0d cm=%0b", a, b, cm);
        end
        if (beta > 0) n_beta++;
        else if (beta1 > 0) n_cm++;
        else n_none++;
      end
    // Error extremes over the lower operand halves, from the reference model.
    for (int unsigned a = 0; a < (1 << H); a++)
      for (int unsigned b = 0; b < (1 << H); b++) begin
        pt   = longint'(rpr_ref(H, 64'(a), 64'(b)) << (2 * N - H));
        pmax = longint'(((longint'(a) << (N - H)) | lowmask) * ((longint'(b) << (N - H)) | lowmask));
        pmin = longint'((longint'(a) << (N - H)) * (longint'(b) << (N - H)));
        if (pmax - pt > max_pos) max_pos = pmax - pt;
        if (pt - pmin > max_neg) max_neg = pt - pmin;
      end
    th_calc = (max_pos > max_neg) ? max_pos : max_neg;
    $display("max error +%0d / -%0d; cases beta>0=%0d cm=%0d none=%0d",
             max_pos, max_neg, n_beta, n_cm, n_none);
    checks++;
    if (th_calc != longint'(ANT_TH)) begin
      failures++;
      $display("FAIL threshold: computed %0d, ANT_TH %0d", th_calc, ANT_TH);
    end
    checks++;
    if (n_beta == 0 || n_cm == 0 || n_none == 0) begin
      failures++;
      $display("FAIL a compensation case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
