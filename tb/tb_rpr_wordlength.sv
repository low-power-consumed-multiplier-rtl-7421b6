// tb_rpr_wordlength: replica word-length sweep for the 12 x 12 multiplier.
//
// Builds the compensated fixed-width replica for word lengths H = 5 .. 10, drives
// all of them with the same 10 000 random 12-bit operand pairs, and checks every
// estimate against the reference model. For each H it measures the signal-to-noise
// ratio of the estimate against the exact product, and compares it with two
// estimates computed by the testbench: the same fixed-width array with no
// compensation (plain truncation) and the full-width H x H product of the operand
// MSBs. It requires the compensation to gain at least 10 dB over plain truncation,
// every error to stay within the threshold listed for that H, and the H = 6 replica
// to reach at least 32 dB (about 33 dB is expected).
module tb_rpr_wordlength;
  import ant_ref_pkg::*;
  localparam int unsigned N    = 12;
  localparam int unsigned HMIN = 5;
  localparam int unsigned HMAX = 10;
  localparam int unsigned NH   = HMAX - HMIN + 1;
  localparam int unsigned NPAT = 10000;

  logic          clk = 1'b0;
  logic [N-1:0]  x, y;
  longint unsigned est [NH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (NPAT * 4 + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar g = 0; g < NH; g++) begin : g_rpr
    localparam int unsigned H = HMIN + g;
    logic [H-1:0] yr;
    fixed_width_rpr #(.H(H)) dut (
      .xh_i (x[N-1:N-H]),
      .yh_i (y[N-1:N-H]),
      .yr_o (yr),
      .cm_o ()
    );
    assign est[g] = 64'(yr) << (2 * N - H);
  end

  // Plain truncation: the kept part of the H x H array only.
  function automatic longint unsigned trunc_product(input int unsigned h, input longint unsigned xv,
                                                    input longint unsigned yv);
    longint unsigned xh, yh, low;
    xh  = xv >> (N - h);
    yh  = yv >> (N - h);
    low = 0;
    for (int unsigned a = 0; a < h; a++)
      for (int unsigned b = 0; b < h; b++)
        if (a + b < h && xh[a] && yh[b]) low += 64'd1 << (a + b);
    return ((xh * yh - low) >> h) << (2 * N - h);
  endfunction

  initial begin
    real sig;
    real n_prop [NH];
    real n_trunc [NH];
    real n_full [NH];
    real snr_p, snr_t, snr_f, d;
    longint unsigned exact, r;
    longint err;
    longint th [NH];
    int unsigned h;
    th  = '{861441, 455553, 241633, 128177, 66681, 33680};
    sig = 0.0;
    for (int g = 0; g < NH; g++) begin
      n_prop[g]  = 0.0;
      n_trunc[g] = 0.0;
      n_full[g]  = 0.0;
    end
    for (int i = 0; i < NPAT; i++) begin
      x = N'($urandom);
      y = N'($urandom);
      @(posedge clk);
      exact = longint'(x) * longint'(y);
      sig  += real'(exact) * real'(exact);
      for (int g = 0; g < NH; g++) begin
        h = HMIN + g;
        r = rpr_product(N, h, 64'(x), 64'(y));
        checks++;
        if (est[g] != r) begin
          failures++;
          if (failures < 10) $display("FAIL H=%0d x=%0d y=%0d est=%0d exp=%0d", h, x, y, est[g], r);
        end
        err = longint'(exact) - longint'(est[g]);
        if (err < 0) err = -err;
        checks++;
        if (err > th[g]) begin
          failures++;
          $display("FAIL H=%0d error %0d above threshold %0d", h, err, th[g]);
        end
        d           = real'(err);
        n_prop[g]  += d * d;
        d           = real'(longint'(exact) - longint'(trunc_product(h, 64'(x), 64'(y))));
        n_trunc[g] += d * d;
        d           = real'(longint'(exact)
                            - longint'(((64'(x) >> (N - h)) * (64'(y) >> (N - h))) << (2 * (N - h))));
        n_full[g]  += d * d;
      end
    end
    $display("  H  SNR compensated  SNR truncated  SNR full-width (dB)");
    for (int g = 0; g < NH; g++) begin
      snr_p = 10.0 * $log10(sig / n_prop[g]);
      snr_t = 10.0 * $log10(sig / n_trunc[g]);
      snr_f = 10.0 * $log10(sig / n_full[g]);
      $display("%3d  %15.2f  %13.2f  %14.2f", HMIN + g, snr_p, snr_t, snr_f);
      checks++;
      if (snr_p - snr_t < 10.0) begin
        failures++;
        $display("FAIL H=%0d compensation gains only %0.2f dB", HMIN + g, snr_p - snr_t);
      end
      if (HMIN + g == 6) begin
        checks++;
        if (snr_p < 32.0) begin
          failures++;
          $display("FAIL H=6 SNR %0.2f dB", snr_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
