// tb_ant_multiplier: end-to-end self-checking test of the ANT multiplier at its
// default size (12 x 12 bits, threshold ANT_TH).
//
// Sends 10 000 random operand pairs, with occasional idle cycles. On a share of the
// pairs a soft error of the main multiplier is imitated through mdsp_err_i: either a
// flip of one upper product bit (an error far above the threshold, which must be
// replaced by the replica estimate) or of one low bit (an error within the
// threshold, which the scheme tolerates). For every output the testbench recomputes
// the exact product, the replica estimate (ant_ref_pkg), the corrupted main product
// and the decision, and checks p_o, sel_rpr_o, ya_o, yr_o and the 2-cycle latency.
// It counts each mechanism (error-free pass, correction by the replica, tolerated
// small error, ICV compensation, conditional Cm carry-in) and fails if one never
// happened. It also reports the output signal-to-noise ratio of the replica alone,
// of the unprotected main product and of the ANT output, and requires the ANT output
// and the replica to stay above 25 dB.
module tb_ant_multiplier;
  import ant_pkg::*;
  import ant_ref_pkg::*;
  localparam int unsigned N       = ANT_N;
  localparam int unsigned H       = N / 2;
  localparam int unsigned W       = 2 * N;
  localparam int unsigned NPAT    = 10000;
  localparam int unsigned LATENCY = 2;

  typedef struct {
    longint unsigned exact;
    longint unsigned ya;
    longint unsigned yr;
    longint unsigned y;
    logic            sel;
    int              t_in;
  } exp_t;

  logic           clk = 1'b0;
  logic           rst_n;
  logic           in_valid;
  logic [N-1:0]   x, y;
  logic [W-1:0]   err;
  logic           out_valid;
  logic [W-1:0]   p, ya, yr;
  logic           sel;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_clean = 0, n_corrected = 0, n_tolerated = 0, n_beta = 0, n_cm = 0, n_out = 0;
  real sig = 0.0, noise_rpr = 0.0, noise_ya = 0.0, noise_ant = 0.0;
  exp_t q[$];

  ant_multiplier dut (
    .clk_i       (clk),
    .rst_ni      (rst_n),
    .in_valid_i  (in_valid),
    .x_i         (x),
    .y_i         (y),
    .mdsp_err_i  (err),
    .out_valid_o (out_valid),
    .p_o         (p),
    .sel_rpr_o   (sel),
    .ya_o        (ya),
    .yr_o        (yr)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (NPAT * 3 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real sq(input longint a, input longint b);
    real d = real'(a - b);
    return d * d;
  endfunction

  // Scoreboard: compare each valid output with the oldest expected entry.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      n_out++;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output at cycle %0d", cycle);
      end else begin
        e = q.pop_front();
        if (64'(p) != e.y || sel != e.sel || 64'(ya) != e.ya || 64'(yr) != e.yr
            || cycle - e.t_in != LATENCY) begin
          failures++;
          if (failures < 10)
            $display("FAIL p=%0d exp=%0d sel=%0b/%0b ya=%0d/%0d yr=%0d/%0d latency=%0d",
                     p, e.y, sel, e.sel, ya, e.ya, yr, e.yr, cycle - e.t_in);
        end
        sig       += real'(e.exact) * real'(e.exact);
        noise_rpr += sq(longint'(e.exact), longint'(e.yr));
        noise_ya  += sq(longint'(e.exact), longint'(e.ya));
        noise_ant += sq(longint'(e.exact), longint'(64'(p)));
      end
    end
  end

  initial begin
    exp_t e;
    int kind, beta, beta1;
    longint d;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    x        = '0;
    y        = '0;
    err      = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < NPAT; i++) begin
      // Occasional idle cycle.
      if ($urandom_range(0, 15) == 0) begin
        in_valid = 1'b0;
        x        = N'($urandom);
        y        = N'($urandom);
        err      = W'($urandom);
        @(posedge clk);
        #1;
      end
      in_valid = 1'b1;
      x        = N'($urandom);
      y        = N'($urandom);
      kind     = $urandom_range(0, 9);
      if (kind == 0)      err = W'(1) << $urandom_range(W - 4, W - 1);  // large error
      else if (kind == 1) err = W'(1) << $urandom_range(0, 12);         // small error
      else                err = '0;
      e.exact = longint'(x) * longint'(y);
      e.ya    = e.exact ^ 64'(err);
      e.yr    = rpr_product(N, H, 64'(x), 64'(y));
      d       = longint'(e.ya) - longint'(e.yr);
      if (d < 0) d = -d;
      e.sel   = d > longint'(ANT_TH);
      e.y     = e.sel ? e.yr : e.ya;
      e.t_in  = cycle;
      q.push_back(e);
      if (err == '0 && !e.sel) n_clean++;
      if (err != '0 && e.sel) n_corrected++;
      if (err != '0 && !e.sel) n_tolerated++;
      beta  = 0;
      beta1 = 0;
      for (int k = 0; k < H; k++) begin
        beta += int'(x[N-1-k] & y[H+k]);
        if (k < H - 1) beta1 += int'(x[N-2-k] & y[H+k]);
      end
      if (beta > 0) n_beta++;
      if (beta == 0 && beta1 > 0) n_cm++;
      // A correct product must never be replaced.
      if (err == '0 && e.sel) begin
        failures++;
        $display("FAIL threshold too small for x=%0d y=%0d", x, y);
      end
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    err      = '0;
    repeat (LATENCY + 2) @(posedge clk);

    $display("outputs=%0d clean=%0d corrected=%0d tolerated=%0d icv_comp=%0d cm_carry=%0d",
             n_out, n_clean, n_corrected, n_tolerated, n_beta, n_cm);
    $display("SNR replica=%0.2f dB  main(with soft errors)=%0.2f dB  ANT output=%0.2f dB",
             10.0 * $log10(sig / noise_rpr), 10.0 * $log10(sig / noise_ya),
             10.0 * $log10(sig / noise_ant));
    checks++;
    if (n_out != NPAT || q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs for %0d inputs", n_out, NPAT);
    end
    checks++;
    if (n_clean == 0 || n_corrected == 0 || n_tolerated == 0 || n_beta == 0 || n_cm == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    if (10.0 * $log10(sig / noise_ant) < 25.0 || 10.0 * $log10(sig / noise_rpr) < 25.0) begin
      failures++;
      $display("FAIL output SNR below 25 dB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
