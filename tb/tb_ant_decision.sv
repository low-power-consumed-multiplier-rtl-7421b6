// tb_ant_decision: self-checking test of the ANT decision block.
// Drives product pairs whose difference lies at, just above and far from the
// threshold, in both directions, plus random pairs, and checks the selected output
// and the detection flag against the rule y = ya if |ya - yr| <= TH else yr.
module tb_ant_decision;
  import ant_pkg::*;
  localparam int unsigned W  = 2 * ANT_N;
  localparam int unsigned TH = ANT_TH;

  logic [W-1:0] ya, yr, y;
  logic         sel;
  int checks = 0, failures = 0;
  int n_sel = 0, n_pass = 0;
  logic clk = 1'b0;

  ant_decision #(.W(W), .TH(TH)) dut (.ya_i(ya), .yr_i(yr), .y_o(y), .sel_rpr_o(sel));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint unsigned a, input longint unsigned r);
    longint d;
    logic   exp_sel;
    ya = W'(a);
    yr = W'(r);
    #1;
    d       = longint'(64'(ya)) - longint'(64'(yr));
    if (d < 0) d = -d;
    exp_sel = d > longint'(TH);
    checks++;
    if (sel != exp_sel || y != (exp_sel ? yr : ya)) begin
      failures++;
      if (failures < 10) $display("FAIL ya=%0d yr=%0d y=%0d sel=%0b", ya, yr, y, sel);
    end
    if (sel) n_sel++;
    else n_pass++;
  endtask

  initial begin
    longint unsigned base;
    for (int i = 0; i < 2000; i++) begin
      base = 64'($urandom_range(2 * TH + 100, (1 << W) - 2 * TH - 100));
      check(base, base);
      check(base + TH, base);
      check(base - TH, base);
      check(base + TH + 1, base);
      check(base - TH - 1, base);
      check(base, base + TH);
      check(base, base + TH + 1);
      check(base, base - TH - 1);
    end
    check(0, 0);
    check((1 << W) - 1, 0);
    check(0, (1 << W) - 1);
    for (int i = 0; i < 100000; i++) check(64'($urandom), 64'($urandom));
    checks++;
    if (n_sel == 0 || n_pass == 0) begin
      failures++;
      $display("FAIL selection never exercised both ways");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
