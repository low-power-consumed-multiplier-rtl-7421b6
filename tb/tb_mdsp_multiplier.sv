// tb_mdsp_multiplier: self-checking test of the main array multiplier.
// Applies corner operands and random operand pairs and compares the product with
// the arithmetic product computed by the testbench.
module tb_mdsp_multiplier;
  localparam int unsigned N = 12;
  localparam int unsigned NRAND = 200000;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;
  int checks = 0, failures = 0;
  logic clk = 1'b0;

  mdsp_multiplier #(.N(N)) dut (.x_i(x), .y_i(y), .p_o(p));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] a, input logic [N-1:0] b);
    longint unsigned exp;
    x = a;
    y = b;
    #1;
    exp = longint'(a) * longint'(b);
    checks++;
    if (64'(p) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d p=%0d exp=%0d", a, b, p, exp);
    end
  endtask

  initial begin
    // Corners: zeros, ones, single bits.
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) check(N'(1) << i, N'(1) << j);
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check('0, '1);
    check('1, N'(1));
    for (int i = 0; i < NRAND; i++) check(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
