// tb_ci_adder: checks the carry-increment adder/subtractor against the
// simulator's own + and - on corner values and random operands, including
// the operands that make a carry ripple through every incrementer.
module tb_ci_adder;
  logic [31:0] a, b, sum;
  logic        sub, cout;
  int checks = 0, failures = 0;

  ci_adder dut (.a, .b, .sub, .sum, .cout);

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic ts);
    logic [32:0] exp;
    a = ta; b = tb_; sub = ts;
    #1;
    exp = ts ? {1'b0, ta} + {1'b0, ~tb_} + 33'd1 : {1'b0, ta} + {1'b0, tb_};
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      $display("FAIL a=%h b=%h sub=%0d got %h/%0d exp %h", ta, tb_, ts, sum, cout, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'hFFFF_FFFF, 32'h1, 0);   // carry through all blocks
    check(32'h0000_000F, 32'h1, 0);
    check(32'h0FFF_FFFF, 32'h1, 0);
    check(32'h0, 32'h1, 1);           // 0 - 1
    check(32'h8000_0000, 32'h1, 1);
    check(32'h1234_5678, 32'h1234_5678, 1);
    for (int i = 0; i < 8; i++) check(32'hFFFF_FFFF >> (4*i), 32'h1, 0);
    for (int i = 0; i < 5000; i++) check($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
