// tb_in_reg8: writes random words to random addresses of the input
// register and compares all eight outputs with a shadow copy after every
// clock; also checks that the reset value is zero and that we = 0 holds.
module tb_in_reg8;
  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0, we;
  logic [2:0] waddr;
  logic signed [15:0] wdata;
  logic signed [15:0] q [8];
  logic signed [15:0] sh [8];

  always #5 clk = ~clk;
  in_reg8 dut (.clk, .rst_n, .we, .waddr, .wdata, .q);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; waddr = 0; wdata = 0;
    for (int i = 0; i < 8; i++) sh[i] = '0;
    #12 rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = 3'($urandom); wdata = 16'($urandom);
      @(posedge clk);
      if (we) sh[waddr] = wdata;
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (q[i] !== sh[i]) begin
          failures++;
          $display("FAIL t=%0d word %0d got %0d exp %0d", t, i, q[i], sh[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
