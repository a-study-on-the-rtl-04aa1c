// tb_tmem: fills both banks of the transposition memory with row-order
// writes {k, r} and reads them back as columns, checking the one-cycle read
// latency and that the two banks are independent.
module tb_tmem;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic we, wbank, re, rbank;
  logic [5:0] waddr, raddr;
  logic signed [15:0] wdata, rdata;
  logic signed [15:0] sh [128];

  always #5 clk = ~clk;
  tmem dut (.clk, .we, .wbank, .waddr, .wdata, .re, .rbank, .raddr, .rdata);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wbank = 0; rbank = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < 8; r++)
        for (int k = 0; k < 8; k++) begin
          @(negedge clk);
          we = 1; wbank = 1'(b); waddr = {3'(k), 3'(r)}; wdata = 16'($urandom);
          sh[{b[0], 3'(k), 3'(r)}] = wdata;
        end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 300; t++) begin
      logic [6:0] a;
      a = 7'($urandom);
      @(negedge clk);
      re = 1; rbank = a[6]; raddr = a[5:0];
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== sh[a]) begin
        failures++;
        $display("FAIL addr %0d got %0d exp %0d", a, rdata, sh[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
