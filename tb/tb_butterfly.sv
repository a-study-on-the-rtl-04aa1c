// tb_butterfly: checks the eight steps of the serial butterfly in both
// positions: before the ROMs (x(n) +/- x(7-n)) and after them
// (e(n) + o(n) for outputs 0..3, e(7-i) - o(7-i) for outputs 4..7).
module tb_butterfly;
  int checks = 0, failures = 0;
  logic post;
  logic [2:0] step;
  logic signed [31:0] v [8];
  logic signed [31:0] y;

  butterfly dut (.post, .step, .v, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      longint e;
      for (int i = 0; i < 8; i++) v[i] = (t < 100) ? 32'(signed'(16'($urandom))) : 32'($urandom) >>> 2;
      post = t[0];
      for (int s = 0; s < 8; s++) begin
        step = 3'(s);
        #1;
        if (!post) e = (s < 4) ? longint'(v[s]) + v[7-s] : longint'(v[s-4]) - v[11-s];
        else       e = (s < 4) ? longint'(v[s]) + v[4+s] : longint'(v[7-s]) - v[11-s];
        checks++;
        if (y !== 32'(e)) begin
          failures++;
          $display("FAIL post=%0d step=%0d got %0d exp %0d", post, s, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
