// tb_ytvy_stage -- self-checking test of one YTVY level on its own.
// The testbench plays the part of the smaller squarer: it feeds back
// e = c_low * c_low computed here. For every input it checks c_low against
// A - B or A + B (low N-1 bits), the condition flag against A >= B, and s
// against A*A. Exhaustive at N = 3 (plus the two worked examples of the
// method, 111 -> 110001 and 010 -> 000100) and at N = 6. Both conditions,
// deficit and surplus, must occur.
module tb_ytvy_stage;

  logic [2:0]  a3;
  logic [3:0]  e3;
  logic [1:0]  c3;
  logic [5:0]  s3;
  logic [5:0]  a6;
  logic [9:0]  e6;
  logic [4:0]  c6;
  logic [11:0] s6;
  int checks = 0, failures = 0;
  int n_deficit = 0, n_surplus = 0;

  ytvy_stage dut3 (.a(a3), .e(e3), .c_low(c3), .s(s3));
  ytvy_stage #(.N(6)) dut6 (.a(a6), .e(e6), .c_low(c6), .s(s6));

  always_comb e3 = 4'(int'(c3) * int'(c3));
  always_comb e6 = 10'(int'(c6) * int'(c6));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c_exp;
    a6 = '0;
    for (int i = 0; i < 8; i++) begin
      a3 = 3'(i);
      #1;
      c_exp = (i >= 4) ? i - 4 : (i + 4) % 4;
      check(int'(c3) == c_exp, $sformatf("N=3 a=%0d c_low=%0d", i, c3));
      check(dut3.deficit == (i >= 4), $sformatf("N=3 a=%0d deficit=%0d", i, dut3.deficit));
      check(int'(s3) == i * i, $sformatf("N=3 a=%0d s=%0d", i, s3));
      if (dut3.deficit) n_deficit++; else n_surplus++;
    end
    a3 = 3'b111; #1;
    check(s3 == 6'b110001, "example Case I");
    a3 = 3'b010; #1;
    check(s3 == 6'b000100, "example Case II");
    for (int i = 0; i < 64; i++) begin
      a6 = 6'(i);
      #1;
      c_exp = (i >= 32) ? i - 32 : i;
      check(int'(c6) == c_exp, $sformatf("N=6 a=%0d c_low=%0d", i, c6));
      check(dut6.deficit == (i >= 32), $sformatf("N=6 a=%0d deficit", i));
      check(int'(s6) == i * i, $sformatf("N=6 a=%0d s=%0d", i, s6));
      if (dut6.deficit) n_deficit++; else n_surplus++;
    end
    check(n_deficit > 0, "deficit case never seen");
    check(n_surplus > 0, "surplus case never seen");
    $display("deficit cases %0d, surplus cases %0d", n_deficit, n_surplus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
