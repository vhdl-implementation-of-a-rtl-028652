// tb_ytvy_addsub -- self-checking test of the adder/subtractor.
// Exhaustive at the default width (3 bits, both operations), random at
// 8 bits; expected values are computed modulo 2^N in the testbench.
module tb_ytvy_addsub;

  logic [2:0] a3, b3, y3;
  logic       sub3;
  logic [7:0] a8, b8, y8;
  logic       sub8;
  int checks = 0, failures = 0;

  ytvy_addsub dut3 (.a(a3), .b(b3), .sub(sub3), .y(y3));
  ytvy_addsub #(.N(8)) dut8 (.a(a8), .b(b8), .sub(sub8), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    a8 = '0; b8 = '0; sub8 = 1'b0;
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          a3 = 3'(i); b3 = 3'(j); sub3 = s[0];
          #1;
          exp_v = (s != 0) ? (i - j + 8) % 8 : (i + j) % 8;
          checks++;
          if (int'(y3) != exp_v) begin
            failures++;
            $display("FAIL N=3 a=%0d b=%0d sub=%0d y=%0d expected %0d", i, j, s, y3, exp_v);
          end
        end
    for (int k = 0; k < 2000; k++) begin
      a8 = 8'($urandom); b8 = 8'($urandom); sub8 = 1'($urandom);
      #1;
      exp_v = sub8 ? (int'(a8) - int'(b8) + 256) % 256 : (int'(a8) + int'(b8)) % 256;
      checks++;
      if (int'(y8) != exp_v) begin
        failures++;
        $display("FAIL N=8 a=%0d b=%0d sub=%0d y=%0d expected %0d", a8, b8, sub8, y8, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
