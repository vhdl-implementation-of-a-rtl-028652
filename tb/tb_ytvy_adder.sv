// tb_ytvy_adder -- self-checking test of the unsigned adder.
// Exhaustive at the default 6-bit width and at 3 bits (the width of the
// D = A + C adder of a 3-bit squarer), checking sum and carry out.
module tb_ytvy_adder;

  logic [5:0] a6, b6, s6;
  logic       c6;
  logic [2:0] a3, b3, s3;
  logic       c3;
  int checks = 0, failures = 0;

  ytvy_adder dut6 (.a(a6), .b(b6), .sum(s6), .cout(c6));
  ytvy_adder #(.W(3)) dut3 (.a(a3), .b(b3), .sum(s3), .cout(c3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a3 = '0; b3 = '0;
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j);
        #1;
        checks++;
        if (int'({c6, s6}) != i + j) begin
          failures++;
          $display("FAIL W=6 %0d+%0d gave %0d", i, j, {c6, s6});
        end
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        a3 = 3'(i); b3 = 3'(j);
        #1;
        checks++;
        if (int'({c3, s3}) != i + j) begin
          failures++;
          $display("FAIL W=3 %0d+%0d gave %0d", i, j, {c3, s3});
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
