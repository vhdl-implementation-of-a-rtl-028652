// tb_ytvy_sq2 -- exhaustive self-checking test of the 2-bit squaring unit.
// Applies all four inputs and compares g with a*a worked out in the
// testbench; also checks the worked result 11 -> 1001 of the 3-bit example.
module tb_ytvy_sq2;

  logic [1:0] a;
  logic [3:0] g;
  int checks = 0, failures = 0;

  ytvy_sq2 dut (.a(a), .g(g));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      a = 2'(i);
      #1;
      checks++;
      if (g !== 4'(i * i)) begin
        failures++;
        $display("FAIL a=%0d g=%0d expected %0d", i, g, i * i);
      end
    end
    a = 2'b11;
    #1;
    checks++;
    if (g !== 4'b1001) begin
      failures++;
      $display("FAIL 11^2 gave %b", g);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
