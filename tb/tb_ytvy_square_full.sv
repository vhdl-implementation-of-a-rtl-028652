// tb_ytvy_square_full -- the squarer at its default size (3 bits), every
// input squared once and compared with a*a, plus the two worked examples
// (111 -> 110001 in the deficit case, 010 -> 000100 in the surplus case).
module tb_ytvy_square_full;

  logic [2:0] a;
  logic [5:0] s;
  int checks = 0, failures = 0;
  int n_deficit = 0, n_surplus = 0;

  ytvy_square dut (.a(a), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      a = 3'(i);
      #1;
      if (dut.g_lvl[3].u_stage.deficit) n_deficit++; else n_surplus++;
      checks++;
      if (int'(s) != i * i) begin
        failures++;
        $display("FAIL a=%0d s=%0d expected %0d", i, s, i * i);
      end
    end
    a = 3'b111; #1;
    checks++;
    if (s != 6'b110001) begin failures++; $display("FAIL 111 -> %b", s); end
    a = 3'b010; #1;
    checks++;
    if (s != 6'b000100) begin failures++; $display("FAIL 010 -> %b", s); end
    checks++;
    if (n_deficit != 4 || n_surplus != 4) begin
      failures++;
      $display("FAIL condition counts %0d/%0d", n_deficit, n_surplus);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
