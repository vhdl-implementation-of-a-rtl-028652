// tb_ytvy_square -- end-to-end self-checking test of the YTVY squarer.
// Several sizes side by side: the default 3-bit squarer and N = 2, 4 and 8
// exhaustively, N = 16 and N = 32 with random inputs plus the corner values
// 0, 1, B-1, B and 2^N-1. Every result is compared with a*a computed in
// 64-bit arithmetic. The testbench also counts, at the top level of each
// squarer, how often the deficit (A >= B) and the surplus (A < B) condition
// occurred, and fails if either never did.
module tb_ytvy_square;

  logic [2:0]  a3;  logic [5:0]  s3;
  logic [1:0]  a2;  logic [3:0]  s2;
  logic [3:0]  a4;  logic [7:0]  s4;
  logic [7:0]  a8;  logic [15:0] s8;
  logic [15:0] a16; logic [31:0] s16;
  logic [31:0] a32; logic [63:0] s32;

  int checks = 0, failures = 0;
  int n_deficit = 0, n_surplus = 0;

  ytvy_square               dut3  (.a(a3),  .s(s3));
  ytvy_square #(.N(2))      dut2  (.a(a2),  .s(s2));
  ytvy_square #(.N(4))      dut4  (.a(a4),  .s(s4));
  ytvy_square #(.N(8))      dut8  (.a(a8),  .s(s8));
  ytvy_square #(.N(16))     dut16 (.a(a16), .s(s16));
  ytvy_square #(.N(32))     dut32 (.a(a32), .s(s32));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Condition flags of the outermost stage of each squarer.
  task automatic count_conditions();
    if (dut3.g_lvl[3].u_stage.deficit)  n_deficit++; else n_surplus++;
    if (dut4.g_lvl[4].u_stage.deficit)  n_deficit++; else n_surplus++;
    if (dut8.g_lvl[8].u_stage.deficit)  n_deficit++; else n_surplus++;
    if (dut16.g_lvl[16].u_stage.deficit) n_deficit++; else n_surplus++;
    if (dut32.g_lvl[32].u_stage.deficit) n_deficit++; else n_surplus++;
  endtask

  task automatic apply_wide(input logic [15:0] v16, input logic [31:0] v32);
    longint unsigned x16, x32;
    a16 = v16; a32 = v32;
    #1;
    count_conditions();
    x16 = longint'(v16);
    x32 = longint'(v32);
    check(longint'(s16) == x16 * x16, $sformatf("N=16 a=%0d s=%0d", v16, s16));
    check(64'(s32) == 64'(x32 * x32), $sformatf("N=32 a=%0d s=%0d", v32, s32));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; a32 = '0;
    for (int i = 0; i < 256; i++) begin
      a3 = 3'(i); a2 = 2'(i); a4 = 4'(i); a8 = 8'(i);
      #1;
      count_conditions();
      if (i < 8)  check(int'(s3) == i * i, $sformatf("N=3 a=%0d s=%0d", i, s3));
      if (i < 4)  check(int'(s2) == i * i, $sformatf("N=2 a=%0d s=%0d", i, s2));
      if (i < 16) check(int'(s4) == i * i, $sformatf("N=4 a=%0d s=%0d", i, s4));
      check(int'(s8) == i * i, $sformatf("N=8 a=%0d s=%0d", i, s8));
    end
    // Worked examples of the 3-bit circuit.
    a3 = 3'b111; #1;
    check(s3 == 6'b110001, "3-bit example 111");
    a3 = 3'b010; #1;
    check(s3 == 6'b000100, "3-bit example 010");
    // Corner values of the wide squarers.
    apply_wide(16'h0000, 32'h0000_0000);
    apply_wide(16'h0001, 32'h0000_0001);
    apply_wide(16'h7fff, 32'h7fff_ffff);
    apply_wide(16'h8000, 32'h8000_0000);
    apply_wide(16'hffff, 32'hffff_ffff);
    for (int k = 0; k < 5000; k++)
      apply_wide(16'($urandom), $urandom);
    check(n_deficit > 0, "deficit condition never occurred");
    check(n_surplus > 0, "surplus condition never occurred");
    $display("deficit conditions %0d, surplus conditions %0d", n_deficit, n_surplus);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
