// tb_r2b_converter_full -- r2b_converter at its default size over its whole range
//
// Instantiates the converter with its default parameters (n = 3, moduli
// {7, 8, 9}, M = 504) and applies every combination of input bit patterns:
// x1 over 0..7, x2 over 0..7, x3 over 0..15. That covers every X in 0..503
// together with the redundant encodings x1 = 7 (for 0) and x3 = 9..15 (for
// 0..6). The expected X is found independently by searching 0..503 for the
// number with those residues. Both outputs are checked, and so is the worked
// example X = 6 (all residues 6, core 0).
module tb_r2b_converter_full;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [2:0] x1, x2;
  logic [3:0] x3;
  logic [5:0] core;
  logic [8:0] x;

  r2b_converter dut (.x1, .x2, .x3, .core, .x);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 16; k++) begin
          int expect_x;
          expect_x = -1;
          for (int v = 0; v < 504; v++)
            if (v % 7 == i % 7 && v % 8 == j && v % 9 == k % 9) expect_x = v;
          x1 = 3'(i); x2 = 3'(j); x3 = 4'(k);
          @(posedge clk);
          #1;
          checks += 2;
          if (int'(x) != expect_x) begin
            failures++;
            if (failures < 10) $display("FAIL residues=(%0d,%0d,%0d) X=%0d expected %0d", i, j, k, x, expect_x);
          end
          if (int'(core) != expect_x / 8) failures++;
        end
    x1 = 3'd6; x2 = 3'd6; x3 = 4'd6;
    #1;
    checks++;
    if (core != 6'd0 || x != 9'd6) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
