// tb_csa_tree_eac -- self-checking testbench for csa_tree_eac
//
// Feeds random five-operand sets to trees for n = 3 and n = 16, plus the
// all-ones and all-zero corners. It checks that sum + carry equals the sum of
// the five operands modulo 2^(2n)-1, computed with 64-bit integers.
module tb_csa_tree_eac;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic [5:0]  o3 [5];
  logic [5:0]  s3, k3;
  logic [31:0] o16 [5];
  logic [31:0] s16, k16;

  csa_tree_eac #(.N(3)) dut3 (
    .op_a(o3[0]), .op_b(o3[1]), .op_c(o3[2]), .op_d(o3[3]), .op_e(o3[4]),
    .sum(s3), .carry(k3)
  );
  csa_tree_eac #(.N(16)) dut16 (
    .op_a(o16[0]), .op_b(o16[1]), .op_c(o16[2]), .op_d(o16[3]), .op_e(o16[4]),
    .sum(s16), .carry(k16)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 30000; t++) begin
      longint unsigned ref3, ref16, m3, m16;
      m3  = 63;
      m16 = (64'd1 << 32) - 1;
      ref3 = 0; ref16 = 0;
      for (int i = 0; i < 5; i++) begin
        o3[i]  = 6'($urandom);
        o16[i] = $urandom;
        if (t == 0) begin o3[i] = '1; o16[i] = '1; end
        if (t == 1) begin o3[i] = '0; o16[i] = '0; end
        ref3  += longint'(o3[i]);
        ref16 += longint'(o16[i]);
      end
      #1;
      checks += 2;
      if ((longint'(s3) + longint'(k3)) % m3 != ref3 % m3) begin
        failures++;
        if (failures < 10) $display("FAIL n=3 t=%0d", t);
      end
      if ((longint'(s16) + longint'(k16)) % m16 != ref16 % m16) begin
        failures++;
        if (failures < 10) $display("FAIL n=16 t=%0d", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
