// tb_csa_eac -- self-checking testbench for csa_eac
//
// Drives a 6-bit layer (n = 3) with every combination of its three inputs
// and a 32-bit layer (n = 16) with random vectors. For each it checks that
// sum + carry equals a + b + c modulo 2^W-1, that the sum is the bitwise
// parity of the inputs, and that bit 0 of the carry holds the carry out of
// the top position (the end-around carry). The reference uses integer
// arithmetic, not the layer's gate equations.
module tb_csa_eac;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int eac_seen = 0;

  logic [5:0]  a6, b6, c6, s6, k6;
  logic [31:0] a32, b32, c32, s32, k32;

  csa_eac #(.W(6))  dut6  (.a(a6),  .b(b6),  .c(c6),  .sum(s6),  .carry(k6));
  csa_eac #(.W(32)) dut32 (.a(a32), .b(b32), .c(c32), .sum(s32), .carry(k32));

  function automatic longint unsigned modw(longint unsigned v, int w);
    return v % ((64'd1 << w) - 1);
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++)
        for (int k = 0; k < 64; k++) begin
          longint unsigned lhs, rhs;
          int top_ones;
          a6 = 6'(i); b6 = 6'(j); c6 = 6'(k);
          #1;
          lhs = modw(longint'(i) + longint'(j) + longint'(k), 6);
          rhs = modw(longint'(s6) + longint'(k6), 6);
          top_ones = int'(a6[5]) + int'(b6[5]) + int'(c6[5]);
          checks += 3;
          if (lhs != rhs) failures++;
          if (s6 != (a6 ^ b6 ^ c6)) failures++;
          if (k6[0] != (top_ones >= 2)) failures++;
          if (top_ones >= 2) eac_seen++;
        end
    for (int t = 0; t < 20000; t++) begin
      longint unsigned lhs, rhs;
      a32 = $urandom; b32 = $urandom; c32 = $urandom;
      if (t < 4) begin a32 = '1; b32 = '1; c32 = 32'(t); end
      #1;
      lhs = modw(longint'(a32) + longint'(b32) + longint'(c32), 32);
      rhs = modw(longint'(s32) + longint'(k32), 32);
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (failures < 10) $display("FAIL W=32 a=%h b=%h c=%h", a32, b32, c32);
      end
    end
    checks++;
    if (eac_seen == 0) failures++;
    $display("end-around carries exercised: %0d", eac_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
