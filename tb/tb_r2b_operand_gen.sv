// tb_r2b_operand_gen -- self-checking testbench for r2b_operand_gen
//
// For n = 3 and n = 5, drives every bit pattern of x1, x2 and x3 (x3 over its
// full n+1 bits) and checks each operand against its arithmetic meaning
// modulo m = 2^(2n)-1:
//   op_a = x1*(2^(2n-1)+2^(n-1)),  op_b = -x2*2^n,  op_d = x3*2^(n-1),
//   op_c + op_e = -x3*2^(2n-1) (the complement offsets and the constant
//   cancel), the upper half of op_e all ones,
// and that the five operands together give floor(X/2^n) for the X that the
// residues encode. It counts the residue x3 = 2^n, which needs the top bit of
// x3 in operand C, and fails if that case never came up.
module tb_r2b_operand_gen;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int x3_top_seen = 0;

  logic [2:0] a1, a2;
  logic [3:0] a3;
  logic [5:0] p [5];
  logic [4:0] b1, b2;
  logic [5:0] b3;
  logic [9:0] q [5];

  r2b_operand_gen #(.N(3)) dut3 (
    .x1(a1), .x2(a2), .x3(a3),
    .op_a(p[0]), .op_b(p[1]), .op_c(p[2]), .op_d(p[3]), .op_e(p[4])
  );
  r2b_operand_gen #(.N(5)) dut5 (
    .x1(b1), .x2(b2), .x3(b3),
    .op_a(q[0]), .op_b(q[1]), .op_c(q[2]), .op_d(q[3]), .op_e(q[4])
  );

  // X in [0, M) with the given residues, by search (small moduli only)
  function automatic longint crt(int n, longint r1, longint r2, longint r3);
    longint m1, m2, m3;
    m1 = (64'd1 << n) - 1; m2 = 64'd1 << n; m3 = (64'd1 << n) + 1;
    for (longint v = r2; v < m1 * m2 * m3; v += m2)
      if (v % m1 == r1 % m1 && v % m3 == r3 % m3) return v;
    return -1;
  endfunction

  task automatic check_ops(int n, longint r1, longint r2, longint r3,
                           longint oa, longint ob, longint oc, longint od, longint oe);
    longint m, neg, xv, tot;
    m = (64'd1 << (2 * n)) - 1;
    // -v mod m written as (m - v mod m) mod m
    checks += 6;
    if (oa % m != (r1 * ((64'd1 << (2*n-1)) + (64'd1 << (n-1)))) % m) failures++;
    neg = (m - (r2 << n) % m) % m;
    if (ob % m != neg) failures++;
    if (od != r3 << (n - 1)) failures++;
    if ((oe >> n) != (64'd1 << n) - 1) failures++;
    neg = (m - (r3 << (2*n-1)) % m) % m;
    if ((oc + oe) % m != neg) failures++;
    xv  = crt(n, r1, r2, r3);
    tot = (oa + ob + oc + od + oe) % m;
    if (tot != (xv >> n)) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d x=(%0d,%0d,%0d) core=%0d expected %0d", n, r1, r2, r3, tot, xv >> n);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        for (int k = 0; k < 16; k++) begin
          a1 = 3'(i); a2 = 3'(j); a3 = 4'(k);
          #1;
          if (k == 8) x3_top_seen++;
          check_ops(3, longint'(i), longint'(j), longint'(k),
                    longint'(p[0]), longint'(p[1]), longint'(p[2]), longint'(p[3]), longint'(p[4]));
        end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j += 3)
        for (int k = 0; k < 64; k++) begin
          b1 = 5'(i); b2 = 5'(j); b3 = 6'(k);
          #1;
          if (k == 32) x3_top_seen++;
          check_ops(5, longint'(i), longint'(j), longint'(k),
                    longint'(q[0]), longint'(q[1]), longint'(q[2]), longint'(q[3]), longint'(q[4]));
        end
    checks++;
    if (x3_top_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
