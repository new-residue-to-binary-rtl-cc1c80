// tb_cpa_mod -- self-checking testbench for cpa_mod
//
// Drives a 6-bit adder (n = 3) with all 4096 input pairs and a 32-bit adder
// (n = 16) with random and corner-case pairs. It checks s = (a + b) mod
// (2^W-1) with s in 0..2^W-2. It also counts how often the end-around carry
// and the all-ones-to-zero mapping occur, and fails if either never did.
module tb_cpa_mod;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int eac_seen = 0;
  int zero_fix_seen = 0;

  logic [5:0]  a6, b6, s6;
  logic [31:0] a32, b32, s32;

  cpa_mod #(.W(6))  dut6  (.a(a6),  .b(b6),  .s(s6));
  cpa_mod #(.W(32)) dut32 (.a(a32), .b(b32), .s(s32));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++)
      for (int j = 0; j < 64; j++) begin
        a6 = 6'(i); b6 = 6'(j);
        #1;
        checks++;
        if (longint'(s6) != (longint'(i) + longint'(j)) % 63) begin
          failures++;
          if (failures < 10) $display("FAIL W=6 a=%0d b=%0d s=%0d", i, j, s6);
        end
        if (i + j >= 64) eac_seen++;
        if ((i + j) % 63 == 0 && (i + j) != 0) zero_fix_seen++;
      end
    for (int t = 0; t < 20000; t++) begin
      longint unsigned m;
      m = (64'd1 << 32) - 1;
      a32 = $urandom; b32 = $urandom;
      case (t)
        0: begin a32 = '1; b32 = '1; end
        1: begin a32 = '1; b32 = '0; end
        2: begin a32 = 32'h8000_0000; b32 = 32'h7fff_ffff; end
        3: begin a32 = 32'h8000_0000; b32 = 32'h8000_0000; end
        default: ;
      endcase
      #1;
      checks++;
      if (longint'(s32) != (longint'(a32) + longint'(b32)) % m) begin
        failures++;
        if (failures < 10) $display("FAIL W=32 a=%h b=%h s=%h", a32, b32, s32);
      end
    end
    checks += 2;
    if (eac_seen == 0) failures++;
    if (zero_fix_seen == 0) failures++;
    $display("end-around carries: %0d, all-ones results mapped to zero: %0d",
             eac_seen, zero_fix_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
