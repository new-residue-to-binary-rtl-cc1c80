// tb_r2b_converter -- end-to-end testbench for r2b_converter
//
// Runs the converter at its default size (n = 3, moduli {7, 8, 9}) over every
// X in 0..503, then at n = 5 ({31, 32, 33}) over every X in 0..32735, and at
// n = 8 and n = 16 ({65535, 65536, 65537}) with random X. Each X is checked
// through both outputs, the core floor(X/2^n) and X itself. It also runs the
// worked examples: X = 6 at n = 3, X = 10253 at n = 5, and X = 67998 at n = 16.
// For every size it requires that each datapath event happened at least
// once: the residue x3 = 2^n, an end-around carry out of each of the three
// CSA layers, the end-around carry of the final adder, the all-ones-to-zero
// mapping, and the redundant residue encodings. Only the n = 8 random run
// may miss the rare all-ones case, so there that event is not required.
module tb_r2b_converter;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  localparam int NSIZES = 4;
  localparam string EV_NAME [8] = '{"x3=2^n", "EAC layer 1", "EAC layer 2", "EAC layer 3",
                                    "CPA end-around carry", "all-ones -> 0",
                                    "x1=2^n-1 encoding", "x3>2^n encoding"};

  logic start = 1'b0;
  logic done [NSIZES];
  int   c [NSIZES];
  int   f [NSIZES];
  int   ev [NSIZES][8];

  r2b_check #(.N(3),  .EXHAUSTIVE(1'b1))                u3  (.start, .done(done[0]), .checks(c[0]), .failures(f[0]), .events(ev[0]));
  r2b_check #(.N(5),  .EXHAUSTIVE(1'b1))                u5  (.start, .done(done[1]), .checks(c[1]), .failures(f[1]), .events(ev[1]));
  r2b_check #(.N(8),  .EXHAUSTIVE(1'b0), .NRAND(20000)) u8  (.start, .done(done[2]), .checks(c[2]), .failures(f[2]), .events(ev[2]));
  r2b_check #(.N(16), .EXHAUSTIVE(1'b0), .NRAND(20000)) u16 (.start, .done(done[3]), .checks(c[3]), .failures(f[3]), .events(ev[3]));

  // worked examples, on instances of their own
  logic [2:0]  e3_x1, e3_x2;   logic [3:0]  e3_x3;  logic [5:0]  e3_core;  logic [8:0]  e3_x;
  logic [4:0]  e5_x1, e5_x2;   logic [5:0]  e5_x3;  logic [9:0]  e5_core;  logic [14:0] e5_x;
  logic [15:0] e16_x1, e16_x2; logic [16:0] e16_x3; logic [31:0] e16_core; logic [47:0] e16_x;

  r2b_converter           ex3  (.x1(e3_x1),  .x2(e3_x2),  .x3(e3_x3),  .core(e3_core),  .x(e3_x));
  r2b_converter #(.N(5))  ex5  (.x1(e5_x1),  .x2(e5_x2),  .x3(e5_x3),  .core(e5_core),  .x(e5_x));
  r2b_converter #(.N(16)) ex16 (.x1(e16_x1), .x2(e16_x2), .x3(e16_x3), .core(e16_core), .x(e16_x));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // X = 6 at n = 3: all residues 6, core 0
    e3_x1 = 3'd6; e3_x2 = 3'd6; e3_x3 = 4'd6;
    // X = 10253 at n = 5: residues (23, 13, 23), core 320
    e5_x1 = 5'd23; e5_x2 = 5'd13; e5_x3 = 6'd23;
    // X = 67998 at n = 16: residues (2463, 2462, 2461), core 1
    e16_x1 = 16'd2463; e16_x2 = 16'd2462; e16_x3 = 17'd2461;
    #1;
    checks += 5;
    if (e3_core != 6'd0 || e3_x != 9'd6) failures++;
    if (e5_core != 10'd320) failures++;
    if (e5_x != 15'd10253) failures++;
    if (e16_core != 32'd1) failures++;
    if (e16_x != 48'd67998) failures++;
    $display("examples: n=3 X=%0d core=%0d; n=5 X=%0d core=%0d; n=16 X=%0d core=%0d",
             e3_x, e3_core, e5_x, e5_core, e16_x, e16_core);

    start = 1'b1;
    wait (done[0] && done[1] && done[2] && done[3]);
    for (int s = 0; s < NSIZES; s++) begin
      checks   += c[s];
      failures += f[s];
      for (int e = 0; e < 8; e++) begin
        $display("size %0d: %-22s %0d", s, EV_NAME[e], ev[s][e]);
        if (!(s == 2 && e == 5)) begin
          checks++;
          if (ev[s][e] == 0) begin
            failures++;
            $display("FAIL size %0d: event '%s' never happened", s, EV_NAME[e]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
