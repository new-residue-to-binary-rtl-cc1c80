// r2b_check -- checking harness for one r2b_converter instance
//
// Holds a converter for moduli exponent N and, when start rises, drives it.
// With EXHAUSTIVE set it tries every X in 0..M-1, otherwise NRAND random X.
// For each X the residues are computed with 64-bit integer arithmetic. At
// random, the redundant encodings x1 = 2^n-1 (for 0) and x3 + 2^n + 1 are used
// instead. The core and X outputs are compared with floor(X/2^n) and X. The
// harness also runs a bit-level model of the operand vectors and adder
// stages, fed with the same residues, to count the events that exercise each
// part of the datapath:
// the residue x3 = 2^n, an end-around carry in each CSA layer, the
// end-around carry of the final adder, the all-ones-to-zero mapping, and the
// two redundant residue encodings. Results go out on the ports when done
// rises.
module r2b_check #(
  parameter int unsigned N          = 3,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int unsigned NRAND      = 1000
) (
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   events [8]   // see EV_* below
);

  localparam int EV_X3_TOP   = 0;
  localparam int EV_EAC_L1   = 1;
  localparam int EV_EAC_L2   = 2;
  localparam int EV_EAC_L3   = 3;
  localparam int EV_CPA_EAC  = 4;
  localparam int EV_ZERO_FIX = 5;
  localparam int EV_X1_ALT   = 6;
  localparam int EV_X3_ALT   = 7;

  localparam longint unsigned M1 = (64'd1 << N) - 1;
  localparam longint unsigned M2 = 64'd1 << N;
  localparam longint unsigned M3 = (64'd1 << N) + 1;
  localparam longint unsigned M  = M1 * M2 * M3;

  logic [N-1:0]   x1, x2;
  logic [N:0]     x3;
  logic [2*N-1:0] core;
  logic [3*N-1:0] x;

  r2b_converter #(.N(N)) dut (.x1, .x2, .x3, .core, .x);

  // Bit-level model of the operand vectors and adder stages, used only to
  // tell which datapath events a given input exercises.
  localparam int unsigned W = 2 * N;
  localparam longint unsigned WM = (64'd1 << W) - 1;
  localparam longint unsigned NM = (64'd1 << N) - 1;

  function automatic longint unsigned rot1(longint unsigned v);
    return ((v << 1) & WM) | (v >> (W - 1));
  endfunction

  task automatic csa_model(input longint unsigned a, b, c, input int ev,
                           output longint unsigned s, k);
    longint unsigned maj;
    maj = (a & b) | (a & c) | (b & c);
    if (maj[W-1]) events[ev]++;
    s = a ^ b ^ c;
    k = rot1(maj);
  endtask

  task automatic count_datapath_events(longint unsigned r1, r2, r3);
    longint unsigned oa, ob, oc, od, oe, s, k, t;
    if (r3 == M2) events[EV_X3_TOP]++;
    oa = ((r1 & 1) << (W - 1)) | (r1 << (N - 1)) | (r1 >> 1);
    ob = ((~r2 & NM) << N) | NM;
    oc = ((~r3 & 1) << (W - 1)) | ((64'd1 << (W - 1)) - 1);
    od = r3 << (N - 1);
    oe = (NM << N) | (~(r3 >> 1) & NM);
    csa_model(oa, ob, oc, EV_EAC_L1, s, k);
    csa_model(s, k, od, EV_EAC_L2, s, k);
    csa_model(s, k, oe, EV_EAC_L3, s, k);
    t = s + k;
    if (t > WM) begin
      events[EV_CPA_EAC]++;
      t = (t & WM) + 1;
    end
    if (t == WM) events[EV_ZERO_FIX]++;
  endtask

  task automatic apply(longint unsigned xv);
    longint unsigned r1, r3;
    r1 = xv % M1;
    r3 = xv % M3;
    if (r1 == 0 && $urandom_range(1) == 1) begin
      r1 = M1;
      events[EV_X1_ALT]++;
    end
    if (r3 + M3 < (64'd1 << (N + 1)) && $urandom_range(3) == 0) begin
      r3 = r3 + M3;
      events[EV_X3_ALT]++;
    end
    x1 = N'(r1);
    x2 = N'(xv % M2);
    x3 = (N+1)'(r3);
    #1;
    count_datapath_events(longint'(x1), longint'(x2), longint'(x3));
    checks += 2;
    if (longint'(core) != longint'(xv >> N)) failures++;
    if (longint'(x) != longint'(xv)) begin
      failures++;
      if (failures < 10)
        $display("FAIL n=%0d X=%0d residues=(%0d,%0d,%0d) got %0d", N, xv, x1, x2, x3, x);
    end
  endtask

  initial begin
    done = 1'b0;
    checks = 0;
    failures = 0;
    foreach (events[i]) events[i] = 0;
    x1 = '0; x2 = '0; x3 = '0;
    wait (start);
    if (EXHAUSTIVE) begin
      for (longint unsigned v = 0; v < M; v++) apply(v);
    end else begin
      apply(0);
      apply(M - 1);
      apply(M2);            // x3 = 2^n - 1, core 1
      apply(M - M2);        // the largest core
      for (int unsigned t = 0; t < NRAND; t++)
        apply({$urandom, $urandom} % M);
      // multiples of 2^n-1, where x1 may take its all-ones encoding
      for (int unsigned t = 0; t < 64; t++)
        apply(({$urandom, $urandom} % (M / M1)) * M1);
      // values whose residue modulo 2^n+1 is 2^n
      for (int unsigned t = 0; t < 64; t++) begin
        longint unsigned v;
        v = ({$urandom, $urandom} % (M / M3)) * M3 + M2;
        if (v < M) apply(v);
      end
    end
    done = 1'b1;
  end

endmodule
