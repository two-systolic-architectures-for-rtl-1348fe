// Workload test: 1024-bit modular exponentiation on both multipliers.
//
// The multipliers have no exponentiation control, so this test bench plays
// that role.  It runs right-to-left square-and-multiply in the Montgomery
// domain: for each exponent bit, from the least significant, P = P*S if the
// bit is 1 and S = S*S, both from the same old S.  The two products are
// independent, so they are started into slot 0 and slot 1 together: on the
// double-layer multiplier they run interleaved, on the non-interlaced one
// back to back.  Each result, which is below 2N, is brought below N by one
// subtraction before reuse.  Entry into the Montgomery domain (x*2^M mod N)
// uses wide arithmetic here; the exit, a multiplication by 1, runs on the
// multiplier.  The final value is compared with x^e mod N from wide-integer
// arithmetic.  Exponents: 65537 and a random 40-bit value.  The clock count
// of each exponentiation is printed.
module tb_modexp_1024;
  import mm_pkg::*;

  localparam int unsigned M = M_DEFAULT;
  localparam int unsigned W = 2 * M + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dl_start = 0, dl_slot = 0, ni_start = 0, ni_slot = 0;
  logic [M-1:0] dl_a = '0, dl_b = '0, dl_n = '0, ni_a = '0, ni_b = '0, ni_n = '0;
  logic [1:0] dl_ready, dl_done, ni_ready, ni_done;
  logic [1:0][M:0] dl_result, ni_result;

  int checks = 0, failures = 0;
  longint cyc = 0;

  modmul_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rand_wide();
    logic [M-1:0] v;
    for (int k = 0; k < M; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [M-1:0] reduce(input logic [M:0] r, input logic [M-1:0] n);
    return (r >= {1'b0, n}) ? M'(r - {1'b0, n}) : M'(r);
  endfunction

  // Two independent Montgomery products; do_p = 0 leaves slot 0 unused.
  task automatic dl_pair(input bit do_p, input logic [M-1:0] pa, input logic [M-1:0] pb,
                         input logic [M-1:0] sa, input logic [M-1:0] n,
                         output logic [M:0] pr, output logic [M:0] sr);
    bit g0, g1;
    @(negedge clk);
    if (do_p) begin
      dl_start = 1; dl_slot = 0; dl_a = pa; dl_b = pb; dl_n = n;
      @(negedge clk);
    end
    dl_start = 1; dl_slot = 1; dl_a = sa; dl_b = sa; dl_n = n;
    @(negedge clk);
    dl_start = 0;
    g0 = !do_p; g1 = 0;
    while (!(g0 && g1)) begin
      @(posedge clk); #1;
      if (dl_done[0]) g0 = 1;
      if (dl_done[1]) g1 = 1;
    end
    pr = dl_result[0]; sr = dl_result[1];
  endtask

  task automatic ni_pair(input bit do_p, input logic [M-1:0] pa, input logic [M-1:0] pb,
                         input logic [M-1:0] sa, input logic [M-1:0] n,
                         output logic [M:0] pr, output logic [M:0] sr);
    bit g0, g1;
    @(negedge clk);
    if (do_p) begin
      ni_start = 1; ni_slot = 0; ni_a = pa; ni_b = pb; ni_n = n;
      @(negedge clk);
    end
    ni_start = 1; ni_slot = 1; ni_a = sa; ni_b = sa; ni_n = n;
    @(negedge clk);
    ni_start = 0;
    g0 = !do_p; g1 = 0;
    while (!(g0 && g1)) begin
      @(posedge clk); #1;
      if (ni_done[0]) g0 = 1;
      if (ni_done[1]) g1 = 1;
    end
    pr = ni_result[0]; sr = ni_result[1];
  endtask

  task automatic modexp(input bit use_ni, input logic [M-1:0] x, input longint e, input int ebits,
                        input logic [M-1:0] n, input logic [M-1:0] expect_v);
    logic [M-1:0] p, s, one;
    logic [M:0] pr, sr;
    longint t0;
    one = '0; one[0] = 1'b1;
    // Montgomery domain entry: s = x*2^M mod N, p = 2^M mod N.
    s = M'((W'(x) << M) % W'(n));
    p = M'((W'(1) << M) % W'(n));
    t0 = cyc;
    for (int k = 0; k < ebits; k++) begin
      if (use_ni) ni_pair(e[k], p, s, s, n, pr, sr);
      else        dl_pair(e[k], p, s, s, n, pr, sr);
      if (e[k]) p = reduce(pr, n);
      s = reduce(sr, n);
    end
    // Exit from the Montgomery domain: p*1 in slot 0 (slot 1 squares p, unused).
    if (use_ni) ni_pair(1'b1, p, one, p, n, pr, sr);
    else        dl_pair(1'b1, p, one, p, n, pr, sr);
    p = reduce(pr, n);
    $display("%s: %0d-bit exponent, %0d clocks", use_ni ? "non-interlaced" : "double-layer",
             ebits, cyc - t0);
    checks++;
    if (p !== expect_v) begin
      failures++;
      $display("%s: wrong x^e mod N", use_ni ? "non-interlaced" : "double-layer");
    end
  endtask

  function automatic logic [M-1:0] ref_modexp(input logic [M-1:0] x, input longint e,
                                              input logic [M-1:0] n);
    logic [W-1:0] r, b;
    r = 1; b = W'(x) % W'(n);
    for (int k = 0; k < 64; k++) begin
      if (e[k]) r = (r * b) % W'(n);
      b = (b * b) % W'(n);
    end
    return M'(r);
  endfunction

  initial begin
    logic [M-1:0] n, x, ev;
    longint e [2];
    int eb [2];
    e[0] = 65537; eb[0] = 17;
    e[1] = (longint'($urandom) << 8) | longint'($urandom_range(255, 0)) | (longint'(1) << 39);
    eb[1] = 40;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 2; t++) begin
      n = rand_wide(); n[0] = 1'b1; n[M-1] = 1'b1;
      x = rand_wide() % n;
      ev = ref_modexp(x, e[t], n);
      fork
        modexp(1'b0, x, e[t], eb[t], n, ev);
        modexp(1'b1, x, e[t], eb[t], n, ev);
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
