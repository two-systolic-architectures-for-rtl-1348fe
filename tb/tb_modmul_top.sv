// End-to-end test of both multipliers at the default operand width.
//
// Drives random and corner-case jobs (A < 2^M, B < N, odd N with its top bit
// set) into the double-layer and the non-interlaced multiplier and checks
// every result against wide-integer arithmetic: R < 2N and
// R*2^M mod N = A*B mod N.  It also checks the cycle counts the schedules
// imply: start-to-done is 3M+2 or 3M+3 clocks for the double-layer
// multiplier (one issue per two clocks, the +1 is the wait for the slot's
// clock parity) and M + (M+3)/2 + 2 for the non-interlaced one (one issue per
// clock).  Mechanisms counted, each of which must occur:
//   dl_interleave - both double-layer slots in flight in the same clocks,
//   dl_gap_issue  - a double-layer job issuing on alternate clocks,
//   ni_back2back  - a non-interlaced job issued on the clock right after the
//                   previous job's last bit (done pulses exactly M apart),
//   slot1_used    - a job run in operand slot 1 of each multiplier.
module tb_modmul_top;
  import mm_pkg::*;

  localparam longint M  = M_DEFAULT;
  localparam longint J  = (M + 3) / 2;
  localparam int unsigned W  = 2 * M_DEFAULT + 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dl_start = 0, dl_slot = 0, ni_start = 0, ni_slot = 0;
  logic [M_DEFAULT-1:0] dl_a = '0, dl_b = '0, dl_n = '0, ni_a = '0, ni_b = '0, ni_n = '0;
  logic [1:0] dl_ready, dl_done, ni_ready, ni_done;
  logic [1:0][M_DEFAULT:0] dl_result, ni_result;

  int checks = 0, failures = 0;
  int dl_interleave = 0, dl_gap_issue = 0, ni_back2back = 0, slot1_dl = 0, slot1_ni = 0;
  longint cyc = 0;

  modmul_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M_DEFAULT-1:0] rand_wide();
    logic [M_DEFAULT-1:0] v;
    for (int k = 0; k < M; k += 32) v[k +: 32] = $urandom;
    return v;
  endfunction

  function automatic logic [W-1:0] widen(input logic [M_DEFAULT:0] x);
    return W'(x);
  endfunction

  task automatic check_result(input string tag, input logic [M_DEFAULT-1:0] a, input logic [M_DEFAULT-1:0] b,
                              input logic [M_DEFAULT-1:0] n, input logic [M_DEFAULT:0] r);
    logic [W-1:0] lhs, rhs;
    lhs = (widen(r) << M) % W'(n);
    rhs = (W'(a) * W'(b)) % W'(n);
    checks++;
    if (lhs !== rhs || widen(r) >= 2 * W'(n)) begin
      failures++;
      $display("%s: wrong result (r<2N=%0d)", tag, widen(r) < 2 * W'(n));
    end
  endtask

  task automatic check_eq(input string what, input longint got, input longint lo, input longint hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      $display("%s: %0d not in [%0d,%0d]", what, got, lo, hi);
    end
  endtask

  // Operand sets: 0 random, 1 all-ones A and B = N-1, 2 A = 0, 3 A = 1 B = 1
  task automatic make_ops(input int kind, output logic [M_DEFAULT-1:0] a, output logic [M_DEFAULT-1:0] b,
                          output logic [M_DEFAULT-1:0] n);
    n = rand_wide();
    n[0] = 1'b1;
    n[M-1] = 1'b1;
    b = rand_wide() % n;
    a = rand_wide();
    case (kind)
      1: begin a = '1; b = n - 1'b1; end
      2: a = '0;
      3: begin a = 1; b = 1; end
      default: ;
    endcase
  endtask

  // ---------------- double-layer ----------------
  task automatic dl_run_pair(input int kind0, input int kind1);
    logic [M_DEFAULT-1:0] a0, b0, n0, a1, b1, n1;
    longint t0, t1, d0, d1;
    bit got0, got1;
    make_ops(kind0, a0, b0, n0);
    make_ops(kind1, a1, b1, n1);
    @(negedge clk);
    dl_start = 1; dl_slot = 0; dl_a = a0; dl_b = b0; dl_n = n0;
    @(posedge clk); #1 t0 = cyc;
    @(negedge clk);
    dl_slot = 1; dl_a = a1; dl_b = b1; dl_n = n1;
    @(posedge clk); #1 t1 = cyc;
    @(negedge clk);
    dl_start = 0;
    checks++;
    if (dl_ready != 2'b00) begin failures++; $display("dl: ready not cleared"); end
    got0 = 0; got1 = 0;
    while (!(got0 && got1)) begin
      @(posedge clk); #1;
      if (dl_done[0]) begin got0 = 1; d0 = cyc; end
      if (dl_done[1]) begin got1 = 1; d1 = cyc; end
    end
    check_result("dl slot0", a0, b0, n0, dl_result[0]);
    check_result("dl slot1", a1, b1, n1, dl_result[1]);
    check_eq("dl latency slot0", d0 - t0, 3 * M + 2, 3 * M + 3);
    check_eq("dl latency slot1", d1 - t1, 3 * M + 2, 3 * M + 3);
    if (d0 - t0 >= 3 * M + 2) dl_gap_issue++;
    // Both jobs overlap almost completely: they share the array's clocks.
    if (d1 - d0 <= 2 && d0 - d1 <= 2) dl_interleave++;
    slot1_dl++;
  endtask

  // ---------------- non-interlaced ----------------
  task automatic ni_run_pair(input int kind0, input int kind1);
    logic [M_DEFAULT-1:0] a0, b0, n0, a1, b1, n1;
    longint t0, d0, d1;
    bit got0, got1;
    make_ops(kind0, a0, b0, n0);
    make_ops(kind1, a1, b1, n1);
    @(negedge clk);
    ni_start = 1; ni_slot = 0; ni_a = a0; ni_b = b0; ni_n = n0;
    @(posedge clk); #1 t0 = cyc;
    @(negedge clk);
    ni_slot = 1; ni_a = a1; ni_b = b1; ni_n = n1;
    @(posedge clk);
    @(negedge clk);
    ni_start = 0;
    got0 = 0; got1 = 0;
    while (!(got0 && got1)) begin
      @(posedge clk); #1;
      if (ni_done[0]) begin got0 = 1; d0 = cyc; end
      if (ni_done[1]) begin got1 = 1; d1 = cyc; end
    end
    check_result("ni slot0", a0, b0, n0, ni_result[0]);
    check_result("ni slot1", a1, b1, n1, ni_result[1]);
    check_eq("ni latency slot0", d0 - t0, M + J + 2, M + J + 2);
    check_eq("ni back-to-back spacing", d1 - d0, M, M);
    if (d1 - d0 == M) ni_back2back++;
    slot1_ni++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (dl_ready != 2'b11 || ni_ready != 2'b11) begin failures++; $display("not ready after reset"); end
    fork
      begin
        dl_run_pair(0, 1);
        dl_run_pair(2, 3);
        dl_run_pair(0, 0);
      end
      begin
        ni_run_pair(0, 1);
        ni_run_pair(2, 3);
        ni_run_pair(0, 0);
      end
    join
    $display("mechanisms: dl_interleave=%0d dl_gap_issue=%0d ni_back2back=%0d slot1 dl=%0d ni=%0d",
             dl_interleave, dl_gap_issue, ni_back2back, slot1_dl, slot1_ni);
    checks += 4;
    if (dl_interleave == 0) begin failures++; $display("dl interleave never seen"); end
    if (dl_gap_issue == 0)  begin failures++; $display("dl alternate-clock issue never seen"); end
    if (ni_back2back == 0)  begin failures++; $display("ni back-to-back never seen"); end
    if (slot1_dl == 0 || slot1_ni == 0) begin failures++; $display("slot 1 unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
