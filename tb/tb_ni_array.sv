// Self-checking test of the non-interlaced array with a small, odd operand
// width.  The test bench feeds one iteration per clock, job after job with
// no idle clock between them and the operand slot alternating, then a few
// jobs with idle clocks in between.  Result bits are collected from each cell
// as the last iteration passes and compared with the bit-serial Montgomery
// recurrence computed on integers.  The array's (R_i)_-1 = 0 assertion runs
// throughout.
module tb_ni_array;
  import mm_pkg::*;

  localparam int M = 15;
  localparam int J = (M + 3) / 2;

  logic clk = 0, rst_n = 0;
  logic a_in = 0;
  tag_t tag_in = TAG_IDLE;
  logic [1:0][M-1:0] b = '0, n = '0;
  logic [J:1] r_hi, r_lo;
  tag_t [J:1] c_tag;
  logic [1:0][M:0] res;
  int fin_cnt [2];
  int checks = 0, failures = 0;

  ni_array #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int j = 1; j <= J; j++)
      if (c_tag[j].valid && c_tag[j].last) begin
        if (2 * j - 2 <= M) res[c_tag[j].slot][2*j-2] <= r_hi[j];
        if (j >= 2 && 2 * j - 3 <= M) res[c_tag[j].slot][2*j-3] <= r_lo[j];
      end
    if (c_tag[J].valid && c_tag[J].last) fin_cnt[c_tag[J].slot] <= fin_cnt[c_tag[J].slot] + 1;
  end

  function automatic longint mont(input longint a, input longint bb, input longint nn);
    longint r = 0;
    for (int i = 0; i < M; i++) begin
      longint t = r + (((a >> i) & 1) != 0 ? bb : 0);
      r = (t + ((t & 1) != 0 ? nn : 0)) >> 1;
    end
    return r;
  endfunction

  longint av[2], bv[2], nv[2];
  bit     pend[2];

  task automatic check_slot(input int s);
    checks++;
    if (longint'(res[s]) != mont(av[s], bv[s], nv[s])) begin
      failures++;
      $display("slot %0d: got %0d exp %0d", s, res[s], mont(av[s], bv[s], nv[s]));
    end
  endtask

  // Issue job k into slot k%2 over M consecutive clocks; 'gap' idle clocks before.
  task automatic issue(input int s, input int gap);
    repeat (gap) begin @(negedge clk); a_in = 0; tag_in = TAG_IDLE; end
    nv[s] = longint'($urandom_range(32767, 16384)) | 1;
    bv[s] = longint'($urandom) % nv[s];
    av[s] = longint'($urandom_range(32767, 0));
    for (int i = 0; i < M; i++) begin
      @(negedge clk);
      if (i == 0) begin b[s] = M'(bv[s]); n[s] = M'(nv[s]); end
      a_in = av[s][i];
      tag_in = '{valid: 1'b1, first: (i == 0), last: (i == M - 1), slot: 1'(s)};
    end
  endtask

  initial begin
    int want [2];
    res = '0; fin_cnt[0] = 0; fin_cnt[1] = 0; want[0] = 0; want[1] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 60; k++) begin
      int s;
      s = k % 2;
      // The previous job of this slot must be checked before its operands change.
      if (k >= 2) begin
        while (fin_cnt[s] < want[s]) @(negedge clk);
        check_slot(s);
      end
      issue(s, (k >= 40) ? int'($urandom_range(3, 0)) : 0);
      want[s]++;
    end
    @(negedge clk); a_in = 0; tag_in = TAG_IDLE;
    for (int s = 0; s < 2; s++) begin
      while (fin_cnt[s] < want[s]) @(negedge clk);
      check_slot(s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
