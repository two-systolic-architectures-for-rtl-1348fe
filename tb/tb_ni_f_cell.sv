// Self-checking test of the non-interlaced general F-cell with random inputs every
// clock.  Expected values come from integer sums of the two pair equations:
//   psum = 2(a b_hi + q n_hi) + a b_lo + q n_lo + cp_in   -> CP, P_hi, P_lo
//   rsum = 2 r_nb + 2 P_lo + r_own + p_lo_in + cr_in        -> CR, R_hi, R_lo
// with the R inputs zero on iteration 0.  R_lo is checked combinationally in
// the same clock, the rest one clock later; R registers hold on idle tags.
module tb_ni_f_cell;
  import mm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic a_in = 0, q_in = 0, cp_in = 0, p_lo_in = 0, r_nb_in = 0;
  logic cr_in = 0;
  tag_t tag_in = TAG_IDLE;
  logic [1:0] b_hi = 0, b_lo = 0, n_hi = 0, n_lo = 0;
  logic a_out, q_out, cp_out, p_hi_out, cr_out, r_lo_out, r_hi;
  logic res_lo;
  tag_t tag_out;
  int checks = 0, failures = 0;

  ni_f_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic mask, prev_hi, prev_lo, own, c0;
    int s, psum, rsum;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev_hi = 0; prev_lo = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      {a_in, q_in, cp_in, p_lo_in, r_nb_in} = 5'($urandom);
      cr_in = 1'($urandom);
      {b_hi, b_lo, n_hi, n_lo} = 8'($urandom);
      tag_in = tag_t'($urandom);
      s = tag_in.slot;
      mask = tag_in.valid & ~tag_in.first;
      psum = 2 * (int'(a_in & b_hi[s]) + int'(q_in & n_hi[s]))
             + int'(a_in & b_lo[s]) + int'(q_in & n_lo[s]) + int'(cp_in);
      own = prev_hi & mask;
      c0 = (int'(own) + int'(p_lo_in) + int'(cr_in)) >= 2;
      rsum = 2 * (int'(r_nb_in & mask) + (psum & 1)) + int'(own) + int'(p_lo_in) + int'(cr_in);
      #1;
      checks++;
      if (r_lo_out !== rsum[0]) failures++;
      
      @(posedge clk); #1;
      checks++;
      if (cp_out !== psum[2] || p_hi_out !== psum[1] || tag_out !== tag_in || a_out !== a_in
          || q_out !== q_in || cr_out !== (tag_in.valid & rsum[2])
          || r_hi !== (tag_in.valid ? rsum[1] : prev_hi) || res_lo !== (tag_in.valid ? rsum[0] : prev_lo)) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d", k);
      end
      if (tag_in.valid) prev_hi = rsum[1];
      if (tag_in.valid) prev_lo = rsum[0];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
