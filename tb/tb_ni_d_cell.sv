// Self-checking test of the quotient-precomputing cell ni_d_cell: random inputs
// every clock.  One clock later q must be a*b_0 xor (R_{i-1})_0, with
// (R_{i-1})_0 rebuilt as r1 xor p1 xor cr0 (zero on iteration 0), P_0 and
// CP_0 must be the sum and carry of a*b_0 + q*n_0, and idle tags give zeros.
module tb_ni_d_cell;
  import mm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic a_in = 0, r1 = 0, p1 = 0, cr0 = 0;
  tag_t tag_in = TAG_IDLE;
  logic [1:0] b0 = 0, n0 = 0;
  logic a_out, q_out, cp_out, p_out;
  tag_t tag_out;
  int checks = 0, failures = 0;

  ni_d_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic ab, rprev, q, qn;
    int s, sum;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      {a_in, r1, p1, cr0} = 4'($urandom);
      b0 = 2'($urandom); n0 = 2'($urandom);
      tag_in = tag_t'($urandom);
      s = tag_in.slot;
      ab = a_in & b0[s] & tag_in.valid;
      // (R_{i-1})_0 is the sum bit of r1 + p1 + cr0.
      sum = int'(r1) + int'(p1) + int'(cr0);
      rprev = tag_in.first ? 1'b0 : sum[0];
      q = tag_in.valid ? (ab ^ rprev) : 1'b0;
      qn = q & n0[s];
      sum = int'(ab) + int'(qn);
      @(posedge clk); #1;
      checks++;
      if (q_out !== q || p_out !== sum[0] || cp_out !== sum[1] || tag_out !== tag_in
          || a_out !== (a_in & tag_in.valid)) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: q %b/%b p %b cp %b", k, q_out, q, p_out, cp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
