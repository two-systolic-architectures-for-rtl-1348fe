// Self-checking test of the double-layer B-cell: random inputs every clock;
// one clock later P and CP must equal the bits of a*b_j + q*n_j + cp for the
// slot in the tag, and a, q and the tag must have moved on unchanged.
module tb_dl_b_cell;
  import mm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic a_in = 0, q_in = 0, cp_in = 0;
  tag_t tag_in = TAG_IDLE;
  logic [1:0] b = 0, n = 0;
  logic a_out, q_out, cp_out, p_out;
  tag_t tag_out;
  int checks = 0, failures = 0;

  dl_b_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s;
    logic [1:0] exp_sum;
    tag_t exp_tag;
    logic exp_a, exp_q;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      {a_in, q_in, cp_in} = 3'($urandom);
      b = 2'($urandom); n = 2'($urandom);
      tag_in = tag_t'($urandom);
      s = tag_in.slot;
      exp_sum = 2'(int'(a_in & b[s]) + int'(q_in & n[s]) + int'(cp_in));
      exp_tag = tag_in; exp_a = a_in; exp_q = q_in;
      @(posedge clk); #1;
      checks++;
      if ({cp_out, p_out} !== exp_sum || tag_out !== exp_tag || a_out !== exp_a || q_out !== exp_q) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: got %b exp %b", k, {cp_out, p_out}, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
