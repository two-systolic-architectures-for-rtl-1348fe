// Self-checking test of the double-layer C-cell: random inputs every clock.
// For a valid tag the registered R bit and carry must be the sum bits of
// (R_{i-1})_j + (P_i)_j + (CR_i)_{j-1}, with the R input taken as zero on
// iteration 0; for an idle tag the R bit must hold and the carry be zero.
module tb_dl_c_cell;
  import mm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic r_in = 0, p_in = 0, cr_in = 0;
  tag_t tag_in = TAG_IDLE;
  logic r_eff, r_q, cr_out;
  tag_t tag_out;
  int checks = 0, failures = 0;

  dl_c_cell dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic r_used, exp_r, exp_cr, prev_r;
    int sum;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    prev_r = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      {r_in, p_in, cr_in} = 3'($urandom);
      tag_in = tag_t'($urandom);
      r_used = (tag_in.valid && !tag_in.first) ? r_in : 1'b0;
      sum = int'(r_used) + int'(p_in) + int'(cr_in);
      #1;
      checks++;
      if (r_eff !== r_used) failures++;
      exp_r  = tag_in.valid ? sum[0] : prev_r;
      exp_cr = tag_in.valid ? sum[1] : 1'b0;
      @(posedge clk); #1;
      checks++;
      if (r_q !== exp_r || cr_out !== exp_cr || tag_out !== tag_in) begin
        failures++;
        if (failures < 5) $display("mismatch at %0d: r %b/%b cr %b/%b", k, r_q, exp_r, cr_out, exp_cr);
      end
      prev_r = exp_r;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
