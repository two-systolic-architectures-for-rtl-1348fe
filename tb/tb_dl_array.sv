// Self-checking test of the double-layer array with a small operand width.
// The test bench is its own controller: it feeds a_i with tags directly,
// one iteration every second clock per operand slot, with slot 0 and slot 1
// on alternate clocks (interleaved), and also single jobs with the other
// slot idle.  Result bits are collected from each cell as the last iteration
// passes and compared with the bit-serial Montgomery recurrence
//   q = (R + a_i B) mod 2,  R = (R + a_i B + q N) / 2
// computed on integers.  The array's (R_i)_-1 = 0 assertion runs throughout.
module tb_dl_array;
  import mm_pkg::*;

  localparam int M = 16;

  logic clk = 0, rst_n = 0;
  logic a_in = 0;
  tag_t tag_in = TAG_IDLE;
  logic [1:0][M-1:0] b = '0, n = '0;
  logic [M+1:0] r_q;
  tag_t [M+1:0] r_tag;
  logic [1:0][M:0] res;
  logic [1:0] fin;
  int checks = 0, failures = 0, interleaved = 0;

  dl_array #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    for (int j = 1; j <= M + 1; j++)
      if (r_tag[j].valid && r_tag[j].last) res[r_tag[j].slot][j-1] <= r_q[j];
    if (r_tag[M+1].valid && r_tag[M+1].last) fin[r_tag[M+1].slot] <= 1'b1;
  end

  function automatic longint mont(input longint a, input longint bb, input longint nn);
    longint r = 0;
    for (int i = 0; i < M; i++) begin
      longint t = r + (((a >> i) & 1) != 0 ? bb : 0);
      r = (t + ((t & 1) != 0 ? nn : 0)) >> 1;
    end
    return r;
  endfunction

  // use[s]: slot s carries a job this round.
  task automatic run_round(input bit use0, input bit use1);
    longint av[2], bv[2], nv[2];
    for (int s = 0; s < 2; s++) begin
      nv[s] = longint'($urandom_range(65535, 32768)) | 1;
      bv[s] = longint'($urandom) % nv[s];
      av[s] = longint'($urandom_range(65535, 0));
      b[s] = M'(bv[s]); n[s] = M'(nv[s]);
    end
    fin = 2'b00;
    for (int c = 0; c < 2 * M; c++) begin
      @(negedge clk);
      a_in = 0; tag_in = TAG_IDLE;
      if ((c % 2 == 0 && use0) || (c % 2 == 1 && use1)) begin
        a_in = av[c % 2][c / 2];
        tag_in = '{valid: 1'b1, first: (c / 2 == 0), last: (c / 2 == M - 1), slot: 1'(c % 2)};
      end
    end
    @(negedge clk); a_in = 0; tag_in = TAG_IDLE;
    while (fin != {use1, use0}) @(negedge clk);
    if (use0 && use1) interleaved++;
    for (int s = 0; s < 2; s++) begin
      if ((s == 0 && use0) || (s == 1 && use1)) begin
        checks++;
        if (longint'(res[s]) != mont(av[s], bv[s], nv[s])) begin
          failures++;
          $display("slot %0d: got %0d exp %0d", s, res[s], mont(av[s], bv[s], nv[s]));
        end
      end
    end
  endtask

  initial begin
    res = '0; fin = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 40; k++) run_round(1'b1, 1'b1);
    for (int k = 0; k < 10; k++) run_round(1'b1, 1'b0);
    for (int k = 0; k < 10; k++) run_round(1'b0, 1'b1);
    checks++;
    if (interleaved == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
