// Self-checking test of the non-interlaced multiplier: a job starts issuing on the clock after its
// start, or right after the job ahead of it has issued its M bits, and is
// done M + (M+3)/2 + 1 clocks after issue began.
// Jobs with random operands (odd N, B < N) are started at random clocks into
// whichever slot is ready, including starts to a busy slot, which must be
// ignored.  Every result is compared with the bit-serial Montgomery
// recurrence on integers, and every start-to-done time with the schedule.
module tb_ni_modmul;
  import mm_pkg::*;

  localparam int M = 30;

  logic clk = 0, rst_n = 0;
  logic start = 0, slot = 0;
  logic [M-1:0] a = '0, b = '0, n = '0;
  logic [1:0] ready, done;
  logic [1:0][M:0] result;
  int checks = 0, failures = 0, jobs = 0, dones = 0, busy_starts = 0, both_busy = 0;
  longint cyc = 0, last_issue = -1000;
  longint ev[2], t_start[2], lat_lo[2], lat_hi[2];

  ni_modmul #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint mont(input longint av, input longint bv, input longint nv);
    longint r = 0;
    for (int i = 0; i < M; i++) begin
      longint t = r + (((av >> i) & 1) != 0 ? bv : 0);
      r = (t + ((t & 1) != 0 ? nv : 0)) >> 1;
    end
    return r;
  endfunction

  // Done monitor.
  always @(posedge clk) begin
    #1;
    for (int s = 0; s < 2; s++) if (done[s]) begin
      dones++;
      checks += 2;
      if (longint'(result[s]) != ev[s]) begin
        failures++;
        $display("slot %0d: got %0d exp %0d", s, result[s], ev[s]);
      end
      if (cyc - t_start[s] < lat_lo[s] || cyc - t_start[s] > lat_hi[s]) begin
        failures++;
        $display("slot %0d: latency %0d not in [%0d,%0d]", s, cyc - t_start[s], lat_lo[s], lat_hi[s]);
      end
    end
    if (ready == 2'b00) both_busy++;
  end

  initial begin
    longint av, bv, nv, t, lo, hi, istart;
    int s;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    while (jobs < 200) begin
      @(negedge clk);
      start = 0;
      if ($urandom_range(3, 0) == 0) begin
        s = int'($urandom_range(1, 0));
        slot = 1'(s);
        nv = longint'($urandom_range(32'h3FFF_FFFF, 32'h2000_0000)) | 1;
        bv = longint'($urandom) % nv;
        av = longint'($urandom_range(32'h3FFF_FFFF, 0));
        a = M'(av); b = M'(bv); n = M'(nv);
        start = 1;
        if (ready[s]) begin
          jobs++;
          t = cyc + 1;
          istart = (t + 1 > last_issue + M) ? t + 1 : last_issue + M; last_issue = istart; lo = istart - t + M + (M + 3) / 2 + 1; hi = lo;
          ev[s] = mont(av, bv, nv); t_start[s] = t; lat_lo[s] = lo; lat_hi[s] = hi;
        end else begin
          busy_starts++;
        end
      end
    end
    @(negedge clk) start = 0;
    while (ready != 2'b11) @(negedge clk);
    repeat (3) @(negedge clk);
    checks += 3;
    if (dones != jobs) begin failures++; $display("%0d jobs but %0d done pulses", jobs, dones); end
    if (busy_starts == 0) begin failures++; $display("no start to a busy slot"); end
    if (both_busy == 0) begin failures++; $display("never two jobs in flight"); end
    $display("jobs=%0d ignored starts=%0d", jobs, busy_starts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
