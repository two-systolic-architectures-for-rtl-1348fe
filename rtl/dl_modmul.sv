// Montgomery modular multiplier built on the double-layer systolic array.
//
// Computes R = A*B*2^-M mod N (possibly plus N, so R < 2N) for odd N,
// A < 2^M and B < N.  The array takes a new iteration every second clock;
// this controller fills the free clocks with a second, independent
// multiplication.  It has two operand slots: slot 0 issues its multiplier
// bits a_i on even clocks and slot 1 on odd clocks, so two jobs run
// interleaved through the same cells.
//
// Interface: when ready[slot] is high, a one-clock start pulse loads A, B and
// N into that slot (a start to a busy slot is ignored).  The slot then issues
// a_0 .. a_{M-1}, one every second clock, starting at the first clock of its
// parity after the load.  As the last iteration passes each cell its result
// bit is copied into result[slot]; when the top cell is done, done[slot]
// pulses for one clock and ready[slot] returns.  Issue takes 2M clocks and
// a job takes about 3M clocks from start to done (the last iteration still
// has to cross the M+2 cells).  result[slot] stays valid until that slot's
// next job finishes.
//
// The slot scheme, start/done handshake and result capture are this
// design's own; the array and its timing follow the architecture.
module dl_modmul
  import mm_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              slot,
  input  logic [M-1:0]      a,
  input  logic [M-1:0]      b,
  input  logic [M-1:0]      n,
  output logic [1:0]        ready,
  output logic [1:0]        done,
  output logic [1:0][M:0]   result
);

  localparam int unsigned CW = $clog2(M + 1);

  logic              phase;          // slot allowed to issue this clock
  logic [1:0]        busy, issuing;
  logic [1:0][M-1:0] a_sh, b_r, n_r;
  logic [1:0][CW-1:0] idx;
  logic              a_in;
  tag_t              tag_in;
  logic [M+1:0]      r_q;
  tag_t [M+1:0]      r_tag;

  assign ready = ~busy;

  // Issue: the slot whose parity matches this clock sends its next bit.
  always_comb begin
    a_in   = 1'b0;
    tag_in = TAG_IDLE;
    if (issuing[phase]) begin
      a_in   = a_sh[phase][0];
      tag_in = '{valid: 1'b1,
                 first: (idx[phase] == '0),
                 last:  (idx[phase] == CW'(M - 1)),
                 slot:  phase};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= 1'b0;
      busy    <= '0;
      issuing <= '0;
      done    <= '0;
      idx     <= '0;
      a_sh    <= '0;
      b_r     <= '0;
      n_r     <= '0;
      result  <= '0;
    end else begin
      phase <= ~phase;
      done  <= '0;
      for (int s = 0; s < 2; s++) begin
        if (issuing[s] && phase == 1'(s)) begin
          a_sh[s] <= a_sh[s] >> 1;
          idx[s]  <= idx[s] + 1'b1;
          if (idx[s] == CW'(M - 1)) issuing[s] <= 1'b0;
        end
        // Result capture: cell j holds bit j-1 once the last iteration passed.
        for (int j = 1; j <= M + 1; j++) begin
          if (r_tag[j].valid && r_tag[j].last && r_tag[j].slot == 1'(s)) result[s][j-1] <= r_q[j];
        end
        if (r_tag[M+1].valid && r_tag[M+1].last && r_tag[M+1].slot == 1'(s)) begin
          busy[s] <= 1'b0;
          done[s] <= 1'b1;
        end
        if (start && !busy[s] && slot == 1'(s)) begin
          busy[s]    <= 1'b1;
          issuing[s] <= 1'b1;
          idx[s]     <= '0;
          a_sh[s]    <= a;
          b_r[s]     <= b;
          n_r[s]     <= n;
        end
      end
    end
  end

  dl_array #(.M(M)) u_array (
    .clk, .rst_n,
    .a_in, .tag_in,
    .b(b_r), .n(n_r),
    .r_q, .r_tag
  );

  // Modulus must be odd for Montgomery reduction.
  a_n_odd: assert property (@(posedge clk) disable iff (!rst_n)
                            (start && !busy[slot]) |-> n[0]);

endmodule
