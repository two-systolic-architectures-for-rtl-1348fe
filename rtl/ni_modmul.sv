// Montgomery modular multiplier built on the non-interlaced systolic array.
//
// Computes R = A*B*2^-M mod N (possibly plus N, so R < 2N) for odd N,
// A < 2^M and B < N.  The array accepts an iteration every clock, so the
// controller issues a_0 .. a_{M-1} on M consecutive clocks.  Two operand
// slots let the next multiplication start on the clock right after the
// previous one issued its last bit, while that one still drains through the
// upper cells: back-to-back jobs see no idle clock at the array input.
//
// Interface: when ready[slot] is high, a one-clock start pulse loads A, B and
// N into that slot (a start to a busy slot is ignored).  A loaded slot issues
// as soon as the array input is free, on the clock after the load at the
// earliest; if both wait, the one that did not issue last goes first.  As the
// last iteration passes each cell its two result bits are copied into
// result[slot]; when the top cell is done, done[slot] pulses for one clock
// and ready[slot] returns.  A job issues for M clocks and is done about
// M + M/2 clocks after issue began.  result[slot] stays valid until that
// slot's next job finishes.
//
// The slot scheme, handshake and result capture are this design's own; the
// array and its one-iteration-per-clock timing follow the architecture.
module ni_modmul
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
  localparam int unsigned J  = (M + 3) / 2;

  logic              active;    // an issue is in progress
  logic              cur;       // slot being issued
  logic [1:0]        busy, pending;
  logic [1:0][M-1:0] a_sh, b_r, n_r;
  logic [CW-1:0]     idx;
  logic              a_in;
  tag_t              tag_in;
  logic [J:1]        r_hi, r_lo;
  tag_t [J:1]        c_tag;

  assign ready = ~busy;

  always_comb begin
    a_in   = 1'b0;
    tag_in = TAG_IDLE;
    if (active) begin
      a_in   = a_sh[cur][0];
      tag_in = '{valid: 1'b1, first: (idx == '0), last: (idx == CW'(M - 1)), slot: cur};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active  <= 1'b0;
      cur     <= 1'b0;
      busy    <= '0;
      pending <= '0;
      done    <= '0;
      idx     <= '0;
      a_sh    <= '0;
      b_r     <= '0;
      n_r     <= '0;
      result  <= '0;
    end else begin
      done <= '0;
      // Issue: one bit per clock; at the end, hand over to a waiting slot.
      if (active) begin
        for (int s = 0; s < 2; s++) if (cur == 1'(s)) a_sh[s] <= a_sh[s] >> 1;
        idx       <= idx + 1'b1;
        if (idx == CW'(M - 1)) begin
          active <= 1'b0;
          idx    <= '0;
          if (pending[~cur]) begin
            active        <= 1'b1;
            cur           <= ~cur;
            pending[~cur] <= 1'b0;
          end
        end
      end else if (pending != '0) begin
        active <= 1'b1;
        cur    <= pending[~cur] ? ~cur : cur;
        pending[pending[~cur] ? ~cur : cur] <= 1'b0;
        idx    <= '0;
      end
      // Result capture: cell j holds bits 2j-2 and 2j-3.
      for (int s = 0; s < 2; s++) begin
        for (int j = 1; j <= J; j++) begin
          if (c_tag[j].valid && c_tag[j].last && c_tag[j].slot == 1'(s)) begin
            if (2 * j - 2 <= M) result[s][2*j-2] <= r_hi[j];
            if (j >= 2 && 2 * j - 3 <= M) result[s][2*j-3] <= r_lo[j];
          end
        end
        if (c_tag[J].valid && c_tag[J].last && c_tag[J].slot == 1'(s)) begin
          busy[s] <= 1'b0;
          done[s] <= 1'b1;
        end
        if (start && !busy[s] && slot == 1'(s)) begin
          busy[s]    <= 1'b1;
          pending[s] <= 1'b1;
          a_sh[s]    <= a;
          b_r[s]     <= b;
          n_r[s]     <= n;
        end
      end
    end
  end

  ni_array #(.M(M)) u_array (
    .clk, .rst_n,
    .a_in, .tag_in,
    .b(b_r), .n(n_r),
    .r_hi, .r_lo, .c_tag
  );

  a_n_odd: assert property (@(posedge clk) disable iff (!rst_n)
                            (start && !busy[slot]) |-> n[0]);

endmodule
