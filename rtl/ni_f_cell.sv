// Non-interlaced architecture, general F-cell j (j >= 2).
//
// Works on two bits at once.  For iteration i it forms bits 2j and 2j-1 of
// P_i = a_i*B + q_i*N,
//   4(CP_i)_j + 2(P_i)_2j + (P_i)_2j-1
//       = 2(a_i b_2j + q_i n_2j) + a_i b_2j-1 + q_i n_2j-1 + (CP_i)_{j-1},
// and bits 2j-2 and 2j-3 of R_i = (R_{i-1} + P_i)/2,
//   4(CR_i)_{j-1} + 2(R_i)_2j-2 + (R_i)_2j-3
//       = 2(R_{i-1})_2j-1 + 2(P_i)_2j-1 + (R_{i-1})_2j-2 + (P_i)_2j-2 + (CR_i)_{j-2}.
// Cell j+1 runs one iteration behind cell j, so (R_{i-1})_2j-1 is the low R
// bit cell j+1 computes in the same clock.  That bit depends on registers
// only (first half of the clock); this cell's high bit then uses it (second
// half).  There is no register on that path, which is what lets an iteration
// enter every clock.
//
// Registered (one clock): a, q, tag, CP and (P_i)_2j to cell j+1, the
// pair carry CR to cell j+1, and r_hi = (R_i)_2j-2, which this cell reads
// back as (R_{i-1})_2j-2 on the next iteration.  r_lo_out = (R_i)_2j-3 is
// combinational, for cell j-1.  res_lo keeps a registered copy of it for
// result read-out, a register of this design's own.  r_hi and res_lo
// change only on valid tags; on iteration 0 both R_{-1} inputs are zero.
module ni_f_cell
  import mm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_in,
  input  logic       q_in,
  input  tag_t       tag_in,
  input  logic       cp_in,     // (CP_i)_{j-1}
  input  logic       p_lo_in,   // (P_i)_2j-2, from cell j-1
  input  logic       cr_in,     // (CR_i)_{j-2}
  input  logic       r_nb_in,   // (R_{i-1})_2j-1, from cell j+1, same clock
  input  logic [1:0] b_hi,      // b_2j   of slot 0 and slot 1
  input  logic [1:0] b_lo,      // b_2j-1 of slot 0 and slot 1
  input  logic [1:0] n_hi,
  input  logic [1:0] n_lo,
  output logic       a_out,
  output logic       q_out,
  output tag_t       tag_out,
  output logic       cp_out,    // (CP_i)_j
  output logic       p_hi_out,  // (P_i)_2j
  output logic       cr_out,    // (CR_i)_{j-1}
  output logic       r_lo_out,  // (R_i)_2j-3, combinational
  output logic       r_hi,      // (R_i)_2j-2, registered
  output logic       res_lo     // (R_i)_2j-3, registered
);

  logic       mask;
  logic [3:0] p_sum, r_sum;

  always_comb begin
    mask  = tag_in.valid & ~tag_in.first;
    p_sum = pair_add(a_in & b_hi[tag_in.slot], q_in & n_hi[tag_in.slot],
                     a_in & b_lo[tag_in.slot], q_in & n_lo[tag_in.slot], cp_in);
    // p_sum[1] = (P_i)_2j-1 feeds the R adder inside the same cell.
    r_sum = pair_add(r_nb_in & mask, p_sum[1], r_hi & mask, p_lo_in, cr_in);
    r_lo_out = r_sum[1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_out    <= 1'b0;
      q_out    <= 1'b0;
      tag_out  <= TAG_IDLE;
      cp_out   <= 1'b0;
      p_hi_out <= 1'b0;
      cr_out   <= 1'b0;
      r_hi     <= 1'b0;
      res_lo   <= 1'b0;
    end else begin
      a_out    <= a_in;
      q_out    <= q_in;
      tag_out  <= tag_in;
      cp_out   <= p_sum[3];
      p_hi_out <= p_sum[2];
      cr_out   <= r_sum[3] & tag_in.valid;
      if (tag_in.valid) begin
        r_hi   <= r_sum[2];
        res_lo <= r_sum[1];
      end
    end
  end

endmodule
