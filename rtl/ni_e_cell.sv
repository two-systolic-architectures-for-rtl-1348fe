// Non-interlaced architecture, E-cell: cell 1, the F-cell modified for the
// quotient precomputation.
//
// It computes (P_i)_2, (P_i)_1 and the R bits (R_i)_0 and (R_i)_-1 exactly
// as an F-cell does (see ni_f_cell).  (R_i)_-1 is the bit that the division
// by two drops and is always zero; (CR_i)_{-1} is zero.  In addition it
// hands the D-cell, in the same clock, the three values from which the D-cell
// rebuilds (R_{i-1})_0 of the iteration this cell is finishing:
//   r_nb_exp = (R_{i-2})_1 as used here (zero on iteration 0),
//   p1_exp   = (P_{i-1})_1, formed in this cell this clock,
//   cr0_exp  = (CR_{i-1})_0, the carry out of the R bit-0 position.
// Timing and registers are those of the F-cell.  Which values are exported
// follows the architecture; the tag gating is this design's choice.
module ni_e_cell
  import mm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_in,
  input  logic       q_in,
  input  tag_t       tag_in,
  input  logic       cp_in,     // (CP_i)_0
  input  logic       p_lo_in,   // (P_i)_0
  input  logic       r_nb_in,   // (R_{i-1})_1, from cell 2, same clock
  input  logic [1:0] b_hi,      // b_2 of slot 0 and slot 1
  input  logic [1:0] b_lo,      // b_1
  input  logic [1:0] n_hi,
  input  logic [1:0] n_lo,
  output logic       a_out,
  output logic       q_out,
  output tag_t       tag_out,
  output logic       cp_out,    // (CP_i)_1
  output logic       p_hi_out,  // (P_i)_2
  output logic       cr_out,    // (CR_i)_0 pair carry (into R bit 1)
  output logic       r_lo_out,  // (R_i)_-1, combinational, always 0
  output logic       r_hi,      // (R_i)_0, registered
  output logic       r_nb_exp,
  output logic       p1_exp,
  output logic       cr0_exp
);

  logic       mask;
  logic [3:0] p_sum, r_sum;

  always_comb begin
    mask  = tag_in.valid & ~tag_in.first;
    p_sum = pair_add(a_in & b_hi[tag_in.slot], q_in & n_hi[tag_in.slot],
                     a_in & b_lo[tag_in.slot], q_in & n_lo[tag_in.slot], cp_in);
    r_sum = pair_add(r_nb_in & mask, p_sum[1], r_hi & mask, p_lo_in, 1'b0);
    r_lo_out = r_sum[1];
    r_nb_exp = r_nb_in & mask;
    p1_exp   = p_sum[1];
    cr0_exp  = r_sum[0];
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
    end else begin
      a_out    <= a_in;
      q_out    <= q_in;
      tag_out  <= tag_in;
      cp_out   <= p_sum[3];
      p_hi_out <= p_sum[2];
      cr_out   <= r_sum[3] & tag_in.valid;
      if (tag_in.valid) r_hi <= r_sum[2];
    end
  end

endmodule
