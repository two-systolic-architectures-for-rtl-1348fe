// Double-layer architecture, lower-layer C-cell of bit j.
//
// Adds the partial product to the previous partial result and shifts by one
// place in the same step:
//   (R_i)_{j-1} + 2(CR_i)_j = (R_{i-1})_j + (P_i)_j + (CR_i)_{j-1}.
// (P_i)_j and the tag come registered from the B- (or A-) cell of the same
// bit, (CR_i)_{j-1} from the C-cell of bit j-1 and (R_{i-1})_j from the
// C-cell of bit j+1, all one clock old.  The C-cell works one clock after the
// upper cell of its bit.
//
// r_q holds the newest valid (R_i)_{j-1}; it only changes on a valid tag, so
// after the last iteration it keeps the result bit.  On iteration 0 the
// incoming R bit is forced to zero (R_{-1} = 0); r_eff exposes that masked
// value, which the A-cell needs when this is the cell of bit 1.  The equation
// is the architecture's; the tag gating is this design's choice.
module dl_c_cell
  import mm_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic r_in,    // (R_{i-1})_j
  input  logic p_in,    // (P_i)_j
  input  logic cr_in,   // (CR_i)_{j-1}
  input  tag_t tag_in,
  output logic r_eff,   // (R_{i-1})_j after the iteration-0 mask
  output logic r_q,     // (R_i)_{j-1}
  output logic cr_out,  // (CR_i)_j
  output tag_t tag_out
);

  logic [1:0] sum;

  always_comb begin
    r_eff = r_in & tag_in.valid & ~tag_in.first;
    sum   = fa(r_eff, p_in, cr_in);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      r_q     <= 1'b0;
      cr_out  <= 1'b0;
      tag_out <= TAG_IDLE;
    end else begin
      tag_out <= tag_in;
      cr_out  <= sum[1] & tag_in.valid;
      if (tag_in.valid) r_q <= sum[0];
    end
  end

endmodule
