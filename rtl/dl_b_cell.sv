// Double-layer architecture, upper-layer B-cell (bit j >= 1).
//
// Computes one bit of the partial product P_i = a_i*B + q_i*N with a full
// adder:  (P_i)_j + 2(CP_i)_j = a_i*b_j + q_i*n_j + (CP_i)_{j-1}.
// The carry comes registered from the cell of bit j-1, which worked on the
// same iteration one clock earlier; a_i, q_i and the tag are passed on to bit
// j+1 through registers, so an iteration moves one bit per clock.
//
// Interface: b and n carry the operand bits b_j and n_j of both operand
// slots; the tag's slot field picks one.  All outputs are registered, so the
// cell has a latency of one clock and its combinational path is one AND
// layer plus one full adder.  The slot selection is this design's choice; the
// equation and the cell's neighbours are those of the architecture.
module dl_b_cell
  import mm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_in,
  input  logic       q_in,
  input  tag_t       tag_in,
  input  logic       cp_in,   // (CP_i)_{j-1}
  input  logic [1:0] b,       // b_j of slot 0 and slot 1
  input  logic [1:0] n,       // n_j of slot 0 and slot 1
  output logic       a_out,
  output logic       q_out,
  output tag_t       tag_out,
  output logic       cp_out,  // (CP_i)_j
  output logic       p_out    // (P_i)_j
);

  logic [1:0] sum;

  always_comb sum = fa(a_in & b[tag_in.slot], q_in & n[tag_in.slot], cp_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_out   <= 1'b0;
      q_out   <= 1'b0;
      tag_out <= TAG_IDLE;
      cp_out  <= 1'b0;
      p_out   <= 1'b0;
    end else begin
      a_out   <= a_in;
      q_out   <= q_in;
      tag_out <= tag_in;
      cp_out  <= sum[1];
      p_out   <= sum[0];
    end
  end

endmodule
