// Double-layer architecture, A-cell: the upper cell of bit 0, with the
// quotient precomputation.
//
// Without precomputation q_i would have to wait for (R_{i-1})_0, which
// leaves the array four clocks per iteration.  The A-cell instead rebuilds
// (R_{i-1})_0 from the three operands the C-cell of bit 1 is adding in the
// same clock, (R_{i-2})_1 + (P_{i-1})_1 + (CR_{i-1})_0, and forms
//   q_i      = a_i*b_0 xor (R_{i-1})_0
//   (P_i)_0  = a_i*b_0 xor q_i*n_0
//   (CP_i)_0 = a_i*b_0 and q_i*n_0
// so that a new iteration can enter every second clock.
//
// Interface: a_in/tag_in come from the controller; r1, p1 and cr0 are the
// operands of the bit-1 C-cell (r1 already forced to zero when that cell
// works on iteration 0).  On iteration 0 (tag first) R_{-1} = 0 and q_0 is
// a_0*b_0.  Outputs are registered (one clock).  Idle tokens (tag not valid)
// produce zero q, P and CP.  The precomputation follows the architecture; the
// tag handling is this design's choice.
module dl_a_cell
  import mm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       a_in,
  input  tag_t       tag_in,
  input  logic [1:0] b0,     // b_0 of slot 0 and slot 1
  input  logic [1:0] n0,     // n_0 of slot 0 and slot 1
  input  logic       r1,     // (R_{i-2})_1
  input  logic       p1,     // (P_{i-1})_1
  input  logic       cr0,    // (CR_{i-1})_0
  output logic       a_out,
  output logic       q_out,
  output tag_t       tag_out,
  output logic       cp_out, // (CP_i)_0
  output logic       p_out   // (P_i)_0
);

  logic a, ab0, q, qn0;

  always_comb begin
    a   = a_in & tag_in.valid;
    ab0 = a & b0[tag_in.slot];
    q   = tag_in.valid & q_pre(ab0, r1, p1, cr0, tag_in.first);
    qn0 = q & n0[tag_in.slot];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_out   <= 1'b0;
      q_out   <= 1'b0;
      tag_out <= TAG_IDLE;
      cp_out  <= 1'b0;
      p_out   <= 1'b0;
    end else begin
      a_out   <= a;
      q_out   <= q;
      tag_out <= tag_in;
      cp_out  <= ab0 & qn0;
      p_out   <= ab0 ^ qn0;
    end
  end

endmodule
