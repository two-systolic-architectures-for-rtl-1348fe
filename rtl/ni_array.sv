// One-dimensional non-interlaced systolic array for radix-2 Montgomery
// multiplication.
//
// Cell 0 (D-cell) issues q_i and the low partial-product bit; cell j >= 1
// (E-cell for j = 1, F-cells above) forms P bits 2j and 2j-1 and R bits 2j-2
// and 2j-3 of one iteration per clock.  Iteration i is in cell j at clock
// t_i + j with t_{i+1} = t_i + 1: there is no idle clock between iterations.
// Cell j reads (R_{i-1})_2j-1 combinationally from cell j+1, which is one
// iteration behind it in the same clock; every other value between cells is
// registered.  The longest path therefore crosses at most two neighbouring
// cells, and the quotient path (cell 2 -> E-cell -> D-cell) is as short.
//
// R needs M+1 bits, so there are J+1 cells with J = (M+3)/2; operand bits at
// M and above are zero.  (R_i)_-1 from the E-cell is always zero; an
// assertion checks it.
//
// Interface: a_in/tag_in enter the D-cell every clock.  b and n give two
// operand slots, chosen per iteration by the tag.  For cell j >= 1, r_hi[j]
// is the newest valid (R_i)_2j-2, r_lo[j] the newest valid (R_i)_2j-3
// (r_lo[1] is zero) and c_tag[j] the tag that wrote them, all registered.
module ni_array
  import mm_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          a_in,
  input  tag_t                          tag_in,
  input  logic [1:0][M-1:0]             b,
  input  logic [1:0][M-1:0]             n,
  output logic [(M+3)/2:1]              r_hi,
  output logic [(M+3)/2:1]              r_lo,
  output tag_t [(M+3)/2:1]              c_tag
);

  localparam int unsigned J = (M + 3) / 2;

  logic [J:0] a_c, q_c, cp_c, p_c, cr_c, rlo_c;
  tag_t [J:0] tag_c;
  logic       r_nb_exp, p1_exp, cr0_exp;
  logic [1:0] b_bit [2*J+1];
  logic [1:0] n_bit [2*J+1];

  for (genvar k = 0; k <= 2 * J; k++) begin : g_bits
    if (k < M) begin : g_op
      assign b_bit[k] = {b[1][k], b[0][k]};
      assign n_bit[k] = {n[1][k], n[0][k]};
    end else begin : g_zero
      assign b_bit[k] = 2'b00;
      assign n_bit[k] = 2'b00;
    end
  end

  // Cell J has no upper neighbour: (R_{i-1})_2J-1 is beyond the M+1 bits of R.
  assign rlo_c[0] = 1'b0;

  ni_d_cell u_d (
    .clk, .rst_n,
    .a_in, .tag_in,
    .b0(b_bit[0]), .n0(n_bit[0]),
    .r1(r_nb_exp), .p1(p1_exp), .cr0(cr0_exp),
    .a_out(a_c[0]), .q_out(q_c[0]), .tag_out(tag_c[0]),
    .cp_out(cp_c[0]), .p_out(p_c[0])
  );
  assign cr_c[0] = 1'b0;

  ni_e_cell u_e (
    .clk, .rst_n,
    .a_in(a_c[0]), .q_in(q_c[0]), .tag_in(tag_c[0]),
    .cp_in(cp_c[0]), .p_lo_in(p_c[0]),
    .r_nb_in((J >= 2) ? rlo_c[2 % (J + 1)] : 1'b0),
    .b_hi(b_bit[2]), .b_lo(b_bit[1]), .n_hi(n_bit[2]), .n_lo(n_bit[1]),
    .a_out(a_c[1]), .q_out(q_c[1]), .tag_out(tag_c[1]),
    .cp_out(cp_c[1]), .p_hi_out(p_c[1]), .cr_out(cr_c[1]),
    .r_lo_out(rlo_c[1]), .r_hi(r_hi[1]),
    .r_nb_exp, .p1_exp, .cr0_exp
  );
  assign r_lo[1]  = 1'b0;
  assign c_tag[1] = tag_c[1];

  for (genvar j = 2; j <= J; j++) begin : g_f
    ni_f_cell u_f (
      .clk, .rst_n,
      .a_in(a_c[j-1]), .q_in(q_c[j-1]), .tag_in(tag_c[j-1]),
      .cp_in(cp_c[j-1]), .p_lo_in(p_c[j-1]), .cr_in(cr_c[j-1]),
      .r_nb_in((j < J) ? rlo_c[(j + 1) % (J + 1)] : 1'b0),
      .b_hi(b_bit[2*j]), .b_lo(b_bit[2*j-1]), .n_hi(n_bit[2*j]), .n_lo(n_bit[2*j-1]),
      .a_out(a_c[j]), .q_out(q_c[j]), .tag_out(tag_c[j]),
      .cp_out(cp_c[j]), .p_hi_out(p_c[j]), .cr_out(cr_c[j]),
      .r_lo_out(rlo_c[j]), .r_hi(r_hi[j]), .res_lo(r_lo[j])
    );
    assign c_tag[j] = tag_c[j];
  end

  // Montgomery's quotient makes (R_i)_-1 zero on every valid iteration.
  a_lsb_zero: assert property (@(posedge clk) disable iff (!rst_n)
                               tag_c[0].valid |-> !rlo_c[1]);

endmodule
