// One-dimensional double-layer systolic array for radix-2 Montgomery
// multiplication.
//
// Cell j (j = 0 .. M+1) holds an upper cell that forms bit j of
// P_i = a_i*B + q_i*N (the A-cell at j = 0, B-cells above) and a lower C-cell
// that forms bit j-1 of R_i = (R_{i-1} + P_i)/2.  An iteration enters the
// A-cell at clock t_i, reaches the upper cell of bit j at t_i + j and the
// C-cell of bit j at t_i + j + 1.  Because (R_i)_0 is ready only at t_i + 2,
// the A-cell precomputes q_{i+1} from the operands of the bit-1 C-cell and
// the next iteration can enter at t_i + 2: one slot out of two is free.
// Every register is read exactly one clock after it is written, so the free
// slots can carry a second, independent multiplication (operand slot 1 on
// the other clock parity) without extra storage.
//
// R needs M+1 bits (R < 2N when B < N), so the array has M+2 cells; operand
// bits above M-1 are zero.  The C-cell of bit 0 produces (R_i)_{-1}, which
// Montgomery's choice of q_i makes zero; an assertion checks that.
//
// Interface: a_in/tag_in enter the A-cell; b and n give both operand slots.
// r_q[j] is the newest valid (R_i)_{j-1} of cell j, r_tag[j] the tag of the
// iteration that wrote it (both registered).
module dl_array
  import mm_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                a_in,
  input  tag_t                tag_in,
  input  logic [1:0][M-1:0]   b,
  input  logic [1:0][M-1:0]   n,
  output logic [M+1:0]        r_q,
  output tag_t [M+1:0]        r_tag
);

  localparam int unsigned NC = M + 2;

  logic [NC-1:0] a_u, q_u, cp_u, p_u, cr_c, r_eff;
  tag_t [NC-1:0] tag_u;
  logic [1:0] b_bit [NC];
  logic [1:0] n_bit [NC];

  for (genvar j = 0; j < NC; j++) begin : g_bits
    if (j < M) begin : g_op
      assign b_bit[j] = {b[1][j], b[0][j]};
      assign n_bit[j] = {n[1][j], n[0][j]};
    end else begin : g_zero
      assign b_bit[j] = 2'b00;
      assign n_bit[j] = 2'b00;
    end
  end

  dl_a_cell u_a (
    .clk, .rst_n,
    .a_in, .tag_in,
    .b0(b_bit[0]), .n0(n_bit[0]),
    .r1(r_eff[1]), .p1(p_u[1]), .cr0(cr_c[0]),
    .a_out(a_u[0]), .q_out(q_u[0]), .tag_out(tag_u[0]),
    .cp_out(cp_u[0]), .p_out(p_u[0])
  );

  for (genvar j = 1; j < NC; j++) begin : g_b
    dl_b_cell u_b (
      .clk, .rst_n,
      .a_in(a_u[j-1]), .q_in(q_u[j-1]), .tag_in(tag_u[j-1]), .cp_in(cp_u[j-1]),
      .b(b_bit[j]), .n(n_bit[j]),
      .a_out(a_u[j]), .q_out(q_u[j]), .tag_out(tag_u[j]),
      .cp_out(cp_u[j]), .p_out(p_u[j])
    );
  end

  for (genvar j = 0; j < NC; j++) begin : g_c
    dl_c_cell u_c (
      .clk, .rst_n,
      .r_in((j + 1 < NC) ? r_q[(j + 1) % NC] : 1'b0),
      .p_in(p_u[j]),
      .cr_in((j > 0) ? cr_c[(j + NC - 1) % NC] : 1'b0),
      .tag_in(tag_u[j]),
      .r_eff(r_eff[j]), .r_q(r_q[j]), .cr_out(cr_c[j]), .tag_out(r_tag[j])
    );
  end

  // Montgomery's quotient makes R_{i-1} + P_i even: (R_i)_{-1} is always 0.
  a_lsb_zero: assert property (@(posedge clk) disable iff (!rst_n)
                               r_tag[0].valid |-> !r_q[0]);

endmodule
