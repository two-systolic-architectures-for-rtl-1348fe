// Two systolic Montgomery multipliers for RSA-size operands, side by side.
//
// dl_*: the double-layer multiplier.  Each bit cell is split into an upper
// cell (partial product P_i = a_i*B + q_i*N) and a lower cell
// (R_i = (R_{i-1} + P_i)/2), with the quotient bit precomputed, so the clock
// is short; iterations enter every second clock and the free clocks carry a
// second independent multiplication.
// ni_*: the non-interlaced multiplier.  Cells handle two bits each and an
// iteration enters every clock, so a stream of multiplications runs with no
// idle clock at the array input.
//
// Both compute R = A*B*2^-M mod N, R < 2N, for odd N, A < 2^M, B < N, and have
// the same two-slot start/ready/done interface (see dl_modmul, ni_modmul).
// They share only clock and reset.
module modmul_top
  import mm_pkg::*;
#(
  parameter int unsigned M = M_DEFAULT
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dl_start,
  input  logic              dl_slot,
  input  logic [M-1:0]      dl_a,
  input  logic [M-1:0]      dl_b,
  input  logic [M-1:0]      dl_n,
  output logic [1:0]        dl_ready,
  output logic [1:0]        dl_done,
  output logic [1:0][M:0]   dl_result,
  input  logic              ni_start,
  input  logic              ni_slot,
  input  logic [M-1:0]      ni_a,
  input  logic [M-1:0]      ni_b,
  input  logic [M-1:0]      ni_n,
  output logic [1:0]        ni_ready,
  output logic [1:0]        ni_done,
  output logic [1:0][M:0]   ni_result
);

  dl_modmul #(.M(M)) u_dl (
    .clk, .rst_n,
    .start(dl_start), .slot(dl_slot), .a(dl_a), .b(dl_b), .n(dl_n),
    .ready(dl_ready), .done(dl_done), .result(dl_result)
  );

  ni_modmul #(.M(M)) u_ni (
    .clk, .rst_n,
    .start(ni_start), .slot(ni_slot), .a(ni_a), .b(ni_b), .n(ni_n),
    .ready(ni_ready), .done(ni_done), .result(ni_result)
  );

endmodule
