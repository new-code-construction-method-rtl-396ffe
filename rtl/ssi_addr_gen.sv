// ssi_addr_gen: row-to-column address generator of one structured permutation
// matrix pi(i,j) of size L x L, L = 2^P - 1.
//
// Row k of pi(i,j) has its 1 in column f(alpha^i * (alpha^j)^k) - 1 (0-based).
// Instead of a lookup table the generator keeps the field element
// a_k = alpha^(i + j*k) in a P-bit register: `load` sets a_0 = alpha^i and every
// `step` multiplies by the constant alpha^j, which is a fixed XOR network.
// The output `col` = a_k - 1 is the column of row k, valid in the cycle after
// `load` and updated one cycle after each `step`. With J coprime with L the
// L addresses of one pass are all different (pi(i,j) is a permutation).
//
// Following the construction: the definition of pi(i,j). Own choices: computing
// the sequence with a constant GF multiplier, the load/step interface, reset
// value alpha^I.
module ssi_addr_gen
  import ssi_pkg::*;
#(
  parameter int unsigned P    = 3,
  parameter int unsigned POLY = ssi_pkg::default_poly(P),
  parameter int unsigned I    = 1,
  parameter int unsigned J    = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,   // restart at row k = 0
  input  logic         step,   // advance to the next row
  output logic [P-1:0] col     // column of the 1 in the current row, 0 .. L-1
);

  localparam gf_t A_I = gf_alpha_pow(I, P, POLY);
  localparam gf_t A_J = gf_alpha_pow(J, P, POLY);

  logic [P-1:0] a;
  gf_t          a_next;

  always_comb a_next = gf_mul(gf_t'(a), A_J, P, POLY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    a <= A_I[P-1:0];
    else if (load) a <= A_I[P-1:0];
    else if (step) a <= a_next[P-1:0];
  end

  assign col = a - P'(1);

endmodule
