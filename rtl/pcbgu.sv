// pcbgu: parity-check-bit-generating unit of the repeat-accumulate encoder.
//
// A combiner (Sigma) XORs the A interleaved bits of one check row,
// g_i = d_1 xor ... xor d_a, and the accumulator register adds it to the previous
// parity bit, p_i = p_{i-1} xor g_i. One parity bit per `en` cycle; `p` shows it
// the cycle after. `first` marks the first row of an accumulator chain: the
// previous parity is taken as 0, which starts a new chain (the parity bit before
// it is not connected).
//
// Following the construction: combiner plus accumulator with register feedback,
// one parity bit per clock. Own choices: the `first` restart input and
// asynchronous active-low reset.
module pcbgu #(
  parameter int unsigned A = 18   // combiner inputs (row weight of H_c)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,      // d holds a valid row
  input  logic         first,   // first row of a chain
  input  logic [A-1:0] d,       // interleaved bits of the row
  output logic         p        // parity bit of the last row
);

  logic g;

  always_comb g = ^d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  p <= 1'b0;
    else if (en) p <= (first ? 1'b0 : p) ^ g;
  end

endmodule
