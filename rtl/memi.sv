// memi: the interleaver memory array of the SSI repeat-accumulate encoder.
//
// One L x 1-bit memory block per entry pi(i,j) of the interleaver table, as many
// blocks as H_c has nonzero permutation matrices (E = sum of the column weights).
// Write phase: in a cycle with `wr_en`, wr_data bit c (information bit c*L + t)
// is written at address t of each block whose entry lies in column-block c,
// for the column-blocks selected by wr_sel, so every block holds a copy of its
// column-block. The parallel encoder writes all column-blocks at once
// (wr_sel all ones), the serial one a single column-block per cycle.
// Read phase: `rd_load` restarts the per-block address generators at row k = 0;
// a cycle with rd_en[r] reads every block of row-block r at the column of row k
// of its pi(i,j) and steps it to row k+1. rd_data[e] is registered and valid the
// cycle after: it is the H_c entry-e contribution to check row rb_e*L + k.
//
// Following the construction: one memory block per nonzero interleaver element,
// the MEMI outputs feeding the parity unit. Own choices: natural-order write with
// permuted read, 1-bit wide blocks, synchronous read, no reset of the storage.
module memi
  import ssi_pkg::*;
#(
  parameter int unsigned P    = 3,
  parameter int unsigned POLY = ssi_pkg::default_poly(P),
  parameter int unsigned NB   = 6,   // column-blocks of H
  parameter int unsigned MB   = 2,   // row-blocks of H (parity column-blocks)
  parameter int unsigned W3   = 2,   // information column-blocks of weight 3
  localparam int unsigned L   = (1 << P) - 1,
  localparam int unsigned KB  = NB - MB,
  localparam int unsigned E   = ssi_num_entries(KB, W3)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [P-1:0]  wr_addr,   // t, 0 .. L-1
  input  logic [KB-1:0] wr_data,   // bit c: information bit c*L + t
  input  logic [KB-1:0] wr_sel,    // column-blocks written
  input  logic          rd_load,
  input  logic [MB-1:0] rd_en,     // row-blocks read
  output logic [E-1:0]  rd_data
);

  for (genvar e = 0; e < E; e++) begin : g_blk
    localparam ssi_entry_t ENT = ssi_entry(e, MB, KB, W3, L);
    localparam int unsigned CB = int'(ENT.cb);
    localparam int unsigned RB = int'(ENT.rb);

    logic         mem [L];
    logic [P-1:0] col;
    logic         q;

    ssi_addr_gen #(
      .P   (P),
      .POLY(POLY),
      .I   (int'(ENT.i)),
      .J   (int'(ENT.j))
    ) u_addr (
      .clk  (clk),
      .rst_n(rst_n),
      .load (rd_load),
      .step (rd_en[RB]),
      .col  (col)
    );

    always_ff @(posedge clk) begin
      if (wr_en && wr_sel[CB]) mem[wr_addr] <= wr_data[CB];
      if (rd_en[RB]) q <= mem[col];
    end

    assign rd_data[e] = q;
  end

  initial begin
    assert (L < (1 << P)) else $error("memi: L must fit in P bits");
  end

endmodule
