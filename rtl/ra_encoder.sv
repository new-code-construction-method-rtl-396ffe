// ra_encoder: encoder for repeat-accumulate codes with superimposed structured
// interleavers (SSI), in a parallel (default) and a serial form.
//
// Code: H = [H_c, H_m] with H_c made of L x L blocks (L = 2^P - 1), NB
// column-blocks, MB row-blocks, KB = NB - MB information column-blocks, K = KB*L
// information bits, M = MB*L parity bits, codeword c = [m, p]. Check row
// rb*L + k of H_c collects g = XOR of m[cb*L + col_e(k)] over the table entries e
// in row-block rb (see ssi_pkg, memi); the accumulator gives p = p_prev xor g.
//
// PARALLEL = 1 (default): the dual-diagonal H_m is cut at every row-block
// boundary (its sub-diagonal 1 at rows L, 2L, ... is removed), so the parity
// part becomes MB independent accumulator chains of length L, each with its own
// parity-check-bit-generating unit (pcbgu), all running in the same cycles:
//   p(rb,k) = p(rb,k-1) xor g(rb*L + k),   p(rb,-1) = 0.
// Slices are KB bits in (bit c = m[c*L + t]) and out; parity slices carry bit
// rb = p(rb,k). Phases: load L cycles, start 1, parity L, drain 2, i.e.
// 2L + 3 cycles per codeword with in_valid held high.
//
// PARALLEL = 0: the unsplit code of the serial architecture: one pcbgu, one
// accumulator chain p_i = p_{i-1} xor g_i over all M rows, one bit per cycle
// in (information bits in order m_0 .. m_{K-1}) and out (m, then p_0 .. p_{M-1}).
// Phases: load K cycles, start 1, parity M, drain 2: NB*L + 3 cycles per
// codeword.
//
// Handshake: in_ready is high only in the load phase; a slice is taken when
// in_valid && in_ready, and in_valid may drop (stall) at any time. Information
// slices leave through the output mux one cycle after they are taken; the first
// parity slice leaves 5 cycles after the last information slice is taken;
// cw_last marks the last parity slice. No back-pressure on the output.
//
// Following the construction: MEMI feeding a combiner and accumulator (PCBGU),
// a MUX forming c = [m, p], the serial N_b*L-cycle schedule, the parallel split
// of H_m into sub-RA chains, and the rate-5/6, length-15330 default (L = 511,
// NB = 30, MB = 5, 10 weight-3 and 15 weight-4 information column-blocks).
// Own choices: slice widths, handshake, phase sequencing and pipeline, and the
// default interleaver table (ssi_pkg::ssi_entry).
module ra_encoder
  import ssi_pkg::*;
#(
  parameter int unsigned P        = 9,
  parameter int unsigned POLY     = ssi_pkg::default_poly(P),
  parameter int unsigned NB       = 30,
  parameter int unsigned MB       = 5,
  parameter int unsigned W3       = 10,
  parameter bit          PARALLEL = 1'b1,
  localparam int unsigned L       = (1 << P) - 1,
  localparam int unsigned KB      = NB - MB,
  localparam int unsigned E       = ssi_num_entries(KB, W3),
  localparam int unsigned IW      = PARALLEL ? KB : 1,
  localparam int unsigned PW      = PARALLEL ? MB : 1,
  localparam int unsigned OW      = (IW > PW) ? IW : PW
) (
  input  logic          clk,
  input  logic          rst_n,
  // information slices
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [IW-1:0] in_data,
  // codeword slices
  output logic          cw_valid,
  output logic          cw_is_parity,
  output logic          cw_last,
  output logic [OW-1:0] cw_data
);

  typedef enum logic [1:0] {
    S_LOAD,
    S_START,
    S_PARITY,
    S_DRAIN
  } state_t;

  localparam int unsigned BW = $clog2(((KB > MB) ? KB : MB) + 1);
  // blocks walked through one after the other in the load and parity phases
  localparam int unsigned LOAD_BLKS = PARALLEL ? 1 : KB;
  localparam int unsigned PAR_BLKS  = PARALLEL ? 1 : MB;
  localparam int unsigned RW        = (MB > 1) ? $clog2(MB) : 1;

  typedef logic [E-1:0] mask_t;
  typedef mask_t mask_arr_t [MB];

  // MASKS[r]: entries of H_c that belong to row-block r.
  function automatic mask_arr_t row_masks();
    mask_arr_t  m;
    mask_t      row;
    ssi_entry_t ent;
    for (int unsigned r = 0; r < MB; r++) begin
      row = '0;
      for (int unsigned e = 0; e < E; e++) begin
        ent = ssi_entry(e, MB, KB, W3, L);
        if (int'(ent.rb) == int'(r)) row[e] = 1'b1;
      end
      m[r] = row;
    end
    return m;
  endfunction

  localparam mask_arr_t MASKS = row_masks();

  state_t        state;
  logic [P-1:0]  cnt;       // slice / row within the block
  logic [BW-1:0] blk;       // block in the serial form, 0 in the parallel one
  logic          cnt_end;
  logic          load_end;
  logic          par_end;
  logic          wr_en;
  logic [KB-1:0] wr_data;
  logic [KB-1:0] wr_sel;
  logic          rd_load;
  logic [MB-1:0] rd_en;
  logic          rd_valid;    // memi read data valid
  logic          rd_first;    // ... and it is the first row of a chain
  logic          rd_last;     // ... and it is the last row of the codeword
  logic [BW-1:0] rd_blk;      // ... and its row-block (serial form)
  logic          par_valid;   // pcbgu outputs valid
  logic          par_last;
  logic [E-1:0]  rd_data;
  logic [PW-1:0] par;

  assign cnt_end  = (cnt == P'(L - 1));
  assign load_end = cnt_end && (blk == BW'(LOAD_BLKS - 1));
  assign par_end  = cnt_end && (blk == BW'(PAR_BLKS - 1));
  assign in_ready = (state == S_LOAD);
  assign wr_en    = in_valid && in_ready;
  assign rd_load  = (state == S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      blk   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (wr_en) begin
          cnt <= cnt_end ? '0 : cnt + P'(1);
          if (cnt_end) blk <= load_end ? '0 : blk + BW'(1);
          if (load_end) state <= S_START;
        end
        S_START: state <= S_PARITY;
        S_PARITY: begin
          cnt <= cnt_end ? '0 : cnt + P'(1);
          if (cnt_end) blk <= par_end ? '0 : blk + BW'(1);
          if (par_end) state <= S_DRAIN;
        end
        S_DRAIN: begin
          cnt <= (cnt == P'(1)) ? '0 : cnt + P'(1);
          if (cnt == P'(1)) state <= S_LOAD;
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  // write and read selection of the memory array
  always_comb begin
    if (PARALLEL) begin
      wr_data = KB'(in_data);
      wr_sel  = '1;
      rd_en   = (state == S_PARITY) ? '1 : '0;
    end else begin
      wr_data = {KB{in_data[0]}};
      wr_sel  = KB'(1) << blk;
      rd_en   = (state == S_PARITY) ? (MB'(1) << blk) : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid  <= 1'b0;
      rd_first  <= 1'b0;
      rd_last   <= 1'b0;
      rd_blk    <= '0;
      par_valid <= 1'b0;
      par_last  <= 1'b0;
    end else begin
      rd_valid  <= (state == S_PARITY);
      rd_first  <= (state == S_PARITY) && (cnt == '0) && (blk == '0);
      rd_last   <= (state == S_PARITY) && par_end;
      rd_blk    <= blk;
      par_valid <= rd_valid;
      par_last  <= rd_last;
    end
  end

  memi #(
    .P   (P),
    .POLY(POLY),
    .NB  (NB),
    .MB  (MB),
    .W3  (W3)
  ) u_memi (
    .clk    (clk),
    .rst_n  (rst_n),
    .wr_en  (wr_en),
    .wr_addr(cnt),
    .wr_data(wr_data),
    .wr_sel (wr_sel),
    .rd_load(rd_load),
    .rd_en  (rd_en),
    .rd_data(rd_data)
  );

  if (PARALLEL) begin : g_parallel
    // one accumulator chain per row-block
    for (genvar r = 0; r < MB; r++) begin : g_chain
      pcbgu #(
        .A(E)
      ) u_pcbgu (
        .clk  (clk),
        .rst_n(rst_n),
        .en   (rd_valid),
        .first(rd_first),
        .d    (rd_data & MASKS[r]),
        .p    (par[r])
      );
    end
  end else begin : g_serial
    // one chain over all rows; the combiner sees the current row-block's entries
    logic [E-1:0] d_row;
    always_comb d_row = rd_data & MASKS[rd_blk[RW-1:0]];
    pcbgu #(
      .A(E)
    ) u_pcbgu (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (rd_valid),
      .first(rd_first),
      .d    (d_row),
      .p    (par[0])
    );
  end

  // output rules: cw_last only on a parity slice; no slice is taken outside
  // the load phase
  a_last_on_parity: assert property (@(posedge clk) disable iff (!rst_n)
    cw_last |-> cw_valid && cw_is_parity)
    else $error("ra_encoder: cw_last outside a parity slice");
  a_load_only: assert property (@(posedge clk) disable iff (!rst_n)
    wr_en |-> state == S_LOAD)
    else $error("ra_encoder: slice taken outside the load phase");

  cw_mux #(
    .KB(IW),
    .MB(PW)
  ) u_mux (
    .clk         (clk),
    .rst_n       (rst_n),
    .sys_valid   (wr_en),
    .sys_data    (in_data),
    .par_valid   (par_valid),
    .par_data    (par),
    .par_last    (par_last),
    .cw_valid    (cw_valid),
    .cw_is_parity(cw_is_parity),
    .cw_last     (cw_last),
    .cw_data     (cw_data)
  );

endmodule
