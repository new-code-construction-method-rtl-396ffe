// tb_ra_encoder_serial: the serial form of the SSI RA encoder (PARALLEL = 0) at
// the default code size (L = 511, NB = 30, MB = 5, N = 15330).
//
// One bit in and one bit out per cycle. Three codewords of random information
// bits; the expected parity is one accumulator chain over all M = MB*L rows of
// H_c (no split): p_i = p_{i-1} xor g_i, p_{-1} = 0, with g_i taken from the
// definition of the pi(i,j) entries and an LFSR power table. Checks every
// codeword bit, the order, cw_last, and the schedule: K cycles of information
// bits then M of parity bits, NB*L + 3 cycles per codeword with in_valid held
// high. Counts input stalls, back-pressure and row-block changes of the
// combiner (the serial unit moves from one row-block to the next MB-1 times per
// codeword).
module tb_ra_encoder_serial;
  import ssi_pkg::*;
  localparam int P = 9, NB = 30, MB = 5, W3 = 10;
  localparam int L = (1 << P) - 1, KB = NB - MB, K = KB * L, M = MB * L;
  localparam int E = ssi_num_entries(KB, W3);
  localparam int NCW = 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid, in_ready;
  logic [0:0] in_data;
  logic cw_valid, cw_is_parity, cw_last;
  logic [0:0] cw_data;

  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_backpressure = 0, n_block_change = 0;

  always #5 clk = ~clk;

  ra_encoder #(.PARALLEL(1'b0)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .cw_valid,
                                     .cw_is_parity, .cw_last, .cw_data);

  int unsigned expt [L];
  bit msg [NCW][K];
  bit par [NCW][M];
  longint cycle = 0;
  longint first_accept [NCW];
  longint last_accept [NCW];
  longint first_parity [NCW];
  int n_done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // row-block changes seen by the serial combiner
  always @(posedge clk)
    if (rst_n && dut.rd_en != '0 && dut.cnt == '0 && dut.blk != '0) n_block_change++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NCW * (NB * L + 4 * L) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  initial begin
    int unsigned x;
    ssi_entry_t ent;
    bit acc;
    bit g [M];
    x = 1;
    for (int n = 0; n < L; n++) begin
      expt[n] = x;
      x = x << 1;
      if (x & (1 << P)) x = x ^ default_poly(P);
    end
    for (int w = 0; w < NCW; w++) begin
      for (int n = 0; n < K; n++) msg[w][n] = $urandom_range(0, 1);
      g = '{default: 0};
      for (int e = 0; e < E; e++) begin
        ent = ssi_entry(e, MB, KB, W3, L);
        for (int k = 0; k < L; k++)
          g[int'(ent.rb) * L + k] ^= msg[w][int'(ent.cb) * L + int'(expt[(int'(ent.i) + int'(ent.j) * k) % L]) - 1];
      end
      acc = 0;
      for (int i = 0; i < M; i++) begin
        acc ^= g[i];
        par[w][i] = acc;
      end
    end
  end

  // driver: codewords 0 and 2 without gaps, codeword 1 with random gaps
  initial begin
    in_valid = 0;
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NCW; w++) begin
      for (int n = 0; n < K; n++) begin
        @(negedge clk);
        if (w == 1) begin
          while ($urandom_range(0, 15) == 0) begin
            in_valid = 0;
            n_stall++;
            @(negedge clk);
          end
        end
        in_valid = 1;
        in_data[0] = msg[w][n];
        @(posedge clk);
        while (!in_ready) begin
          n_backpressure++;
          @(posedge clk);
        end
        if (n == 0) first_accept[w] = cycle;
        if (n == K - 1) last_accept[w] = cycle;
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // monitor
  initial begin
    int w, t, k;
    w = 0; t = 0; k = 0;
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (cw_valid) begin
        if (!cw_is_parity) begin
          check(cw_data[0] === msg[w][t], $sformatf("cw %0d info bit %0d", w, t));
          check(k == 0 && !cw_last, $sformatf("cw %0d info bit out of order", w));
          t++;
        end else begin
          check(t == K, $sformatf("cw %0d parity before all info bits", w));
          if (k == 0) first_parity[w] = cycle;
          check(cw_data[0] === par[w][k], $sformatf("cw %0d parity bit %0d", w, k));
          check(cw_last === (k == M - 1), $sformatf("cw %0d last flag at bit %0d", w, k));
          k++;
          if (k == M) begin
            check(first_parity[w] - last_accept[w] == 5,
                  $sformatf("cw %0d: %0d cycles from last info bit to first parity bit",
                            w, first_parity[w] - last_accept[w]));
            if (w == 1)
              check(first_accept[1] - first_accept[0] == NB * L + 3,
                    $sformatf("codeword period %0d cycles, expected %0d",
                              first_accept[1] - first_accept[0], NB * L + 3));
            w++; t = 0; k = 0;
            n_done++;
            if (w == NCW) break;
          end
        end
      end
    end
    $display("codewords=%0d stalls=%0d backpressure=%0d row_block_changes=%0d",
             n_done, n_stall, n_backpressure, n_block_change);
    check(n_done == NCW, "all codewords out");
    check(n_stall > 0, "input stall never happened");
    check(n_backpressure > 0, "back-pressure never happened");
    check(n_block_change == NCW * (MB - 1), "row-block changes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
