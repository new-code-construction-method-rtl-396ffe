// tb_ra_encoder: end-to-end test of the parallel SSI RA encoder at its default
// size (L = 511, NB = 30, MB = 5, rate 5/6, N = 15330).
//
// Four codewords of random information bits are encoded. The expected parity is
// computed here from the definition: row rb*L + k of H_c collects
// m[cb*L + alpha^(i+j*k) - 1] for every table entry in row-block rb (powers of
// alpha from an LFSR table), and each row-block is its own accumulator chain
// starting from 0. Every codeword slice is checked, plus the slice order, the
// last flag and the timing: 2L + 3 cycles per codeword with in_valid held high
// (L + 4 cycles from the last slice of one codeword to the first of the next),
// and 5 cycles from the last information slice to the first parity slice.
//
// Mechanisms that must occur: input stalls (in_valid low in the load phase),
// back-pressure (in_valid high while in_ready is low), superimposed blocks
// (two pi(i,j) in one L x L block of H_c), chain restarts (first row of a
// row-block), and back-to-back codewords.
module tb_ra_encoder;
  import ssi_pkg::*;
  localparam int P = 9, NB = 30, MB = 5, W3 = 10;
  localparam int L = (1 << P) - 1, KB = NB - MB, K = KB * L;
  localparam int E = ssi_num_entries(KB, W3);
  localparam int W = (KB > MB) ? KB : MB;
  localparam int NCW = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid, in_ready;
  logic [KB-1:0] in_data;
  logic cw_valid, cw_is_parity, cw_last;
  logic [W-1:0] cw_data;

  int checks = 0;
  int failures = 0;
  int n_stall = 0, n_backpressure = 0, n_superimposed = 0, n_restart = 0, n_back_to_back = 0;

  always #5 clk = ~clk;

  ra_encoder dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .cw_valid, .cw_is_parity,
                  .cw_last, .cw_data);

  int unsigned expt [L];
  bit msg [NCW][K];
  bit par [NCW][MB*L];
  longint cycle = 0;
  longint first_accept [NCW];
  longint last_accept [NCW];
  longint first_parity [NCW];
  int n_done = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (NCW * (3 * L + 50) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  initial begin
    int unsigned x;
    ssi_entry_t ent;
    bit h;
    bit acc;
    int cnt [MB][KB];
    x = 1;
    for (int n = 0; n < L; n++) begin
      expt[n] = x;
      x = x << 1;
      if (x & (1 << P)) x = x ^ default_poly(P);
    end
    cnt = '{default: 0};
    for (int e = 0; e < E; e++) begin
      ent = ssi_entry(e, MB, KB, W3, L);
      cnt[ent.rb][ent.cb]++;
    end
    for (int r = 0; r < MB; r++)
      for (int c = 0; c < KB; c++)
        if (cnt[r][c] > 1) n_superimposed++;
    for (int w = 0; w < NCW; w++) begin
      for (int n = 0; n < K; n++) msg[w][n] = $urandom_range(0, 1);
      for (int r = 0; r < MB; r++) begin
        acc = 0;
        for (int k = 0; k < L; k++) begin
          h = 0;
          for (int e = 0; e < E; e++) begin
            ent = ssi_entry(e, MB, KB, W3, L);
            if (int'(ent.rb) == r)
              h ^= msg[w][int'(ent.cb) * L + int'(expt[(int'(ent.i) + int'(ent.j) * k) % L]) - 1];
          end
          acc ^= h;
          par[w][r * L + k] = acc;
        end
      end
    end
  end

  // driver: codewords 0 and 3 with in_valid always high, 1 and 2 with random gaps
  initial begin
    in_valid = 0;
    in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < NCW; w++) begin
      for (int t = 0; t < L; t++) begin
        @(negedge clk);
        if (w == 1 || w == 2) begin
          while ($urandom_range(0, 7) == 0) begin
            in_valid = 0;
            n_stall++;
            @(negedge clk);
          end
        end
        in_valid = 1;
        for (int c = 0; c < KB; c++) in_data[c] = msg[w][c * L + t];
        @(posedge clk);
        while (!in_ready) begin
          n_backpressure++;
          @(posedge clk);
        end
        if (t == 0) first_accept[w] = cycle;
        if (t == L - 1) last_accept[w] = cycle;
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
          for (int c = 0; c < KB; c++)
            check(cw_data[c] === msg[w][c * L + t], $sformatf("cw %0d info slice %0d bit %0d", w, t, c));
          check(k == 0 && !cw_last, $sformatf("cw %0d info slice out of order", w));
          t++;
        end else begin
          check(t == L, $sformatf("cw %0d parity before all info slices", w));
          if (k == 0) begin
            first_parity[w] = cycle;
            n_restart += MB;
          end
          for (int r = 0; r < MB; r++)
            check(cw_data[r] === par[w][r * L + k], $sformatf("cw %0d parity row %0d", w, r * L + k));
          check(cw_data[W-1:MB] == '0, "upper bits of a parity slice");
          check(cw_last === (k == L - 1), $sformatf("cw %0d last flag at slice %0d", w, k));
          k++;
          if (k == L) begin
            check(first_parity[w] - last_accept[w] == 5,
                  $sformatf("cw %0d: %0d cycles from last info slice to first parity slice",
                            w, first_parity[w] - last_accept[w]));
            if (w == 1) begin
              // codeword 0 was loaded without gaps
              check(first_accept[1] - first_accept[0] == 2 * L + 3,
                    $sformatf("codeword period %0d cycles, expected %0d",
                              first_accept[1] - first_accept[0], 2 * L + 3));
              n_back_to_back++;
            end
            if (w == 3) begin
              // codeword 3 waits only for the parity and drain phases of codeword 2
              check(first_accept[3] - last_accept[2] == L + 4,
                    $sformatf("load-to-load gap %0d cycles, expected %0d",
                              first_accept[3] - last_accept[2], L + 4));
              n_back_to_back++;
            end
            w++; t = 0; k = 0;
            n_done++;
            if (w == NCW) break;
          end
        end
      end
    end
    $display("codewords=%0d stalls=%0d backpressure=%0d superimposed_blocks=%0d chain_restarts=%0d back_to_back=%0d",
             n_done, n_stall, n_backpressure, n_superimposed, n_restart, n_back_to_back);
    check(n_done == NCW, "all codewords out");
    check(n_stall > 0, "input stall never happened");
    check(n_backpressure > 0, "back-pressure never happened");
    check(n_superimposed > 0, "no superimposed block in the table");
    check(n_restart > 0, "no chain restart");
    check(n_back_to_back > 0, "no back-to-back codeword");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
