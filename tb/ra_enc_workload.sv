// ra_enc_workload: testbench helper that encodes NCW random codewords with one
// parallel ra_encoder of the given size and checks every codeword slice against
// parity computed here from the table definition (LFSR power table, one
// accumulator chain per row-block). Back-to-back codewords with in_valid held
// high; the codeword period must be 2L + 3 cycles. Raises `done` when all
// codewords are out; `checks` and `failures` count the comparisons.
module ra_enc_workload
  import ssi_pkg::*;
#(
  parameter int P   = 3,
  parameter int NB  = 6,
  parameter int MB  = 2,
  parameter int W3  = 0,
  parameter int NCW = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int L = (1 << P) - 1, KB = NB - MB, K = KB * L;
  localparam int E = ssi_num_entries(KB, W3);
  localparam int W = (KB > MB) ? KB : MB;

  logic in_valid, in_ready;
  logic [KB-1:0] in_data;
  logic cw_valid, cw_is_parity, cw_last;
  logic [W-1:0] cw_data;

  ra_encoder #(.P(P), .NB(NB), .MB(MB), .W3(W3)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .cw_valid, .cw_is_parity, .cw_last, .cw_data);

  int unsigned expt [L];
  bit msg [NCW][K];
  bit par [NCW][MB*L];
  longint cycle = 0;
  longint first_accept [NCW];

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    done = 0;
    checks = 0;
    failures = 0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (N=%0d): %s", NB * L, what);
    end
  endtask

  // reference
  initial begin
    int unsigned x;
    ssi_entry_t ent;
    bit g [MB*L];
    bit acc;
    x = 1;
    for (int n = 0; n < L; n++) begin
      expt[n] = x;
      x = x << 1;
      if ((x >> P) & 1) x = x ^ default_poly(P);
    end
    for (int w = 0; w < NCW; w++) begin
      for (int n = 0; n < K; n++) msg[w][n] = 1'($urandom_range(0, 1));
      g = '{default: 0};
      for (int e = 0; e < E; e++) begin
        ent = ssi_entry(e, MB, KB, W3, L);
        for (int k = 0; k < L; k++)
          g[int'(ent.rb) * L + k] ^= msg[w][int'(ent.cb) * L + int'(expt[(int'(ent.i) + int'(ent.j) * k) % L]) - 1];
      end
      for (int r = 0; r < MB; r++) begin
        acc = 0;
        for (int k = 0; k < L; k++) begin
          acc ^= g[r * L + k];
          par[w][r * L + k] = acc;
        end
      end
    end
  end

  // driver
  initial begin
    in_valid = 0;
    in_data = '0;
    wait (rst_n);
    for (int w = 0; w < NCW; w++) begin
      for (int t = 0; t < L; t++) begin
        @(negedge clk);
        in_valid = 1;
        for (int c = 0; c < KB; c++) in_data[c] = msg[w][c * L + t];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (t == 0) first_accept[w] = cycle;
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
    while (w < NCW) begin
      @(posedge clk);
      if (cw_valid) begin
        if (!cw_is_parity) begin
          for (int c = 0; c < KB; c++)
            check(cw_data[c] === msg[w][c * L + t], $sformatf("cw %0d info slice %0d", w, t));
          t++;
        end else begin
          check(t == L, $sformatf("cw %0d parity before all info slices", w));
          for (int r = 0; r < MB; r++)
            check(cw_data[r] === par[w][r * L + k], $sformatf("cw %0d parity row %0d", w, r * L + k));
          check(cw_last === (k == L - 1), $sformatf("cw %0d last flag", w));
          k++;
          if (k == L) begin
            if (w > 0)
              check(first_accept[w] - first_accept[w-1] == 2 * L + 3,
                    $sformatf("codeword period %0d", first_accept[w] - first_accept[w-1]));
            w++; t = 0; k = 0;
          end
        end
      end
    end
    done = 1;
  end
endmodule
