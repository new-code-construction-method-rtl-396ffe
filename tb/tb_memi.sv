// tb_memi: small interleaver (P=3, L=7, NB=6, MB=2, 2 weight-3 and 2 weight-4
// column-blocks, 14 entries). Writes L random information slices, then reads L
// rows and checks every block output against m[cb*L + alpha^(i+j*k) - 1] taken
// from an LFSR power table. Codeword 0 is written and read the parallel way
// (all column-blocks and row-blocks at once). Codeword 1 is written one
// column-block at a time with the other bits of wr_data inverted (wr_sel must
// mask them) and read one row-block at a time with random stalls; blocks of
// the idle row-block must hold their output.
module tb_memi;
  import ssi_pkg::*;
  localparam int P = 3, NB = 6, MB = 2, W3 = 2;
  localparam int L = (1 << P) - 1, KB = NB - MB;
  localparam int E = ssi_num_entries(KB, W3);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic wr_en, rd_load;
  logic [MB-1:0] rd_en;
  logic [KB-1:0] wr_sel;
  logic [P-1:0] wr_addr;
  logic [KB-1:0] wr_data;
  logic [E-1:0] rd_data;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  memi #(.P(P), .NB(NB), .MB(MB), .W3(W3)) dut (.clk, .rst_n, .wr_en, .wr_addr, .wr_data, .wr_sel,
                                                .rd_load, .rd_en, .rd_data);

  int unsigned expt [L];
  bit m [KB*L];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned x;
    ssi_entry_t ent;
    int k;
    int col;
    logic [E-1:0] prev;
    x = 1;
    for (int n = 0; n < L; n++) begin
      expt[n] = x;
      x = x << 1;
      if (x & (1 << P)) x = x ^ default_poly(P);
    end
    wr_en = 0; rd_load = 0; rd_en = '0; wr_addr = '0; wr_data = '0; wr_sel = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cw = 0; cw < 2; cw++) begin
      foreach (m[n]) m[n] = $urandom_range(0, 1);
      for (int c = 0; c < ((cw == 0) ? 1 : KB); c++) begin
        for (int t = 0; t < L; t++) begin
          @(negedge clk);
          wr_en = 1;
          wr_addr = P'(t);
          if (cw == 0) begin
            wr_sel = '1;
            for (int b = 0; b < KB; b++) wr_data[b] = m[b * L + t];
          end else begin
            wr_sel = KB'(1) << c;
            for (int b = 0; b < KB; b++) wr_data[b] = !m[c * L + t];
            wr_data[c] = m[c * L + t];
          end
        end
      end
      @(negedge clk);
      wr_en = 0;
      rd_load = 1;
      @(negedge clk);
      rd_load = 0;
      for (int r = 0; r < ((cw == 0) ? 1 : MB); r++) begin
        k = 0;
        while (k < L) begin
          if (cw == 0) rd_en = '1;
          else rd_en = ($urandom_range(0, 2) != 0) ? (MB'(1) << r) : '0;
          prev = rd_data;
          @(negedge clk);
          for (int e = 0; e < E; e++) begin
            ent = ssi_entry(e, MB, KB, W3, L);
            col = int'(expt[(int'(ent.i) + int'(ent.j) * k) % L]) - 1;
            if (rd_en[ent.rb]) begin
              checks++;
              if (rd_data[e] !== m[int'(ent.cb) * L + col]) begin
                failures++;
                if (failures < 10) $display("FAIL cw %0d row %0d entry %0d: got %0b expected %0b (cb %0d col %0d)", cw, k, e, rd_data[e], m[int'(ent.cb) * L + col], ent.cb, col);
              end
            end else if (cw == 1) begin
              checks++;
              if (rd_data[e] !== prev[e]) begin
                failures++;
                if (failures < 10) $display("FAIL cw %0d entry %0d changed while idle", cw, e);
              end
            end
          end
          if (rd_en != '0) k++;
          rd_en = '0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
