// tb_pcbgu: random rows into the combiner/accumulator, compared with
// p = (first ? 0 : p_prev) xor parity(d) computed in the testbench; idle
// cycles (en low) must hold p.
module tb_pcbgu;
  localparam int A = 7;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic en, first;
  logic [A-1:0] d;
  logic p;
  bit model;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  pcbgu #(.A(A)) dut (.clk, .rst_n, .en, .first, .d, .p);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit g;
    en = 0; first = 0; d = '0; model = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en    = ($urandom_range(0, 4) != 0);
      first = ($urandom_range(0, 9) == 0);
      d     = A'($urandom);
      g = 1'b0;
      for (int b = 0; b < A; b++) g ^= d[b];
      if (en) model = (first ? 1'b0 : model) ^ g;
      @(posedge clk);
      #1;
      checks++;
      if (p !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d: p=%0b expected %0b", n, p, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
