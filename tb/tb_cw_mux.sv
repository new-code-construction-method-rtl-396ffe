// tb_cw_mux: drives information slices, parity slices and idle cycles in random
// order (never both in one cycle) and checks the registered output one cycle
// later: valid, parity tag, last flag and the zero-extended data.
module tb_cw_mux;
  localparam int KB = 6;
  localparam int MB = 3;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic sys_valid, par_valid, par_last;
  logic [KB-1:0] sys_data;
  logic [MB-1:0] par_data;
  logic cw_valid, cw_is_parity, cw_last;
  logic [KB-1:0] cw_data;
  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  cw_mux #(.KB(KB), .MB(MB)) dut (.clk, .rst_n, .sys_valid, .sys_data, .par_valid, .par_data,
                                   .par_last, .cw_valid, .cw_is_parity, .cw_last, .cw_data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sel;
    logic [KB-1:0] exp_data;
    sys_valid = 0; par_valid = 0; par_last = 0; sys_data = '0; par_data = '0;
    exp_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      sel = $urandom_range(0, 2);
      sys_valid = (sel == 1);
      par_valid = (sel == 2);
      par_last  = $urandom_range(0, 1);
      sys_data  = KB'($urandom);
      par_data  = MB'($urandom);
      if (sel == 1) exp_data = sys_data;
      if (sel == 2) exp_data = KB'(par_data);
      @(posedge clk);
      #1;
      checks++;
      if (cw_valid !== (sel != 0) || cw_is_parity !== (sel == 2) ||
          cw_last !== (sel == 2 && par_last) || (sel != 0 && cw_data !== exp_data)) begin
        failures++;
        if (failures < 10)
          $display("FAIL n=%0d sel=%0d: valid=%0b par=%0b last=%0b data=%h exp %h",
                   n, sel, cw_valid, cw_is_parity, cw_last, cw_data, exp_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
