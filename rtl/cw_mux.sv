// cw_mux: codeword output multiplexer of the systematic RA encoder.
//
// The codeword is c = [m, p]: information slices first, then parity slices.
// The mux puts either the information slice (sys_*) or the parity slice (par_*)
// on the registered codeword output and tags it with cw_is_parity; parity slices
// occupy the low MB bits, the rest are zero. The two sources are never valid in
// the same cycle (checked by an assertion); the information source wins if they
// are. Latency one cycle, no back-pressure.
//
// Following the construction: a MUX selecting information bits or parity bits
// onto the codeword. Own choices: slice widths, the tag and last flags, the
// register.
module cw_mux #(
  parameter int unsigned KB = 25,
  parameter int unsigned MB = 5,
  localparam int unsigned W = (KB > MB) ? KB : MB
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          sys_valid,
  input  logic [KB-1:0] sys_data,
  input  logic          par_valid,
  input  logic [MB-1:0] par_data,
  input  logic          par_last,
  output logic          cw_valid,
  output logic          cw_is_parity,
  output logic          cw_last,
  output logic [W-1:0]  cw_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cw_valid     <= 1'b0;
      cw_is_parity <= 1'b0;
      cw_last      <= 1'b0;
      cw_data      <= '0;
    end else begin
      cw_valid     <= sys_valid | par_valid;
      cw_is_parity <= !sys_valid && par_valid;
      cw_last      <= !sys_valid && par_valid && par_last;
      if (sys_valid)      cw_data <= W'(sys_data);
      else if (par_valid) cw_data <= W'(par_data);
    end
  end

  property p_one_source;
    @(posedge clk) disable iff (!rst_n) !(sys_valid && par_valid);
  endproperty
  a_one_source: assert property (p_one_source)
    else $error("cw_mux: information and parity slices in the same cycle");

endmodule
