// tero_mux: output multiplexer behind a block of TERO cells.
// Forwards the output of the cell addressed by sel; that signal is used as the
// clock of the block's oscillation counter. Purely combinational. An address
// beyond the last cell gives 0.
module tero_mux #(
  parameter int unsigned N_CELLS = 128,
  parameter int unsigned SEL_W   = $clog2(N_CELLS)
) (
  input  logic [N_CELLS-1:0] osc_in,  // outputs of all cells
  input  logic [SEL_W-1:0]   sel,     // cell address
  output logic               osc_out  // selected output
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    osc_out = 1'b0;
    for (int unsigned i = 0; i < N_CELLS; i++)
      if (sel == SEL_W'(i)) osc_out = osc_in[i];
  end

endmodule
