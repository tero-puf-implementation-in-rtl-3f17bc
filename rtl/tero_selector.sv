// tero_selector: enable demultiplexer in front of a block of TERO cells.
// The one cell addressed by sel receives en; every other cell's control input is
// held low, so only one cell of the block can oscillate at a time. Purely
// combinational. The selector itself follows the source design; its one-hot
// decoder form is the simplest circuit that does the job.
module tero_selector #(
  parameter int unsigned N_CELLS = 128,
  parameter int unsigned SEL_W   = $clog2(N_CELLS)
) (
  input  logic               en,     // enable_tero
  input  logic [SEL_W-1:0]   sel,    // cell address
  output logic [N_CELLS-1:0] ctrl    // control inputs of the cells
);
  timeunit 1ns;
  timeprecision 1ps;

  always_comb begin
    ctrl = '0;
    for (int unsigned i = 0; i < N_CELLS; i++)
      if (sel == SEL_W'(i)) ctrl[i] = en;
  end

endmodule
