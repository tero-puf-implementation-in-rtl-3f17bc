// tero_block: one block of N_CELLS TERO cells (128 in the source design).
// Each cell has its own control input and output; the block adds no logic. On the
// FPGA the cells are identical hard macros placed side by side, and the two blocks
// of the PUF are placed apart. In this model each cell is a behavioural tero_cell
// whose oscillation count stands for its process mismatch. The count of cell i in
// block BLOCK_ID is
//   OSC_NOMINAL - OSC_SPREAD/2 + (h mod OSC_SPREAD),
//   h = ((BLOCK_ID*N_CELLS + i) * 2654435761) xor ((BLOCK_ID*N_CELLS + i) >> 3),
// a fixed pseudo-random spread (32-bit arithmetic, wrapping). The spread and its
// formula are modelling choices, not part of the source design.
module tero_block #(
  parameter int unsigned N_CELLS     = 128,
  parameter int unsigned BLOCK_ID    = 0,
  parameter int unsigned OSC_NOMINAL = 100,
  parameter int unsigned OSC_SPREAD  = 64,
  parameter realtime     HALF_PERIOD = 2.0
) (
  input  logic [N_CELLS-1:0] ctrl,  // control input of each cell
  output logic [N_CELLS-1:0] osc    // output of each cell
);
  timeunit 1ns;
  timeprecision 1ps;

  // Oscillation count of one cell of this block (see the header for the formula).
  function automatic int unsigned cell_count(int unsigned idx);
    int unsigned k, h;
    k = BLOCK_ID * N_CELLS + idx;
    h = (k * 32'd2654435761) ^ (k >> 3);
    return OSC_NOMINAL - OSC_SPREAD / 2 + (h % OSC_SPREAD);
  endfunction

  for (genvar i = 0; i < N_CELLS; i++) begin : g_cell
    tero_cell #(
      .OSC_COUNT  (cell_count(i)),
      .HALF_PERIOD(HALF_PERIOD)
    ) u_cell (
      .ctrl(ctrl[i]),
      .osc (osc[i])
    );
  end

endmodule
