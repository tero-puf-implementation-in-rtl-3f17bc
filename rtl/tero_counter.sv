// tero_counter: counts the oscillations of the selected TERO cell.
// The counter is clocked by the cell's output itself (one increment per rising
// edge) and counts only while enable_tero is high, so it holds its value once the
// acquisition window closes. Because that clock stops when the cell settles, the
// counter cannot be cleared synchronously: reset clears it asynchronously. The
// controller holds reset high whenever no acquisition is under way or waiting to
// be read, and releases it when a new acquisition starts. The count appears on q
// only while data_req is high (q is 0 otherwise), so the bus side sees a result
// only when it asks for one. The width of 16 bits follows the source design; the
// wrap-around at 2^16 and the meaning given to reset and data_req are this
// design's choices.
module tero_counter #(
  parameter int unsigned CNT_W = 16
) (
  input  logic             osc,          // selected TERO output, used as clock
  input  logic             reset,        // asynchronous clear, active high
  input  logic             enable_tero,  // count enable
  input  logic             data_req,     // output enable of the result
  output logic [CNT_W-1:0] q             // count, 0 while data_req is low
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [CNT_W-1:0] count;

  always_ff @(posedge osc or posedge reset) begin
    if (reset)            count <= '0;
    else if (enable_tero) count <= count + 1'b1;
  end

  assign q = data_req ? count : '0;

endmodule
