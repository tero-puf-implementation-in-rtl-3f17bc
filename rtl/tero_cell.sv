// tero_cell: behavioural model of one Transient Effect Ring Oscillator (TERO) cell.
// This is a simulation model, not synthesizable logic: on the FPGA the cell is a
// placed hard macro (on Spartan 6, two cross-coupled branches of inverters and AND
// gates, 7 inverters in all), whose useful property is analog.
//
// Behaviour: while ctrl is low the cell rests with osc = 0. A rising edge on ctrl
// starts a transient oscillation: osc makes OSC_COUNT full periods of
// 2*HALF_PERIOD ns (one rising edge per period), then settles at 0 and stays
// there until ctrl falls and rises again. Dropping ctrl forces osc to 0 and ends
// the burst; ctrl must then stay low for at least HALF_PERIOD before the next
// burst. The number of oscillations is what the PUF measures; on silicon it
// depends on the mismatch between the two branches of the cell, here it is the
// parameter OSC_COUNT, which the enclosing block sets per cell.
// Like the real cell the model is a loop: each change of osc schedules the next
// one HALF_PERIOD later, as the delay around the ring does, which synthesis tools
// report as a combinational loop; that loop is the oscillator. The PUF counting
// scheme follows the source design; the fixed period, the deterministic count and
// the absence of run-to-run noise are modelling choices.
module tero_cell #(
  parameter int unsigned OSC_COUNT   = 100,  // oscillations after each rising ctrl edge
  parameter realtime     HALF_PERIOD = 2.0   // ns
) (
  input  logic ctrl,  // control: rising edge starts an oscillation burst
  output logic osc    // oscillating output
);
  timeunit 1ns;
  timeprecision 1ps;

  logic        ring;     // event travelling round the loop
  int unsigned toggles;  // output transitions since the last rising ctrl edge
  logic        burst;    // a burst is under way

  initial begin
    ring    = 1'b0;
    toggles = 0;
    burst   = 1'b0;
  end

  // Start and stop of a burst. A transition already under way when ctrl falls
  // still arrives later, but is ignored because no burst is running then.
  always @(ctrl) begin
    toggles = 0;
    burst   = ctrl && OSC_COUNT != 0;
    if (burst) ring <= #(HALF_PERIOD) ~ring;
  end

  // Each arrival of the ring event is one output transition and launches the
  // next one, until the 2*OSC_COUNT transitions of the burst are done.
  always @(ring) begin
    if (burst) begin
      toggles = toggles + 1;
      if (toggles < 2 * OSC_COUNT) ring <= #(HALF_PERIOD) ~ring;
      else burst = 1'b0;
    end
  end

  // The output is high after an odd number of transitions.
  assign osc = ctrl & toggles[0];

endmodule
