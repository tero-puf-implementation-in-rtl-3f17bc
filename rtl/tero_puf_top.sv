// tero_puf_top: the TERO PUF application of the Evarist III platform.
// The application controller (applic_ctrl) drives the application wrapper
// (applic_wrp), which holds the two blocks of 128 TERO cells and their counters.
// The ports are the controller's side of the platform sequencer bus, which in the
// complete system connects to the unchanged platform sequencer and USB interface;
// here they are brought out so that a host model or another sequencer can drive
// them. Everything runs on clk_ctrl except the two oscillation counters, which
// are clocked by the selected TERO cells.
//
// Use: write a configuration command (mode 3, acquisition time, two cell
// addresses), then a start command (mode 7); after that every read of data2bus
// (wait for busy2bus low, pulse rd_data2bus) returns one acquisition,
// data2bus[15:0] = oscillations of the block-1 cell, data2bus[31:16] = those of
// the block-2 cell, and starts the next. The TERO cells are behavioural models;
// OSC_NOMINAL, OSC_SPREAD and HALF_PERIOD set their oscillation counts and period.
module tero_puf_top
  import tero_puf_pkg::*;
#(
  parameter int unsigned READ_WAIT   = 2,
  parameter int unsigned OSC_NOMINAL = 100,
  parameter int unsigned OSC_SPREAD  = 64,
  parameter realtime     HALF_PERIOD = 2.0
) (
  input  logic               clk_ctrl,
  input  logic               rst,
  input  logic [CTRL_W-1:0]  ctrl2appl,
  input  logic               wr_ctrl2appl,
  output logic [DATA_W-1:0]  data2bus,
  input  logic               rd_data2bus,
  output logic [STATE_W-1:0] state2bus,
  output logic               busy2bus
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [SEL_W-1:0]   select_tero_1, select_tero_2;
  logic               enable_tero, data_req, cnt_reset;
  logic [2*CNT_W-1:0] appl_data;

  applic_ctrl #(.READ_WAIT(READ_WAIT)) u_ctrl (
    .clk          (clk_ctrl),
    .rst          (rst),
    .ctrl2appl    (ctrl2appl),
    .wr_ctrl2appl (wr_ctrl2appl),
    .data2bus     (data2bus),
    .rd_data2bus  (rd_data2bus),
    .state2bus    (state2bus),
    .busy2bus     (busy2bus),
    .select_tero_1(select_tero_1),
    .select_tero_2(select_tero_2),
    .enable_tero  (enable_tero),
    .data_req     (data_req),
    .cnt_reset    (cnt_reset),
    .appl_data    (appl_data)
  );

  applic_wrp #(
    .N_CELLS    (1 << SEL_W),
    .SEL_W      (SEL_W),
    .CNT_W      (CNT_W),
    .OSC_NOMINAL(OSC_NOMINAL),
    .OSC_SPREAD (OSC_SPREAD),
    .HALF_PERIOD(HALF_PERIOD)
  ) u_wrp (
    .select_tero_1(select_tero_1),
    .select_tero_2(select_tero_2),
    .enable_tero  (enable_tero),
    .data_req     (data_req),
    .reset        (cnt_reset),
    .appl_data    (appl_data)
  );

endmodule
