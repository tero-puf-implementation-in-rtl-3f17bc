// applic_wrp: the TERO PUF core (application wrapper).
// Two completely separate blocks of N_CELLS TERO cells. In each block a selector
// routes enable_tero to the one cell addressed by select_tero_1 (block 1) or
// select_tero_2 (block 2), a multiplexer with the same address brings that cell's
// output out, and a 16-bit counter clocked by it counts the oscillations. So
// exactly two cells, one per block, oscillate together; the PUF response is the
// comparison of their two counts, made by the host.
//
// Interface: select_tero_1/2 address the cells, enable_tero starts and gates the
// oscillation, reset clears both counters (asynchronous), data_req presents the
// counts on appl_data = {count of block 2, count of block 1}. There is no clock:
// the counters are clocked by the oscillators and all control comes registered
// from the controller. The structure follows the source design; the order of the
// two counts in appl_data is this design's choice.
module applic_wrp #(
  parameter int unsigned N_CELLS     = 128,
  parameter int unsigned SEL_W       = $clog2(N_CELLS),
  parameter int unsigned CNT_W       = 16,
  parameter int unsigned OSC_NOMINAL = 100,
  parameter int unsigned OSC_SPREAD  = 64,
  parameter realtime     HALF_PERIOD = 2.0
) (
  input  logic [SEL_W-1:0]   select_tero_1,
  input  logic [SEL_W-1:0]   select_tero_2,
  input  logic               enable_tero,
  input  logic               data_req,
  input  logic               reset,
  output logic [2*CNT_W-1:0] appl_data
);
  timeunit 1ns;
  timeprecision 1ps;

  logic [N_CELLS-1:0] ctrl1, ctrl2, osc1, osc2;
  logic               clk_cnt1, clk_cnt2;
  logic [CNT_W-1:0]   cnt1, cnt2;

  // Block 1
  tero_selector #(.N_CELLS(N_CELLS), .SEL_W(SEL_W)) u_sel1 (
    .en(enable_tero), .sel(select_tero_1), .ctrl(ctrl1));
  tero_block #(.N_CELLS(N_CELLS), .BLOCK_ID(0), .OSC_NOMINAL(OSC_NOMINAL),
               .OSC_SPREAD(OSC_SPREAD), .HALF_PERIOD(HALF_PERIOD)) u_blk1 (
    .ctrl(ctrl1), .osc(osc1));
  tero_mux #(.N_CELLS(N_CELLS), .SEL_W(SEL_W)) u_mux1 (
    .osc_in(osc1), .sel(select_tero_1), .osc_out(clk_cnt1));
  tero_counter #(.CNT_W(CNT_W)) u_cnt1 (
    .osc(clk_cnt1), .reset(reset), .enable_tero(enable_tero), .data_req(data_req), .q(cnt1));

  // Block 2
  tero_selector #(.N_CELLS(N_CELLS), .SEL_W(SEL_W)) u_sel2 (
    .en(enable_tero), .sel(select_tero_2), .ctrl(ctrl2));
  tero_block #(.N_CELLS(N_CELLS), .BLOCK_ID(1), .OSC_NOMINAL(OSC_NOMINAL),
               .OSC_SPREAD(OSC_SPREAD), .HALF_PERIOD(HALF_PERIOD)) u_blk2 (
    .ctrl(ctrl2), .osc(osc2));
  tero_mux #(.N_CELLS(N_CELLS), .SEL_W(SEL_W)) u_mux2 (
    .osc_in(osc2), .sel(select_tero_2), .osc_out(clk_cnt2));
  tero_counter #(.CNT_W(CNT_W)) u_cnt2 (
    .osc(clk_cnt2), .reset(reset), .enable_tero(enable_tero), .data_req(data_req), .q(cnt2));

  assign appl_data = {cnt2, cnt1};

endmodule
