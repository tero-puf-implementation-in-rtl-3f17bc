// tero_puf_pkg: types and constants shared by the TERO PUF application.
//
// The application sits behind the Evarist III platform sequencer and is driven by a
// 64-bit command word (ctrl2appl). The field layout below is the one of the
// communication protocol: acquisition time in bits 35:20, the two TERO cell
// addresses in bits 10:4 (block 1) and 18:12 (block 2), the mode in bits 2:0
// (0 idle, 3 configuration, 7 data acquisition), and the script-level reset
// (0x0400...) and end-of-script (0x8000...) flags in bits 58 and 63.
// The status codes reported on state2bus and the bus widths of the platform
// (128-bit data buses, 96-bit state bus) are this design's encoding choices, apart
// from the widths, which follow the platform's block diagram.
package tero_puf_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Structure of the TERO PUF: two blocks of 128 cells, 16-bit counters.
  localparam int unsigned SEL_W = 7;   // log2 of 128 cells per block
  localparam int unsigned CNT_W = 16;

  // Platform bus widths.
  localparam int unsigned CTRL_W  = 64;
  localparam int unsigned DATA_W  = 128;
  localparam int unsigned STATE_W = 96;

  // Acquisition time loaded while the controller is idle (in clk_ctrl cycles).
  localparam logic [15:0] DEFAULT_ACQ_TIME = 16'd255;

  // mode2appl field, bits 2:0 of the command word.
  typedef enum logic [2:0] {
    MODE_IDLE   = 3'd0,
    MODE_CONFIG = 3'd3,
    MODE_START  = 3'd7
  } mode_e;

  // cfg_tero field (command bits 19:4): select_tero_1 in [6:0], select_tero_2 in [14:8].
  typedef struct packed {
    logic             rsvd15;
    logic [SEL_W-1:0] sel2;
    logic             rsvd7;
    logic [SEL_W-1:0] sel1;
  } cfg_tero_t;

  // Command word ctrl2appl(63:0).
  typedef struct packed {
    logic        end_script;  // 63: end of script (handled by the host side)
    logic [3:0]  rsvd62_59;
    logic        app_reset;   // 58: reset of the application
    logic [21:0] rsvd57_36;
    logic [15:0] acq_time;    // 35:20: acquisition window in clk_ctrl cycles
    cfg_tero_t   cfg_tero;    // 19:4
    logic        rsvd3;
    logic [2:0]  mode;        // 2:0: mode2appl
  } cmd_t;

  // Controller states.
  typedef enum logic [1:0] {
    ST_IDLE,
    ST_CONFIG,
    ST_START,
    ST_READ
  } state_e;

  // Status codes reported in state2bus[7:0].
  typedef enum logic [7:0] {
    USS_IDLE   = 8'h00,
    USS_CONFIG = 8'h01,
    USS_START  = 8'h02,
    USS_READ   = 8'h03
  } status_e;

  // Command word builder, used by testbenches and by anyone scripting the device.
  function automatic logic [CTRL_W-1:0] make_cmd(logic [2:0] mode, logic [15:0] acq_time,
                                                  logic [SEL_W-1:0] sel1, logic [SEL_W-1:0] sel2);
    cmd_t c;
    c = '0;
    c.mode          = mode;
    c.acq_time      = acq_time;
    c.cfg_tero.sel1 = sel1;
    c.cfg_tero.sel2 = sel2;
    return c;
  endfunction

endpackage
