// applic_ctrl: application controller of the TERO PUF.
// A four-state machine (IDLE, CONFIG, START, READ) between the platform sequencer
// and the TERO wrapper. The sequencer writes 64-bit command words (ctrl2appl with
// the strobe wr_ctrl2appl); the mode field moves the machine to the state of the
// same name:
//   MODE_IDLE   (0) -> IDLE    defaults: addresses 0, acquisition time 255
//   MODE_CONFIG (3) -> CONFIG  latches the cell addresses and acquisition time
//   MODE_START  (7) -> START   from IDLE or CONFIG; ignored while acquiring
// and the reset flag (bit 58) returns it to IDLE like rst does.
// START runs one acquisition: once the cell addresses have been stable for a
// cycle, the two addressed cells get enable_tero for exactly
// CNT_MAX clk cycles (CNT_MAX = configured acquisition time; 0 means 65536), then
// the machine moves to READ by itself. READ raises data_req, waits READ_WAIT
// cycles for the counters' outputs to settle into this clock domain, captures
// appl_data into data2bus[31:0] and lowers busy2bus. When the sequencer takes the
// word (rd_data2bus) the counters are cleared and the machine returns to START for
// the next acquisition, so repeated reads give consecutive acquisitions.
//
// Outputs are registers, as in the state diagram where each state assigns
// status2bus, tero_adr and acq_time. The counter clear (cnt_reset) is a register
// of its own, high in IDLE and CONFIG and from a read until the next window, so
// that it never glitches when enable_tero and data_req change together. It is low
// during rst and rises in the first IDLE cycle, so the counters always see a
// clearing edge after a reset.
// busy2bus is high while an acquisition runs or its result is not yet captured.
// The states, their register assignments, the mode codes, the command layout and
// the 255-cycle default follow the source design. The READ to START return on a
// read, the READ_WAIT delay, the counter-clear register, the status codes, the
// synchronous active-high rst and the meaning of busy2bus are this design's
// choices. The platform's data2appl/wr_data2appl channel carries nothing for this
// application and is left out.
module applic_ctrl
  import tero_puf_pkg::*;
#(
  parameter int unsigned READ_WAIT = 2  // clk cycles between data_req and capture
) (
  input  logic               clk,           // clk_ctrl
  input  logic               rst,           // synchronous, active high
  // sequencer side
  input  logic [CTRL_W-1:0]  ctrl2appl,
  input  logic               wr_ctrl2appl,
  output logic [DATA_W-1:0]  data2bus,
  input  logic               rd_data2bus,
  output logic [STATE_W-1:0] state2bus,
  output logic               busy2bus,
  // wrapper side
  output logic [SEL_W-1:0]   select_tero_1,
  output logic [SEL_W-1:0]   select_tero_2,
  output logic               enable_tero,
  output logic               data_req,
  output logic               cnt_reset,
  input  logic [2*CNT_W-1:0] appl_data
);
  timeunit 1ns;
  timeprecision 1ps;

  cmd_t        cmd_in;
  cfg_tero_t   cmd_tero_q;    // configuration fields of the last command
  logic [15:0] cmd_acq_q;
  state_e      state;
  status_e     status2bus;
  cfg_tero_t   tero_adr, cfg_tero_s;
  logic [15:0] acq_time, cfg_acq_time_s, captur_window;
  logic [$clog2(READ_WAIT+1)-1:0] wait_cnt;
  logic        data_valid;
  logic [DATA_W-1:0] data_q;

  assign cmd_in = cmd_t'(ctrl2appl);

  always_ff @(posedge clk) begin
    if (rst) begin
      state          <= ST_IDLE;
      cmd_tero_q     <= '0;
      cmd_acq_q      <= '0;
      status2bus     <= USS_IDLE;
      tero_adr       <= '0;
      acq_time       <= '0;
      cfg_tero_s     <= '0;
      cfg_acq_time_s <= DEFAULT_ACQ_TIME;
      captur_window  <= '0;
      enable_tero    <= 1'b0;
      data_req       <= 1'b0;
      cnt_reset      <= 1'b0;  // rises in IDLE, right after rst
      wait_cnt       <= '0;
      data_valid     <= 1'b0;
      data_q         <= '0;
    end else begin
      // State actions (register assignments of the state diagram).
      unique case (state)
        ST_IDLE: begin
          status2bus     <= USS_IDLE;
          tero_adr       <= '0;
          acq_time       <= '0;
          cfg_tero_s     <= '0;
          cfg_acq_time_s <= DEFAULT_ACQ_TIME;
          captur_window  <= '0;
          enable_tero    <= 1'b0;
          data_req       <= 1'b0;
          cnt_reset      <= 1'b1;
          data_valid     <= 1'b0;
        end
        ST_CONFIG: begin
          status2bus     <= USS_CONFIG;
          tero_adr       <= '0;
          acq_time       <= '0;
          cfg_tero_s     <= cmd_tero_q;
          cfg_acq_time_s <= cmd_acq_q;
          captur_window  <= '0;
          enable_tero    <= 1'b0;
          data_req       <= 1'b0;
          cnt_reset      <= 1'b1;
          data_valid     <= 1'b0;
        end
        ST_START: begin
          status2bus <= USS_START;
          tero_adr   <= cfg_tero_s;
          acq_time   <= cfg_acq_time_s;   // CNT_MAX
          cnt_reset  <= 1'b0;
          data_req   <= 1'b0;
          if (!enable_tero && captur_window == '0 && tero_adr == cfg_tero_s) begin
            enable_tero <= 1'b1;          // addresses settled: open the capture window
          end else if (enable_tero) begin
            captur_window <= captur_window + 1'b1;
            if (16'(captur_window + 1'b1) == acq_time) begin
              enable_tero <= 1'b0;        // window of CNT_MAX cycles is over
              data_req    <= 1'b1;
              wait_cnt    <= '0;
              state       <= ST_READ;
            end
          end
        end
        ST_READ: begin
          status2bus <= USS_READ;
          tero_adr   <= cfg_tero_s;
          acq_time   <= cfg_acq_time_s;
          if (!data_valid) begin
            if (wait_cnt == READ_WAIT[$bits(wait_cnt)-1:0]) begin
              data_q     <= DATA_W'(appl_data);
              data_valid <= 1'b1;
            end else begin
              wait_cnt <= wait_cnt + 1'b1;
            end
          end else if (rd_data2bus) begin
            // Result taken: clear the counters and start the next acquisition.
            data_valid    <= 1'b0;
            data_req      <= 1'b0;
            cnt_reset     <= 1'b1;
            captur_window <= '0;
            state         <= ST_START;
          end
        end
        default: state <= ST_IDLE;
      endcase

      // Commands from the sequencer take precedence over the state's own moves.
      if (wr_ctrl2appl) begin
        cmd_tero_q <= cmd_in.cfg_tero;
        cmd_acq_q  <= cmd_in.acq_time;
        if (cmd_in.app_reset) begin
          state <= ST_IDLE;
        end else begin
          unique case (cmd_in.mode)
            MODE_IDLE:   state <= ST_IDLE;
            MODE_CONFIG: state <= ST_CONFIG;
            MODE_START:  if (state == ST_IDLE || state == ST_CONFIG) begin
                           state         <= ST_START;
                           captur_window <= '0;
                         end
            default: ;
          endcase
        end
      end
    end
  end

  assign select_tero_1 = tero_adr.sel1;
  assign select_tero_2 = tero_adr.sel2;
  assign data2bus      = data_q;
  assign state2bus     = STATE_W'(status2bus);
  assign busy2bus      = (state == ST_START) || (state == ST_READ && !data_valid);

endmodule
