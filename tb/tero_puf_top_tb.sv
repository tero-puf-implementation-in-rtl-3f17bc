// tero_puf_top_tb: end-to-end test of the TERO PUF application at its default size
// (2 x 128 cells, 16-bit counters), acting as the platform sequencer.
// It runs the documented host script: reset, configure cells 0/0 with an 80-cycle
// window, start, read 100 acquisitions, reconfigure block 1 to cell 64, start,
// read 100, reset. It then runs the protocol example (cells 9 and 15, 80 cycles)
// with two chained reads of 100 (more than 128 reads on one configuration), a
// window too short for the oscillations to finish, an IDLE command, a
// reconfiguration in the middle of an acquisition, and a start straight from IDLE
// with the default 255-cycle window.
// Every read is compared with the oscillation counts of the two addressed cells,
// recomputed here from the cell models' mismatch formula, cut to the number of
// periods that fit in the window. Each mechanism is counted and must occur.
module tero_puf_top_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tero_puf_pkg::*;

  localparam int unsigned N = 128, NOMINAL = 100, SPREAD = 64;
  localparam realtime     H = 2.0, TCLK = 10.0;

  logic         clk_ctrl = 0, rst = 1;
  logic [63:0]  ctrl2appl = '0;
  logic         wr_ctrl2appl = 0, rd_data2bus = 0;
  logic [127:0] data2bus;
  logic [95:0]  state2bus;
  logic         busy2bus;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_reset_cmd = 0, n_config = 0, n_start = 0, n_idle = 0;
  int n_window_end = 0, n_read_restart = 0, n_truncated = 0, n_abandon = 0, n_default_win = 0;
  int n_long_chain = 0;

  // host-side copy of the configuration
  int unsigned cfg_acq = 255, cfg_s1 = 0, cfg_s2 = 0;

  tero_puf_top dut (
    .clk_ctrl(clk_ctrl), .rst(rst), .ctrl2appl(ctrl2appl), .wr_ctrl2appl(wr_ctrl2appl),
    .data2bus(data2bus), .rd_data2bus(rd_data2bus), .state2bus(state2bus), .busy2bus(busy2bus));

  always #(TCLK / 2) clk_ctrl = ~clk_ctrl;

  // START -> READ transitions taken by the controller itself.
  logic [7:0] st_d = '0;
  always @(posedge clk_ctrl) begin
    if (st_d == USS_START && state2bus[7:0] == USS_READ) n_window_end++;
    st_d <= state2bus[7:0];
  end

  function automatic int unsigned cell_count(int unsigned blk, int unsigned idx);
    int unsigned k, h;
    k = blk * N + idx;
    h = (k * 32'd2654435761) ^ (k >> 3);
    return NOMINAL - SPREAD / 2 + (h % SPREAD);
  endfunction

  // Oscillations counted in a window of `acq` clock cycles.
  function automatic int unsigned counted(int unsigned blk, int unsigned idx, int unsigned acq);
    int unsigned fit, n;
    fit = int'($floor((acq * TCLK / H + 1) / 2));
    n   = cell_count(blk, idx);
    return (fit < n) ? fit : n;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // "C <word>" line of a script.
  task automatic cmd(input logic [63:0] w);
    cmd_t c;
    c = cmd_t'(w);
    @(negedge clk_ctrl);
    ctrl2appl    = w;
    wr_ctrl2appl = 1;
    @(negedge clk_ctrl);
    wr_ctrl2appl = 0;
    if (c.app_reset) begin
      n_reset_cmd++;
      cfg_acq = 255; cfg_s1 = 0; cfg_s2 = 0;
    end else if (c.mode == MODE_CONFIG) begin
      n_config++;
      cfg_acq = (c.acq_time == 0) ? 65536 : c.acq_time;
      cfg_s1  = c.cfg_tero.sel1;
      cfg_s2  = c.cfg_tero.sel2;
    end else if (c.mode == MODE_START) begin
      n_start++;
    end else if (c.mode == MODE_IDLE) begin
      n_idle++;
      cfg_acq = 255; cfg_s1 = 0; cfg_s2 = 0;
    end
    repeat (2) @(negedge clk_ctrl);
  endtask

  // "R <n>" line of a script: n reads, each checked.
  task automatic read_n(input int n);
    for (int r = 0; r < n; r++) begin
      int unsigned guard, e1, e2;
      guard = 0;
      while (busy2bus && guard < 70000) begin
        @(negedge clk_ctrl);
        guard++;
      end
      e1 = counted(0, cfg_s1, cfg_acq);
      e2 = counted(1, cfg_s2, cfg_acq);
      if (e1 < cell_count(0, cfg_s1) || e2 < cell_count(1, cfg_s2)) n_truncated++;
      if (cfg_acq == 255) n_default_win++;
      check(!busy2bus && state2bus[7:0] == USS_READ, "result ready");
      check(data2bus == {96'b0, 16'(e2), 16'(e1)},
            $sformatf("read %0d of cells %0d/%0d: got %0d/%0d, expected %0d/%0d", r, cfg_s1, cfg_s2,
                      data2bus[15:0], data2bus[31:16], e1, e2));
      rd_data2bus = 1;
      @(negedge clk_ctrl);
      rd_data2bus = 0;
      n_read_restart += busy2bus ? 1 : 0;  // back in START: a new window runs
    end
  endtask

  initial begin
    #20ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int reads_before;
    repeat (3) @(negedge clk_ctrl);
    rst = 0;

    // The documented script.
    cmd(64'h0400_0000_0000_0000);            // reset
    check(state2bus[7:0] == USS_IDLE, "IDLE after the reset command");
    cmd(64'h0000_0000_0500_0003);            // configuration: cells 0/0, 80 cycles
    check(state2bus[7:0] == USS_CONFIG, "CONFIG");
    cmd(64'h0000_0000_0000_0007);            // acquisition mode
    read_n(100);
    cmd(64'h0000_0000_0500_0403);            // configuration: cell 64 of block 1
    check(cfg_s1 == 64 && cfg_s2 == 0 && cfg_acq == 80, "script decodes to cells 64/0, 80 cycles");
    cmd(64'h0000_0000_0000_0007);
    read_n(100);
    cmd(64'h0400_0000_0000_0000);            // reset
    check(state2bus[7:0] == USS_IDLE, "IDLE after the second reset command");

    // Protocol example with chained reads.
    cmd(64'h0000_0000_0500_F093);            // cells 9 and 15, 80 cycles
    check(cfg_s1 == 9 && cfg_s2 == 15 && cfg_acq == 80, "example decodes to cells 9/15, 80 cycles");
    cmd(64'h0000_0000_0000_0007);
    reads_before = n_read_restart;
    read_n(100);
    read_n(100);
    if (n_read_restart - reads_before > 128) n_long_chain++;

    // Window too short for the oscillations to end (20 cycles).
    cmd(make_cmd(MODE_CONFIG, 16'd20, 7'd33, 7'd90));
    cmd(64'h0000_0000_0000_0007);
    read_n(5);

    // IDLE, then start from IDLE with the default window.
    cmd(64'h0000_0000_0000_0000);
    check(state2bus[7:0] == USS_IDLE, "IDLE command");
    cmd(64'h0000_0000_0000_0007);
    read_n(3);

    // Reconfiguration in the middle of an acquisition.
    cmd(make_cmd(MODE_CONFIG, 16'd40, 7'd127, 7'd127));
    cmd(64'h0000_0000_0000_0007);
    repeat (10) @(negedge clk_ctrl);
    check(busy2bus && state2bus[7:0] == USS_START, "acquisition under way");
    cmd(make_cmd(MODE_CONFIG, 16'd60, 7'd5, 7'd6));
    if (state2bus[7:0] == USS_CONFIG) n_abandon++;
    cmd(64'h0000_0000_0000_0007);
    read_n(4);

    // Every mechanism must have happened.
    check(n_reset_cmd >= 2,    "reset command used");
    check(n_config >= 5,       "configuration used");
    check(n_start >= 6,        "start used");
    check(n_idle >= 1,         "IDLE command used");
    check(n_window_end >= 400, "START to READ at the end of the window");
    check(n_read_restart >= 400, "READ to START after a read");
    check(n_long_chain == 1,   "more than 128 chained reads on one configuration");
    check(n_truncated >= 5,    "window shorter than the oscillation");
    check(n_default_win >= 3,  "default 255-cycle window");
    check(n_abandon == 1,      "acquisition abandoned by reconfiguration");
    $display("mechanisms: reset=%0d config=%0d start=%0d idle=%0d window_end=%0d read_restart=%0d",
             n_reset_cmd, n_config, n_start, n_idle, n_window_end, n_read_restart);
    $display("            long_chain=%0d truncated=%0d default_window=%0d abandoned=%0d",
             n_long_chain, n_truncated, n_default_win, n_abandon);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
