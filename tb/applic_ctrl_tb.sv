// applic_ctrl_tb: checks the application controller on its own, with the wrapper
// replaced by a testbench-driven appl_data word.
// It sends the command words of the protocol and checks the state reported on
// state2bus, the cell addresses, the length of every capture window in clock
// cycles (the configured acquisition time, 255 after IDLE), the counter clear,
// data_req, the capture of appl_data into data2bus, busy2bus, the return to START
// on each read, and the IDLE, CONFIG and reset commands in the middle of an
// acquisition.
module applic_ctrl_tb;
  timeunit 1ns;
  timeprecision 1ps;
  import tero_puf_pkg::*;

  logic               clk = 0, rst = 1;
  logic [63:0]        ctrl2appl = '0;
  logic               wr_ctrl2appl = 0, rd_data2bus = 0;
  logic [127:0]       data2bus;
  logic [95:0]        state2bus;
  logic               busy2bus;
  logic [6:0]         sel1, sel2;
  logic               enable_tero, data_req, cnt_reset;
  logic [31:0]        appl_data = '0;
  int checks = 0, failures = 0;

  // Length of the last completed enable_tero run, and addresses seen during it.
  int unsigned run_len = 0, last_len = 0, windows = 0;
  logic [6:0]  run_sel1, run_sel2;
  bit          sel_stable = 1, clr_low = 1;

  applic_ctrl dut (
    .clk(clk), .rst(rst), .ctrl2appl(ctrl2appl), .wr_ctrl2appl(wr_ctrl2appl),
    .data2bus(data2bus), .rd_data2bus(rd_data2bus), .state2bus(state2bus), .busy2bus(busy2bus),
    .select_tero_1(sel1), .select_tero_2(sel2), .enable_tero(enable_tero), .data_req(data_req),
    .cnt_reset(cnt_reset), .appl_data(appl_data));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (enable_tero) begin
      if (run_len == 0) begin
        run_sel1 = sel1;
        run_sel2 = sel2;
        sel_stable = 1;
        clr_low = 1;
      end
      if (sel1 != run_sel1 || sel2 != run_sel2) sel_stable = 0;
      if (cnt_reset) clr_low = 0;
      run_len++;
    end else if (run_len != 0) begin
      last_len = run_len;
      run_len  = 0;
      windows++;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic send(input logic [63:0] w);
    @(negedge clk);
    ctrl2appl    = w;
    wr_ctrl2appl = 1;
    @(negedge clk);
    wr_ctrl2appl = 0;
  endtask

  task automatic expect_status(input status_e s);
    repeat (2) @(negedge clk);
    check(state2bus == 96'(s), $sformatf("status %s, got %0d", s.name(), state2bus[7:0]));
  endtask

  // Wait for the result of an acquisition, check it and read it.
  task automatic read_result(input int unsigned win, input logic [6:0] a, input logic [6:0] b,
                             input logic [31:0] value);
    int unsigned guard;
    guard = 0;
    appl_data = value;
    while (busy2bus && guard < 70000) begin
      @(negedge clk);
      guard++;
    end
    check(last_len == win, $sformatf("window of %0d cycles, expected %0d", last_len, win));
    check(run_sel1 == a && run_sel2 == b && sel_stable,
          $sformatf("addresses %0d/%0d during window, expected %0d/%0d", run_sel1, run_sel2, a, b));
    check(clr_low, "counter clear low during the window");
    check(state2bus == 96'(USS_READ), "status READ when the result is ready");
    check(data_req && !enable_tero && !cnt_reset, "data_req high, enable and clear low in READ");
    check(data2bus == 128'(value), $sformatf("data2bus %h, expected %h", data2bus, value));
    rd_data2bus = 1;
    @(negedge clk);
    rd_data2bus = 0;
    check(busy2bus, "busy again after the read");
    check(cnt_reset, "counters cleared after the read");
  endtask

  initial begin
    #5000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (2) @(negedge clk);
    check(state2bus == 96'(USS_IDLE) && !busy2bus && !enable_tero && cnt_reset,
          "idle after reset, counters cleared");

    // Protocol example: cells 9 and 15, window 80 cycles.
    send(64'h0000_0000_0500_F093);
    expect_status(USS_CONFIG);
    check(sel1 == 0 && sel2 == 0 && !enable_tero, "addresses 0 in CONFIG");
    send(64'h0000_0000_0000_0007);
    expect_status(USS_START);
    read_result(80, 7'd9, 7'd15, 32'h1234_5678);
    read_result(80, 7'd9, 7'd15, 32'h0042_0051);   // next acquisition after a read
    // MODE_START while acquiring is ignored: the window keeps its length.
    send(64'h0000_0000_0000_0007);
    read_result(80, 7'd9, 7'd15, 32'hFFFF_0001);

    // IDLE from READ, then START straight from IDLE: default 255 cycles, cells 0.
    wait (!busy2bus);
    send(64'h0000_0000_0000_0000);
    expect_status(USS_IDLE);
    send(64'h0000_0000_0000_0007);
    read_result(255, 7'd0, 7'd0, 32'hABCD_0000);

    // Reconfigure during an acquisition: the window is abandoned.
    send(64'h0000_0000_0000_0003 | (64'd1000 << 20) | (64'd127 << 4) | (64'd100 << 12));
    expect_status(USS_CONFIG);
    send(64'h0000_0000_0000_0007);
    repeat (50) @(negedge clk);
    check(enable_tero && state2bus == 96'(USS_START), "acquiring");
    send(make_cmd(MODE_CONFIG, 16'd1, 7'd3, 7'd4));
    @(negedge clk);
    check(!enable_tero && state2bus == 96'(USS_CONFIG), "window abandoned by MODE_CONFIG");
    send(64'h0000_0000_0000_0007);
    read_result(1, 7'd3, 7'd4, 32'h0000_0001);      // shortest window

    // Reset command of the script.
    send(make_cmd(MODE_CONFIG, 16'd300, 7'd1, 7'd2));
    send(64'h0000_0000_0000_0007);
    repeat (20) @(negedge clk);
    send(64'h0400_0000_0000_0000);
    expect_status(USS_IDLE);
    check(!enable_tero && cnt_reset && sel1 == 0 && sel2 == 0, "reset command returns to IDLE");
    send(64'h0000_0000_0000_0007);
    read_result(255, 7'd0, 7'd0, 32'h5555_AAAA);    // configuration was reset too
    // Six windows were read; two more ran to their end unread and three were
    // abandoned (twice by MODE_CONFIG, once by the reset command).
    check(windows == 11, $sformatf("%0d windows completed, expected 11", windows));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
