// applic_wrp_tb: checks the TERO PUF core with its default 2 x 128 cells.
// For a series of cell pairs (among them cells 9 and 15) the testbench clears the
// counters, opens a window with enable_tero, closes it and requests the data:
// appl_data must hold {oscillations of the block-2 cell, those of the block-1 cell}
// as given by the block's mismatch formula (recomputed here), or, for a window
// shorter than the burst, the number of periods that fit in the window. Without
// data_req appl_data must be 0, and reset must clear both counts.
module applic_wrp_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 128, NOMINAL = 100, SPREAD = 64;
  localparam realtime     H = 2.0;

  logic [6:0]  sel1 = '0, sel2 = '0;
  logic        enable_tero = 0, data_req = 0, reset = 0;
  logic [31:0] appl_data;
  int checks = 0, failures = 0;

  applic_wrp dut (.select_tero_1(sel1), .select_tero_2(sel2), .enable_tero(enable_tero),
                  .data_req(data_req), .reset(reset), .appl_data(appl_data));

  function automatic int unsigned expected_count(int unsigned blk, int unsigned idx);
    int unsigned k, h;
    k = blk * N + idx;
    h = (k * 32'd2654435761) ^ (k >> 3);
    return NOMINAL - SPREAD / 2 + (h % SPREAD);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (appl_data=%h)", what, appl_data);
    end
  endtask

  // One acquisition with a window of `window` ns.
  task automatic acquire(input int unsigned a, input int unsigned b, input realtime window);
    int unsigned e1, e2, fit;
    reset = 1;
    sel1  = 7'(a);
    sel2  = 7'(b);
    #5 reset = 0;
    #5 enable_tero = 1;
    #(window) enable_tero = 0;
    #20;
    check(appl_data == 0, "no data without data_req");
    data_req = 1;
    #1;
    fit = int'($floor((window / H + 1) / 2));  // rising edges at H, 3H, 5H, ... inside the window
    e1  = expected_count(0, a);
    e2  = expected_count(1, b);
    if (fit < e1) e1 = fit;
    if (fit < e2) e2 = fit;
    check(appl_data[15:0] == 16'(e1), $sformatf("block 1 cell %0d: expected %0d", a, e1));
    check(appl_data[31:16] == 16'(e2), $sformatf("block 2 cell %0d: expected %0d", b, e2));
    data_req = 0;
    #5;
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5;
    acquire(9, 15, 800.0);
    acquire(0, 0, 800.0);
    acquire(64, 0, 800.0);
    acquire(127, 127, 800.0);
    acquire(9, 15, 801.0);      // repeat gives the same counts
    acquire(33, 90, 201.0);     // window shorter than the burst
    for (int r = 0; r < 16; r++) acquire($urandom % N, $urandom % N, 800.0);
    // reset clears both counters
    data_req = 1;
    reset = 1;
    #1 check(appl_data == 0, "reset clears both counters");
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
