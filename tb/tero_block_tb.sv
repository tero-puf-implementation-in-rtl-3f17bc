// tero_block_tb: checks a full block of 128 TERO cell models.
// Each cell in turn gets a control pulse; the testbench counts the rising edges of
// every output and requires the pulsed cell to make exactly its own oscillation
// count (the mismatch formula of the block, recomputed here) and every other cell
// to stay silent. It also requires the counts to differ between cells.
module tero_block_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N        = 128;
  localparam int unsigned BLOCK_ID = 1;
  localparam int unsigned NOMINAL  = 100;
  localparam int unsigned SPREAD   = 64;

  logic [N-1:0] ctrl = '0;
  logic [N-1:0] osc;
  logic [N-1:0] osc_d = '0;
  int unsigned  rises [N];
  int checks = 0, failures = 0;
  int distinct = 0;

  tero_block #(.N_CELLS(N), .BLOCK_ID(BLOCK_ID), .OSC_NOMINAL(NOMINAL), .OSC_SPREAD(SPREAD),
               .HALF_PERIOD(2.0)) dut (.ctrl(ctrl), .osc(osc));

  // Rising-edge counter per output, sampled well above the oscillation rate.
  always #0.5 begin
    for (int i = 0; i < N; i++) if (osc[i] && !osc_d[i]) rises[i]++;
    osc_d = osc;
  end

  function automatic int unsigned expected_count(int unsigned idx);
    int unsigned k, h;
    k = BLOCK_ID * N + idx;
    h = (k * 32'd2654435761) ^ (k >> 3);
    return NOMINAL - SPREAD / 2 + (h % SPREAD);
  endfunction

  initial begin
    #500000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned prev;
    prev = 0;
    for (int c = 0; c < N; c++) begin
      int others;
      foreach (rises[i]) rises[i] = 0;
      #3 ctrl[c] = 1'b1;
      #((NOMINAL + SPREAD) * 4 + 10);
      ctrl[c] = 1'b0;
      #3;
      others = 0;
      for (int i = 0; i < N; i++) if (i != c) others += int'(rises[i]);
      checks++;
      if (rises[c] != expected_count(c)) begin
        failures++;
        $display("FAIL: cell %0d made %0d oscillations, expected %0d", c, rises[c], expected_count(c));
      end
      checks++;
      if (others != 0) begin
        failures++;
        $display("FAIL: cells other than %0d oscillated (%0d edges)", c, others);
      end
      if (c > 0 && rises[c] != prev) distinct++;
      prev = rises[c];
    end
    checks++;
    if (distinct < N / 2) begin
      failures++;
      $display("FAIL: only %0d neighbouring cells differ", distinct);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
