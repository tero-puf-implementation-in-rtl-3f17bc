// tero_cell_tb: checks the behavioural TERO cell model.
// A rising control edge must give exactly OSC_COUNT rising output edges spaced
// 2*HALF_PERIOD apart, after which the output rests at 0; a second burst must
// repeat the count; dropping the control early must stop the burst and hold the
// output at 0.
module tero_cell_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 7;
  localparam realtime     H = 1.5;

  logic ctrl = 1'b0;
  logic osc;
  int   checks = 0, failures = 0;
  int   rises = 0;
  realtime t_last = 0, t_first = 0;

  tero_cell #(.OSC_COUNT(N), .HALF_PERIOD(H)) dut (.ctrl(ctrl), .osc(osc));

  always @(posedge osc) begin
    if (rises == 0) t_first = $realtime;
    t_last = $realtime;
    rises++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10;
    check(osc == 1'b0, "output low at rest");
    // Burst 1
    rises = 0;
    ctrl  = 1'b1;
    #(2 * H * N + 20);
    check(rises == N, $sformatf("burst 1: %0d rising edges, expected %0d", rises, N));
    check((t_last - t_first) > 2 * H * (N - 1) - 0.01 && (t_last - t_first) < 2 * H * (N - 1) + 0.01,
          "burst 1: period is 2*HALF_PERIOD");
    check(osc == 1'b0, "burst 1: output settles low");
    ctrl = 1'b0;
    #10;
    // Burst 2 repeats the count
    rises = 0;
    ctrl  = 1'b1;
    #(2 * H * N + 20);
    check(rises == N, $sformatf("burst 2: %0d rising edges, expected %0d", rises, N));
    ctrl = 1'b0;
    #10;
    // Early stop after three periods
    rises = 0;
    ctrl  = 1'b1;
    #(2 * H * 3 + 0.5);
    ctrl = 1'b0;
    check(osc == 1'b0, "early stop: output forced low");
    #(2 * H * N + 20);
    check(rises == 3, $sformatf("early stop: %0d rising edges, expected 3", rises));
    check(osc == 1'b0, "early stop: output stays low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
