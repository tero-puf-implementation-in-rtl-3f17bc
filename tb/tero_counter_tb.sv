// tero_counter_tb: checks the oscillation counter with hand-made clock bursts.
// Bursts of known length must be counted exactly while enable_tero is high and
// ignored while it is low; the result must appear only while data_req is high;
// reset must clear it with no clock running; the counter wraps at 2^16.
module tero_counter_tb;
  timeunit 1ns;
  timeprecision 1ps;

  logic        osc = 0, reset = 0, enable_tero = 0, data_req = 0;
  logic [15:0] q;
  int checks = 0, failures = 0;

  tero_counter dut (.osc(osc), .reset(reset), .enable_tero(enable_tero),
                                  .data_req(data_req), .q(q));

  task automatic burst(input int n);
    repeat (n) begin
      #2 osc = 1'b1;
      #2 osc = 1'b0;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (q=%0d)", what, q);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1 reset = 1;
    #5 reset = 0;
    data_req = 1;
    #1 check(q == 0, "cleared after reset");
    enable_tero = 1;
    burst(37);
    #1 check(q == 37, "counts 37 oscillations");
    enable_tero = 0;
    burst(10);
    #1 check(q == 37, "holds while enable_tero is low");
    data_req = 0;
    #1 check(q == 0, "output is 0 without data_req");
    data_req = 1;
    #1 check(q == 37, "value kept while not requested");
    enable_tero = 1;
    burst(5);
    #1 check(q == 42, "continues counting");
    reset = 1;
    #1 check(q == 0, "asynchronous clear without a clock edge");
    burst(3);
    #1 check(q == 0, "no counting while reset");
    reset = 0;
    for (int k = 0; k < 20; k++) begin
      int n;
      n = 1 + int'($urandom % 300);
      reset = 1;
      #1 reset = 0;
      burst(n);
      #1 check(q == 16'(n), $sformatf("random burst of %0d", n));
    end
    reset = 1;
    #1 reset = 0;
    burst(65536 + 3);
    #1 check(q == 3, "wraps at 2^16");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
