// tero_mux_tb: checks the 128-to-1 output multiplexer.
// For random input vectors every address must forward its own input bit, and a
// one-hot input must reach the output only at its own address.
module tero_mux_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 128;
  logic [N-1:0] osc_in;
  logic [6:0]   sel;
  logic         osc_out;
  int checks = 0, failures = 0;

  tero_mux dut (.osc_in(osc_in), .sel(sel), .osc_out(osc_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      for (int w = 0; w < N / 32; w++) osc_in[w*32 +: 32] = $urandom;
      for (int i = 0; i < N; i++) begin
        sel = 7'(i);
        #1;
        check(osc_out == osc_in[i], $sformatf("random vector %0d, sel=%0d", r, i));
      end
    end
    for (int h = 0; h < N; h += 9) begin
      osc_in = '0;
      osc_in[h] = 1'b1;
      for (int i = 0; i < N; i++) begin
        sel = 7'(i);
        #1;
        check(osc_out == (i == h), $sformatf("one-hot %0d, sel=%0d", h, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
