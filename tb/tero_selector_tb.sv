// tero_selector_tb: exhaustive check of the enable selector at 128 cells.
// For every address, with the enable high exactly that cell's control must be
// high; with the enable low every control must be low.
module tero_selector_tb;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N = 128;
  logic           en;
  logic [6:0]     sel;
  logic [N-1:0]   ctrl;
  int checks = 0, failures = 0;

  tero_selector dut (.en(en), .sel(sel), .ctrl(ctrl));

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      for (int e = 0; e < 2; e++) begin
        logic [N-1:0] expected;
        en  = e[0];
        sel = 7'(i);
        #1;
        expected = '0;
        if (e == 1) expected[i] = 1'b1;
        checks++;
        if (ctrl !== expected) begin
          failures++;
          $display("FAIL: sel=%0d en=%0d ctrl=%h", i, e, ctrl);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
