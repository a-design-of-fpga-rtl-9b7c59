// tb_sub_timer: loads random startup times (some zero, i.e. disabled),
// pulses sta and checks cycle by cycle that ena[K] is high exactly in the
// cycle T[K] after the sta cycle and never otherwise, and that busy falls
// after the largest startup time. A second sta restarts the timers.
module tb_sub_timer;
  import solver_pkg::*;
  localparam int NT = 12;
  logic clk = 0, rst_n = 0, ld_en = 0, sta = 0;
  idx_t ld_addr = 0;
  time_t ld_data = 0;
  logic [NT-1:0] ena;
  logic busy;
  int tval [NT];
  int checks = 0, failures = 0;
  int fires = 0;

  sub_timer #(.NT(NT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_once();
    int tmax = 0;
    @(negedge clk); sta = 1;
    @(negedge clk); sta = 0;
    for (int k = 0; k < NT; k++) if (tval[k] > tmax) tmax = tval[k];
    // now in cycle 1 after sta
    for (int c = 1; c <= tmax + 3; c++) begin
      for (int k = 0; k < NT; k++) begin
        checks++;
        if (ena[k] !== (tval[k] == c)) begin
          failures++;
          $display("FAIL cycle %0d ena[%0d]=%b T=%0d", c, k, ena[k], tval[k]);
        end
        if (ena[k]) fires++;
      end
      checks++;
      if (busy !== (c <= tmax)) begin
        failures++;
        $display("FAIL cycle %0d busy=%b", c, busy);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      for (int k = 0; k < NT; k++) begin
        tval[k] = (k == 3) ? 0 : 1 + ($urandom % 40);
        @(negedge clk);
        ld_en = 1; ld_addr = idx_t'(k); ld_data = time_t'(tval[k]);
      end
      @(negedge clk); ld_en = 0;
      run_once();
    end
    checks++;
    if (fires != 3 * (NT - 1)) begin
      failures++;
      $display("FAIL fired %0d subtasks", fires);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
