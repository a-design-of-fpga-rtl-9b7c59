// tb_global_control: the global control with behavioural processing units.
// The testbench records the currents the controller writes into each unit,
// answers its reads with a value derived from each position, and raises
// units_done a chosen number of cycles after sta. It checks the reordering
// i''[m] = i[p[m]] on the way in, u[q[m]] = u''[m] on the way out, the
// single sta pulse, the reported run length and the done pulse.
module tb_global_control;
  import solver_pkg::*;
  localparam int N = 10, NK = 4, NU = 3;
  logic clk = 0, rst_n = 0, start = 0;
  load_t ld;
  fp32_t i_in [N];
  fp32_t u_out [N];
  logic busy, done_o, sta, units_done;
  logic [31:0] run_cycles;
  vec_wr_t vin [NU];
  idx_t out_rd_idx;
  fp32_t out_rd_val [NU];
  fp32_t got [N];
  int p [N], q [N];
  int checks = 0, failures = 0, cyc = 0, sta_cyc = -1, n_sta = 0, delay = 5;

  global_control #(.N(N), .NK(NK), .NU(NU)) dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic fp32_t upp(input int m);
    return 32'h4000_0000 + 32'(m * 1000);
  endfunction

  always_comb begin
    for (int u = 0; u < NU; u++) out_rd_val[u] = upp(u * NK + int'(out_rd_idx));
  end

  always @(posedge clk) if (rst_n) begin
    for (int u = 0; u < NU; u++) if (vin[u].valid) got[u * NK + int'(vin[u].idx)] = vin[u].val;
    if (sta) begin
      sta_cyc = cyc;
      n_sta++;
    end
  end
  assign units_done = (sta_cyc >= 0) && (cyc - sta_cyc >= delay) && !sta;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic shuffle(ref int a [N]);
    for (int i = 0; i < N; i++) a[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int j, t;
      j = $urandom % (i + 1);
      t = a[i]; a[i] = a[j]; a[j] = t;
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = '0; start = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      int t0, dones;
      shuffle(p); shuffle(q);
      for (int m = 0; m < N; m++) begin
        @(negedge clk); ld = '{en: 1'b1, unit: 4'd0, rom: R_P, addr: idx_t'(m), data: 32'(p[m])};
        @(negedge clk); ld = '{en: 1'b1, unit: 4'd0, rom: R_Q, addr: idx_t'(m), data: 32'(q[m])};
      end
      @(negedge clk); ld = '0;
      for (int i = 0; i < N; i++) i_in[i] = $urandom;
      delay = 3 + $urandom % 20;
      sta_cyc = -1;
      n_sta = 0;
      dones = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t0 = cyc;
      while (!done_o && cyc - t0 < 1000) @(negedge clk);
      checks++;
      if (!done_o) fail("no done");
      checks++;
      if (n_sta != 1) fail($sformatf("%0d sta pulses", n_sta));
      checks++;
      if (int'(run_cycles) != delay) fail($sformatf("run_cycles %0d, expected %0d", run_cycles, delay));
      for (int m = 0; m < N; m++) begin
        checks += 2;
        if (got[m] !== i_in[p[m]]) fail($sformatf("i''[%0d] = %h, expected %h", m, got[m], i_in[p[m]]));
        if (u_out[q[m]] !== upp(m)) fail($sformatf("u[%0d] = %h, expected %h", q[m], u_out[q[m]], upp(m)));
      end
      @(negedge clk);
      checks++;
      if (done_o || busy) fail("done held or busy after completion");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
