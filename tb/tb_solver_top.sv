// tb_solver_top: end-to-end test of the solver at its default size
// (120 nodes, three solving units of 40 columns, one updating unit).
//
// A random test system is prepared by the off-line model (offline_pkg):
// reordered matrix, LU factors, column storage and startup times. The
// testbench writes every memory over the load bus, then runs several time
// steps with new node currents, and checks for each
//   - every node voltage against the exact solution (single-precision
//     tolerance),
//   - the number of cycles between sta and completion against the length of
//     the off-line schedule,
//   - that the reorderings, the forward, backward and updating subtasks and
//     the cross-unit updates all took place.
module tb_solver_top;
  import solver_pkg::*;
  import fp_ref_pkg::*;
  import offline_pkg::*;
  localparam int N = 120, NU = 3, NK = 40;
  localparam int STEPS = 3;

  logic clk = 0, rst_n = 0, start = 0;
  load_t ld;
  fp32_t i_in [N];
  fp32_t u_out [N];
  logic busy, done;
  logic [31:0] run_cycles;
  logic [NU-1:0][NK-1:0] ena_l, ena_u;
  logic [N-1:0] ena_g;

  int checks = 0, failures = 0;
  int n_fwd = 0, n_bwd = 0, n_upd = 0, n_cross = 0, n_chain = 0, n_perm = 0;
  int cyc = 0;

  solver_top dut (.*);

  always #4 clk = ~clk;   // 125 MHz

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) for (int k = 0; k < NU; k++) begin
      n_fwd += $countones(ena_l[k]);
      n_bwd += $countones(ena_u[k]);
    end
    if (rst_n) n_upd += $countones(ena_g);
  end
  // updates delivered by the updating unit, and same-row merges
  always @(posedge clk) if (rst_n) begin
    if (dut.g_su[0].u_su.upd_sub.valid) n_cross++;
    if (dut.g_su[1].u_su.upd_sub.valid) n_cross++;
    if (dut.g_su[2].u_su.upd_sub.valid) n_cross++;
    if (dut.g_su[0].u_su.u_vec.sub[2].valid && dut.g_su[0].u_su.u_vec.sub[0].valid &&
        dut.g_su[0].u_su.u_vec.sub[2].row == dut.g_su[0].u_su.u_vec.sub[0].row) n_chain++;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic load(input rom_sel_e r, input int unit, input int a, input logic [31:0] d);
    @(negedge clk);
    ld = '{en: 1'b1, unit: 4'(unit), rom: r, addr: idx_t'(a), data: d};
  endtask

  task automatic load_csc(input rom_sel_e rp, input rom_sel_e rr, input rom_sel_e rv,
                          input int unit, input int ncol, input int col0, input entry_t q [$]);
    int cnt = 0;
    for (int c = 0; c < ncol; c++) begin
      load(rp, unit, c, 32'(cnt));
      foreach (q[e]) begin
        if (q[e].unit == unit && q[e].col == col0 + c) begin
          load(rr, unit, cnt, 32'(q[e].row));
          load(rv, unit, cnt, q[e].val);
          cnt++;
        end
      end
    end
    load(rp, unit, ncol, 32'(cnt));
  endtask

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    solver_case sc;
    entry_t gall [$];
    ld = '0;
    for (int i = 0; i < N; i++) i_in[i] = '0;
    sc = new(N, NU, NK);
    sc.build(24);
    $display("L non-zeros %0d, U non-zeros %0d, off-diagonal non-zeros %0d, schedule %0d cycles",
             sc.lq.size(), sc.uq.size(), sc.gq.size(), sc.run_cycles);
    repeat (3) @(negedge clk);
    rst_n = 1;
    // memories
    for (int m = 0; m < N; m++) begin
      load(R_P, 0, m, 32'(sc.p[m]));
      load(R_Q, 0, m, 32'(sc.q[m]));
      if (sc.p[m] != m || sc.q[m] != m) n_perm++;
    end
    for (int k = 0; k < NU; k++) begin
      for (int c = 0; c < NK; c++) begin
        load(R_LT, k, c, 32'(sc.tl[k * NK + c]));
        load(R_UT, k, c, 32'(sc.tu[k * NK + c]));
        load(R_UDIAG, k, c, sc.udiag[k * NK + c]);
      end
      load_csc(R_LPTR, R_LROW, R_LVAL, k, NK, 0, sc.lq);
      load_csc(R_UPTR, R_UROW, R_UVAL, k, NK, 0, sc.uq);
    end
    for (int c = 0; c < N; c++) load(R_GT, 0, c, 32'(sc.tg[c]));
    foreach (sc.gq[e]) begin
      gall.push_back(sc.gq[e]);
      gall[gall.size() - 1].unit = 0;
    end
    load_csc(R_GPTR, R_GROW, R_GVAL, 0, N, 0, gall);
    @(negedge clk); ld = '0;

    for (int s = 0; s < STEPS; s++) begin
      int t0;
      real maxerr;
      sc.new_step();
      maxerr = 0.0;
      for (int i = 0; i < N; i++) i_in[i] = from_real(sc.i_rhs[i]);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      t0 = cyc;
      while (!done && cyc - t0 < 100000) @(negedge clk);
      checks++;
      if (!done) fail("no done");
      checks++;
      if (int'(run_cycles) != sc.run_cycles)
        fail($sformatf("step %0d: %0d cycles between sta and completion, schedule says %0d", s, run_cycles, sc.run_cycles));
      for (int i = 0; i < N; i++) begin
        real err;
        err = to_real(u_out[i]) - sc.u_true[i];
        if (err < 0.0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 1.0e-4) fail($sformatf("step %0d: u[%0d] = %f, expected %f", s, i, to_real(u_out[i]), sc.u_true[i]));
      end
      $display("step %0d: solve %0d cycles (%0d ns at 125 MHz), whole step %0d cycles, max |error| %g",
               s, run_cycles, run_cycles * 8, cyc - t0, maxerr);
    end
    $display("events: forward %0d, backward %0d, updating %0d, cross-unit updates %0d, merged same-row updates %0d, permuted positions %0d",
             n_fwd, n_bwd, n_upd, n_cross, n_chain, n_perm);
    checks++;
    if (n_fwd != STEPS * N) fail($sformatf("forward subtasks %0d", n_fwd));
    checks++;
    if (n_bwd != STEPS * N) fail($sformatf("backward subtasks %0d", n_bwd));
    checks++;
    if (n_upd == 0) fail("no updating subtask");
    checks++;
    if (n_cross != STEPS * sc.gq.size()) fail($sformatf("cross-unit updates %0d", n_cross));
    checks++;
    if (n_perm == 0) fail("no reordering");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
