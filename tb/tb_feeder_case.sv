// tb_feeder_case: runs the solver at its default size on a system shaped
// like the evaluated distribution network: 120 unknowns in three radial
// blocks of 38 nodes plus six independent elements, 342 non-zeros in all.
// Each 38-node tree is the 33-bus feeder
//   1-2-...-18, 2-19-...-22, 3-23-24-25, 6-26-...-33
// extended by five nodes: one behind each PV connection point (buses 33, 22
// and 18) and one more behind each of the first two. Conductances are random.
// The leaves-first ordering gives factors without fill, so every forward
// and backward column has one non-zero (the parent), the updating unit has
// nothing to do, and the solve time is set by the depth of the trees.
// Checks: the non-zero count, the solved voltages against the exact
// solution, and the cycle count against the off-line schedule; it prints
// the solve time at 125 MHz.
module tb_feeder_case;
  import solver_pkg::*;
  import fp_ref_pkg::*;
  import offline_pkg::*;
  localparam int N = 120, NU = 3, NK = 40, NB = 38;

  logic clk = 0, rst_n = 0, start = 0;
  load_t ld;
  fp32_t i_in [N];
  fp32_t u_out [N];
  logic busy, done;
  logic [31:0] run_cycles;
  logic [NU-1:0][NK-1:0] ena_l, ena_u;
  logic [N-1:0] ena_g;
  int checks = 0, failures = 0, cyc = 0;

  solver_top dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL: %s", msg);
  endtask

  task automatic load(input rom_sel_e r, input int unit, input int a, input logic [31:0] d);
    @(negedge clk);
    ld = '{en: 1'b1, unit: 4'(unit), rom: r, addr: idx_t'(a), data: d};
  endtask

  task automatic load_csc(input rom_sel_e rp, input rom_sel_e rr, input rom_sel_e rv,
                          input int unit, input int ncol, input entry_t q [$]);
    int cnt = 0;
    for (int c = 0; c < ncol; c++) begin
      load(rp, unit, c, 32'(cnt));
      foreach (q[e]) begin
        if (q[e].unit == unit && q[e].col == c) begin
          load(rr, unit, cnt, 32'(q[e].row));
          load(rv, unit, cnt, q[e].val);
          cnt++;
        end
      end
    end
    load(rp, unit, ncol, 32'(cnt));
  endtask

  // parent of each bus (0-based: bus b is node b-1), then the five added nodes
  function automatic void feeder(ref int parent []);
    parent = new[NB];
    parent[0] = -1;
    for (int b = 2; b <= 18; b++) parent[b - 1] = b - 2;
    parent[18] = 1;                                     // 19 on 2
    for (int b = 20; b <= 22; b++) parent[b - 1] = b - 2;
    parent[22] = 2;                                     // 23 on 3
    for (int b = 24; b <= 25; b++) parent[b - 1] = b - 2;
    parent[25] = 5;                                     // 26 on 6
    for (int b = 27; b <= 33; b++) parent[b - 1] = b - 2;
    parent[33] = 32;                                    // behind bus 33
    parent[34] = 21;                                    // behind bus 22
    parent[35] = 17;                                    // behind bus 18
    parent[36] = 33;
    parent[37] = 34;
  endfunction

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    solver_case sc;
    int parent [];
    entry_t gall [$];
    ld = '0;
    for (int i = 0; i < N; i++) i_in[i] = '0;
    feeder(parent);
    sc = new(N, NU, NK);
    sc.build_tree(parent);
    checks++;
    if (sc.nonzeros() != 342) fail($sformatf("%0d non-zeros", sc.nonzeros()));
    $display("non-zeros %0d, L %0d, U %0d, off-diagonal %0d, schedule %0d cycles",
             sc.nonzeros(), sc.lq.size(), sc.uq.size(), sc.gq.size(), sc.run_cycles);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < N; m++) begin
      load(R_P, 0, m, 32'(sc.p[m]));
      load(R_Q, 0, m, 32'(sc.q[m]));
    end
    for (int k = 0; k < NU; k++) begin
      for (int c = 0; c < NK; c++) begin
        load(R_LT, k, c, 32'(sc.tl[k * NK + c]));
        load(R_UT, k, c, 32'(sc.tu[k * NK + c]));
        load(R_UDIAG, k, c, sc.udiag[k * NK + c]);
      end
      load_csc(R_LPTR, R_LROW, R_LVAL, k, NK, sc.lq);
      load_csc(R_UPTR, R_UROW, R_UVAL, k, NK, sc.uq);
    end
    for (int c = 0; c < N; c++) load(R_GT, 0, c, 32'(sc.tg[c]));
    load_csc(R_GPTR, R_GROW, R_GVAL, 0, N, gall);
    @(negedge clk); ld = '0;
    for (int s = 0; s < 2; s++) begin
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
      if (int'(run_cycles) != sc.run_cycles) fail($sformatf("%0d cycles, schedule %0d", run_cycles, sc.run_cycles));
      for (int i = 0; i < N; i++) begin
        real err;
        err = to_real(u_out[i]) - sc.u_true[i];
        if (err < 0.0) err = -err;
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 1.0e-3) fail($sformatf("u[%0d] = %f, expected %f", i, to_real(u_out[i]), sc.u_true[i]));
      end
      $display("step %0d: solve %0d cycles = %0d ns at 125 MHz; with reordering %0d cycles = %0d ns; max |error| %g",
               s, run_cycles, run_cycles * 8, cyc - t0, (cyc - t0) * 8, maxerr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
