// tb_solving_unit: one solving unit (unit number 1) on its own. A random
// 40x40 diagonal part (38-node block plus two independent elements) is
// factored and scheduled by the off-line model; its memories are written
// over the load bus, followed by loads addressed to another unit, which must
// be ignored. The reordered currents are written through vin, sta is
// pulsed, and the testbench checks the completion time against the
// schedule and every solved voltage, read through both read ports, against
// the exact solution. Two time steps are run.
module tb_solving_unit;
  import solver_pkg::*;
  import fp_ref_pkg::*;
  import offline_pkg::*;
  localparam int NK = 40, ID = 1;
  logic clk = 0, rst_n = 0, sta = 0;
  load_t ld;
  vec_wr_t vin;
  sub_req_t upd_sub;
  idx_t upd_rd_idx, out_rd_idx;
  fp32_t upd_rd_val, out_rd_val;
  logic done;
  logic [NK-1:0] ena_l, ena_u;
  int checks = 0, failures = 0, cyc = 0, n_l = 0, n_u = 0;

  solving_unit #(.UNIT_ID(ID)) dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      n_l += $countones(ena_l);
      n_u += $countones(ena_u);
    end
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
                          input int unit, input entry_t q [$]);
    int cnt = 0;
    for (int c = 0; c < NK; c++) begin
      load(rp, unit, c, 32'(cnt));
      foreach (q[e]) begin
        if (q[e].col == c) begin
          load(rr, unit, cnt, 32'(q[e].row));
          load(rv, unit, cnt, q[e].val);
          cnt++;
        end
      end
    end
    load(rp, unit, NK, 32'(cnt));
  endtask

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    solver_case sc;
    ld = '0; vin = '0; upd_sub = '0; upd_rd_idx = '0; out_rd_idx = '0;
    sc = new(NK, 1, NK);
    sc.build(0);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < NK; c++) begin
      load(R_LT, ID, c, 32'(sc.tl[c]));
      load(R_UT, ID, c, 32'(sc.tu[c]));
      load(R_UDIAG, ID, c, sc.udiag[c]);
    end
    load_csc(R_LPTR, R_LROW, R_LVAL, ID, sc.lq);
    load_csc(R_UPTR, R_UROW, R_UVAL, ID, sc.uq);
    // loads for another unit must not disturb this one
    for (int c = 0; c < NK; c++) begin
      load(R_LVAL, 0, c, 32'hc000_0000);
      load(R_UVAL, 2, c, 32'h4000_0000);
    end
    @(negedge clk); ld = '0;
    for (int s = 0; s < 2; s++) begin
      int t0;
      sc.new_step();
      for (int m = 0; m < NK; m++) begin
        @(negedge clk);
        vin = '{valid: 1'b1, idx: idx_t'(m), val: from_real(sc.i_rhs[sc.p[m]])};
      end
      @(negedge clk); vin = '0; sta = 1;
      @(posedge clk); t0 = cyc;
      @(negedge clk); sta = 0;
      while (!done && cyc - t0 < 20000) @(negedge clk);
      checks++;
      if (cyc - t0 != sc.run_cycles) fail($sformatf("done after %0d cycles, schedule %0d", cyc - t0, sc.run_cycles));
      for (int m = 0; m < NK; m++) begin
        real e1, e2;
        out_rd_idx = idx_t'(m);
        upd_rd_idx = idx_t'(NK - 1 - m);
        #1;
        e1 = to_real(out_rd_val) - sc.u_true[sc.q[m]];
        e2 = to_real(upd_rd_val) - sc.u_true[sc.q[NK - 1 - m]];
        checks += 2;
        if (e1 > 1.0e-4 || e1 < -1.0e-4) fail($sformatf("u''[%0d] = %f, expected %f", m, to_real(out_rd_val), sc.u_true[sc.q[m]]));
        if (e2 > 1.0e-4 || e2 < -1.0e-4) fail($sformatf("upd read %0d wrong", NK - 1 - m));
      end
    end
    checks++;
    if (n_l != 2 * NK || n_u != 2 * NK) fail($sformatf("subtasks fired: forward %0d backward %0d", n_l, n_u));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
