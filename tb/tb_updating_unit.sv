// tb_updating_unit: the updating unit with 8 columns split over two owners
// of 4. The testbench models both owners' vectors (holding solved
// voltages), loads random off-diagonal columns (rows in the first owner,
// columns in either) and startup times, pulses sta and checks that each
// update appears at the predicted cycle on the port of the owner of its
// row, with the row made local and the product G[r][j] * u''[j] rounded to
// single precision, and that done rises after the last update.
module tb_updating_unit;
  import solver_pkg::*;
  import fp_ref_pkg::*;
  localparam int N = 8, NK = 4, NU = 2, GNZ = 16;
  logic clk = 0, rst_n = 0, sta = 0;
  load_t ld;
  idx_t rd_idx;
  fp32_t rd_val [NU];
  sub_req_t sub [NU];
  logic done;
  logic [N-1:0] ena_g;
  fp32_t uvec [N];
  int ptr [N+1];
  int rows [GNZ];
  fp32_t vals [GNZ];
  int tg [N];
  int exp_unit [int];
  int exp_row [int];
  fp32_t exp_prod [int];
  int checks = 0, failures = 0, cyc = 0, sta_cyc = 0, n_sub = 0, last_done = 0;

  updating_unit #(.N(N), .NK(NK), .NU(NU), .GNZ(GNZ)) dut (.*);

  always #4 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  always_comb begin
    for (int u = 0; u < NU; u++) rd_val[u] = (int'(rd_idx) < NK) ? uvec[u * NK + int'(rd_idx)] : '0;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  always @(posedge clk) if (rst_n) begin
    for (int j = 0; j < N; j++) begin
      if (ena_g[j]) begin
        checks++;
        if (cyc - sta_cyc != tg[j]) fail($sformatf("column %0d at %0d, expected %0d", j, cyc - sta_cyc, tg[j]));
        for (int e = ptr[j]; e < ptr[j+1]; e++) begin
          exp_unit[cyc + 2 + e - ptr[j]] = rows[e] / NK;
          exp_row[cyc + 2 + e - ptr[j]]  = rows[e] % NK;
          exp_prod[cyc + 2 + e - ptr[j]] = from_real(to_real(vals[e]) * to_real(uvec[j]));
        end
      end
    end
    for (int u = 0; u < NU; u++) begin
      checks++;
      if (sub[u].valid) begin
        n_sub++;
        if (!exp_unit.exists(cyc) || exp_unit[cyc] != u) fail($sformatf("unexpected update on port %0d", u));
        else if (int'(sub[u].row) != exp_row[cyc] || sub[u].prod !== exp_prod[cyc])
          fail($sformatf("update row %0d prod %h, expected %0d %h", sub[u].row, sub[u].prod, exp_row[cyc], exp_prod[cyc]));
      end else if (exp_unit.exists(cyc) && exp_unit[cyc] == u) fail($sformatf("missing update on port %0d", u));
    end
  end

  task automatic load(input rom_sel_e r, input int a, input logic [31:0] d);
    @(negedge clk);
    ld = '{en: 1'b1, unit: 4'd0, rom: r, addr: idx_t'(a), data: d};
  endtask

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, total = 0;
    ld = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      ptr[0] = 0;
      t = 1;
      for (int j = 0; j < N; j++) begin
        int n;
        n = (j == 1) ? 0 : $urandom % 3;
        if (ptr[j] + n > GNZ) n = 0;
        ptr[j+1] = ptr[j] + n;
        for (int e = ptr[j]; e < ptr[j+1]; e++) begin
          rows[e] = (j < NK) ? ($urandom % NK) : ($urandom % NK);
          vals[e] = {1'($urandom), 8'(122 + $urandom % 8), 23'($urandom)};
        end
        tg[j] = t;
        t += n + 1 + $urandom % 2;
        uvec[j] = {1'($urandom), 8'(122 + $urandom % 8), 23'($urandom)};
      end
      // route some rows to the second owner as well
      for (int e = 0; e < ptr[N]; e += 3) rows[e] = NK + $urandom % NK;
      last_done = 0;
      for (int j = 0; j < N; j++) begin
        int d;
        d = tg[j] + ((ptr[j+1] > ptr[j]) ? ptr[j+1] - ptr[j] + 2 : 1);
        if (d > last_done) last_done = d;
        load(R_GT, j, 32'(tg[j]));
        load(R_GPTR, j, 32'(ptr[j]));
      end
      load(R_GPTR, N, 32'(ptr[N]));
      for (int e = 0; e < ptr[N]; e++) begin
        load(R_GROW, e, 32'(rows[e]));
        load(R_GVAL, e, vals[e]);
      end
      // a load for another memory must not reach this unit
      load(R_LT, 0, 32'd3);
      @(negedge clk); ld = '0;
      total += ptr[N];
      exp_unit.delete(); exp_row.delete(); exp_prod.delete();
      sta = 1;
      @(posedge clk); sta_cyc = cyc;
      @(negedge clk); sta = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - sta_cyc != last_done) fail($sformatf("done after %0d, expected %0d", cyc - sta_cyc, last_done));
    end
    checks++;
    if (n_sub != total) fail($sformatf("%0d updates, expected %0d", n_sub, total));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
