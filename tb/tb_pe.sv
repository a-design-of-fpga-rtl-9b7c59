// tb_pe: exercises one processing element with a reciprocal-diagonal memory
// (the backward-substitution configuration). The testbench plays the
// vector owner: it answers the element's read from its own model vector and
// applies the element's writes and subtract requests. It loads random
// sparse columns and startup times that respect the element's timing rules,
// and checks
//   - that subtask K is solved exactly T[K] cycles after sta, with
//     y = i[K] * diag[K] rounded to single precision,
//   - that the j-th non-zero of that column appears on sub exactly 2+j
//     cycles later with the right row and product,
//   - that done rises right after the last update,
//   - the final vector against a sequential reference.
module tb_pe;
  import solver_pkg::*;
  import fp_ref_pkg::*;
  localparam int NT = 6, NNZ = 32;
  logic clk = 0, rst_n = 0, ld_en = 0, sta = 0;
  pe_rom_e ld_rom = PR_T;
  idx_t ld_addr = 0;
  logic [31:0] ld_data = 0;
  logic [NT-1:0] ena;
  logic done;
  idx_t rd_idx;
  fp32_t rd_val;
  vec_wr_t wr;
  sub_req_t sub;

  fp32_t vec [NT];
  fp32_t ref_vec [NT];
  fp32_t diag [NT];
  int tstart [NT];
  int ptr [NT+1];
  int rows [NNZ];
  fp32_t vals [NNZ];
  int cyc = 0, sta_cyc = 0;
  int exp_row [int];
  fp32_t exp_prod [int];
  int n_solved = 0, n_sub = 0;
  int checks = 0, failures = 0;

  pe #(.NT(NT), .NNZ(NNZ), .HAS_DIAG(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  assign rd_val = (int'(rd_idx) < NT) ? vec[rd_idx] : '0;

  function automatic fp32_t rnd_val();
    return {1'($urandom), 8'(122 + $urandom % 8), 23'($urandom)};
  endfunction

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  // vector owner and checker
  always @(posedge clk) begin
    if (rst_n && wr.valid) begin
      fp32_t y;
      int k;
      k = int'(wr.idx);
      y = from_real(to_real(vec[k]) * to_real(diag[k]));
      checks += 2;
      if (cyc - sta_cyc != tstart[k]) fail($sformatf("subtask %0d at %0d, expected %0d", k, cyc - sta_cyc, tstart[k]));
      if (wr.val !== y) fail($sformatf("y[%0d] = %h, expected %h", k, wr.val, y));
      for (int e = ptr[k]; e < ptr[k+1]; e++) begin
        exp_row[cyc + 2 + e - ptr[k]]  = rows[e];
        exp_prod[cyc + 2 + e - ptr[k]] = from_real(to_real(vals[e]) * to_real(y));
      end
      vec[k] <= wr.val;
      n_solved++;
    end
    if (rst_n && sub.valid) begin
      n_sub++;
      checks++;
      if (!exp_row.exists(cyc)) fail("unexpected update");
      else if (int'(sub.row) != exp_row[cyc] || sub.prod !== exp_prod[cyc])
        fail($sformatf("update row %0d prod %h, expected row %0d prod %h", sub.row, sub.prod, exp_row[cyc], exp_prod[cyc]));
      vec[sub.row] <= from_real(to_real(vec[sub.row]) - to_real(sub.prod));
    end
    if (rst_n && !sub.valid) begin
      checks++;
      if (exp_row.exists(cyc)) fail("missing update");
    end
  end

  task automatic load(input pe_rom_e r, input int a, input logic [31:0] d);
    @(negedge clk);
    ld_en = 1; ld_rom = r; ld_addr = idx_t'(a); ld_data = d;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t, last_done, total_sub;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 4; round++) begin
      // random CSC columns, processed in the order 0..NT-1
      ptr[0] = 0;
      for (int k = 0; k < NT; k++) begin
        int n;
        n = (k == 2) ? 0 : 1 + $urandom % 4;
        ptr[k+1] = ptr[k] + n;
        for (int e = ptr[k]; e < ptr[k+1]; e++) begin
          do rows[e] = $urandom % NT; while (rows[e] == k);
          vals[e] = rnd_val();
        end
        diag[k] = rnd_val();
      end
      t = 1 + $urandom % 3;
      for (int k = 0; k < NT; k++) begin
        tstart[k] = t;
        t += (ptr[k+1] - ptr[k]) + 2 + $urandom % 3;
      end
      last_done = tstart[NT-1] + ((ptr[NT] > ptr[NT-1]) ? (ptr[NT] - ptr[NT-1] + 2) : 1);
      for (int k = 0; k < NT; k++) begin
        load(PR_T, k, 32'(tstart[k]));
        load(PR_DIAG, k, diag[k]);
      end
      for (int k = 0; k <= NT; k++) load(PR_PTR, k, 32'(ptr[k]));
      for (int e = 0; e < ptr[NT]; e++) begin
        load(PR_ROW, e, 32'(rows[e]));
        load(PR_VAL, e, vals[e]);
      end
      for (int k = 0; k < NT; k++) begin
        vec[k] = rnd_val();
        ref_vec[k] = vec[k];
      end
      @(negedge clk); ld_en = 0;
      // sequential reference
      for (int k = 0; k < NT; k++) begin
        fp32_t y;
        y = from_real(to_real(ref_vec[k]) * to_real(diag[k]));
        ref_vec[k] = y;
        for (int e = ptr[k]; e < ptr[k+1]; e++)
          ref_vec[rows[e]] = from_real(to_real(ref_vec[rows[e]]) - to_real(from_real(to_real(vals[e]) * to_real(y))));
      end
      exp_row.delete(); exp_prod.delete();
      sta = 1;
      @(posedge clk); sta_cyc = cyc;
      @(negedge clk); sta = 0;
      while (!done) @(negedge clk);
      checks++;
      if (cyc - sta_cyc != last_done) fail($sformatf("done after %0d cycles, expected %0d", cyc - sta_cyc, last_done));
      repeat (2) @(negedge clk);
      for (int k = 0; k < NT; k++) begin
        checks++;
        if (vec[k] !== ref_vec[k]) fail($sformatf("final entry %0d: %h, expected %h", k, vec[k], ref_vec[k]));
      end
    end
    total_sub = n_sub;
    checks++;
    if (n_solved != 4 * NT || total_sub == 0) fail($sformatf("solved %0d, updates %0d", n_solved, total_sub));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
