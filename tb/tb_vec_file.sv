// tb_vec_file: drives random loads, solved-value writes and subtract
// requests (often several to the same row in one cycle) into the vector
// storage and checks every entry against a model kept in the testbench,
// whose subtraction uses the reference single-precision rounding. Counts
// how often same-row subtracts were chained.
module tb_vec_file;
  import solver_pkg::*;
  import fp_ref_pkg::*;
  localparam int NK = 8;
  logic clk = 0;
  vec_wr_t  ld;
  vec_wr_t  wr [2];
  sub_req_t sub [3];
  idx_t     rd_idx [4];
  fp32_t    rd_val [4];
  fp32_t    model [NK];
  int checks = 0, failures = 0, chained = 0;

  vec_file #(.NK(NK), .NWR(2), .NRD(4)) dut (.*);

  always #5 clk = ~clk;

  function automatic fp32_t rnd_val();
    return {1'($urandom), 8'(120 + $urandom % 10), 23'($urandom)};
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld = '0; wr[0] = '0; wr[1] = '0;
    for (int p = 0; p < 3; p++) sub[p] = '0;
    for (int r = 0; r < 4; r++) rd_idx[r] = '0;
    for (int i = 0; i < NK; i++) begin
      @(negedge clk);
      ld = '{valid: 1'b1, idx: idx_t'(i), val: rnd_val()};
      model[i] = ld.val;
    end
    @(negedge clk); ld = '0;
    for (int n = 0; n < 2000; n++) begin
      int wrow;
      bit used [NK];
      @(negedge clk);
      for (int i = 0; i < NK; i++) used[i] = 0;
      // a plain write to a row no subtract touches this cycle
      wrow = $urandom % NK;
      wr[0] = '{valid: 1'($urandom), idx: idx_t'(wrow), val: rnd_val()};
      wr[1] = '0;
      for (int p = 0; p < 3; p++) begin
        int row;
        do row = $urandom % NK; while (row == wrow);
        if ($urandom % 3 == 0 && p > 0) row = int'(sub[p-1].row);
        sub[p] = '{valid: 1'($urandom % 4 != 0), row: idx_t'(row), prod: rnd_val()};
      end
      if (sub[0].valid && sub[1].valid && sub[0].row == sub[1].row) chained++;
      if (sub[1].valid && sub[2].valid && sub[1].row == sub[2].row) chained++;
      // model
      if (wr[0].valid) model[wrow] = wr[0].val;
      for (int p = 0; p < 3; p++) begin
        if (sub[p].valid)
          model[sub[p].row] = from_real(to_real(model[sub[p].row]) - to_real(sub[p].prod));
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < NK; i += 4) begin
        for (int r = 0; r < 4; r++) rd_idx[r] = idx_t'(i + r);
        #1;
        for (int r = 0; r < 4; r++) begin
          checks++;
          if (rd_val[r] !== model[i + r] && !(rd_val[r][30:0] == 0 && model[i + r][30:0] == 0)) begin
            failures++;
            if (failures < 10) $display("FAIL step %0d entry %0d: got %h expected %h", n, i + r, rd_val[r], model[i + r]);
            model[i + r] = rd_val[r];
          end
        end
      end
    end
    checks++;
    if (chained == 0) begin
      failures++;
      $display("FAIL no chained subtracts exercised");
    end
    $display("chained same-row subtracts: %0d", chained);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
