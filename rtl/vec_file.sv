// vec_file: the working vector of one solving processing unit. It starts a
// time step holding the unit's slice of the reordered current vector i'',
// is overwritten in place by the forward results y and then by the node
// voltages u'', and receives the "i_temp" updates of the processing
// elements.
//
// Ports, all acting at the clock edge:
//   ld          write of the initial current (from the global control)
//   wr[NWR]     writes of solved unknowns (one per processing element)
//   sub[3]      subtract requests: vec[row] <= vec[row] - prod (forward
//               element, backward element, updating unit)
// and NRD asynchronous read ports. Each subtract is a read-modify-write
// completed within the cycle, so no update can be lost to a later one.
// When several subtract ports hit the same row in one cycle they are
// chained (port p subtracts from port p-1's result), so all of them take
// effect. A plain write and a subtract to the same row in one cycle would
// be a scheduling error; an assertion reports it. The document gives only
// the register name i_temp[K]; the port structure is this design's own.
module vec_file
  import solver_pkg::*;
#(
  parameter int NK  = 40,
  parameter int NWR = 2,
  parameter int NRD = 4
) (
  input  logic     clk,
  input  vec_wr_t  ld,
  input  vec_wr_t  wr     [NWR],
  input  sub_req_t sub    [3],
  input  idx_t     rd_idx [NRD],
  output fp32_t    rd_val [NRD]
);
  localparam int AW = (NK > 1) ? $clog2(NK) : 1;
  fp32_t vec [NK];
  fp32_t base0, base1, base2, res0, res1, res2;

  function automatic fp32_t read_vec(input idx_t i);
    return (int'(i) < NK) ? vec[i[AW-1:0]] : '0;
  endfunction

  // Operand of each subtract port: the stored value, or the result of the
  // latest earlier port that targets the same row in this cycle.
  assign base0 = read_vec(sub[0].row);
  assign base1 = (sub[0].valid && sub[0].row == sub[1].row) ? res0 : read_vec(sub[1].row);
  assign base2 = (sub[1].valid && sub[1].row == sub[2].row) ? res1 :
                 (sub[0].valid && sub[0].row == sub[2].row) ? res0 : read_vec(sub[2].row);

  fp_add u_sub0 (.a(base0), .b(sub[0].prod), .sub(1'b1), .s(res0));
  fp_add u_sub1 (.a(base1), .b(sub[1].prod), .sub(1'b1), .s(res1));
  fp_add u_sub2 (.a(base2), .b(sub[2].prod), .sub(1'b1), .s(res2));

  always_ff @(posedge clk) begin
    if (ld.valid && int'(ld.idx) < NK) vec[ld.idx[AW-1:0]] <= ld.val;
    for (int w = 0; w < NWR; w++) begin
      if (wr[w].valid && int'(wr[w].idx) < NK) vec[wr[w].idx[AW-1:0]] <= wr[w].val;
    end
    if (sub[0].valid && int'(sub[0].row) < NK) vec[sub[0].row[AW-1:0]] <= res0;
    if (sub[1].valid && int'(sub[1].row) < NK) vec[sub[1].row[AW-1:0]] <= res1;
    if (sub[2].valid && int'(sub[2].row) < NK) vec[sub[2].row[AW-1:0]] <= res2;
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) rd_val[r] = read_vec(rd_idx[r]);
  end

  // A solved unknown must never be written while it is still being updated.
  always_ff @(posedge clk) begin
    for (int w = 0; w < NWR; w++) begin
      for (int p = 0; p < 3; p++) begin
        assert (!(wr[w].valid && sub[p].valid && wr[w].idx == sub[p].row))
          else $error("vec_file: write and update of entry %0d in one cycle", wr[w].idx);
      end
    end
  end
endmodule
