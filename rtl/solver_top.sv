// solver_top: online calculation part of the real-time sparse linear solver
// (i = G u, solved once per simulation time step).
//
// Structure: a global control, NU solving processing units and one updating
// processing unit. Solving unit k owns columns and rows [k*NK, (k+1)*NK) of
// the reordered matrix G'' = P'' G Q'', which is block upper triangular.
// It performs the forward and backward substitution with the host-computed
// LU factors of its diagonal part; the updating unit applies the non-zeros
// above the diagonal parts, feeding solved voltages of one unit into the
// currents of another. All work is statically scheduled: every subtask has
// a startup time, computed off-line, counted from one sta pulse.
// Interface: the host first writes every memory through the load bus ld
// (see solver_pkg::rom_sel_e); then, per time step, start with the node
// currents on i_in, and done pulses one cycle after u_out holds the node
// voltages. run_cycles reports the cycles spent between sta and the last
// unit finishing. ena_* expose the subtask enables for observation.
// Defaults follow the evaluated case: N = 120 nodes, three solving units,
// one updating unit. NK = 40 (a 38-node block plus two independent
// elements per unit) is this design's reading of that case. LNZ and UNZ
// (780 = 40*39/2) let a unit hold completely filled factors; GNZ = 342 is
// the non-zero count of the whole matrix, an upper bound for the
// off-diagonal part.
module solver_top
  import solver_pkg::*;
#(
  parameter int N   = 120,
  parameter int NU  = 3,
  parameter int NK  = 40,
  parameter int LNZ = 780,
  parameter int UNZ = 780,
  parameter int GNZ = 342
) (
  input  logic     clk,
  input  logic     rst_n,
  input  load_t    ld,
  input  logic     start,
  input  fp32_t    i_in  [N],
  output fp32_t    u_out [N],
  output logic     busy,
  output logic     done,
  output logic [31:0] run_cycles,
  output logic [NU-1:0][NK-1:0] ena_l,
  output logic [NU-1:0][NK-1:0] ena_u,
  output logic [N-1:0]  ena_g
);
  logic     sta;
  vec_wr_t  vin        [NU];
  idx_t     out_rd_idx;
  fp32_t    out_rd_val [NU];
  idx_t     upd_rd_idx;
  fp32_t    upd_rd_val [NU];
  sub_req_t upd_sub    [NU];
  logic [NU-1:0] su_done;
  logic     upd_done;

  global_control #(.N(N), .NK(NK), .NU(NU)) u_ctrl (
    .clk, .rst_n, .ld, .start, .i_in, .u_out, .busy, .done_o(done), .run_cycles,
    .sta, .vin, .out_rd_idx, .out_rd_val,
    .units_done(&su_done && upd_done));

  for (genvar k = 0; k < NU; k++) begin : g_su
    solving_unit #(.NK(NK), .LNZ(LNZ), .UNZ(UNZ), .UNIT_ID(k)) u_su (
      .clk, .rst_n, .ld, .sta,
      .vin        (vin[k]),
      .upd_sub    (upd_sub[k]),
      .upd_rd_idx (upd_rd_idx),
      .upd_rd_val (upd_rd_val[k]),
      .out_rd_idx (out_rd_idx),
      .out_rd_val (out_rd_val[k]),
      .done       (su_done[k]),
      .ena_l      (ena_l[k]),
      .ena_u      (ena_u[k]));
  end

  updating_unit #(.N(N), .NK(NK), .NU(NU), .GNZ(GNZ)) u_upd (
    .clk, .rst_n, .ld, .sta,
    .rd_idx (upd_rd_idx),
    .rd_val (upd_rd_val),
    .sub    (upd_sub),
    .done   (upd_done),
    .ena_g);
endmodule
