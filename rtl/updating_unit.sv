// updating_unit: updating processing unit. It handles the non-zeros of G''
// that lie outside the diagonal parts solved by the solving units, and keeps
// subtracting their contribution from the current vector i''.
//
// It holds one processing element with N subtasks, one per column j of G''
// (memories ROM_Gk and ROM_Gki). When subtask j is enabled the element reads
// the solved voltage u''[j] from the solving unit that owns column j (no
// diagonal scaling) and then streams the off-diagonal non-zeros of column j;
// each gives "i''[r] -= G''[r][j] * u''[j]", which is routed to the solving
// unit owning row r with the row number made local to that unit.
// Rows and columns are global indices 0..N-1; unit u owns [u*NK, (u+1)*NK).
// The startup time of subtask j must come after u''[j] is solved.
// The document gives the unit's function and the ROM names; the single
// element and the routing by index range are this design's choices.
// The unit field of the load bus is not used here (there is one updating
// unit), which is why lint reports those bits as unused.
module updating_unit
  import solver_pkg::*;
#(
  parameter int N   = 120,
  parameter int NK  = 40,
  parameter int NU  = 3,
  parameter int GNZ = 342
) (
  input  logic     clk,
  input  logic     rst_n,
  input  load_t    ld,
  input  logic     sta,
  output idx_t     rd_idx,
  input  fp32_t    rd_val [NU],
  output sub_req_t sub    [NU],
  output logic     done,
  output logic [N-1:0] ena_g
);
  logic     g_ld;
  pe_rom_e  g_rom;
  idx_t     j_idx;
  sub_req_t g_sub;
  vec_wr_t  g_wr;
  int       rd_unit, sub_unit;

  always_comb begin
    g_ld  = 1'b0;
    g_rom = PR_T;
    unique case (ld.rom)
      R_GT:    begin g_ld = ld.en; g_rom = PR_T;   end
      R_GPTR:  begin g_ld = ld.en; g_rom = PR_PTR; end
      R_GROW:  begin g_ld = ld.en; g_rom = PR_ROW; end
      R_GVAL:  begin g_ld = ld.en; g_rom = PR_VAL; end
      default: ;
    endcase
  end

  pe #(.NT(N), .NNZ(GNZ), .HAS_DIAG(1'b0)) u_pe (
    .clk, .rst_n,
    .ld_en(g_ld), .ld_rom(g_rom), .ld_addr(ld.addr), .ld_data(ld.data),
    .sta, .ena(ena_g), .done,
    .rd_idx(j_idx), .rd_val(rd_val[rd_unit]),
    .wr(g_wr), .sub(g_sub));

  // Owner of the column being read and of the row being updated.
  always_comb begin
    rd_unit  = 0;
    sub_unit = 0;
    for (int u = 1; u < NU; u++) begin
      if (int'(j_idx) >= u * NK)     rd_unit  = u;
      if (int'(g_sub.row) >= u * NK) sub_unit = u;
    end
    rd_idx = j_idx - idx_t'(rd_unit * NK);
    for (int u = 0; u < NU; u++) begin
      sub[u].valid = g_sub.valid && (sub_unit == u);
      sub[u].row   = g_sub.row - idx_t'(sub_unit * NK);
      sub[u].prod  = g_sub.prod;
    end
  end

  // The element's solved-value write is not used here: u''[j] is only read.
  logic unused_wr;
  assign unused_wr = ^g_wr;
endmodule
