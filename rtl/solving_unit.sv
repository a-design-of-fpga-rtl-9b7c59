// solving_unit: solving processing unit. It performs the forward and the
// backward substitution of one diagonal part of G'' (NK consecutive columns;
// with the default sizes a 38x38 BTF block plus two independent diagonal
// elements).
//
// Inside are the unit's working vector (vec_file) and two processing
// elements of identical structure: one for the forward substitution with
// L'' (memories ROM_Lk and ROM_Lki, unit diagonal, so y[K] = i''[K]) and one
// for the backward substitution with U'' (ROM_Uk and ROM_Uki, plus the
// reciprocal of each diagonal entry, so u''[K] = y[K] / U''[K][K]). Both
// work in place on the same vector: after a time step it holds the unit's
// slice of u''. Subtract requests from the updating processing unit arrive
// on upd_sub (local row numbers); upd_rd_* lets the updating unit read a
// solved voltage and out_rd_* lets the global control read the result.
// Startup times are relative to the common sta pulse.
// Host loads whose unit field equals UNIT_ID and whose memory is R_L* or
// R_U* are taken by this unit.
// Using a separate element for the forward and the backward pass, and the
// in-place vector, are this design's choices; the document says only that
// the unit performs both substitutions with processing elements.
module solving_unit
  import solver_pkg::*;
#(
  parameter int NK      = 40,
  parameter int LNZ     = 780,
  parameter int UNZ     = 780,
  parameter int UNIT_ID = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  load_t    ld,
  input  logic     sta,
  input  vec_wr_t  vin,
  input  sub_req_t upd_sub,
  input  idx_t     upd_rd_idx,
  output fp32_t    upd_rd_val,
  input  idx_t     out_rd_idx,
  output fp32_t    out_rd_val,
  output logic     done,
  output logic [NK-1:0] ena_l,
  output logic [NK-1:0] ena_u
);
  logic     mine, l_ld, u_ld;
  pe_rom_e  l_rom, u_rom;
  idx_t     l_rd_idx, u_rd_idx;
  vec_wr_t  l_wr, u_wr;
  sub_req_t l_sub, u_sub;
  logic     l_done, u_done;
  vec_wr_t  wr  [2];
  sub_req_t sub [3];
  idx_t     rd_idx [4];
  fp32_t    rd_val [4];

  always_comb begin
    mine  = ld.en && (int'(ld.unit) == UNIT_ID);
    l_ld  = 1'b0;
    u_ld  = 1'b0;
    l_rom = PR_T;
    u_rom = PR_T;
    unique case (ld.rom)
      R_LT:    begin l_ld = mine; l_rom = PR_T;    end
      R_LPTR:  begin l_ld = mine; l_rom = PR_PTR;  end
      R_LROW:  begin l_ld = mine; l_rom = PR_ROW;  end
      R_LVAL:  begin l_ld = mine; l_rom = PR_VAL;  end
      R_UT:    begin u_ld = mine; u_rom = PR_T;    end
      R_UPTR:  begin u_ld = mine; u_rom = PR_PTR;  end
      R_UROW:  begin u_ld = mine; u_rom = PR_ROW;  end
      R_UVAL:  begin u_ld = mine; u_rom = PR_VAL;  end
      R_UDIAG: begin u_ld = mine; u_rom = PR_DIAG; end
      default: ;
    endcase
  end

  pe #(.NT(NK), .NNZ(LNZ), .HAS_DIAG(1'b0)) u_fwd (
    .clk, .rst_n,
    .ld_en(l_ld), .ld_rom(l_rom), .ld_addr(ld.addr), .ld_data(ld.data),
    .sta, .ena(ena_l), .done(l_done),
    .rd_idx(l_rd_idx), .rd_val(rd_val[0]),
    .wr(l_wr), .sub(l_sub));

  pe #(.NT(NK), .NNZ(UNZ), .HAS_DIAG(1'b1)) u_bwd (
    .clk, .rst_n,
    .ld_en(u_ld), .ld_rom(u_rom), .ld_addr(ld.addr), .ld_data(ld.data),
    .sta, .ena(ena_u), .done(u_done),
    .rd_idx(u_rd_idx), .rd_val(rd_val[1]),
    .wr(u_wr), .sub(u_sub));

  always_comb begin
    wr[0]     = l_wr;
    wr[1]     = u_wr;
    sub[0]    = l_sub;
    sub[1]    = u_sub;
    sub[2]    = upd_sub;
    rd_idx[0] = l_rd_idx;
    rd_idx[1] = u_rd_idx;
    rd_idx[2] = upd_rd_idx;
    rd_idx[3] = out_rd_idx;
  end

  vec_file #(.NK(NK), .NWR(2), .NRD(4)) u_vec (
    .clk, .ld(vin), .wr, .sub, .rd_idx, .rd_val);

  assign upd_rd_val = rd_val[2];
  assign out_rd_val = rd_val[3];
  assign done       = l_done && u_done;
endmodule
