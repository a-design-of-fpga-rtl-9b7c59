// pe: processing element. All processing elements of the solver share this
// structure: a bank of subtraction timers, a stage that solves the unknown
// of the enabled subtask, and a floating-point stage that applies that
// unknown to the rest of the column. A subtask K is one column of a sparse
// factor (L'' or U'' of a block) or of the off-diagonal part of G''.
//
// Timing, with c0 the cycle in which ena[K] is 1 (T[K] cycles after sta):
//   c0          rd_idx = K, rd_val = i''[K] is read; the unknown
//               y[K] = i''[K] * DIAG[K] (HAS_DIAG) or y[K] = i''[K] is
//               written back through wr and kept in a register.
//   c0+1+j      the j-th stored non-zero of column K (CSC order) is read
//               from the value and row memories and multiplied by y[K].
//   c0+2+j      sub carries {row, L[row][K] * y[K]}; the owner of the row
//               subtracts it from i''[row] at the end of this cycle.
// A column with n non-zeros keeps the element busy until cycle c0+n, so the
// next subtask may start at c0+n+1; a subtask that reads a row updated by
// this one may start at c0+n+2. The off-line schedule (the startup times)
// must respect both rules; an assertion reports a subtask enabled while
// the element is still busy.
// The element computes the product; the final subtraction from i''[row]
// (the i_temp update) is done by the vector storage that owns the row, so
// that updates from different elements to one row cannot overwrite each
// other.
// Memories, written by the host through the load port and selected by
// ld_rom: PR_T startup times, PR_PTR column pointers (NT+1 words), PR_ROW
// and PR_VAL the non-zeros, PR_DIAG the reciprocal of each diagonal entry.
// The timer / solve / floating-point structure and the signals sta, ena[K],
// K, i[K], y[K], L[K], L_row[K], i_temp follow the document; CSC storage
// follows it too. The two-cycle timing, storing reciprocals of the U''
// diagonal so that no divider is needed, and the unit diagonal of L'' are
// choices of this design.
// rst_n also disables the two schedule assertions, so lint reports it as
// used both asynchronously and synchronously; the logic itself only uses
// the asynchronous reset.
module pe
  import solver_pkg::*;
#(
  parameter int NT       = 40,
  parameter int NNZ      = 780,
  parameter bit HAS_DIAG = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  // host load port
  input  logic     ld_en,
  input  pe_rom_e  ld_rom,
  input  idx_t     ld_addr,
  input  logic [31:0] ld_data,
  // control
  input  logic     sta,
  output logic [NT-1:0] ena,
  output logic     done,
  // read of the entry being solved
  output idx_t     rd_idx,
  input  fp32_t    rd_val,
  // solved unknown and updates
  output vec_wr_t  wr,
  output sub_req_t sub
);
  logic   tmr_busy;
  logic   ena_any;
  idx_t   k_idx;
  fp32_t  y_now, y_q, val_e, prod_e;
  idx_t   ptr_lo, ptr_hi, row_e;
  idx_t   cur, last;
  logic   streaming;
  logic   started;

  sub_timer #(.NT(NT)) u_tmr (
    .clk, .rst_n,
    .ld_en   (ld_en && ld_rom == PR_T),
    .ld_addr (ld_addr),
    .ld_data (ld_data[15:0]),
    .sta,
    .ena,
    .busy    (tmr_busy)
  );

  // CSC column pointers, non-zero rows and values, diagonal reciprocals.
  rom #(.W(16), .DEPTH(NT + 1)) u_ptr_lo (
    .clk, .ld_en(ld_en && ld_rom == PR_PTR), .ld_addr, .ld_data(ld_data[15:0]),
    .rd_addr(k_idx), .rd_data(ptr_lo));
  rom #(.W(16), .DEPTH(NT + 1)) u_ptr_hi (
    .clk, .ld_en(ld_en && ld_rom == PR_PTR), .ld_addr, .ld_data(ld_data[15:0]),
    .rd_addr(k_idx + idx_t'(1)), .rd_data(ptr_hi));
  rom #(.W(16), .DEPTH(NNZ)) u_row (
    .clk, .ld_en(ld_en && ld_rom == PR_ROW), .ld_addr, .ld_data(ld_data[15:0]),
    .rd_addr(cur), .rd_data(row_e));
  rom #(.W(32), .DEPTH(NNZ)) u_val (
    .clk, .ld_en(ld_en && ld_rom == PR_VAL), .ld_addr, .ld_data,
    .rd_addr(cur), .rd_data(val_e));

  if (HAS_DIAG) begin : g_diag
    fp32_t diag_k;
    rom #(.W(32), .DEPTH(NT)) u_diag (
      .clk, .ld_en(ld_en && ld_rom == PR_DIAG), .ld_addr, .ld_data,
      .rd_addr(k_idx), .rd_data(diag_k));
    fp_mul u_solve (.a(rd_val), .b(diag_k), .p(y_now));
  end else begin : g_nodiag
    assign y_now = rd_val;
  end

  // Index of the enabled subtask (at most one per cycle in a valid schedule).
  always_comb begin
    ena_any = 1'b0;
    k_idx   = '0;
    for (int k = NT - 1; k >= 0; k--) begin
      if (ena[k]) begin
        ena_any = 1'b1;
        k_idx   = idx_t'(k);
      end
    end
  end

  assign rd_idx = k_idx;

  always_comb begin
    wr.valid = ena_any;
    wr.idx   = k_idx;
    wr.val   = y_now;
  end

  fp_mul u_fop (.a(val_e), .b(y_q), .p(prod_e));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q       <= '0;
      cur       <= '0;
      last      <= '0;
      streaming <= 1'b0;
      sub       <= '0;
      started   <= 1'b0;
    end else begin
      sub.valid <= 1'b0;
      if (streaming) begin
        sub.valid <= 1'b1;
        sub.row   <= row_e;
        sub.prod  <= prod_e;
        cur       <= cur + idx_t'(1);
        if (cur + idx_t'(1) == last) streaming <= 1'b0;
      end
      if (ena_any) begin
        y_q       <= y_now;
        cur       <= ptr_lo;
        last      <= ptr_hi;
        streaming <= (ptr_lo != ptr_hi);
      end
      if (sta) started <= 1'b1;
    end
  end

  assign done = started && !sta && !tmr_busy && !streaming && !sub.valid;

  a_one_subtask: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(ena))
    else $error("pe: two subtasks enabled in one cycle");
  a_not_busy: assert property (@(posedge clk) disable iff (!rst_n) !(ena_any && streaming))
    else $error("pe: subtask %0d enabled while busy", k_idx);
endmodule
