// solver_pkg: types and constants shared by the sparse-solver RTL.
//
// Numbers are IEEE-754 single precision (fp32_t). Indices into vectors and
// coefficient memories are 16 bits (idx_t), startup times are 16-bit cycle
// counts (time_t). The host fills every coefficient, index and startup-time
// memory through one load bus (load_t); rom_sel_e says which memory a load
// word goes to. Subtract requests (sub_req_t) carry "vector[row] -= prod"
// from a processing element to the vector storage that owns the row;
// vec_wr_t is a plain write of one vector entry.
package solver_pkg;

  typedef logic [31:0] fp32_t;
  typedef logic [15:0] idx_t;
  typedef logic [15:0] time_t;

  localparam fp32_t FP_ONE = 32'h3f80_0000;

  // Memories inside one processing element.
  typedef enum logic [2:0] {
    PR_T    = 3'd0,  // startup time of each subtask (ROM_Lki / ROM_Uki / ROM_Gki)
    PR_PTR  = 3'd1,  // CSC column pointers
    PR_ROW  = 3'd2,  // CSC row index of each non-zero
    PR_VAL  = 3'd3,  // CSC value of each non-zero
    PR_DIAG = 3'd4   // reciprocal of the diagonal (backward substitution only)
  } pe_rom_e;

  // Memories of the whole solver, as addressed on the host load bus.
  typedef enum logic [3:0] {
    R_LT = 4'd0, R_LPTR = 4'd1, R_LROW = 4'd2, R_LVAL = 4'd3,
    R_UT = 4'd4, R_UPTR = 4'd5, R_UROW = 4'd6, R_UVAL = 4'd7, R_UDIAG = 4'd8,
    R_GT = 4'd9, R_GPTR = 4'd10, R_GROW = 4'd11, R_GVAL = 4'd12,
    R_P  = 4'd13, R_Q   = 4'd14
  } rom_sel_e;

  typedef struct packed {
    logic     en;
    logic [3:0] unit;   // solving unit number for R_L* / R_U* memories
    rom_sel_e rom;
    idx_t     addr;
    logic [31:0] data;
  } load_t;

  typedef struct packed {
    logic  valid;
    idx_t  row;
    fp32_t prod;
  } sub_req_t;

  // Plain write of one vector entry (solved unknowns, initial currents).
  typedef struct packed {
    logic  valid;
    idx_t  idx;
    fp32_t val;
  } vec_wr_t;

endpackage
