// rom: coefficient / index memory of the solver (ROM_P, ROM_Q, ROM_Lk,
// ROM_Uk, ROM_Gk and the column-pointer tables).
//
// During operation the solver only reads it: rd_data shows the word at
// rd_addr in the same cycle (asynchronous read, as a distributed/LUT ROM).
// The contents come from the host's off-line processing and change with the
// network, so instead of being fixed at configuration they are written
// through a load port (ld_en, ld_addr, ld_data) before the solver starts.
// An address at or beyond DEPTH reads as zero and is ignored on load.
module rom #(
  parameter int W     = 32,
  parameter int DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     ld_en,
  input  logic [15:0]              ld_addr,
  input  logic [W-1:0]             ld_data,
  input  logic [15:0]              rd_addr,
  output logic [W-1:0]             rd_data
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_en && int'(ld_addr) < DEPTH) mem[ld_addr[AW-1:0]] <= ld_data;
  end

  always_comb begin
    rd_data = '0;
    if (int'(rd_addr) < DEPTH) rd_data = mem[rd_addr[AW-1:0]];
  end
endmodule
