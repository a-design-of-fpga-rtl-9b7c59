// sub_timer: the subtraction timers of one processing element, together
// with the memory holding the startup time of each subtask (ROM_Lki, ROM_Uki
// or ROM_Gki, depending on where the element sits).
//
// The host writes the startup time T[K] of every subtask K through the load
// port. On the start pulse sta every timer K is loaded with T[K]; each
// counts down by one per cycle and stops at zero. While timer K holds 1,
// ena[K] is 1, so subtask K is enabled exactly T[K] cycles after the cycle
// in which sta was high. A startup time of 0 disables the subtask.
// The down-counting timer and "ena[K] when it counts to 1" follow the
// document; one counter per subtask, all loaded at once, is this design's
// reading of it. busy is 1 while any timer is still counting.
module sub_timer
  import solver_pkg::*;
#(
  parameter int NT = 40
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ld_en,
  input  idx_t          ld_addr,
  input  time_t         ld_data,
  input  logic          sta,
  output logic [NT-1:0] ena,
  output logic          busy
);
  localparam int AW = (NT > 1) ? $clog2(NT) : 1;
  time_t tstart [NT];
  time_t cnt    [NT];

  always_ff @(posedge clk) begin
    if (ld_en && int'(ld_addr) < NT) tstart[ld_addr[AW-1:0]] <= ld_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NT; k++) cnt[k] <= '0;
    end else begin
      for (int k = 0; k < NT; k++) begin
        if (sta)                cnt[k] <= tstart[k];
        else if (cnt[k] != '0)  cnt[k] <= cnt[k] - time_t'(1);
      end
    end
  end

  always_comb begin
    busy = 1'b0;
    for (int k = 0; k < NT; k++) begin
      ena[k] = (cnt[k] == time_t'(1));
      busy   = busy | (cnt[k] != '0);
    end
  end
endmodule
