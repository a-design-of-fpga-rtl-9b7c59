// global_control: sequences one solution of i = G u per time step and does
// the reorderings i'' = P'' i and u = Q'' u''.
//
// ROM_P holds, for each position m of i'', the node index p[m] with
// i''[m] = i[p[m]]; ROM_Q holds, for each position m of u'', the node index
// q[m] with u[q[m]] = u''[m]. Both are written by the host on the load bus.
// On start the controller
//   LOAD   writes i[p[m]] into position m of the owning solving unit, one
//          entry per cycle (N cycles),
//   STA    pulses sta to every processing unit (the "control signal"),
//   RUN    waits until every unit reports done, counting the cycles,
//   STORE  reads u''[m] back, one per cycle, into u_out[q[m]] (N cycles),
// then pulses done_o. run_cycles is the length of RUN, i.e. the time spent
// in the solving and updating units.
// The document names the global control and the two reordering memories;
// the one-entry-per-cycle reordering and the handshake are this design's.
// The unit field of the load bus is not used here (ROM_P and ROM_Q are
// global), which is why lint reports those bits as unused.
module global_control
  import solver_pkg::*;
#(
  parameter int N  = 120,
  parameter int NK = 40,
  parameter int NU = 3
) (
  input  logic     clk,
  input  logic     rst_n,
  input  load_t    ld,
  input  logic     start,
  input  fp32_t    i_in  [N],
  output fp32_t    u_out [N],
  output logic     busy,
  output logic     done_o,
  output logic [31:0] run_cycles,
  // to and from the processing units
  output logic     sta,
  output vec_wr_t  vin   [NU],
  output idx_t     out_rd_idx,
  input  fp32_t    out_rd_val [NU],
  input  logic     units_done
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_STA, S_RUN, S_STORE, S_DONE} state_e;
  localparam int AW = (N > 1) ? $clog2(N) : 1;
  state_e state;
  idx_t   m;
  idx_t   p_m, q_m;
  int     m_unit;
  idx_t   m_local;

  rom #(.W(16), .DEPTH(N)) u_rom_p (
    .clk, .ld_en(ld.en && ld.rom == R_P), .ld_addr(ld.addr), .ld_data(ld.data[15:0]),
    .rd_addr(m), .rd_data(p_m));
  rom #(.W(16), .DEPTH(N)) u_rom_q (
    .clk, .ld_en(ld.en && ld.rom == R_Q), .ld_addr(ld.addr), .ld_data(ld.data[15:0]),
    .rd_addr(m), .rd_data(q_m));

  always_comb begin
    m_unit = 0;
    for (int u = 1; u < NU; u++) if (int'(m) >= u * NK) m_unit = u;
    m_local    = m - idx_t'(m_unit * NK);
    out_rd_idx = m_local;
    for (int u = 0; u < NU; u++) begin
      vin[u].valid = (state == S_LOAD) && (m_unit == u);
      vin[u].idx   = m_local;
      vin[u].val   = (int'(p_m) < N) ? i_in[p_m[AW-1:0]] : '0;
    end
    sta  = (state == S_STA);
    busy = (state != S_IDLE) && (state != S_DONE);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      m          <= '0;
      done_o     <= 1'b0;
      run_cycles <= '0;
      for (int n = 0; n < N; n++) u_out[n] <= '0;
    end else begin
      done_o <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_LOAD;
            m     <= '0;
          end
        end
        S_LOAD: begin
          m <= m + idx_t'(1);
          if (int'(m) == N - 1) state <= S_STA;
        end
        S_STA: begin
          state      <= S_RUN;
          run_cycles <= 32'd1;
        end
        S_RUN: begin
          if (units_done) begin
            state <= S_STORE;
            m     <= '0;
          end else begin
            run_cycles <= run_cycles + 32'd1;
          end
        end
        S_STORE: begin
          if (int'(q_m) < N) u_out[q_m[AW-1:0]] <= out_rd_val[m_unit];
          m <= m + idx_t'(1);
          if (int'(m) == N - 1) begin
            state  <= S_DONE;
            done_o <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
