// offline_pkg: testbench model of the host-side off-line processing that
// prepares the solver's memories.
//
// solver_case builds a random test system directly in the reordered form:
// a block upper triangular G'' of size n whose diagonal part owned by each
// of the nu solving units (nk columns) is a strongly coupled block of nk-2
// nodes (a ring with a few chords) followed by two independent diagonal
// elements, plus off-diagonal couplings above the diagonal parts. Random
// permutations p (i''[m] = i[p[m]]) and q (u[q[m]] = u''[m]) play the role
// of the BTF/COLAMD reorderings, whose algorithms are outside the solver.
// It then
//   - factors each diagonal part as L U (Doolittle, L with unit diagonal)
//     in double precision and rounds the factors to single precision,
//   - stores the non-zeros of L, of U (without its diagonal, which is kept
//     as a reciprocal) and of the off-diagonal part of G'' column by column,
//   - computes the startup time of every subtask by simulating the units
//     cycle by cycle with the processing element's timing rules: an element
//     with an n-entry column is busy for n+1 cycles, its j-th update is
//     visible 3+j cycles after the start, a solved value 1 cycle after it;
//     a subtask starts at the first cycle at which its element is free and
//     all updates of its row are visible,
//   - gives the exact solution u for a right-hand side i = G u.
// build_tree makes instead a radial-feeder system: one tree per unit and no
// coupling between units, ordered leaves first so that L U causes no fill.
package offline_pkg;
  import fp_ref_pkg::*;

  typedef struct {
    int unit;
    int col;     // local column (L, U) or global column (G)
    int row;     // local row (L, U) or global row (G)
    logic [31:0] val;
  } entry_t;

  class solver_case;
    int n, nu, nk;
    real g [];          // G'' dense, g[r*n+c]
    int  p [];
    int  q [];
    entry_t lq [$];
    entry_t uq [$];
    entry_t gq [$];
    logic [31:0] udiag [];   // reciprocal of U diagonal, by global index
    int tl [];               // startup times, by global column
    int tu [];
    int tg [];
    int run_cycles;
    real u_true [];
    real i_rhs [];

    function new(int n_, int nu_, int nk_);
      n = n_; nu = nu_; nk = nk_;
      g = new[n * n];
      p = new[n]; q = new[n];
      udiag = new[n];
      tl = new[n]; tu = new[n]; tg = new[n];
      u_true = new[n]; i_rhs = new[n];
    endfunction

    static function real urand(real lo, real hi);
      return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
    endfunction

    function int unit_of(int idx);
      return idx / nk;
    endfunction

    function void shuffle(ref int a []);
      for (int i = 0; i < n; i++) a[i] = i;
      for (int i = n - 1; i > 0; i--) begin
        int j = $urandom % (i + 1);
        int t = a[i]; a[i] = a[j]; a[j] = t;
      end
    endfunction

    function void build(int n_cross);
      int nb = nk - 2;
      for (int i = 0; i < n * n; i++) g[i] = 0.0;
      for (int k = 0; k < nu; k++) begin
        int b = k * nk;
        // ring plus chords inside the coupled block
        for (int c = 0; c < nb; c++) begin
          real w = urand(0.5, 1.5);
          int d = (c + 1) % nb;
          g[(b + c) * n + b + d] = -w;
          g[(b + d) * n + b + c] = -w;
        end
        for (int x = 0; x < 3; x++) begin
          int r = $urandom % nb, c = $urandom % nb;
          if (r != c) begin
            real w = urand(0.2, 1.0);
            g[(b + r) * n + b + c] -= w;
            g[(b + c) * n + b + r] -= w;
          end
        end
        // independent elements may couple upwards into the block
        for (int s = nb; s < nk; s++) begin
          g[(b + ($urandom % nb)) * n + b + s] = -urand(0.2, 1.0);
        end
        // diagonal dominance inside the unit's part
        for (int r = 0; r < nk; r++) begin
          real sum = 0.0;
          for (int c = 0; c < nk; c++) if (c != r) sum += (g[(b + r) * n + b + c] < 0.0) ? -g[(b + r) * n + b + c] : g[(b + r) * n + b + c];
          g[(b + r) * n + b + r] = sum + urand(0.5, 2.0);
        end
      end
      // couplings above the diagonal parts
      for (int x = 0; x < n_cross && nu > 1; x++) begin
        int a = $urandom % (nu - 1);
        int bu = a + 1 + $urandom % (nu - 1 - a);
        int r = a * nk + $urandom % nk, c = bu * nk + $urandom % nk;
        g[r * n + c] = -urand(0.1, 1.0);
      end
      shuffle(p);
      shuffle(q);
      factor();
      schedule();
    endfunction

    function void factor();
      real a [];
      a = new[nk * nk];
      lq.delete(); uq.delete(); gq.delete();
      for (int k = 0; k < nu; k++) begin
        int b = k * nk;
        for (int r = 0; r < nk; r++)
          for (int c = 0; c < nk; c++) a[r * nk + c] = g[(b + r) * n + b + c];
        for (int kk = 0; kk < nk; kk++)
          for (int i = kk + 1; i < nk; i++) begin
            if (a[i * nk + kk] != 0.0) begin
              a[i * nk + kk] = a[i * nk + kk] / a[kk * nk + kk];
              for (int j = kk + 1; j < nk; j++)
                a[i * nk + j] = a[i * nk + j] - a[i * nk + kk] * a[kk * nk + j];
            end
          end
        for (int c = 0; c < nk; c++) begin
          for (int r = c + 1; r < nk; r++)
            if (a[r * nk + c] != 0.0) lq.push_back('{k, c, r, from_real(a[r * nk + c])});
          for (int r = 0; r < c; r++)
            if (a[r * nk + c] != 0.0) uq.push_back('{k, c, r, from_real(a[r * nk + c])});
          udiag[b + c] = from_real(1.0 / a[c * nk + c]);
        end
      end
      for (int c = 0; c < n; c++)
        for (int r = 0; r < n; r++)
          if (unit_of(r) != unit_of(c) && g[r * n + c] != 0.0)
            gq.push_back('{unit_of(c), c, r, from_real(g[r * n + c])});
    endfunction

    // Non-zeros of one column of L (which=0), U (1) or G (2).
    function void column(int which, int unit, int col, ref entry_t out [$]);
      out.delete();
      if (which == 0) begin
        foreach (lq[e]) if (lq[e].unit == unit && lq[e].col == col) out.push_back(lq[e]);
      end else if (which == 1) begin
        foreach (uq[e]) if (uq[e].unit == unit && uq[e].col == col) out.push_back(uq[e]);
      end else begin
        foreach (gq[e]) if (gq[e].col == col) out.push_back(gq[e]);
      end
    endfunction

    function void schedule();
      int pend_f [], pend_b [], vis_f [], vis_b [], fwd_vis [], bwd_vis [];
      int next_f [], next_b [], free_f [], free_b [];
      bit g_done [];
      int free_g, left;
      entry_t col [$];
      pend_f = new[n]; pend_b = new[n]; vis_f = new[n]; vis_b = new[n];
      fwd_vis = new[n]; bwd_vis = new[n]; g_done = new[n];
      next_f = new[nu]; next_b = new[nu]; free_f = new[nu]; free_b = new[nu];
      for (int i = 0; i < n; i++) begin
        pend_f[i] = 0; pend_b[i] = 0; vis_f[i] = 1; vis_b[i] = 1;
        fwd_vis[i] = -1; bwd_vis[i] = -1; tl[i] = 0; tu[i] = 0; tg[i] = 0;
        g_done[i] = 1'b1;
      end
      foreach (lq[e]) pend_f[lq[e].unit * nk + lq[e].row]++;
      foreach (uq[e]) pend_b[uq[e].unit * nk + uq[e].row]++;
      foreach (gq[e]) begin
        pend_f[gq[e].row]++;
        g_done[gq[e].col] = 1'b0;
      end
      for (int k = 0; k < nu; k++) begin
        next_f[k] = 0; next_b[k] = nk - 1; free_f[k] = 1; free_b[k] = 1;
      end
      free_g = 1;
      left = 2 * n;
      foreach (g_done[c]) if (!g_done[c]) left++;
      run_cycles = 0;
      for (int t = 1; left > 0 && t < 60000; t++) begin
        for (int k = 0; k < nu; k++) begin
          // forward element
          if (next_f[k] < nk && t >= free_f[k]) begin
            int gi = k * nk + next_f[k];
            if (pend_f[gi] == 0 && vis_f[gi] <= t) begin
              column(0, k, next_f[k], col);
              tl[gi] = t;
              fwd_vis[gi] = t + 1;
              foreach (col[e]) begin
                int ri = k * nk + col[e].row;
                pend_f[ri]--;
                if (t + 3 + e > vis_f[ri]) vis_f[ri] = t + 3 + e;
              end
              free_f[k] = t + col.size() + 1;
              if (t + ((col.size() > 0) ? col.size() + 2 : 1) > run_cycles) run_cycles = t + ((col.size() > 0) ? col.size() + 2 : 1);
              next_f[k]++;
              left--;
            end
          end
          // backward element
          if (next_b[k] >= 0 && t >= free_b[k]) begin
            int gi = k * nk + next_b[k];
            if (fwd_vis[gi] > 0 && fwd_vis[gi] <= t && pend_b[gi] == 0 && vis_b[gi] <= t) begin
              column(1, k, next_b[k], col);
              tu[gi] = t;
              bwd_vis[gi] = t + 1;
              foreach (col[e]) begin
                int ri = k * nk + col[e].row;
                pend_b[ri]--;
                if (t + 3 + e > vis_b[ri]) vis_b[ri] = t + 3 + e;
              end
              free_b[k] = t + col.size() + 1;
              if (t + ((col.size() > 0) ? col.size() + 2 : 1) > run_cycles) run_cycles = t + ((col.size() > 0) ? col.size() + 2 : 1);
              next_b[k]--;
              left--;
            end
          end
        end
        // updating element: lowest ready column
        if (t >= free_g) begin
          for (int c = 0; c < n; c++) begin
            if (!g_done[c] && bwd_vis[c] > 0 && bwd_vis[c] <= t) begin
              column(2, 0, c, col);
              tg[c] = t;
              foreach (col[e]) begin
                pend_f[col[e].row]--;
                if (t + 3 + e > vis_f[col[e].row]) vis_f[col[e].row] = t + 3 + e;
              end
              free_g = t + col.size() + 1;
              if (t + col.size() + 2 > run_cycles) run_cycles = t + col.size() + 2;
              g_done[c] = 1'b1;
              left--;
              break;
            end
          end
        end
      end
      if (left != 0) $display("offline_pkg: schedule did not complete");
    endfunction

    // Radial-feeder test system: each unit holds one tree of nk-2 nodes given
    // by parent[] (parent[0] = -1 for the root) and two independent
    // elements, with no coupling between units. Nodes are placed leaves
    // first (decreasing depth), an elimination order that causes no fill.
    function void build_tree(int parent []);
      int nb = nk - 2;
      int depth [], order [], pos [];
      depth = new[nb]; order = new[nb]; pos = new[nb];
      for (int i = 0; i < n * n; i++) g[i] = 0.0;
      for (int v = 0; v < nb; v++) begin
        int d = 0, x = v;
        while (parent[x] >= 0) begin
          x = parent[x];
          d++;
        end
        depth[v] = d;
      end
      begin
        int cnt = 0;
        for (int d = nb; d >= 0; d--)
          for (int v = 0; v < nb; v++)
            if (depth[v] == d) begin
              order[cnt] = v;
              pos[v] = cnt;
              cnt++;
            end
      end
      for (int k = 0; k < nu; k++) begin
        int b = k * nk;
        for (int v = 1; v < nb; v++) begin
          real w = urand(0.5, 1.5);
          int r = b + pos[v], c = b + pos[parent[v]];
          g[r * n + c] = -w;
          g[c * n + r] = -w;
          g[r * n + r] += w;
          g[c * n + c] += w;
        end
        for (int v = 0; v < nk; v++) g[(b + v) * n + b + v] += urand(0.1, 0.5);
      end
      shuffle(p);
      shuffle(q);
      factor();
      schedule();
    endfunction

    function int nonzeros();
      int cnt = 0;
      for (int i = 0; i < n * n; i++) if (g[i] != 0.0) cnt++;
      return cnt;
    endfunction

    // New right-hand side for a random exact solution.
    function void new_step();
      real up [];
      up = new[n];
      for (int m = 0; m < n; m++) up[m] = urand(-1.0, 1.0);
      for (int m = 0; m < n; m++) u_true[q[m]] = up[m];
      for (int r = 0; r < n; r++) begin
        real s = 0.0;
        for (int c = 0; c < n; c++) s += g[r * n + c] * up[c];
        i_rhs[p[r]] = s;
      end
    endfunction
  endclass
endpackage
