// upgma_ref_pkg: reference model for the testbenches. It runs integer UPGMA
// on a distance matrix held in the package and records the merges, using the
// conventions the hardware documents: clusters kept in slots, the closest
// pair found by scanning i < j in row order with the first minimum winning,
// the new cluster taking the lower slot, and the weighted mean
// (d_il*|Ci| + d_jl*|Cj|) / (|Ci| + |Cj|) truncated to an integer.
// It also counts the clock cycles the engine is busy for a run, from the
// timing the engine documents: a scan step costs one cycle per removed slot
// and RD_LAT + 2 per distance read, a row change one cycle; an average costs
// two reads, one cycle to start the divider and num_w + 1 divider cycles.
// It also generates test matrices: random distances 1..max_d, with one value
// repeated a given number of times so that equal distances occur.
package upgma_ref_pkg;

  localparam int NMAX = 256;

  longint unsigned dmat [NMAX][NMAX];   // symmetric input matrix
  int  rec_a [NMAX];                     // merge m: child ids and distance
  int  rec_b [NMAX];
  longint unsigned rec_d [NMAX];
  int  root_id;
  longint unsigned n_reads;              // distance reads the run needs
  longint unsigned n_avgs;               // averages computed
  int  n_ties;                           // equal to current minimum during scans
  longint unsigned n_cycles;             // busy cycles of the engine

  function automatic void gen(int n, int max_d, int reps, int unsigned seed);
    int unsigned s;
    longint unsigned rep_val;
    int unsigned md, v32;
    md = int'(max_d);
    s = seed;
    for (int i = 0; i < n; i++) begin
      dmat[i][i] = 0;
      for (int j = i + 1; j < n; j++) begin
        s = s * 1103515245 + 12345;
        v32 = (s >> 8) % md;
        dmat[i][j] = 64'(v32) + 64'd1;
        dmat[j][i] = dmat[i][j];
      end
    end
    // repeat one value 'reps' times at pseudo-random pair positions
    s = s * 1103515245 + 12345;
    v32 = (s >> 8) % md;
    rep_val = 64'(v32) + 64'd1;
    for (int r = 0; r < reps && n > 1; r++) begin
      int i, j;
      s = s * 1103515245 + 12345;
      i = int'((s >> 8) % n);
      s = s * 1103515245 + 12345;
      j = int'((s >> 8) % n);
      if (i != j) begin
        dmat[i][j] = rep_val;
        dmat[j][i] = rep_val;
      end
    end
  endfunction

  function automatic void run(int n, int rd_lat = 4, int num_w = 42);
    longint unsigned d [NMAX][NMAX];
    int  sz [NMAX];
    int  id [NMAX];
    bit  act [NMAX];
    int  next_id, live;
    int  avg_cost;
    avg_cost = 2 * (rd_lat + 1) + 1 + num_w + 1;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) d[i][j] = dmat[i][j];
      sz[i] = 1; id[i] = i; act[i] = 1;
    end
    next_id = n;
    live    = n;
    n_reads = 0;
    n_avgs  = 0;
    n_ties  = 0;
    root_id = 0;
    n_cycles = 1;                                   // initialization
    for (int m = 0; live > 1; m++) begin
      int a, b;
      longint unsigned best;
      bit have;
      have = 0; a = 0; b = 0; best = 0;
      for (int i = 0; i + 1 < n; i++) begin
        n_cycles++;                                 // row change or removed row
        if (!act[i]) continue;
        for (int j = i + 1; j < n; j++) begin
          if (!act[j]) begin
            n_cycles++;
            continue;
          end
          n_reads++;
          n_cycles += 64'(rd_lat + 2);
          if (have && d[i][j] == best) n_ties++;
          if (!have || d[i][j] < best) begin
            have = 1; best = d[i][j]; a = i; b = j;
          end
        end
      end
      rec_a[m] = id[a];
      rec_b[m] = id[b];
      rec_d[m] = best;
      n_cycles += 3;                                // scan end, two record writes
      if (live == 2) begin
        root_id = next_id;
        break;
      end
      for (int l = 0; l < n; l++) begin
        longint unsigned num;
        n_cycles++;
        if (!act[l] || l == a || l == b) continue;
        n_reads += 2;
        n_cycles += 64'(avg_cost);
        n_avgs++;
        num = d[a][l] * longint'(sz[a]) + d[b][l] * longint'(sz[b]);
        d[a][l] = (num / 64'(sz[a] + sz[b])) & 64'hFFFF_FFFF;
        d[l][a] = d[a][l];
      end
      n_cycles += 2;                                // loop end, remove
      act[b]  = 0;
      sz[a]   = sz[a] + sz[b];
      id[a]   = next_id;
      next_id++;
      live--;
    end
    n_cycles += 2;                                  // root, done
  endfunction

endpackage
