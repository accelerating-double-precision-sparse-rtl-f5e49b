// spmv_tb_pkg: test problems for the SpMxV processing elements.
//
// spmv_problem builds a blocked sparse matrix and an input vector with small
// integer values (so every product and every sum is exact in double precision
// and the order of additions does not matter), computes the reference result
// y = A x, and prepares what the memory controllers would deliver:
//   - per processing element, the schedule of matrix entries: the entries of
//     each dense block are grouped by row, rows sorted by decreasing length and
//     dealt to the k elements in turn; each element's share is then ordered so
//     that entries of the same row are at least `sep` positions apart, with
//     null entries where no row is eligible (a greedy form of the document's
//     pre-processing schedule). Every element gets at least one entry per
//     block; its last entry carries the end-of-matrix flag.
//   - the sequence of vector blocks, one per dense block, in processing order.
package spmv_tb_pkg;
  import spmv_pkg::*;

  typedef struct { int row; int col; int val; } nz_t;

  class spmv_problem;
    int nrs, ncb;                 // rowstrips, column blocks
    int x [];                     // input vector
    longint yref [];              // reference result
    int blk_rs [$], blk_cb [$];   // dense blocks in processing order
    nz_t blk_nz [$][$];           // entries of each dense block
    mat_entry_t seq [][$];        // per element schedule
    int n_null;                   // null entries inserted
    int n_entries;                // real entries

    function new(int nrs_i, int ncb_i);
      nrs = nrs_i; ncb = ncb_i;
      x = new[ncb * BLOCK];
      yref = new[nrs * BLOCK];
      foreach (x[i]) x[i] = $urandom_range(0, 8) - 4;
      foreach (yref[i]) yref[i] = 0;
      n_null = 0; n_entries = 0;
    endfunction

    // dense block (rs, cb) with nnz random entries, heavy entries in one row
    function void add_block(int rs, int cb, int nnz, int heavy);
      bit used [int];
      nz_t l [$];
      int hr = $urandom_range(0, BLOCK - 1);
      for (int i = 0; i < nnz + heavy; i++) begin
        nz_t e;
        int key;
        do begin
          e.row = (i < heavy) ? hr : $urandom_range(0, BLOCK - 1);
          e.col = $urandom_range(0, BLOCK - 1);
          key = e.row * BLOCK + e.col;
        end while (used.exists(key));
        used[key] = 1;
        do e.val = $urandom_range(0, 8) - 4; while (e.val == 0);
        l.push_back(e);
        yref[rs * BLOCK + e.row] += longint'(e.val) * x[cb * BLOCK + e.col];
      end
      blk_rs.push_back(rs);
      blk_cb.push_back(cb);
      blk_nz.push_back(l);
      n_entries += l.size();
    endfunction

    function mat_entry_t mk(int b, int pb, nz_t e, bit is_null);
      mat_entry_t m;
      m.value    = is_null ? 64'd0 : $realtobits(real'(e.val));
      m.col      = 7'(e.col);
      m.vbuf     = 1'(b);
      m.row      = 7'(e.row);
      m.pbuf     = 1'(pb);
      m.eom      = 1'b0;
      m.is_null  = is_null;
      m.rowstrip = rs_idx_t'(blk_rs[b]);
      return m;
    endfunction

    function void schedule(int k, int sep);
      int pb = 0;
      int pos [];
      int last [][int];
      seq = new[k];
      pos = new[k];
      last = new[k];
      foreach (pos[p]) pos[p] = 0;
      for (int b = 0; b < blk_rs.size(); b++) begin
        nz_t byrow [int][$];
        int rows [$];
        nz_t share [][$];
        if (b > 0 && blk_rs[b] != blk_rs[b-1]) begin
          pb = 1 - pb;
          foreach (last[p]) last[p].delete();
        end
        foreach (blk_nz[b][i]) byrow[blk_nz[b][i].row].push_back(blk_nz[b][i]);
        foreach (byrow[r]) rows.push_back(r);
        rows.rsort() with (byrow[item].size());
        share = new[k];
        begin
          int d = 0;
          foreach (rows[i])
            foreach (byrow[rows[i]][j]) begin
              share[d % k].push_back(byrow[rows[i]][j]);
              d++;
            end
        end
        for (int p = 0; p < k; p++) begin
          nz_t rem [int][$];
          int left = share[p].size();
          nz_t dummy;
          dummy.row = 0; dummy.col = 0; dummy.val = 0;
          foreach (share[p][i]) rem[share[p][i].row].push_back(share[p][i]);
          if (left == 0) begin
            seq[p].push_back(mk(b, pb, dummy, 1));
            n_null++;
            pos[p]++;
          end
          while (left > 0) begin
            int best = -1, bestn = 0;
            foreach (rem[r])
              if (rem[r].size() > bestn &&
                  (!last[p].exists(r) || pos[p] - last[p][r] >= sep)) begin
                best = r; bestn = rem[r].size();
              end
            if (best < 0) begin
              seq[p].push_back(mk(b, pb, dummy, 1));
              n_null++;
            end else begin
              seq[p].push_back(mk(b, pb, rem[best].pop_front(), 0));
              last[p][best] = pos[p];
              left--;
            end
            pos[p]++;
          end
        end
      end
      foreach (seq[p]) seq[p][seq[p].size() - 1].eom = 1'b1;
    endfunction

    // beat j (0..31) of the vector block needed by dense block b
    function dword_t xword(int b, int beat, int w);
      return $realtobits(real'(x[blk_cb[b] * BLOCK + beat * WORDS + w]));
    endfunction
  endclass

endpackage
