// tb_spmv_pkg: helpers shared by the testbenches.
//
// base_to_real gives the real value of a base-64 accumulator operand
// (significand * 2^(64*exp - 1075)); rand_double draws a normal double with a
// chosen binary exponent range; spmv_sched plays the host: it builds a random
// sparse matrix in CSR form and schedules it into packets of nlanes 80-bit slots the way the
// engine expects (all values of a row in one slot position, rows padded to at
// least eight entries, a zero termination naming the lane's next row, idle
// lanes padded), and it computes the expected y = A x in real arithmetic.
package tb_spmv_pkg;

  localparam int SIG_W = 118;   // 54 + 64
  localparam logic [15:0] IDLE = 16'hFFFF;

  function automatic real pow2(int e);
    real r;
    r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r * 0.5;
    return r;
  endfunction

  function automatic real base_to_real(logic signed [SIG_W-1:0] sig, logic [4:0] ex);
    logic [SIG_W-1:0] a;
    real r;
    a = sig[SIG_W-1] ? SIG_W'(-sig) : SIG_W'(sig);
    r = 0.0;
    for (int i = SIG_W - 1; i >= 0; i--) r = r * 2.0 + (a[i] ? 1.0 : 0.0);
    if (int'(ex) * 64 - 1075 < -900) r = (r * pow2(int'(ex) * 64 - 1075 + 200)) * pow2(-200);
    else r = r * pow2(int'(ex) * 64 - 1075);
    return sig[SIG_W-1] ? -r : r;
  endfunction

  function automatic logic [63:0] rand_double(int emin, int emax);
    logic [63:0] d;
    int e;
    e = emin + int'($urandom_range(0, emax - emin));
    d[63]    = 1'($urandom_range(0, 1));
    d[62:52] = 11'(1023 + e);
    d[51:32] = 20'($urandom);
    d[31:0]  = $urandom;
    return d;
  endfunction

  function automatic real fabs(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  class spmv_sched;
    int          nrows, ncols;
    int          row_nnz[];
    int          row_start[];
    int          cols[$];
    logic [63:0] vals[$];
    logic [63:0] x[];
    real         y_exp[];
    real         y_mag[];
    int          nlanes = 5;
    logic [79:0] slots[$];     // packet p, lane l at index p * nlanes + l
    int          n_pads, n_terms, n_idle, n_short, n_long;

    // nnz per row drawn from [nnz_min, nnz_max].
    function void make_matrix(int nr, int nc, int nnz_min, int nnz_max);
      nrows = nr; ncols = nc;
      row_nnz = new[nr]; row_start = new[nr];
      x = new[nc]; y_exp = new[nr]; y_mag = new[nr];
      cols.delete(); vals.delete();
      for (int c = 0; c < nc; c++) x[c] = rand_double(-4, 4);
      for (int r = 0; r < nr; r++) begin
        int n, c;
        n = nnz_min + int'($urandom_range(0, nnz_max - nnz_min));
        if (n > nc) n = nc;
        row_nnz[r] = n; row_start[r] = cols.size();
        c = int'($urandom_range(0, nc - 1));
        y_exp[r] = 0.0; y_mag[r] = 0.0;
        for (int k = 0; k < n; k++) begin
          logic [63:0] v;
          real p;
          c = (c + 1 + int'($urandom_range(0, 3))) % nc;
          v = rand_double(-6, 6);
          cols.push_back(c); vals.push_back(v);
          p = $bitstoreal(v) * $bitstoreal(x[c]);
          y_exp[r] += p;
          y_mag[r] += fabs(p);
        end
      end
    endfunction

    function void schedule();
      int lane_row[], pos[], next_row;
      logic [79:0] pk[];
      bit busy;
      slots.delete();
      lane_row = new[nlanes]; pos = new[nlanes]; pk = new[nlanes];
      n_pads = 0; n_terms = 0; n_idle = 0; n_short = 0; n_long = 0;
      for (int r = 0; r < nrows; r++)
        if (row_nnz[r] < 7) n_short++; else if (row_nnz[r] > 8) n_long++;
      for (int l = 0; l < nlanes; l++) begin
        lane_row[l] = (l < nrows) ? l : int'(IDLE);
        pos[l] = 0;
      end
      next_row = nlanes;
      busy = 1;
      while (busy) begin
        busy = 0;
        for (int l = 0; l < nlanes; l++) begin
          logic [63:0] v;
          logic [15:0] c;
          if (lane_row[l] == int'(IDLE)) begin
            v = '0; c = '0; n_idle++;
          end else begin
            int r, n, total;
            busy = 1;
            r = lane_row[l]; n = row_nnz[r];
            total = (n + 1 < 8) ? 8 : n + 1;
            if (pos[l] < n) begin
              v = vals[row_start[r] + pos[l]];
              c = 16'(cols[row_start[r] + pos[l]]);
              pos[l]++;
            end else if (pos[l] < total - 1) begin
              v = '0; c = '0; n_pads++; pos[l]++;
            end else begin
              int nxt;
              nxt = (next_row < nrows) ? next_row : int'(IDLE);
              if (next_row < nrows) next_row++;
              v = '0; c = 16'(nxt); n_terms++;
              lane_row[l] = nxt; pos[l] = 0;
            end
          end
          pk[l] = {v, c};
        end
        if (busy) foreach (pk[l]) slots.push_back(pk[l]);
      end
    endfunction

    function int npkts();
      return slots.size() / nlanes;
    endfunction

    function logic [79:0] slot(int p, int l);
      return slots[p * nlanes + l];
    endfunction

    // Five-lane packet, slot 0 in the most significant bits.
    function logic [399:0] pkt5(int p);
      logic [399:0] pk;
      for (int l = 0; l < 5; l++) pk[399 - 80*l -: 80] = slot(p, l);
      return pk;
    endfunction
  endclass

endpackage
