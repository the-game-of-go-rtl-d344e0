// go_ref_pkg: software reference model of the Go rules used by the
// testbenches. It works on plain integer arrays with an explicit flood fill,
// independent of the wire-propagation hardware it is compared against.
package go_ref_pkg;
  import go_pkg::*;

  typedef int ref_board_t [N][N];

  function automatic ref_board_t to_ref(board_t b);
    ref_board_t r;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) r[i][j] = int'(b[i][j]);
    return r;
  endfunction

  function automatic board_t from_ref(ref_board_t r);
    board_t b;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) b[i][j] = cell_t'(r[i][j][1:0]);
    return b;
  endfunction

  // Marks every stone of colour col that reaches an empty point through
  // same-coloured neighbours (iterative relaxation until nothing changes).
  function automatic ref_board_t alive_map(ref_board_t b, int col);
    ref_board_t alive;
    bit changed;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) alive[i][j] = 0;
    do begin
      changed = 0;
      for (int i = 0; i < int'(N); i++)
        for (int j = 0; j < int'(N); j++) begin
          if (b[i][j] == col && alive[i][j] == 0) begin
            int di[4] = '{-1, 1, 0, 0};
            int dj[4] = '{0, 0, -1, 1};
            for (int k = 0; k < 4; k++) begin
              int ni = i + di[k];
              int nj = j + dj[k];
              if (ni >= 0 && ni < int'(N) && nj >= 0 && nj < int'(N)) begin
                if (b[ni][nj] == 0 || (b[ni][nj] == col && alive[ni][nj] != 0)) begin
                  alive[i][j] = 1;
                  changed = 1;
                end
              end
            end
          end
        end
    end while (changed);
    return alive;
  endfunction

  function automatic ref_board_t ref_prune(ref_board_t b, int col);
    ref_board_t a = alive_map(b, col);
    ref_board_t o = b;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++)
        if (b[i][j] == col && a[i][j] == 0) o[i][j] = 0;
    return o;
  endfunction

  function automatic bit same(ref_board_t a, ref_board_t b);
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) if (a[i][j] != b[i][j]) return 0;
    return 1;
  endfunction

  // Area of colour col: its stones plus empty regions that touch only col.
  function automatic int ref_area(ref_board_t b, int col);
    int region [N][N];
    int cnt = 0;
    int opp = (col == 1) ? 2 : 1;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        region[i][j] = 0;
        if (b[i][j] == col) cnt++;
      end
    // region = 1 marks empties connected (through empties) to an opp stone
    begin
      bit changed;
      do begin
        changed = 0;
        for (int i = 0; i < int'(N); i++)
          for (int j = 0; j < int'(N); j++) if (b[i][j] == 0 && region[i][j] == 0) begin
            int di[4] = '{-1, 1, 0, 0};
            int dj[4] = '{0, 0, -1, 1};
            for (int k = 0; k < 4; k++) begin
              int ni = i + di[k];
              int nj = j + dj[k];
              if (ni >= 0 && ni < int'(N) && nj >= 0 && nj < int'(N))
                if (b[ni][nj] == opp || (b[ni][nj] == 0 && region[ni][nj] == 1)) begin
                  region[i][j] = 1;
                  changed = 1;
                end
            end
          end
      end while (changed);
    end
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) if (b[i][j] == 0 && region[i][j] == 0) cnt++;
    return cnt;
  endfunction

  // Random board: each point empty / black / white with given weights.
  function automatic ref_board_t random_board(int pct_empty);
    ref_board_t r;
    for (int i = 0; i < int'(N); i++)
      for (int j = 0; j < int'(N); j++) begin
        int x = int'($urandom_range(99));
        if (x < pct_empty) r[i][j] = 0;
        else r[i][j] = ($urandom_range(1) == 0) ? 1 : 2;
      end
    return r;
  endfunction
endpackage
