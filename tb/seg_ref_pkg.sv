// seg_ref_pkg: behavioural reference of the block segmentation, for testbenches.
//
// Works on a block held in plain integer arrays and follows the algorithm,
// not the hardware structure:
//   weight  W(p, q)  = max(0, 255 - 8 * max over channels |p - q|)
//   leader           : sum of the weights to the existing neighbours > PHI_P
//   regions          : take the first free leader in raster order, then add
//                      free cells whose weights towards region cells sum to
//                      more than PHI_Z, until none is left; number regions
//                      from 1; cells never reached keep 0.
// Growing is done in synchronous rounds (all cells of a round test against
// the region as it was before the round) only to count rounds: that gives the
// expected cycle count of a block: per region one cycle for the leader,
// one per round that adds cells and one for the round that adds none (the
// labeling cycle); plus one for the final leader search that finds none. The region itself is then recomputed by a sequential
// in-place sweep until nothing changes, which reaches the same fixpoint
// (the rule is monotone) by a different route, and the two are compared.
package seg_ref_pkg;

  // Test image: a few flat coloured areas with low noise (segments), a
  // high-contrast texture (no leaders, left unsegmented) and bands.
  function automatic int hash3(int x, int y, int k);
    logic [31:0] h;
    h = (32'(x) * 32'd73856093) ^ (32'(y) * 32'd19349663) ^ (32'(k) * 32'd83492791);
    h = h ^ (h >> 13);
    h = h * 32'd1274126177;
    return int'(h[30:16]);
  endfunction

  function automatic int test_pixel(int x, int y, int ch, int seed);
    int base, dx, dy;
    dx = x - 320;
    dy = y - 240;
    if (dx * dx + dy * dy < 130 * 130)                   base = (ch == 0) ? 200 : (ch == 1) ? 60 : 40;
    else if (x >= 50 && x < 210 && y >= 60 && y < 190)   base = (ch == 0) ? 30 : (ch == 1) ? 180 : 70;
    else if (x >= 470 && x < 600 && y >= 330 && y < 440) base = (((x >> 1) + (y >> 1)) & 1) ? 230 : 20;
    else base = 60 + 45 * ((y / 97 + x / 151 + seed) % 4) + ch * 10;
    return base + hash3(x, y, ch + 3 * seed) % 5;
  endfunction

  class seg_ref #(int ROWS = 33, int COLS = 41, int NCH = 3,
                  int PHI_P = 800, int PHI_Z = 120);

    int pix    [ROWS][COLS][NCH];
    int wh     [ROWS][COLS];     // weight to the left neighbour (0 in column 0)
    int wv     [ROWS][COLS];     // weight to the cell below (0 in the last row)
    bit leader [ROWS][COLS];
    int label  [ROWS][COLS];
    int nseg;
    int seg_cycles;
    int grow_rounds;
    int internal_errors;

    static function int weight(int a [NCH], int b [NCH]);
      int m, d;
      m = 0;
      for (int k = 0; k < NCH; k++) begin
        d = (a[k] > b[k]) ? a[k] - b[k] : b[k] - a[k];
        if (d > m) m = d;
      end
      return (8 * m >= 255) ? 0 : 255 - 8 * m;
    endfunction

    // weight between (r,c) and neighbour n: 0 up, 1 down, 2 left, 3 right; -1 if none
    function int nbw(int r, int c, int n, output int rr, output int cc);
      rr = r; cc = c;
      case (n)
        0: begin if (r == 0)        return -1; rr = r - 1; return wv[r-1][c]; end
        1: begin if (r == ROWS - 1) return -1; rr = r + 1; return wv[r][c];   end
        2: begin if (c == 0)        return -1; cc = c - 1; return wh[r][c];   end
        default: begin if (c == COLS - 1) return -1; cc = c + 1; return wh[r][c+1]; end
      endcase
    endfunction

    function void run();
      bit exc   [ROWS][COLS];
      bit exc2  [ROWS][COLS];
      bit grow  [ROWS][COLS];
      int rr, cc, w, s, seg;
      bit found, changed;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          wh[r][c] = (c == 0) ? 0 : weight(pix[r][c], pix[r][c-1]);
          wv[r][c] = (r == ROWS - 1) ? 0 : weight(pix[r][c], pix[r+1][c]);
        end
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          s = 0;
          for (int n = 0; n < 4; n++) begin
            w = nbw(r, c, n, rr, cc);
            if (w > 0) s += w;
          end
          leader[r][c] = (s > PHI_P);
          label[r][c]  = 0;
        end
      seg = 1; seg_cycles = 0; grow_rounds = 0; internal_errors = 0;
      forever begin
        found = 0;
        for (int r = 0; r < ROWS && !found; r++)
          for (int c = 0; c < COLS && !found; c++)
            if (leader[r][c] && label[r][c] == 0) begin
              found = 1;
              foreach (exc[i, j]) begin exc[i][j] = 0; exc2[i][j] = 0; end
              exc[r][c]  = 1;
              exc2[r][c] = 1;
            end
        seg_cycles++;
        if (!found) break;
        // synchronous rounds (cycle count)
        do begin
          changed = 0;
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++) begin
              grow[r][c] = 0;
              if (!exc[r][c] && label[r][c] == 0) begin
                s = 0;
                for (int n = 0; n < 4; n++) begin
                  w = nbw(r, c, n, rr, cc);
                  if (w >= 0 && exc[rr][cc]) s += w;
                end
                grow[r][c] = (s > PHI_Z);
              end
            end
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++)
              if (grow[r][c]) begin exc[r][c] = 1; changed = 1; end
          seg_cycles++;
          if (changed) grow_rounds++;
        end while (changed);
        // sequential sweep (region)
        do begin
          changed = 0;
          for (int r = 0; r < ROWS; r++)
            for (int c = 0; c < COLS; c++)
              if (!exc2[r][c] && label[r][c] == 0) begin
                s = 0;
                for (int n = 0; n < 4; n++) begin
                  w = nbw(r, c, n, rr, cc);
                  if (w >= 0 && exc2[rr][cc]) s += w;
                end
                if (s > PHI_Z) begin exc2[r][c] = 1; changed = 1; end
              end
        end while (changed);
        for (int r = 0; r < ROWS; r++)
          for (int c = 0; c < COLS; c++) begin
            if (exc[r][c] != exc2[r][c]) internal_errors++;
            if (exc2[r][c]) label[r][c] = seg;
          end
        seg++;
      end
      nseg = seg - 1;
    endfunction

  endclass

endpackage
