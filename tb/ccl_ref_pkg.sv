// ccl_ref_pkg: software reference for the connected components labeler,
// used by the testbenches. Temporary labels follow the L-mask rules of the
// first pass; final labels are obtained independently by flood-filling
// each 4-connected blob and giving it the smallest temporary label found
// in it, or 255 when the blob touches the border and discard is on.
package ccl_ref_pkg;
  localparam int MAXD = 704;   // largest frame side the model handles
  int img [MAXD][MAXD];   // [y][x], 0/1
  int tmp [MAXD][MAXD];
  int fin [MAXD][MAXD];
  int comp[MAXD][MAXD];
  int n_tmp;
  int n_pairs;            // pairs the first pass stores (repeats of the last pair skipped)

  function automatic void compute(int w, int h, bit discard);
    int next, t, l, qx[$], qy[$], cid, mn, brd, cx, cy, la, lb, hi, lo;
    next = 1; n_pairs = 0; la = 0; lb = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        tmp[y][x] = 0; comp[y][x] = 0;
        if (img[y][x] != 0) begin
          t = (y > 0) ? tmp[y-1][x] : 0;
          l = (x > 0) ? tmp[y][x-1] : 0;
          if (t == 0 && l == 0) begin tmp[y][x] = next; next++; end
          else if (t == 0) tmp[y][x] = l;
          else if (l == 0) tmp[y][x] = t;
          else begin
            tmp[y][x] = (t < l) ? t : l;
            hi = (t > l) ? t : l; lo = (t < l) ? t : l;
            if (hi != lo && !(n_pairs > 0 && la == hi && lb == lo)) begin
              n_pairs++; la = hi; lb = lo;
            end
          end
        end
      end
    n_tmp = next - 1;
    cid = 0;
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++) begin
        fin[y][x] = 0;
      end
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        if (img[y][x] != 0 && comp[y][x] == 0) begin
          int px[$], py[$];
          cid++;
          mn = 1000; brd = 0;
          qx.push_back(x); qy.push_back(y); comp[y][x] = cid;
          while (qx.size() > 0) begin
            cx = qx.pop_front(); cy = qy.pop_front();
            px.push_back(cx); py.push_back(cy);
            if (tmp[cy][cx] < mn) mn = tmp[cy][cx];
            if (cx == 0 || cy == 0 || cx == w-1 || cy == h-1) brd = 1;
            if (cx > 0   && img[cy][cx-1] != 0 && comp[cy][cx-1] == 0) begin comp[cy][cx-1] = cid; qx.push_back(cx-1); qy.push_back(cy); end
            if (cx < w-1 && img[cy][cx+1] != 0 && comp[cy][cx+1] == 0) begin comp[cy][cx+1] = cid; qx.push_back(cx+1); qy.push_back(cy); end
            if (cy > 0   && img[cy-1][cx] != 0 && comp[cy-1][cx] == 0) begin comp[cy-1][cx] = cid; qx.push_back(cx); qy.push_back(cy-1); end
            if (cy < h-1 && img[cy+1][cx] != 0 && comp[cy+1][cx] == 0) begin comp[cy+1][cx] = cid; qx.push_back(cx); qy.push_back(cy+1); end
          end
          foreach (px[i]) fin[py[i]][px[i]] = (discard && brd) ? 255 : mn;
        end
  endfunction

  // random blobby image: density in percent
  function automatic void random_image(int w, int h, int density);
    for (int y = 0; y < h; y++)
      for (int x = 0; x < w; x++)
        img[y][x] = (($urandom % 100) < density) ? 1 : 0;
  endfunction

  // the 12x19 test image of the two-pass example (shape with a frame,
  // an E-like blob and a small square)
  function automatic void example_image();
    string rows [19];
    rows = '{"000000000000", "011111111110", "010000000010", "010111000010",
             "010111000010", "010001100010", "010111100010", "010111110010",
             "010011110010", "010011100010", "010111000010", "010111000010",
             "010000000010", "010000011010", "010000011010", "010000000010",
             "010000000010", "011111111110", "000000000000"};
    for (int y = 0; y < 19; y++)
      for (int x = 0; x < 12; x++)
        img[y][x] = (rows[y][x] == "1") ? 1 : 0;
  endfunction
endpackage
