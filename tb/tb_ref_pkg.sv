// tb_ref_pkg: reference models shared by the block testbenches, written
// from the H.264 equations independently of the RTL: luma intra prediction
// of an n x n block from its neighbour arrays, and the 1-D inverse
// transforms.
package tb_ref_pkg;

  // P[0] = p[-1,-1], P[1+i] = p[i,-1]; L[j] = p[-1,j]
  function automatic int ref_luma(int P [17], int L [8], bit at, bit al,
                                  int n, int m, int x, int y);
    int v, z, s;
    // helper lambdas as inline expressions
    case (m)
      0: v = P[1 + x];
      1: v = L[y];
      2: begin
        s = 0;
        if (at && al) begin
          for (int i = 0; i < n; i++) s += P[1 + i] + L[i];
          v = (s + n) / (2 * n);
        end else if (at) begin
          for (int i = 0; i < n; i++) s += P[1 + i];
          v = (s + n / 2) / n;
        end else if (al) begin
          for (int i = 0; i < n; i++) s += L[i];
          v = (s + n / 2) / n;
        end else v = 128;
      end
      3: v = (x == n - 1 && y == n - 1) ? (P[2 * n - 1] + 3 * P[2 * n] + 2) >> 2
             : (P[1 + x + y] + 2 * P[2 + x + y] + P[3 + x + y] + 2) >> 2;
      4: begin
        if (x > y) v = (P[x - y - 1] + 2 * P[x - y] + P[x - y + 1] + 2) >> 2;
        else if (x < y) v = (lget(P, L, y - x - 2) + 2 * lget(P, L, y - x - 1)
                             + lget(P, L, y - x) + 2) >> 2;
        else v = (P[1] + 2 * P[0] + L[0] + 2) >> 2;
      end
      5: begin
        z = 2 * x - y;
        if (z >= 0 && z % 2 == 0) v = (P[x - (y >> 1)] + P[x - (y >> 1) + 1] + 1) >> 1;
        else if (z >= 0) v = (P[x - (y >> 1) - 1] + 2 * P[x - (y >> 1)] + P[x - (y >> 1) + 1] + 2) >> 2;
        else if (z == -1) v = (L[0] + 2 * P[0] + P[1] + 2) >> 2;
        else v = (lget(P, L, y - 2 * x - 1) + 2 * lget(P, L, y - 2 * x - 2)
                  + lget(P, L, y - 2 * x - 3) + 2) >> 2;
      end
      6: begin
        z = 2 * y - x;
        if (z >= 0 && z % 2 == 0) v = (lget(P, L, y - (x >> 1) - 1) + L[y - (x >> 1)] + 1) >> 1;
        else if (z >= 0) v = (lget(P, L, y - (x >> 1) - 2) + 2 * lget(P, L, y - (x >> 1) - 1)
                              + L[y - (x >> 1)] + 2) >> 2;
        else if (z == -1) v = (L[0] + 2 * P[0] + P[1] + 2) >> 2;
        else v = (P[x - 2 * y] + 2 * P[x - 2 * y - 1] + P[x - 2 * y - 2] + 2) >> 2;
      end
      7: v = (y % 2 == 0) ? (P[1 + x + (y >> 1)] + P[2 + x + (y >> 1)] + 1) >> 1
             : (P[1 + x + (y >> 1)] + 2 * P[2 + x + (y >> 1)] + P[3 + x + (y >> 1)] + 2) >> 2;
      default: begin
        z = x + 2 * y;
        if (z > 2 * n - 3) v = L[n - 1];
        else if (z == 2 * n - 3) v = (L[n - 2] + 3 * L[n - 1] + 2) >> 2;
        else if (z % 2 == 0) v = (L[y + (x >> 1)] + L[y + (x >> 1) + 1] + 1) >> 1;
        else v = (L[y + (x >> 1)] + 2 * L[y + (x >> 1) + 1] + L[y + (x >> 1) + 2] + 2) >> 2;
      end
    endcase
    return v;
  endfunction

  function automatic int lget(int P [17], int L [8], int y);
    return (y < 0) ? P[0] : L[y];
  endfunction

  function automatic void idct4(input int v [4], output int o [4]);
    int e, f, g, h;
    e = v[0] + v[2]; f = v[0] - v[2];
    g = (v[1] >>> 1) - v[3]; h = v[1] + (v[3] >>> 1);
    o[0] = e + h; o[1] = f + g; o[2] = f - g; o[3] = e - h;
  endfunction

  function automatic void idct8(input int v [8], output int o [8]);
    int e0, e2, e4, e6, f0, f2, f4, f6, g1, g3, g5, g7, h1, h3, h5, h7;
    e0 = v[0] + v[4]; e4 = v[0] - v[4];
    e2 = (v[2] >>> 1) - v[6]; e6 = v[2] + (v[6] >>> 1);
    f0 = e0 + e6; f2 = e4 + e2; f4 = e4 - e2; f6 = e0 - e6;
    g1 = -v[3] + v[5] - v[7] - (v[7] >>> 1);
    g3 = v[1] + v[7] - v[3] - (v[3] >>> 1);
    g5 = -v[1] + v[7] + v[5] + (v[5] >>> 1);
    g7 = v[3] + v[5] + v[1] + (v[1] >>> 1);
    h1 = g1 + (g7 >>> 2); h7 = g7 - (g1 >>> 2);
    h3 = g3 + (g5 >>> 2); h5 = (g3 >>> 2) - g5;
    o[0] = f0 + h7; o[1] = f2 + h5; o[2] = f4 + h3; o[3] = f6 + h1;
    o[4] = f6 - h1; o[5] = f4 - h3; o[6] = f2 - h5; o[7] = f0 - h7;
  endfunction

endpackage
