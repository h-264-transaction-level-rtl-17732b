// pred_ref_pkg: reference models for the testbenches. Each function
// evaluates one predicted sample straight from the H.264 formulas (no
// systolic scheduling, no reshuffling), so the testbenches compare the
// hardware against an independent description.
package pred_ref_pkg;
  import pred_pkg::*;

  function automatic int clip(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int av(int u, int v); return (u + v + 1) >> 1; endfunction
  function automatic int tap6(int a, int b, int c, int d, int e, int f);
    return a - 5*b + 20*c + 20*d - 5*e + f;
  endfunction

  // luma: win[r][c] is the sample at (c-2, r-2)
  function automatic int luma_ref(input pix_t win [9][9], int qx, int qy, int x, int y);
    int G [9][9];
    int b1 [9][4];
    int bq, hq, jq, hx1, by1, gx1, gy1;
    for (int r = 0; r < 9; r++) for (int c = 0; c < 9; c++) G[r][c] = int'(win[r][c]);
    for (int r = 0; r < 9; r++) for (int c = 0; c < 4; c++)
      b1[r][c] = tap6(G[r][c], G[r][c+1], G[r][c+2], G[r][c+3], G[r][c+4], G[r][c+5]);
    bq  = clip((b1[y+2][x] + 16) >>> 5);
    by1 = clip((b1[y+3][x] + 16) >>> 5);
    hq  = clip((tap6(G[y][x+2], G[y+1][x+2], G[y+2][x+2], G[y+3][x+2], G[y+4][x+2], G[y+5][x+2]) + 16) >>> 5);
    hx1 = clip((tap6(G[y][x+3], G[y+1][x+3], G[y+2][x+3], G[y+3][x+3], G[y+4][x+3], G[y+5][x+3]) + 16) >>> 5);
    jq  = clip((tap6(b1[y][x], b1[y+1][x], b1[y+2][x], b1[y+3][x], b1[y+4][x], b1[y+5][x]) + 512) >>> 10);
    gx1 = G[y+2][x+3];
    gy1 = G[y+3][x+2];
    case (qy*4 + qx)
      0:  return G[y+2][x+2];
      1:  return av(G[y+2][x+2], bq);
      2:  return bq;
      3:  return av(bq, gx1);
      4:  return av(G[y+2][x+2], hq);
      5:  return av(bq, hq);
      6:  return av(bq, jq);
      7:  return av(bq, hx1);
      8:  return hq;
      9:  return av(hq, jq);
      10: return jq;
      11: return av(jq, hx1);
      12: return av(hq, gy1);
      13: return av(hq, by1);
      14: return av(jq, by1);
      default: return av(hx1, by1);
    endcase
  endfunction

  function automatic int chroma_ref(input pix_t w [5][5], int dx, int dy, int x, int y);
    return ((8-dx)*(8-dy)*int'(w[y][x]) + dx*(8-dy)*int'(w[y][x+1]) +
            (8-dx)*dy*int'(w[y+1][x]) + dx*dy*int'(w[y+1][x+1]) + 32) >> 6;
  endfunction

  function automatic int nb(input pix_t top [16], input pix_t left [16], input pix_t corner,
                            bit is16, bit tra, int x, int y);
    if (x == -1 && y == -1) return int'(corner);
    if (y == -1) return (!is16 && x > 3 && !tra) ? int'(top[3]) : int'(top[x]);
    return int'(left[y]);
  endfunction

  function automatic int intra4_ref(int m, input pix_t t [16], input pix_t l [16], input pix_t c,
                                    bit ta, bit la, bit tra, int x, int y);
    int z, s;
    case (m)
      0: return nb(t,l,c,0,tra,x,-1);
      1: return nb(t,l,c,0,tra,-1,y);
      2: begin
        s = 0;
        if (ta && la) begin for (int i = 0; i < 4; i++) s += int'(t[i]) + int'(l[i]); return (s + 4) >> 3; end
        if (la) begin for (int i = 0; i < 4; i++) s += int'(l[i]); return (s + 2) >> 2; end
        if (ta) begin for (int i = 0; i < 4; i++) s += int'(t[i]); return (s + 2) >> 2; end
        return 128;
      end
      3: if (x == 3 && y == 3) return (nb(t,l,c,0,tra,6,-1) + 3*nb(t,l,c,0,tra,7,-1) + 2) >> 2;
         else return (nb(t,l,c,0,tra,x+y,-1) + 2*nb(t,l,c,0,tra,x+y+1,-1) + nb(t,l,c,0,tra,x+y+2,-1) + 2) >> 2;
      4: if (x > y) return (nb(t,l,c,0,tra,x-y-2,-1) + 2*nb(t,l,c,0,tra,x-y-1,-1) + nb(t,l,c,0,tra,x-y,-1) + 2) >> 2;
         else if (x < y) return (nb(t,l,c,0,tra,-1,y-x-2) + 2*nb(t,l,c,0,tra,-1,y-x-1) + nb(t,l,c,0,tra,-1,y-x) + 2) >> 2;
         else return (nb(t,l,c,0,tra,0,-1) + 2*int'(c) + nb(t,l,c,0,tra,-1,0) + 2) >> 2;
      5: begin
        z = 2*x - y;
        if (z >= 0 && (z & 1) == 0) return (nb(t,l,c,0,tra,x-(y>>1)-1,-1) + nb(t,l,c,0,tra,x-(y>>1),-1) + 1) >> 1;
        if (z > 0) return (nb(t,l,c,0,tra,x-(y>>1)-2,-1) + 2*nb(t,l,c,0,tra,x-(y>>1)-1,-1) + nb(t,l,c,0,tra,x-(y>>1),-1) + 2) >> 2;
        if (z == -1) return (nb(t,l,c,0,tra,-1,0) + 2*int'(c) + nb(t,l,c,0,tra,0,-1) + 2) >> 2;
        return (nb(t,l,c,0,tra,-1,y-1) + 2*nb(t,l,c,0,tra,-1,y-2) + nb(t,l,c,0,tra,-1,y-3) + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && (z & 1) == 0) return (nb(t,l,c,0,tra,-1,y-(x>>1)-1) + nb(t,l,c,0,tra,-1,y-(x>>1)) + 1) >> 1;
        if (z > 0) return (nb(t,l,c,0,tra,-1,y-(x>>1)-2) + 2*nb(t,l,c,0,tra,-1,y-(x>>1)-1) + nb(t,l,c,0,tra,-1,y-(x>>1)) + 2) >> 2;
        if (z == -1) return (nb(t,l,c,0,tra,-1,0) + 2*int'(c) + nb(t,l,c,0,tra,0,-1) + 2) >> 2;
        return (nb(t,l,c,0,tra,x-1,-1) + 2*nb(t,l,c,0,tra,x-2,-1) + nb(t,l,c,0,tra,x-3,-1) + 2) >> 2;
      end
      7: if ((y & 1) == 0) return (nb(t,l,c,0,tra,x+(y>>1),-1) + nb(t,l,c,0,tra,x+(y>>1)+1,-1) + 1) >> 1;
         else return (nb(t,l,c,0,tra,x+(y>>1),-1) + 2*nb(t,l,c,0,tra,x+(y>>1)+1,-1) + nb(t,l,c,0,tra,x+(y>>1)+2,-1) + 2) >> 2;
      default: begin
        z = x + 2*y;
        if (z > 5) return int'(l[3]);
        if (z == 5) return (int'(l[2]) + 3*int'(l[3]) + 2) >> 2;
        if ((z & 1) == 0) return (int'(l[y+(x>>1)]) + int'(l[y+(x>>1)+1]) + 1) >> 1;
        return (int'(l[y+(x>>1)]) + 2*int'(l[y+(x>>1)+1]) + int'(l[y+(x>>1)+2]) + 2) >> 2;
      end
    endcase
  endfunction

  function automatic int intra16_ref(int m, input pix_t t [16], input pix_t l [16], input pix_t c,
                                     bit ta, bit la, int x, int y);
    int s, H, V, a, b, cc;
    case (m)
      0: return int'(t[x]);
      1: return int'(l[y]);
      2: begin
        s = 0;
        if (ta && la) begin for (int i = 0; i < 16; i++) s += int'(t[i]) + int'(l[i]); return (s + 16) >> 5; end
        if (la) begin for (int i = 0; i < 16; i++) s += int'(l[i]); return (s + 8) >> 4; end
        if (ta) begin for (int i = 0; i < 16; i++) s += int'(t[i]); return (s + 8) >> 4; end
        return 128;
      end
      default: begin
        H = 0; V = 0;
        for (int i = 0; i < 8; i++) begin
          H += (i + 1) * (int'(t[8+i]) - ((i == 7) ? int'(c) : int'(t[6-i])));
          V += (i + 1) * (int'(l[8+i]) - ((i == 7) ? int'(c) : int'(l[6-i])));
        end
        a  = 16 * (int'(l[15]) + int'(t[15]));
        b  = (5 * H + 32) >>> 6;
        cc = (5 * V + 32) >>> 6;
        return clip((a + b * (x - 7) + cc * (y - 7) + 16) >>> 5);
      end
    endcase
  endfunction

endpackage
