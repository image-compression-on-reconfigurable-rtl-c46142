// Reference model of the CCSDS 122.0 integer 9/7 forward DWT, used by the
// testbenches to check the hardware. It is written from the standard's
// equations, including its explicit formulas for the borders, not from the
// mirrored window the hardware uses.
package dwt_ref_pkg;

  function automatic int fdiv(int a, int b);  // floor(a / b), b > 0
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  // one-dimensional transform of x[0..n-1] -> c[0..n/2-1], d[0..n/2-1]
  function automatic void dwt1d(input int x[], input int n, output int c[], output int d[]);
    int h;
    h = n / 2;
    c = new[h];
    d = new[h];
    for (int j = 0; j < h; j++) begin
      if (j == 0)
        d[j] = x[1] - fdiv(9 * (x[0] + x[2]) - (x[2] + x[4]) + 8, 16);
      else if (j == h - 2)
        d[j] = x[n-3] - fdiv(9 * (x[n-4] + x[n-2]) - (x[n-6] + x[n-2]) + 8, 16);
      else if (j == h - 1)
        d[j] = x[n-1] - fdiv(18 * x[n-2] - 2 * x[n-4] + 8, 16);
      else
        d[j] = x[2*j+1] - fdiv(9 * (x[2*j] + x[2*j+2]) - (x[2*j-2] + x[2*j+4]) + 8, 16);
    end
    for (int j = 0; j < h; j++) begin
      if (j == 0)
        c[j] = x[0] - fdiv(-d[0] + 1, 2);
      else
        c[j] = x[2*j] - fdiv(-(d[j-1] + d[j]) + 2, 4);
    end
  endfunction

  // img is w*h, row-major. Produces sb[level][band] as (h>>l+1)*(w>>l+1)
  // arrays, band 0..3 = LL, LH (row low, column high), HL, HH.
  typedef int img_t[];
  function automatic void dwt2d_3lvl(input int img[], input int w, input int h,
                                     output img_t sb[3][4]);
    int cur[];
    int cw, ch;
    cur = img;
    cw = w;
    ch = h;
    for (int l = 0; l < 3; l++) begin
      int rt[];
      int hw, hh;
      hw = cw / 2;
      hh = ch / 2;
      rt = new[cw * ch];
      for (int r = 0; r < ch; r++) begin
        int x[], c[], d[];
        x = new[cw];
        for (int i = 0; i < cw; i++) x[i] = cur[r*cw + i];
        dwt1d(x, cw, c, d);
        for (int i = 0; i < hw; i++) begin
          rt[r*cw + i]      = c[i];
          rt[r*cw + hw + i] = d[i];
        end
      end
      for (int b = 0; b < 4; b++) sb[l][b] = new[hw * hh];
      for (int col = 0; col < cw; col++) begin
        int x[], c[], d[];
        x = new[ch];
        for (int r = 0; r < ch; r++) x[r] = rt[r*cw + col];
        dwt1d(x, ch, c, d);
        for (int r = 0; r < hh; r++) begin
          if (col < hw) begin
            sb[l][0][r*hw + col]      = c[r];
            sb[l][1][r*hw + col]      = d[r];
          end else begin
            sb[l][2][r*hw + col - hw] = c[r];
            sb[l][3][r*hw + col - hw] = d[r];
          end
        end
      end
      cur = sb[l][0];
      cw = hw;
      ch = hh;
    end
  endfunction

endpackage
