// mip_ref_pkg: reference model of the image processor for the testbenches.
// Independent of the RTL: a 3x3 window is read straight from the image array,
// sorted with the simulator's built-in sort, the auxiliary rank 0 appended,
// and the two weighted sums evaluated with integer arithmetic (weights in
// quarters), then rounded half up and clamped to 0..255.
package mip_ref_pkg;
  localparam int N = 10;

  typedef struct {
    int ds [N];
    int dr [N];
    int f1, f2;     // exact sums, in quarters
    int p1, p2;     // rounded, clamped pixels
  } ref_t;

  function automatic int to_pix(int q);
    int r = (q + 2) >>> 2;
    return (r < 0) ? 0 : (r > 255) ? 255 : r;
  endfunction

  // img is row-major, width w; window centred on (x, y)
  function automatic ref_t model(input int img [], input int w, input int x, input int y, input int d,
                                 input int ys [N], input int yd [N]);
    ref_t o;
    int v [9];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) v[3*r + c] = img[(y - 1 + r) * w + (x - 1 + c)];
    v.rsort();
    for (int i = 0; i < 9; i++) o.ds[i] = v[i];
    o.ds[9] = 0;
    o.dr[0] = d - o.ds[0];
    for (int r = 1; r < N; r++) o.dr[r] = o.ds[r-1] - o.ds[r];
    o.f1 = 0; o.f2 = 0;
    for (int r = 0; r < N; r++) begin
      o.f1 += ys[r] * o.ds[r];
      o.f2 += yd[r] * o.dr[r];
    end
    o.p1 = to_pix(o.f1);
    o.p2 = to_pix(o.f2);
    return o;
  endfunction
endpackage
