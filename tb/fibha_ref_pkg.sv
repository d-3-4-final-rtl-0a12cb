// fibha_ref_pkg: reference model used by the FiBHA testbenches.
//
// Computes a fused convolution + bias + shift + ReLU + INT8 saturation layer directly
// from its definition on plain int arrays (row-major pixels, channel innermost), and
// packs natural-layout weights into the engine's weight-word layout. It is written
// independently of the RTL loop order so that it checks the engine's arithmetic and
// addressing rather than repeating them.
// The fused layer follows the accelerator description; the shift requantisation and
// valid padding it models are this design's choices.
package fibha_ref_pkg;

  typedef int iarr_t[];

  // Layer types, numbered as in fibha_pkg::layer_type_e.
  localparam int STD = 0;
  localparam int DW  = 1;
  localparam int PW  = 2;

  function automatic int odim(int in_dim, int k, int s);
    return (in_dim - k) / s + 1;
  endfunction

  function automatic int clip(longint v);
    if (v < 0) return 0;
    if (v > 127) return 127;
    return int'(v);
  endfunction

  // x[(y*w + x)*ci + c]; wn STD/PW: [((oc*k+ky)*k+kx)*ci+ic], DW: [(c*k+ky)*k+kx]
  function automatic iarr_t conv(int lt, int k, int s, int h, int w, int ci, int co,
                                 int shift, iarr_t x, iarr_t wn, iarr_t b);
    int oh, ow, cout;
    iarr_t y;
    oh = odim(h, k, s);
    ow = odim(w, k, s);
    cout = (lt == DW) ? ci : co;
    y = new[oh*ow*cout];
    for (int oy = 0; oy < oh; oy++)
      for (int ox = 0; ox < ow; ox++)
        for (int oc = 0; oc < cout; oc++) begin
          longint acc;
          acc = 0;
          for (int ky = 0; ky < k; ky++)
            for (int kx = 0; kx < k; kx++) begin
              int base;
              base = ((oy*s + ky)*w + (ox*s + kx))*ci;
              if (lt == DW) acc += longint'(x[base + oc]) * wn[(oc*k + ky)*k + kx];
              else for (int ic = 0; ic < ci; ic++)
                acc += longint'(x[base + ic]) * wn[((oc*k + ky)*k + kx)*ci + ic];
            end
          y[(oy*ow + ox)*cout + oc] = clip((acc + b[oc]) >>> shift);
        end
    return y;
  endfunction

  // Number of weight words for a layer with PAR lanes.
  function automatic int nwords(int lt, int k, int ci, int co, int par);
    int g;
    g = ((lt == DW ? ci : co) + par - 1) / par;
    return g * k * k * (lt == DW ? 1 : ci);
  endfunction

  // Weight of lane p in word widx (0 for lanes beyond the channel count).
  function automatic int wlane(int lt, int k, int ci, int co, int par, iarr_t wn, int widx, int p);
    int nic, ic, kx, ky, g, ch, rest;
    nic  = (lt == DW) ? 1 : ci;
    ic   = widx % nic;   rest = widx / nic;
    kx   = rest % k;     rest = rest / k;
    ky   = rest % k;     g    = rest / k;
    ch   = g*par + p;
    if (ch >= ((lt == DW) ? ci : co)) return 0;
    if (lt == DW) return wn[(ch*k + ky)*k + kx];
    return wn[((ch*k + ky)*k + kx)*ci + ic];
  endfunction

  function automatic iarr_t rand_arr(int n, int lo, int hi);
    iarr_t a;
    a = new[n];
    foreach (a[i]) a[i] = lo + int'($urandom_range(hi - lo));
    return a;
  endfunction

endpackage
