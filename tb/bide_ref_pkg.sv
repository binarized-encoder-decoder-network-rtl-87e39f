// bide_ref_pkg: behavioural reference of one BEDN layer, for the testbenches.
//
// Works pixel by pixel and channel by channel on plain integer arrays, without
// any of the hardware's word packing, stream ordering or folding, so the RTL is
// checked against the arithmetic itself:
//   binary layers  pop = #(a == w) over nonzero taps, fan = #nonzero activations,
//                  out = pop >= (th + fan) >>> 1
//   first layer    acc = sum(w ? +a : -a), out = acc >= th
//   last layer     score = ((pop - ((th + fan) >>> 1)) * lambda) >>> 16, 24 bits
// A tap is nonzero when it reads a real input pixel: edge padding and the zeros
// a x2 deconvolution inserts between pixels are left out.  Feature maps are
// flat arrays indexed (y*W + x)*C + c; weights (o*9 + tap)*ICH + c.
package bide_ref_pkg;
  import bide_pkg::*;

  function automatic int ref_coord(geo_e g, int o, int k, int n);
    int c;
    case (g)
      GEO_S2:  c = 2 * o + k;
      GEO_UP2: c = (((o + k - 1) % 2) != 0) ? (o + k - 2) / 2 : -1;
      default: c = o + k - 1;
    endcase
    if (o + k - 1 < 0 && g == GEO_UP2) c = -1;
    if (c < 0 || c >= n) c = -1;
    return c;
  endfunction

  function automatic void ref_layer(
    input  kind_e g_kind, input geo_e g,
    input  int ih, input int iw, input int ich, input int och,
    input  int fin[], input bit w[], input int th[], input int lam[],
    output int fout[], output int oh, output int ow);
    oh = out_size(g, ih);
    ow = out_size(g, iw);
    fout = new[oh * ow * och];
    for (int y = 0; y < oh; y++)
      for (int x = 0; x < ow; x++)
        for (int o = 0; o < och; o++) begin
          int acc, fan, thn, r;
          longint prod;
          acc = 0; fan = 0;
          for (int ky = 0; ky < 3; ky++)
            for (int kx = 0; kx < 3; kx++) begin
              int sy, sx;
              sy = ref_coord(g, y, ky, ih);
              sx = ref_coord(g, x, kx, iw);
              if (sy >= 0 && sx >= 0)
                for (int c = 0; c < ich; c++) begin
                  int a;
                  bit wb;
                  a  = fin[(sy * iw + sx) * ich + c];
                  wb = w[(o * 9 + ky * 3 + kx) * ich + c];
                  if (g_kind == KIND_FIRST) acc += wb ? a : -a;
                  else acc += (a == int'(wb)) ? 1 : 0;
                  fan++;
                end
            end
          thn = (th[o] + fan) >>> 1;
          case (g_kind)
            KIND_FIRST: r = (acc >= th[o]) ? 1 : 0;
            KIND_BIN:   r = (acc >= thn) ? 1 : 0;
            default: begin
              prod = longint'(acc - thn) * longint'(lam[o]);
              prod = prod >>> 16;
              r = int'(prod[23:0]);
              if (prod[23]) r = r - (1 << 24);
            end
          endcase
          fout[(y * ow + x) * och + o] = r;
        end
  endfunction

  // index of the largest score, lowest index on ties
  function automatic int ref_argmax(int s[], int base, int n);
    int best = 0;
    for (int i = 1; i < n; i++) if (s[base + i] > s[base + best]) best = i;
    return best;
  endfunction
endpackage
