// bide_pkg: types, constants and geometry helpers shared by the binarized
// deconvolution engine (BiDE) that runs the 11-layer binarized encoder-decoder
// network (BEDN).
//
// The network is fixed: three stride-1 / stride-2 convolution pairs in the
// encoder, two zero-padding deconvolutions in the decoder, a partially binarized
// first layer (8-bit pixels, binary weights) and a last layer that produces
// 24-bit class scores instead of binary activations.  Every layer uses a 3x3
// kernel.  The functions below describe, for each window geometry, which input
// row/column a kernel tap reads; taps that land on edge padding or on a zero
// inserted by deconvolution upsampling are reported invalid so the hardware can
// skip them (zero-skipping).
package bide_pkg;

  localparam int unsigned K         = 3;   // kernel size of every layer
  localparam int unsigned NUM_LAYERS = 11;
  localparam int unsigned PIX_W     = 8;   // bits per input image channel
  localparam int unsigned TH_W      = 16;  // threshold / accumulator width
  localparam int unsigned SCORE_W   = 24;  // class score and lambda scale width
  localparam int unsigned LAMBDA_FRAC = 16; // fractional bits of lambda (own choice)

  // Window geometry of a layer.
  //  GEO_S1 : stride-1 convolution, one zero of edge padding on every side
  //  GEO_S2 : stride-2 convolution, edge padding only at bottom and right
  //  GEO_UP2: zero-padding deconvolution, x2 upsampling (zeros between pixels)
  typedef enum logic [1:0] {GEO_S1 = 2'd0, GEO_S2 = 2'd1, GEO_UP2 = 2'd2} geo_e;

  // What a layer's processing elements compute.
  //  KIND_FIRST: 8-bit activations x binary weights, compared with th_old
  //  KIND_BIN  : XNOR-popcount, zero-aware threshold (th_old+fan_in)>>1
  //  KIND_LAST : XNOR-popcount, (acc - th_new) * lambda -> 24-bit score
  typedef enum logic [1:0] {KIND_FIRST = 2'd0, KIND_BIN = 2'd1, KIND_LAST = 2'd2} kind_e;

  // Which memory of a PE a configuration write goes to.
  typedef enum logic [1:0] {SEL_WEIGHT = 2'd0, SEL_THRESH = 2'd1, SEL_SCALE = 2'd2} cfg_sel_e;

  // BEDN layer table (layer index 0 = paper layer 1).
  function automatic geo_e layer_geo(int unsigned l);
    case (l)
      2, 4:    return GEO_S2;
      6, 8:    return GEO_UP2;
      default: return GEO_S1;
    endcase
  endfunction

  function automatic kind_e layer_kind(int unsigned l);
    if (l == 0) return KIND_FIRST;
    if (l == NUM_LAYERS - 1) return KIND_LAST;
    return KIND_BIN;
  endfunction

  // Output size of a layer along one axis for an input size n.
  function automatic int unsigned out_size(geo_e g, int unsigned n);
    case (g)
      GEO_S2:  return n / 2;
      GEO_UP2: return 2 * n;
      default: return n;
    endcase
  endfunction

  // Input coordinate read by kernel tap k for output coordinate o, or -1 when
  // the tap falls on padding (edge padding or an upsampling zero).
  function automatic int tap_coord(geo_e g, int o, int k, int n);
    int c;
    int u;
    case (g)
      GEO_S2:  c = 2 * o + k;
      GEO_UP2: begin
        // upsampled map: input pixel i sits at output-aligned position 2i+1
        u = o + k - 1;
        c = ((u & 1) == 1) ? (u - 1) / 2 : -1;
      end
      default: c = o + k - 1;
    endcase
    if (c < 0 || c >= n) c = -1;
    return c;
  endfunction

  // Deconvolution window pattern of an output coordinate pair (paper numbering):
  // 1 = (odd,odd), 2 = (odd,even), 3 = (even,odd), 4 = (even,even).
  function automatic logic [2:0] up2_pattern(int oy, int ox);
    case ({oy[0], ox[0]})
      2'b11:   return 3'd1;
      2'b10:   return 3'd2;
      2'b01:   return 3'd3;
      default: return 3'd4;
    endcase
  endfunction

endpackage
