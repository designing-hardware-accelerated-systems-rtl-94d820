// ifc_pkg: types, constants and pure arithmetic functions shared by the
// cell analysis core (background averaging, detection, find cell, find
// center, trace cellular wall).
//
// Frame size (64x64, 8-bit), crop size (24x24) and resize factor (5) come
// from the design description. The bicubic weights, the sine table and the
// result word layout are this design's own choices:
//  * bicubic weights use the Keys kernel with a = -0.5, sampled at the five
//    sub-pixel phases f = p/5 of a 5x enlargement and scaled to sum to 256;
//  * the sine table uses Bhaskara's rational approximation
//      sin(x deg) ~= 4x(180-x) / (40500 - x(180-x)),  0 <= x <= 180,
//    in Q1.14, which is within 0.002 of the true value;
//  * resized pixel (X, Y) samples source position (X/5, Y/5) of the crop,
//    using the 4x4 neighbourhood rows/cols floor-1 .. floor+2, clamped at
//    the crop border.
package ifc_pkg;

  localparam int unsigned CROP    = 24;            // crop edge (pixels)
  localparam int unsigned SCALE   = 5;             // resize factor
  localparam int unsigned RS      = CROP * SCALE;  // resized edge, 120
  localparam int unsigned N_ANGLE = 360;           // one radius per degree

  typedef logic [7:0] pix_t;
  typedef logic [6:0] rcoord_t;                    // 0..119, resized coordinate
  typedef pix_t crop_t [CROP*CROP];                // one cropped image

  // Keys bicubic weight (Q8) for tap t (0..3 = offsets -1,0,+1,+2) at phase p/5.
  function automatic logic signed [9:0] bicubic_w(input int unsigned p, input int unsigned t);
    // rows: p = 0..4, columns: taps -1, 0, +1, +2
    logic signed [9:0] w;
    case (p)
      0: w = (t == 1) ? 10'sd256 : 10'sd0;
      1: case (t) 0: w = -10'sd16; 1: w = 10'sd233; 2: w = 10'sd43;  default: w = -10'sd4;  endcase
      2: case (t) 0: w = -10'sd18; 1: w = 10'sd178; 2: w = 10'sd108; default: w = -10'sd12; endcase
      3: case (t) 0: w = -10'sd12; 1: w = 10'sd108; 2: w = 10'sd178; default: w = -10'sd18; endcase
      default: case (t) 0: w = -10'sd4; 1: w = 10'sd43; 2: w = 10'sd233; default: w = -10'sd16; endcase
    endcase
    return w;
  endfunction

  function automatic int clampi(input int v, input int lo, input int hi);
    return (v < lo) ? lo : ((v > hi) ? hi : v);
  endfunction

  // Resized pixel (X, Y) of a 24x24 crop enlarged 5x by bicubic interpolation.
  function automatic pix_t bicubic_px(input crop_t img, input int unsigned xo, input int unsigned yo);
    int xi, yi, px, py;
    int acc, row;
    xi = int'(xo / SCALE);
    yi = int'(yo / SCALE);
    px = int'(xo % SCALE);
    py = int'(yo % SCALE);
    acc = 0;
    for (int i = 0; i < 4; i++) begin
      row = 0;
      for (int j = 0; j < 4; j++)
        row += int'(bicubic_w(px, j)) *
               int'(img[clampi(yi + i - 1, 0, CROP-1) * CROP + clampi(xi + j - 1, 0, CROP-1)]);
      acc += int'(bicubic_w(py, i)) * row;
    end
    acc = (acc + 32768) >>> 16;
    return pix_t'(clampi(acc, 0, 255));
  endfunction

  // Linear contrast stretch: (p - lo) * scale / 256, clamped to 0..255.
  function automatic pix_t adjust_px(input pix_t p, input pix_t lo, input logic [15:0] scale);
    int v;
    v = ((int'(p) - int'(lo)) * int'(scale)) >>> 8;
    return pix_t'(clampi(v, 0, 255));
  endfunction

  // sin(deg) in Q1.14 for deg = 0..359 (Bhaskara approximation, see header).
  function automatic logic signed [15:0] sin_q14(input int unsigned deg);
    int x, num, den, v;
    x = int'(deg % 180);
    num = 4 * x * (180 - x);
    den = 40500 - x * (180 - x);
    v = (num * 16384 + den / 2) / den;
    if (deg % 360 >= 180) v = -v;
    return 16'(v);
  endfunction

  function automatic logic signed [15:0] cos_q14(input int unsigned deg);
    return sin_q14((deg + 90) % 360);
  endfunction

endpackage
