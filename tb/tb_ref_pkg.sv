// tb_ref_pkg: reference models for the testbenches, written independently of
// the RTL. Images are flat arrays in raster order, img[y*w + x].
//   median : 5th smallest of the nine pixels of the 3x3 neighbourhood
//   sobel  : |gx| + |gy| with the 1-2-1 Sobel kernels, saturated to 255
//   smooth : (sum of kernel 1 2 1 / 2 4 2 / 1 2 1 times pixels + 8) / 16
// ref_filter returns the result for the window centred on (cx, cy).
// make_bitstream builds a partial bitstream in the ICAP model's format.
package tb_ref_pkg;

  function automatic int px(const ref byte unsigned img[], input int w, input int x, input int y);
    return int'(img[y*w + x]);
  endfunction

  function automatic byte unsigned ref_filter(input int fn, const ref byte unsigned img[],
                                              input int w, input int cx, input int cy);
    int v[9];
    int k, t, gx, gy, s;
    case (fn)
      1: begin // median
        k = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++) begin
            v[k] = px(img, w, cx+dx, cy+dy);
            k++;
          end
        // selection sort
        for (int i = 0; i < 9; i++)
          for (int j = i + 1; j < 9; j++)
            if (v[j] < v[i]) begin t = v[i]; v[i] = v[j]; v[j] = t; end
        return byte'(v[4]);
      end
      2: begin // sobel
        gx = (px(img,w,cx+1,cy-1) + 2*px(img,w,cx+1,cy) + px(img,w,cx+1,cy+1))
           - (px(img,w,cx-1,cy-1) + 2*px(img,w,cx-1,cy) + px(img,w,cx-1,cy+1));
        gy = (px(img,w,cx-1,cy+1) + 2*px(img,w,cx,cy+1) + px(img,w,cx+1,cy+1))
           - (px(img,w,cx-1,cy-1) + 2*px(img,w,cx,cy-1) + px(img,w,cx+1,cy-1));
        s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
        return byte'(s > 255 ? 255 : s);
      end
      3: begin // smoothing
        s = 8;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            s += px(img, w, cx+dx, cy+dy) * (dx == 0 ? 2 : 1) * (dy == 0 ? 2 : 1);
        return byte'(s / 16);
      end
      default: return 8'd0;
    endcase
  endfunction

  // Expected output stream of a core: the (w-2) x (h-2) interior results.
  function automatic void ref_image(input int fn, const ref byte unsigned img[], input int w,
                                    input int h, output byte unsigned res[$]);
    res = {};
    for (int y = 1; y < h - 1; y++)
      for (int x = 1; x < w - 1; x++)
        res.push_back(ref_filter(fn, img, w, x, y));
  endfunction

  // Reduced partial bitstream accepted by the ICAP model: sync word, region,
  // function, n_frame random frame bytes (never 0x30, so no false DESYNC),
  // then the DESYNC command write.
  function automatic void make_bitstream(input int region, input int fn, input int n_frame,
                                         output byte unsigned bs[$]);
    byte unsigned b;
    bs = {8'hFF, 8'hFF, 8'hAA, 8'h99, 8'h55, 8'h66, byte'(region), byte'(fn)};
    for (int i = 0; i < n_frame; i++) begin
      b = byte'($urandom);
      if (b == 8'h30) b = 8'h31;
      bs.push_back(b);
    end
    bs.push_back(8'h30); bs.push_back(8'h00); bs.push_back(8'h80); bs.push_back(8'h01);
    bs.push_back(8'h00); bs.push_back(8'h00); bs.push_back(8'h00); bs.push_back(8'h0D);
  endfunction

endpackage
