// tb_video_platform_top: end-to-end test of the platform at reduced sizes
// (16x12 source, 40x28 display raster).
//
// A random interlaced source is sent as two fields and woven into the frame
// buffers; then the display output is captured frame by frame while the push
// buttons walk through the functions. Every captured pixel is compared with
// a model written from the functional definitions: source -> zoom (1:1,
// bilinear or nearest zoom-in, low-pass zoom-out) -> YCbCr-to-RGB ->
// 3x3 Sobel gradient on the displayed luma -> layer mixing. The test counts
// how often each mechanism was exercised (field weave, frame_done, each zoom
// mode, edge layer, blending, edge-only, binary edges, each colour matrix,
// rejected button glitch, accepted presses) and fails if one never happened.
module tb_video_platform_top;
  import video_pkg::*;
  localparam int SW = 16, SH = 12;
  localparam int HA = 40, HFP = 2, HS = 3, HBP = 3;
  localparam int VA = 28, VFP = 1, VS = 1, VBP = 1;
  localparam int HT = HA + HFP + HS + HBP, VT = VA + VFP + VS + VBP;
  localparam int DEB = 4;

  logic clk = 0, rst_n = 0, vin_clk = 0;
  logic vin_valid, vin_sof, vin_sol, vin_field;
  logic [7:0] vin_y, vin_c;
  logic frame_done;
  logic [3:0] btn;
  csc_sel_e csc_sel;
  csc_matrix_t csc_user_m;
  logic [7:0] csc_user_yoff, alpha, edge_thresh;
  logic edge_binary;
  rgb_t edge_color, bg_color, rgb;
  scale_mode_e cur_mode;
  logic cur_bilinear, cur_edge_en, cur_video_en, de, hsync_n, vsync_n;

  video_platform_top #(
    .SRC_WIDTH(SW), .SRC_HEIGHT(SH),
    .H_ACTIVE(HA), .H_FP(HFP), .H_SYNC(HS), .H_BP(HBP),
    .V_ACTIVE(VA), .V_FP(VFP), .V_SYNC(VS), .V_BP(VBP),
    .DEBOUNCE(DEB)
  ) dut (.*);

  always #20 clk = ~clk;          // 25 MHz display clock
  always #18.5 vin_clk = ~vin_clk; // 27 MHz capture clock

  int checks = 0, failures = 0;
  int src_y [SH][SW];
  int src_c [SH][SW];
  int n_done = 0;
  always @(posedge vin_clk) if (rst_n && frame_done) n_done++;

  // ---------------- reference model ----------------
  int c601 [9] = '{298, 0, 409, 298, -100, -208, 298, 516, 0};
  int c709 [9] = '{298, 0, 459, 298, -55, -136, 298, 541, 0};
  int cusr [9];

  function automatic int clip(int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int cl(int v, int m); return (v < m) ? v : m - 1; endfunction
  function automatic int ra2(int a, int b); return (a + b + 1) / 2; endfunction
  function automatic int ra4(int a, int b, int c, int d); return (a + b + c + d + 2) / 4; endfunction

  // displayed Y, Cb, Cr and image flag for display (x, y)
  function automatic void disp_ycc(scale_mode_e m, bit bil, int x, int y,
                                   output int py, output int pb, output int pr, output bit img);
    int sx, sy, sx1, sy1, pc;
    py = 16; pb = 128; pr = 128; img = 0;
    case (m)
      SCALE_ZIN: if (x < 2 * SW && y < 2 * SH) begin
        img = 1;
        sx = x / 2; sy = y / 2; sx1 = cl(sx + 1, SW); sy1 = cl(sy + 1, SH); pc = sx - sx % 2;
        if (!bil || (x % 2 == 0 && y % 2 == 0)) py = src_y[sy][sx];
        else if (y % 2 == 0) py = ra2(src_y[sy][sx], src_y[sy][sx1]);
        else if (x % 2 == 0) py = ra2(src_y[sy][sx], src_y[sy1][sx]);
        else py = ra4(src_y[sy][sx], src_y[sy][sx1], src_y[sy1][sx], src_y[sy1][sx1]);
        if (bil && y % 2 == 1) begin
          pb = ra2(src_c[sy][pc], src_c[sy1][pc]); pr = ra2(src_c[sy][pc + 1], src_c[sy1][pc + 1]);
        end else begin
          pb = src_c[sy][pc]; pr = src_c[sy][pc + 1];
        end
      end
      SCALE_ZOUT: if (x < SW / 2 && y < SH / 2) begin
        img = 1;
        sx = 2 * x; sy = 2 * y;
        py = ra4(src_y[sy][sx], src_y[sy][sx + 1], src_y[sy + 1][sx], src_y[sy + 1][sx + 1]);
        pb = ra2(src_c[sy][sx], src_c[sy + 1][sx]); pr = ra2(src_c[sy][sx + 1], src_c[sy + 1][sx + 1]);
      end
      default: if (x < SW && y < SH) begin
        img = 1; pc = x - x % 2;
        py = src_y[y][x]; pb = src_c[y][pc]; pr = src_c[y][pc + 1];
      end
    endcase
  endfunction

  function automatic rgb_t to_rgb(csc_sel_e s, int py, int pb, int pr, int yoff);
    int m [9];
    int d [3];
    int o [3];
    m = (s == CSC_BT709) ? c709 : (s == CSC_USER) ? cusr : c601;
    d = '{py - ((s == CSC_USER) ? yoff : 16), pb - 128, pr - 128};
    for (int k = 0; k < 3; k++) o[k] = clip((m[3*k] * d[0] + m[3*k+1] * d[1] + m[3*k+2] * d[2] + 128) >>> 8);
    return '{r: 8'(o[0]), g: 8'(o[1]), b: 8'(o[2])};
  endfunction

  int dl [VA][HA];  // displayed luma

  function automatic rgb_t expected(int x, int y);
    int py, pb, pr, mag, gx, gy, s;
    bit img, ef;
    rgb_t v, e;
    localparam int KX [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
    localparam int KY [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
    disp_ycc(cur_mode, cur_bilinear, x, y, py, pb, pr, img);
    v = to_rgb(csc_sel, py, pb, pr, int'(csc_user_yoff));
    mag = 0; ef = 0;
    if (x >= 2 && y >= 2) begin
      gx = 0; gy = 0;
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          gx += dl[y - 2 + a][x - 2 + b] * KX[(2 - a) * 3 + (2 - b)];
          gy += dl[y - 2 + a][x - 2 + b] * KY[(2 - a) * 3 + (2 - b)];
        end
      s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
      mag = s > 255 ? 255 : s;
      ef = s >= int'(edge_thresh);
    end
    e = edge_binary ? (ef ? edge_color : '0) : '{r: 8'(mag), g: 8'(mag), b: 8'(mag)};
    if (cur_edge_en && cur_video_en && img)
      return '{r: 8'((int'(alpha) * e.r + (256 - int'(alpha)) * v.r) / 256),
               g: 8'((int'(alpha) * e.g + (256 - int'(alpha)) * v.g) / 256),
               b: 8'((int'(alpha) * e.b + (256 - int'(alpha)) * v.b) / 256)};
    if (cur_edge_en) return e;
    if (cur_video_en && img) return v;
    return bg_color;
  endfunction

  // ---------------- stimulus helpers ----------------
  task automatic send_fields;
    for (int f = 0; f < 2; f++)
      for (int l = 0; l < SH / 2; l++)
        for (int c = 0; c < SW; c++) begin
          @(negedge vin_clk);
          vin_valid = 1; vin_sof = (l == 0 && c == 0); vin_sol = (c == 0); vin_field = f[0];
          vin_y = 8'(src_y[2 * l + f][c]); vin_c = 8'(src_c[2 * l + f][c]);
        end
    @(negedge vin_clk); vin_valid = 0; vin_sof = 0; vin_sol = 0;
  endtask

  task automatic press(input int b, input int len);
    @(negedge clk); btn[b] = 1;
    repeat (len) @(negedge clk);
    btn[b] = 0;
    repeat (DEB + 4) @(negedge clk);
  endtask

  // capture one whole frame after the next vertical sync and compare it
  int n_frames = 0, n_pix_bad = 0;
  task automatic check_frame(input string what);
    int x, y, bad;
    rgb_t ex;
    // skip one frame, so that a setting accepted late is in force as well
    @(negedge vsync_n);
    @(negedge vsync_n);
    // settings are stable from here on; prepare the displayed luma plane
    for (int yy = 0; yy < VA; yy++)
      for (int xx = 0; xx < HA; xx++) begin
        int pb, pr;
        bit img;
        disp_ycc(cur_mode, cur_bilinear, xx, yy, dl[yy][xx], pb, pr, img);
      end
    x = 0; y = 0; bad = 0;
    while (y < VA) begin
      @(posedge clk); #1;
      if (de) begin
        ex = expected(x, y);
        checks++;
        if (rgb !== ex) begin
          bad++;
          failures++;
          if (bad < 4) $display("FAIL: %s pixel (%0d,%0d) got %h exp %h", what, x, y, rgb, ex);
        end
        x++;
        if (x == HA) begin x = 0; y++; end
      end
    end
    n_frames++;
    $display("frame %0d (%s): %0d mismatches", n_frames, what, bad);
  endtask

  // ---------------- test ----------------
  int n_1x = 0, n_zin_bil = 0, n_zin_nn = 0, n_zout = 0, n_blend = 0, n_edge_only = 0,
      n_binary = 0, n_709 = 0, n_user = 0, n_glitch_ok = 0;

  initial begin
    vin_valid = 0; vin_sof = 0; vin_sol = 0; vin_field = 0; vin_y = 0; vin_c = 0;
    btn = 0; csc_sel = CSC_BT601; csc_user_yoff = 8'd0; alpha = 8'd96; edge_thresh = 8'd60;
    edge_binary = 0; edge_color = '{r: 8'd255, g: 8'd40, b: 8'd0}; bg_color = '{r: 8'd10, g: 8'd20, b: 8'd90};
    for (int i = 0; i < 9; i++) begin cusr[i] = $urandom_range(600) - 300; csc_user_m[i] = 12'(cusr[i]); end
    foreach (src_y[r, c]) begin
      // smooth ramp with a bright block so that both edges and flat areas occur
      src_y[r][c] = (r >= 4 && r < 8 && c >= 6 && c < 12) ? 230 : 30 + (3 * c) % 190 + $urandom_range(8);
      src_c[r][c] = $urandom_range(255);
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    send_fields;
    repeat (4) @(posedge clk);
    checks++;
    if (n_done != 1) begin failures++; $display("FAIL: frame_done count %0d", n_done); end

    // 1:1, video only
    check_frame("1:1 video");
    n_1x++;
    // short glitch must not change anything
    press(0, 1);
    check_frame("1:1 after glitch");
    if (cur_mode == SCALE_1X) n_glitch_ok++;
    // edge layer on: blend inside the image, edge image elsewhere
    press(1, DEB + 3);
    check_frame("1:1 edge blend"); n_blend++;
    // video off: edge image only, binary rendering
    press(2, DEB + 3);
    edge_binary = 1;
    check_frame("edge only binary"); n_edge_only++; n_binary++;
    edge_binary = 0;
    press(2, DEB + 3);
    press(1, DEB + 3);
    // zoom-in bilinear, BT.709
    press(0, DEB + 3);
    csc_sel = CSC_BT709;
    check_frame("zoom-in bilinear 709");
    if (cur_mode == SCALE_ZIN && cur_bilinear) n_zin_bil++;
    n_709++;
    // zoom-in nearest, user matrix
    press(3, DEB + 3);
    csc_sel = CSC_USER; csc_user_yoff = 8'd5;
    check_frame("zoom-in nearest user");
    if (cur_mode == SCALE_ZIN && !cur_bilinear) n_zin_nn++;
    n_user++;
    // zoom-out with edge blend, BT.601
    press(3, DEB + 3);
    press(0, DEB + 3);
    press(1, DEB + 3);
    csc_sel = CSC_BT601;
    check_frame("zoom-out edge blend");
    if (cur_mode == SCALE_ZOUT) n_zout++;
    // back to 1:1
    press(1, DEB + 3);
    press(0, DEB + 3);
    check_frame("1:1 again");
    if (cur_mode == SCALE_1X) n_1x++;

    $display("mechanisms: 1x=%0d zin_bil=%0d zin_nn=%0d zout=%0d blend=%0d edge_only=%0d binary=%0d bt709=%0d user=%0d glitch_rejected=%0d frame_done=%0d",
             n_1x, n_zin_bil, n_zin_nn, n_zout, n_blend, n_edge_only, n_binary, n_709, n_user, n_glitch_ok, n_done);
    checks++;
    if (n_1x < 2 || n_zin_bil == 0 || n_zin_nn == 0 || n_zout == 0 || n_blend == 0 || n_edge_only == 0 ||
        n_binary == 0 || n_709 == 0 || n_user == 0 || n_glitch_ok == 0 || n_done == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (HT * VT * 40) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
