// tb_scaler: the testbench plays both frame buffers (a random luma and a
// random 4:2:2 chroma image, 2x2 clamped windows, one clock latency) and
// sweeps a display area larger than every image in all modes. Each output
// pixel is compared, two clocks after its coordinates, with a reference that
// works directly on source coordinates: 1:1 copy, zoom-in by half-position
// interpolation or pixel repeat, zoom-out by 2x2 averaging.
module tb_scaler;
  import video_pkg::*;
  localparam int W = 8, H = 6;
  localparam int DX = 2 * W + 2, DY = 2 * H + 1;
  logic clk = 0, rst_n = 0;
  scale_mode_e mode;
  logic bilinear, active;
  logic [10:0] x, y;
  logic [$clog2(H)-1:0] y_rrow, c_rrow;
  logic [$clog2(W)-1:0] y_rcol, c_rcol;
  logic [7:0] yq00, yq01, yq10, yq11, cq00, cq01, cq10, cq11;
  ycc_t pix;
  logic in_img, valid;
  int checks = 0, failures = 0;
  logic [7:0] ly [H][W];
  logic [7:0] lc [H][W];

  scaler #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  function automatic int cl(int v, int m); return (v < m) ? v : m - 1; endfunction

  // frame buffer models
  always_ff @(posedge clk) begin
    yq00 <= ly[y_rrow][y_rcol];
    yq01 <= ly[y_rrow][cl(y_rcol + 1, W)];
    yq10 <= ly[cl(y_rrow + 1, H)][y_rcol];
    yq11 <= ly[cl(y_rrow + 1, H)][cl(y_rcol + 1, W)];
    cq00 <= lc[c_rrow][c_rcol];
    cq01 <= lc[c_rrow][cl(c_rcol + 1, W)];
    cq10 <= lc[cl(c_rrow + 1, H)][c_rcol];
    cq11 <= lc[cl(c_rrow + 1, H)][cl(c_rcol + 1, W)];
  end

  function automatic int ra2(int a, int b); return (a + b + 1) / 2; endfunction

  // reference pixel for display position (dx, dy)
  function automatic ycc_t ref_pix(scale_mode_e m, bit bil, int dx, int dy, output bit inimg);
    ycc_t p;
    int sx, sy, sx1, sy1, pc;
    p = '{y: 8'd16, cb: 8'd128, cr: 8'd128};
    inimg = 0;
    case (m)
      SCALE_ZIN: if (dx < 2 * W && dy < 2 * H) begin
        inimg = 1;
        sx = dx / 2; sy = dy / 2; sx1 = cl(sx + 1, W); sy1 = cl(sy + 1, H);
        pc = sx - (sx % 2);
        if (!bil || (dx % 2 == 0 && dy % 2 == 0)) p.y = ly[sy][sx];
        else if (dy % 2 == 0) p.y = 8'(ra2(ly[sy][sx], ly[sy][sx1]));
        else if (dx % 2 == 0) p.y = 8'(ra2(ly[sy][sx], ly[sy1][sx]));
        else p.y = 8'((ly[sy][sx] + ly[sy][sx1] + ly[sy1][sx] + ly[sy1][sx1] + 2) / 4);
        if (bil && dy % 2 == 1) begin
          p.cb = 8'(ra2(lc[sy][pc], lc[sy1][pc]));
          p.cr = 8'(ra2(lc[sy][pc + 1], lc[sy1][pc + 1]));
        end else begin
          p.cb = lc[sy][pc];
          p.cr = lc[sy][pc + 1];
        end
      end
      SCALE_ZOUT: if (dx < W / 2 && dy < H / 2) begin
        inimg = 1;
        sx = 2 * dx; sy = 2 * dy;
        p.y  = 8'((ly[sy][sx] + ly[sy][sx + 1] + ly[sy + 1][sx] + ly[sy + 1][sx + 1] + 2) / 4);
        p.cb = 8'(ra2(lc[sy][sx], lc[sy + 1][sx]));
        p.cr = 8'(ra2(lc[sy][sx + 1], lc[sy + 1][sx + 1]));
      end
      default: if (dx < W && dy < H) begin
        inimg = 1;
        pc = dx - (dx % 2);
        p.y = ly[dy][dx]; p.cb = lc[dy][pc]; p.cr = lc[dy][pc + 1];
      end
    endcase
    return p;
  endfunction

  typedef struct { ycc_t p; bit inimg; bit act; } exp_t;
  exp_t exp_at [int];  // expected output, keyed by the clock edge it appears at
  int cyc = 0;

  task automatic sweep(input scale_mode_e m, input bit bil);
    mode = m; bilinear = bil;
    for (int dy = 0; dy < DY; dy++)
      for (int dx = 0; dx < DX; dx++) begin
        exp_t e;
        @(negedge clk);
        x = 11'(dx); y = 11'(dy); active = (dx != DX - 1);  // last column blank
        e.p = ref_pix(m, bil, dx, dy, e.inimg);
        e.act = active;
        if (!active) e.inimg = 0;
        if (!e.inimg) e.p = '{y: 8'd16, cb: 8'd128, cr: 8'd128};
        exp_at[cyc + 2] = e;  // sampled at edge cyc+1, output after edge cyc+2
      end
    @(negedge clk); active = 0;
    repeat (3) @(posedge clk);
  endtask

  always @(posedge clk) begin
    cyc++;
    #1;
    if (exp_at.exists(cyc)) begin
      exp_t e;
      e = exp_at[cyc];
      exp_at.delete(cyc);
      checks++;
      if (valid !== e.act || (e.act && (in_img !== e.inimg || pix !== e.p))) begin
        failures++;
        if (failures < 10)
          $display("FAIL: cyc %0d got v%0d in%0d %h exp v%0d in%0d %h", cyc, valid, in_img, pix,
                   e.act, e.inimg, e.p);
      end
    end
  end

  initial begin
    foreach (ly[r, c]) begin ly[r][c] = 8'($urandom); lc[r][c] = 8'($urandom); end
    mode = SCALE_1X; bilinear = 1; x = 0; y = 0; active = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    sweep(SCALE_1X, 1);
    sweep(SCALE_ZIN, 1);
    sweep(SCALE_ZIN, 0);
    sweep(SCALE_ZOUT, 1);
    repeat (5) @(posedge clk);
    checks++;
    if (exp_at.size() != 0) begin failures++; $display("FAIL: unchecked outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
