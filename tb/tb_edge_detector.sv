// tb_edge_detector: streams random and structured (step edge) luminance
// frames, with idle clocks between pixels, into the edge detector and checks
// every output clock: out_valid exactly 10 clocks after in_valid, and the
// gradient magnitude and threshold flag against a direct 3x3 convolution
// with the Sobel kernels (Eq. h = f * g), zero where the window leaves the
// frame. Also counts outputs that saturate at 255 and edge / non-edge flags.
module tb_edge_detector;
  localparam int LW = 8, NR = 6, LAT = 10;
  localparam int KX [9] = '{-1, 0, 1, -2, 0, 2, -1, 0, 1};
  localparam int KY [9] = '{-1, -2, -1, 0, 0, 0, 1, 2, 1};
  logic clk = 0, rst_n = 0;
  logic in_valid, in_sof, out_valid, out_edge;
  logic [7:0] in_y, thresh, out_mag;
  int checks = 0, failures = 0, saturated = 0, edges = 0, flats = 0;
  int img [NR][LW];

  edge_detector #(.LINE_W(LW)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { bit v; int mag; bit e; } exp_t;
  exp_t exp_at [int];
  int cyc = 0;

  function automatic void ref_out(int r, int c, int th, output int mag, output bit e);
    int gx, gy, s;
    gx = 0; gy = 0;
    mag = 0; e = 0;
    if (r < 2 || c < 2) return;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        gx += img[r - 2 + a][c - 2 + b] * KX[(2 - a) * 3 + (2 - b)];
        gy += img[r - 2 + a][c - 2 + b] * KY[(2 - a) * 3 + (2 - b)];
      end
    s = (gx < 0 ? -gx : gx) + (gy < 0 ? -gy : gy);
    mag = s > 255 ? 255 : s;
    e = s >= th;
  endfunction

  always @(posedge clk) begin
    cyc++;
    #1;
    if (rst_n && cyc > 3) begin
      exp_t e;
      if (exp_at.exists(cyc)) begin e = exp_at[cyc]; exp_at.delete(cyc); end
      else e = '{v: 0, mag: 0, e: 0};
      checks++;
      if (out_valid !== e.v || (e.v && (out_mag !== 8'(e.mag) || out_edge !== e.e))) begin
        failures++;
        if (failures < 10)
          $display("FAIL: cyc %0d got v%0d m%0d e%0d exp v%0d m%0d e%0d", cyc, out_valid, out_mag, out_edge,
                   e.v, e.mag, e.e);
      end
      if (e.v && e.mag == 255) saturated++;
    end
  end

  task automatic send_frame(input int kind);
    foreach (img[r, c])
      img[r][c] = (kind == 0) ? $urandom_range(255) : ((c >= 4) ? 200 : 20);
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < LW; c++) begin
        exp_t e;
        int m;
        bit f;
        if ($urandom_range(3) == 0) begin
          @(negedge clk); in_valid = 0; in_sof = 0;
        end
        @(negedge clk);
        in_valid = 1; in_sof = (r == 0 && c == 0); in_y = 8'(img[r][c]);
        ref_out(r, c, thresh, m, f);
        e = '{v: 1, mag: m, e: f};
        if (r >= 2 && c >= 2) begin if (f) edges++; else flats++; end
        exp_at[cyc + LAT] = e;  // presented in clock cyc, out in clock cyc+LAT
      end
    @(negedge clk); in_valid = 0; in_sof = 0;
  endtask

  initial begin
    in_valid = 0; in_sof = 0; in_y = 0; thresh = 8'd100;
    repeat (3) @(posedge clk);
    rst_n = 1;
    send_frame(0);
    send_frame(1);
    thresh = 8'd250;
    send_frame(0);
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (saturated == 0 || edges == 0 || flats == 0) begin
      failures++;
      $display("FAIL: coverage sat=%0d edges=%0d flats=%0d", saturated, edges, flats);
    end
    $display("saturated=%0d edges=%0d flats=%0d", saturated, edges, flats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
