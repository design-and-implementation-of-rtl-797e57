// tb_ycbcr2rgb: drives random and corner YCbCr pixels through all three
// matrix selections and checks each RGB result, 3 clocks later, against an
// integer model with the standard BT.601 / BT.709 coefficients (x256) and a
// random user matrix; also checks known points (studio black and white map
// to 0 and 255) and counts clamped results.
module tb_ycbcr2rgb;
  import video_pkg::*;
  logic clk = 0, rst_n = 0;
  csc_sel_e sel;
  csc_matrix_t user_m;
  logic [7:0] user_yoff;
  logic in_valid, out_valid;
  ycc_t in_pix;
  rgb_t out_pix;
  int checks = 0, failures = 0, clamped = 0;

  ycbcr2rgb dut (.*);

  always #5 clk = ~clk;

  int c601 [9] = '{298, 0, 409, 298, -100, -208, 298, 516, 0};
  int c709 [9] = '{298, 0, 459, 298, -55, -136, 298, 541, 0};
  int cu   [9];

  function automatic int clip(int v);
    if (v < 0) return 0;
    if (v > 255) return 255;
    return v;
  endfunction

  function automatic rgb_t model(csc_sel_e s, ycc_t p, int yoff, ref int cl);
    int m [9];
    int d [3];
    int o [3];
    rgb_t r;
    m = (s == CSC_BT709) ? c709 : (s == CSC_USER) ? cu : c601;
    d[0] = int'(p.y) - ((s == CSC_USER) ? yoff : 16);
    d[1] = int'(p.cb) - 128;
    d[2] = int'(p.cr) - 128;
    for (int k = 0; k < 3; k++) begin
      int acc;
      acc = m[3*k] * d[0] + m[3*k+1] * d[1] + m[3*k+2] * d[2];
      acc = (acc + 128) >>> 8;
      if (acc < 0 || acc > 255) cl++;
      o[k] = clip(acc);
    end
    r = '{r: 8'(o[0]), g: 8'(o[1]), b: 8'(o[2])};
    return r;
  endfunction

  typedef struct { bit v; rgb_t p; } exp_t;
  exp_t exp_at [int];
  int cyc = 0;

  always @(posedge clk) begin
    cyc++;
    #1;
    if (rst_n && cyc > 4) begin
      exp_t e;
      if (exp_at.exists(cyc)) begin e = exp_at[cyc]; exp_at.delete(cyc); end
      else e = '{v: 0, p: '0};
      checks++;
      if (out_valid !== e.v || (e.v && out_pix !== e.p)) begin
        failures++;
        if (failures < 10) $display("FAIL: cyc %0d got %0d %h exp %0d %h", cyc, out_valid, out_pix, e.v, e.p);
      end
    end
  end

  task automatic send(input csc_sel_e s, input ycc_t p);
    exp_t e;
    @(negedge clk);
    sel = s; in_pix = p; in_valid = 1;
    e.v = 1; e.p = model(s, p, user_yoff, clamped);
    exp_at[cyc + 3] = e;
  endtask

  initial begin
    for (int i = 0; i < 9; i++) begin
      cu[i] = $urandom_range(800) - 400;
      user_m[i] = 12'(cu[i]);
    end
    user_yoff = 8'd0;
    sel = CSC_BT601; in_pix = '0; in_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);
    // known points
    send(CSC_BT601, '{y: 8'd235, cb: 8'd128, cr: 8'd128});
    send(CSC_BT601, '{y: 8'd16, cb: 8'd128, cr: 8'd128});
    @(negedge clk); in_valid = 0;
    repeat (4) @(posedge clk);
    for (int i = 0; i < 600; i++) begin
      ycc_t p;
      p = '{y: 8'($urandom), cb: 8'($urandom), cr: 8'($urandom)};
      send(csc_sel_e'(i % 3), p);
      if (i % 7 == 0) begin @(negedge clk); in_valid = 0; end
    end
    @(negedge clk); in_valid = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (clamped == 0) begin failures++; $display("FAIL: clamping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // explicit known-point check: white and black
  initial begin
    wait (rst_n);
    repeat (2) @(posedge clk);
    @(posedge clk); @(posedge clk); @(posedge clk); #2;
    checks++;
    if (out_pix !== '{r: 8'd255, g: 8'd255, b: 8'd255}) begin failures++; $display("FAIL: white %h", out_pix); end
    @(posedge clk); #2;
    checks++;
    if (out_pix !== '{r: 8'd0, g: 8'd0, b: 8'd0}) begin failures++; $display("FAIL: black %h", out_pix); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
