// scaler: zoom-in / zoom-out unit between the frame buffers and the display.
//
// For every display pixel (x, y) the unit addresses the luma and chroma
// frame buffers, receives a 2x2 neighbourhood from each and forms the output
// pixel. Following the design description:
//  * zoom-in x2: a new pixel between source lines n and n+1 (and between
//    columns) is the weight-1/2 mix of its two neighbours, i.e. bilinear
//    interpolation at half positions; nearest-neighbour (pixel repeat) can be
//    selected instead with `bilinear` = 0;
//  * zoom-out 1/2: the source is low-pass filtered (2x2 average) and then
//    decimated, which suppresses aliasing;
//  * 1:1: the source is shown unchanged.
// The image occupies the top-left corner of the display (1:1 = W x H,
// zoom-in = 2W x 2H, zoom-out = W/2 x H/2); elsewhere `in_img` is low and
// the pixel is black. Chroma is 4:2:2 interleaved (Cb at even, Cr at odd
// columns); it is read at the even column of the pair so that one window
// yields Cb and Cr of two lines. In zoom-in chroma is interpolated only
// vertically, since it already has half the horizontal resolution.
// The image placement and the 2x2 averaging kernel are this implementation's
// choices.
//
// Timing: x, y, active enter at cycle t; the frame buffer addresses leave
// combinationally in cycle t, the neighbourhoods arrive at t+1, and pix,
// in_img and valid are registered at t+2 (latency 2).
module scaler
  import video_pkg::*;
#(
  parameter int unsigned W = 320,  // source width (even)
  parameter int unsigned H = 240   // source height (even)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  scale_mode_e          mode,
  input  logic                 bilinear,   // 1: bilinear zoom-in, 0: nearest
  input  logic [10:0]          x,
  input  logic [10:0]          y,
  input  logic                 active,
  // frame buffer read addresses
  output logic [$clog2(H)-1:0] y_rrow,
  output logic [$clog2(W)-1:0] y_rcol,
  output logic [$clog2(H)-1:0] c_rrow,
  output logic [$clog2(W)-1:0] c_rcol,
  // frame buffer neighbourhoods, one clock after the address
  input  logic [7:0]           yq00, yq01, yq10, yq11,
  input  logic [7:0]           cq00, cq01, cq10, cq11,
  // output pixel
  output ycc_t                 pix,
  output logic                 in_img,
  output logic                 valid
);
  localparam int unsigned RW = $clog2(H);
  localparam int unsigned CW = $clog2(W);

  // ---- stage 0: address generation ----
  logic        in0;
  logic [11:0] sr, sc;  // source row / column (wide to hold 2*y)
  always_comb begin
    unique case (mode)
      SCALE_ZIN: begin
        in0 = (32'(x) < 2 * W) && (32'(y) < 2 * H);
        sr  = {2'b0, y[10:1]};
        sc  = {2'b0, x[10:1]};
      end
      SCALE_ZOUT: begin
        in0 = (32'(x) < W / 2) && (32'(y) < H / 2);
        sr  = {y, 1'b0};
        sc  = {x, 1'b0};
      end
      default: begin
        in0 = (32'(x) < W) && (32'(y) < H);
        sr  = {1'b0, y};
        sc  = {1'b0, x};
      end
    endcase
    if (!in0) begin
      sr = '0;
      sc = '0;
    end
    y_rrow = RW'(sr);
    y_rcol = CW'(sc);
    c_rrow = RW'(sr);
    c_rcol = CW'({sc[11:1], 1'b0});
  end

  // ---- stage 1: wait for the frame buffers ----
  scale_mode_e mode1;
  logic        bil1, in1, val1, fx1, fy1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode1 <= SCALE_1X;
      bil1  <= 1'b0;
      in1   <= 1'b0;
      val1  <= 1'b0;
      fx1   <= 1'b0;
      fy1   <= 1'b0;
    end else begin
      mode1 <= mode;
      bil1  <= bilinear;
      in1   <= in0 && active;
      val1  <= active;
      fx1   <= x[0];
      fy1   <= y[0];
    end
  end

  // ---- stage 2: interpolation / filtering ----
  ycc_t p;
  always_comb begin
    unique case (mode1)
      SCALE_ZIN: begin
        if (bil1) begin
          unique case ({fy1, fx1})
            2'b00:   p.y = yq00;
            2'b01:   p.y = avg2(yq00, yq01);
            2'b10:   p.y = avg2(yq00, yq10);
            default: p.y = avg4(yq00, yq01, yq10, yq11);
          endcase
          p.cb = fy1 ? avg2(cq00, cq10) : cq00;
          p.cr = fy1 ? avg2(cq01, cq11) : cq01;
        end else begin
          p.y  = yq00;
          p.cb = cq00;
          p.cr = cq01;
        end
      end
      SCALE_ZOUT: begin
        p.y  = avg4(yq00, yq01, yq10, yq11);
        p.cb = avg2(cq00, cq10);
        p.cr = avg2(cq01, cq11);
      end
      default: begin
        p.y  = yq00;
        p.cb = cq00;
        p.cr = cq01;
      end
    endcase
    if (!in1) p = '{y: 8'd16, cb: 8'd128, cr: 8'd128};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pix    <= '{y: 8'd16, cb: 8'd128, cr: 8'd128};
      in_img <= 1'b0;
      valid  <= 1'b0;
    end else begin
      pix    <= p;
      in_img <= in1;
      valid  <= val1;
    end
  end
endmodule
