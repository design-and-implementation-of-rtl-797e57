// ycbcr2rgb: colour space conversion unit, YCbCr to RGB.
//
// The unit turns the decoded video (Y, Cb, Cr) into the RGB samples the
// display port needs. As the design description asks, it keeps the
// conversions for the common colour spaces and also accepts user-defined
// constants: `sel` picks the ITU-R BT.601 matrix, the BT.709 matrix (both
// for studio-range 16..235 input) or the user matrix `user_m` with the user
// luma offset `user_yoff`. The coefficient values and their 1/256 fixed-point
// format are this implementation's choice (standard values):
//     [R G B] = M * [Y - yoff, Cb - 128, Cr - 128] / 256, rounded, clamped
// to 0..255. Nine multipliers work in parallel.
//
// Timing: fully pipelined, one pixel per clock, latency 3 clocks; `out_valid`
// is `in_valid` delayed by 3.
module ycbcr2rgb
  import video_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  csc_sel_e    sel,
  input  csc_matrix_t user_m,
  input  logic [7:0]  user_yoff,
  input  logic        in_valid,
  input  ycc_t        in_pix,
  output logic        out_valid,
  output rgb_t        out_pix
);
  // Row-major {R row, G row, B row}, each {Y, Cb, Cr}; element 0 is the
  // least significant 12 bits.
  localparam csc_matrix_t M601 = {12'sd0,    12'sd516,  12'sd298,
                                  -12'sd208, -12'sd100, 12'sd298,
                                  12'sd409,  12'sd0,    12'sd298};
  localparam csc_matrix_t M709 = {12'sd0,    12'sd541,  12'sd298,
                                  -12'sd136, -12'sd55,  12'sd298,
                                  12'sd459,  12'sd0,    12'sd298};

  // ---- stage 1: matrix select, offset removal ----
  csc_matrix_t        m1;
  logic signed [9:0]  d1 [3];
  logic               v1;
  always_ff @(posedge clk) begin
    unique case (sel)
      CSC_BT709: m1 <= M709;
      CSC_USER:  m1 <= user_m;
      default:   m1 <= M601;
    endcase
    d1[0] <= $signed({2'b0, in_pix.y}) - $signed({2'b0, (sel == CSC_USER) ? user_yoff : 8'd16});
    d1[1] <= $signed({2'b0, in_pix.cb}) - 10'sd128;
    d1[2] <= $signed({2'b0, in_pix.cr}) - 10'sd128;
  end

  // ---- stage 2: nine products ----
  logic signed [21:0] prod [9];
  logic               v2;
  always_ff @(posedge clk) begin
    for (int k = 0; k < 3; k++)
      for (int j = 0; j < 3; j++)
        prod[3*k+j] <= $signed(m1[3*k+j]) * d1[j];
  end

  // ---- stage 3: sums, rounding, clamping ----
  function automatic logic [7:0] clamp8(input logic signed [23:0] s);
    logic signed [23:0] q;
    q = (s + 24'sd128) >>> 8;
    if (q < 0)        return 8'd0;
    else if (q > 255) return 8'd255;
    else              return q[7:0];
  endfunction

  logic signed [23:0] sum [3];
  always_comb begin
    for (int k = 0; k < 3; k++)
      sum[k] = 24'(prod[3*k]) + 24'(prod[3*k+1]) + 24'(prod[3*k+2]);
  end

  always_ff @(posedge clk) begin
    out_pix.r <= clamp8(sum[0]);
    out_pix.g <= clamp8(sum[1]);
    out_pix.b <= clamp8(sum[2]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      out_valid <= v2;
    end
  end
endmodule
