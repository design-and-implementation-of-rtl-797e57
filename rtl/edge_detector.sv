// edge_detector: 3x3 two-dimensional gradient edge recognition.
//
// The luminance stream is filtered with two 3x3 kernels, horizontal (KX) and
// vertical (KY) gradient, by the 2-D convolution
//     h[i,j] = sum_k sum_l f[k,l] * g[i-k, j-l]
// and the gradient magnitude is estimated as |h_x| + |h_y|, clamped to 255.
// As in the design description, two line buffers (the two previous lines)
// and six registers (the two previous columns of the window) gather the nine
// neighbourhood pixels; the three newest pixels come straight from the line
// buffer outputs and the incoming pixel, and nine products per kernel give
// each output. The default kernels are Sobel; the description says only
// "3x3 kernel", so the coefficients are parameters. A pixel whose window
// reaches past the top or left edge of the frame yields magnitude 0.
// `out_edge` is the magnitude compared with `thresh` (magnitude >= thresh).
//
// Interface: one pixel per clock while `in_valid` is high, `in_sof` on the
// first pixel of a frame; lines are LINE_W pixels long. The output for the
// pixel entering at clock t leaves at clock t + LATENCY (the description's
// 10-clock processing time per pixel), together with `out_valid`, which is
// `in_valid` delayed by the same number of clocks. The result belongs to the
// window centred one line above and one pixel left of that input pixel.
module edge_detector #(
  parameter int unsigned LINE_W  = 640,
  parameter int unsigned LATENCY = 10,   // >= 7
  parameter int          KX [9]  = '{-1, 0, 1, -2, 0, 2, -1, 0, 1},
  parameter int          KY [9]  = '{-1, -2, -1, 0, 0, 0, 1, 2, 1}
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sof,
  input  logic [7:0] in_y,
  input  logic [7:0] thresh,
  output logic       out_valid,
  output logic [7:0] out_mag,
  output logic       out_edge
);
  localparam int unsigned CORE = 7;  // clocks used by the arithmetic below
  localparam int unsigned CW   = $clog2(LINE_W);

  // ---- stage 1: line buffers ----
  logic [7:0] lb1 [LINE_W];  // previous line
  logic [7:0] lb2 [LINE_W];  // line before that
  logic [CW-1:0] col, col_c;
  logic [11:0]   row, row_c;
  logic [7:0]    v_top, v_mid, v_bot;
  logic          val1, inwin1;

  always_comb begin
    col_c = col;
    row_c = row;
    if (in_sof) begin
      col_c = '0;
      row_c = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      v_top       <= lb2[col_c];
      v_mid       <= lb1[col_c];
      v_bot       <= in_y;
      lb2[col_c]  <= lb1[col_c];
      lb1[col_c]  <= in_y;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col    <= '0;
      row    <= '0;
      val1   <= 1'b0;
      inwin1 <= 1'b0;
    end else begin
      val1 <= in_valid;
      if (in_valid) begin
        inwin1 <= (row_c >= 12'd2) && (col_c >= CW'(2));
        if (32'(col_c) == LINE_W - 1) begin
          col <= '0;
          row <= (row_c == '1) ? row_c : row_c + 12'd1;
        end else begin
          col <= col_c + CW'(1);
          row <= row_c;
        end
      end
    end
  end

  // ---- window: six registers hold the two previous columns ----
  logic [7:0] w1_top, w1_mid, w1_bot, w2_top, w2_mid, w2_bot;
  always_ff @(posedge clk) begin
    if (val1) begin
      {w2_top, w2_mid, w2_bot} <= {w1_top, w1_mid, w1_bot};
      {w1_top, w1_mid, w1_bot} <= {v_top, v_mid, v_bot};
    end
  end

  // f[r][c], r = 0 top .. 2 bottom, c = 0 left .. 2 right
  logic [7:0] f [9];
  assign f = '{w2_top, w1_top, v_top,
               w2_mid, w1_mid, v_mid,
               w2_bot, w1_bot, v_bot};

  // ---- stage 2: nine products per kernel (convolution: kernel flipped) ----
  logic signed [19:0] px [9];
  logic signed [19:0] py [9];
  logic               val2, inwin2;
  always_ff @(posedge clk) begin
    for (int i = 0; i < 9; i++) begin
      px[i] <= $signed({12'b0, f[i]}) * 20'(KX[8 - i]);
      py[i] <= $signed({12'b0, f[i]}) * 20'(KY[8 - i]);
    end
  end

  // ---- stage 3: row sums; stage 4: totals ----
  logic signed [19:0] rx [3];
  logic signed [19:0] ry [3];
  logic signed [19:0] gx, gy;
  always_ff @(posedge clk) begin
    for (int r = 0; r < 3; r++) begin
      rx[r] <= px[3*r] + px[3*r+1] + px[3*r+2];
      ry[r] <= py[3*r] + py[3*r+1] + py[3*r+2];
    end
    gx <= rx[0] + rx[1] + rx[2];
    gy <= ry[0] + ry[1] + ry[2];
  end

  // ---- stage 5: absolute values; stage 6: magnitude; stage 7: output ----
  logic [19:0] ax, ay;
  logic [20:0] sum6;
  logic [7:0]  mag7;
  logic        edge7;
  always_ff @(posedge clk) begin
    ax   <= gx[19] ? 20'(-gx) : 20'(gx);
    ay   <= gy[19] ? 20'(-gy) : 20'(gy);
    sum6 <= {1'b0, ax} + {1'b0, ay};
  end

  // valid / window flags travel beside the arithmetic
  logic [CORE-1:2] vpipe, wpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vpipe <= '0;
      wpipe <= '0;
      val2  <= 1'b0;
      inwin2 <= 1'b0;
      mag7  <= '0;
      edge7 <= 1'b0;
    end else begin
      val2   <= val1;
      inwin2 <= inwin1;
      vpipe  <= {vpipe[CORE-2:2], val2};
      wpipe  <= {wpipe[CORE-2:2], inwin2};
      if (!wpipe[CORE-2]) begin
        mag7  <= '0;
        edge7 <= 1'b0;
      end else begin
        mag7  <= (sum6 > 21'd255) ? 8'd255 : sum6[7:0];
        edge7 <= (sum6 >= 21'(thresh));
      end
    end
  end

  // ---- pad to the specified latency ----
  localparam int unsigned PAD = LATENCY - CORE;
  logic [9:0] dly [PAD + 1];
  always_comb dly[0] = {vpipe[CORE-1], edge7, mag7};
  for (genvar i = 0; i < PAD; i++) begin : g_pad
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) dly[i+1] <= '0;
      else        dly[i+1] <= dly[i];
    end
  end
  assign {out_valid, out_edge, out_mag} = dly[PAD];

  initial begin
    assert (LATENCY >= CORE) else $error("edge_detector: LATENCY must be at least %0d", CORE);
  end
endmodule
