// video_mixer: layer mixer of the processing unit.
//
// Two picture layers are combined over a background colour: the video layer
// (the zoomed video after RGB conversion) and the image layer produced by the
// edge recognition unit. The design description gives the mixer by function
// only: it blends video layers, combines a picture with the video, and can
// show each layer on its own. This implementation:
//   * a layer is present where it is enabled and has data (the video layer
//     only inside the zoomed image area);
//   * both present: out = (alpha*edge + (256-alpha)*video) / 256;
//   * one present: that layer; none: `bg`.
// The edge layer is drawn as a grey level equal to the gradient magnitude,
// or, with `edge_binary`, as `edge_color` on black where the magnitude passes
// the threshold.
//
// Timing: one pixel per clock, latency 1 clock.
module video_mixer
  import video_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       video_en,
  input  logic       edge_en,
  input  logic       edge_binary,
  input  logic [7:0] alpha,
  input  rgb_t       bg,
  input  rgb_t       edge_color,
  input  logic       in_valid,
  input  rgb_t       video,
  input  logic       video_in_img,
  input  logic [7:0] edge_mag,
  input  logic       edge_flag,
  output logic       out_valid,
  output rgb_t       out_pix
);
  function automatic logic [7:0] blend(input logic [7:0] e, input logic [7:0] v,
                                       input logic [7:0] a);
    logic [16:0] s;
    s = 17'(a) * 17'(e) + (17'd256 - 17'(a)) * 17'(v);
    return s[15:8];
  endfunction

  rgb_t edge_rgb, mix;
  logic v_on, e_on;

  always_comb begin
    if (edge_binary) edge_rgb = edge_flag ? edge_color : '0;
    else             edge_rgb = '{r: edge_mag, g: edge_mag, b: edge_mag};
    v_on = video_en && video_in_img;
    e_on = edge_en;
    unique case ({e_on, v_on})
      2'b11: mix = '{r: blend(edge_rgb.r, video.r, alpha),
                     g: blend(edge_rgb.g, video.g, alpha),
                     b: blend(edge_rgb.b, video.b, alpha)};
      2'b10: mix = edge_rgb;
      2'b01: mix = video;
      default: mix = bg;
    endcase
    if (!in_valid) mix = '0;  // blanking
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= mix;
    end
  end
endmodule
