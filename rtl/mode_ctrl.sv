// mode_ctrl: push-button selection of the processing functions.
//
// In the design description the processing functions (edge recognition,
// zoom-in, zoom-out) are combined with push buttons on the board; how the
// buttons map to functions is not given, so this mapping is this
// implementation's choice:
//   button 0  cycles the zoom: 1:1 -> zoom-in x2 -> zoom-out 1/2 -> 1:1
//   button 1  toggles the edge image layer
//   button 2  toggles the video layer
//   button 3  toggles zoom-in interpolation (bilinear / nearest neighbour)
// Each button is synchronised and debounced: its level must stay the same
// for DEBOUNCE clocks before it is accepted, and an action happens on an
// accepted press. New settings are collected in a pending set and take
// effect together at the next start of frame (`sof`), so a frame is never
// drawn half in one mode and half in another.
//
// Reset state: 1:1, bilinear, video layer on, edge layer off.
module mode_ctrl
  import video_pkg::*;
#(
  parameter int unsigned DEBOUNCE = 250_000  // 10 ms at 25 MHz
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [3:0]  btn,       // raw, active high
  input  logic        sof,       // start of display frame
  output scale_mode_e mode,
  output logic        bilinear,
  output logic        edge_en,
  output logic        video_en
);
  localparam int unsigned DW = $clog2(DEBOUNCE + 1);

  logic [3:0] s1, s2;      // two-flop synchroniser
  logic [3:0] stable;      // debounced level
  logic [3:0] press;       // accepted press, one clock
  logic [DW-1:0] cnt [4];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0;
      s2 <= '0;
    end else begin
      s1 <= btn;
      s2 <= s1;
    end
  end

  for (genvar i = 0; i < 4; i++) begin : g_deb
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cnt[i]    <= '0;
        stable[i] <= 1'b0;
        press[i]  <= 1'b0;
      end else begin
        press[i] <= 1'b0;
        if (s2[i] == stable[i]) begin
          cnt[i] <= '0;
        end else if (32'(cnt[i]) == DEBOUNCE - 1) begin
          cnt[i]    <= '0;
          stable[i] <= s2[i];
          press[i]  <= s2[i];
        end else begin
          cnt[i] <= cnt[i] + 1'b1;
        end
      end
    end
  end

  scale_mode_e p_mode;
  logic        p_bil, p_edge, p_video;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_mode   <= SCALE_1X;
      p_bil    <= 1'b1;
      p_edge   <= 1'b0;
      p_video  <= 1'b1;
      mode     <= SCALE_1X;
      bilinear <= 1'b1;
      edge_en  <= 1'b0;
      video_en <= 1'b1;
    end else begin
      if (press[0]) begin
        unique case (p_mode)
          SCALE_1X:  p_mode <= SCALE_ZIN;
          SCALE_ZIN: p_mode <= SCALE_ZOUT;
          default:   p_mode <= SCALE_1X;
        endcase
      end
      if (press[1]) p_edge  <= !p_edge;
      if (press[2]) p_video <= !p_video;
      if (press[3]) p_bil   <= !p_bil;
      if (sof) begin
        mode     <= p_mode;
        bilinear <= p_bil;
        edge_en  <= p_edge;
        video_en <= p_video;
      end
    end
  end
endmodule
