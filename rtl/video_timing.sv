// video_timing: display raster generator for the 25 MHz pixel clock.
//
// Two counters, pixel-in-line and line-in-frame, run over the full raster
// (active + front porch + sync + back porch). From them the block derives
// active video, horizontal and vertical sync, and start-of-frame. The counts
// are the pixel counter the design description mentions; the 640x480 raster
// and its porch and sync lengths (industry 640x480@60 Hz, 800x525 total at
// 25 MHz) are this implementation's choice. Sync polarity is active low.
//
// Timing: all outputs are registered and describe the same pixel; x/y are
// valid while `active` is high. `sof` is high for the first active pixel of
// a frame (x=0, y=0).
module video_timing #(
  parameter int unsigned H_ACTIVE = 640,
  parameter int unsigned H_FP     = 16,
  parameter int unsigned H_SYNC   = 96,
  parameter int unsigned H_BP     = 48,
  parameter int unsigned V_ACTIVE = 480,
  parameter int unsigned V_FP     = 10,
  parameter int unsigned V_SYNC   = 2,
  parameter int unsigned V_BP     = 33
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [10:0] x,       // pixel counter
  output logic [10:0] y,       // line counter
  output logic        active,  // inside the visible area
  output logic        hsync_n,
  output logic        vsync_n,
  output logic        sof      // first active pixel of a frame
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;

  logic [10:0] hc, vc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hc <= '0;
      vc <= '0;
    end else if (hc == 11'(H_TOTAL - 1)) begin
      hc <= '0;
      vc <= (vc == 11'(V_TOTAL - 1)) ? '0 : vc + 11'd1;
    end else begin
      hc <= hc + 11'd1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x       <= '0;
      y       <= '0;
      active  <= 1'b0;
      hsync_n <= 1'b1;
      vsync_n <= 1'b1;
      sof     <= 1'b0;
    end else begin
      x       <= hc;
      y       <= vc;
      active  <= (hc < 11'(H_ACTIVE)) && (vc < 11'(V_ACTIVE));
      hsync_n <= !((hc >= 11'(H_ACTIVE + H_FP)) && (hc < 11'(H_ACTIVE + H_FP + H_SYNC)));
      vsync_n <= !((vc >= 11'(V_ACTIVE + V_FP)) && (vc < 11'(V_ACTIVE + V_FP + V_SYNC)));
      sof     <= (hc == '0) && (vc == '0);
    end
  end
endmodule
