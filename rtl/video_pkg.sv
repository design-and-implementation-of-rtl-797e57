// video_pkg: types and constants shared by the video platform.
//
// The platform captures interlaced YCbCr 4:2:2 video into two on-chip frame
// buffers (one luminance, one chroma), reads them out at a 25 MHz display
// pixel clock through a zoom unit, an edge-recognition filter, a colour space
// converter and a layer mixer. This package holds the pixel structs, the mode
// encodings and the default sizes. The 25 MHz clock, the 3x3 kernel, the
// x2 / 1/2 zoom factors and the 10-clock edge pipeline follow the design
// description; the 640x480 display raster and the 320x240 source frame are
// this implementation's choices (320x240 luma + chroma fills about the 68
// block RAMs the description reports as used).
package video_pkg;

  // Source frame held in the frame buffers (progressive, after weaving).
  localparam int unsigned SRC_W = 320;
  localparam int unsigned SRC_H = 240;

  // Display raster, 640x480 at 25 MHz (industry VGA timing).
  localparam int unsigned DISP_W = 640;
  localparam int unsigned DISP_H = 480;

  // Pipeline length of the edge-recognition unit, in pixel clocks.
  localparam int unsigned EDGE_LATENCY = 10;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycc_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Geometric operation applied while reading the frame buffers.
  typedef enum logic [1:0] {
    SCALE_1X   = 2'd0,  // source shown 1:1 in the top-left corner
    SCALE_ZIN  = 2'd1,  // zoom-in x2, fills the display
    SCALE_ZOUT = 2'd2   // zoom-out 1/2 (low-pass, then decimate)
  } scale_mode_e;

  // Colour space matrix selection of the RGB conversion unit.
  typedef enum logic [1:0] {
    CSC_BT601 = 2'd0,
    CSC_BT709 = 2'd1,
    CSC_USER  = 2'd2
  } csc_sel_e;

  // One 3x3 conversion matrix: nine signed 12-bit coefficients in 1/256
  // units, row-major (entry 3*row+col), row 0 = R, 1 = G, 2 = B and
  // column 0 = Y, 1 = Cb, 2 = Cr.
  typedef logic [8:0][11:0] csc_matrix_t;

  // Average of two and of four 8-bit samples, rounded to nearest.
  function automatic logic [7:0] avg2(input logic [7:0] a, input logic [7:0] b);
    logic [8:0] s;
    s = {1'b0, a} + {1'b0, b} + 9'd1;
    return s[8:1];
  endfunction

  function automatic logic [7:0] avg4(input logic [7:0] a, input logic [7:0] b,
                                      input logic [7:0] c, input logic [7:0] d);
    logic [9:0] s;
    s = {2'b0, a} + {2'b0, b} + {2'b0, c} + {2'b0, d} + 10'd2;
    return s[9:2];
  endfunction

endpackage
