// deinterlacer: interlaced-to-progressive conversion by field weaving.
//
// Interlaced video arrives one field at a time: field 0 carries the even
// lines of a frame, field 1 the odd lines. The design description requires
// progressive video for LCD-style displays and gives the deinterlace unit
// only by its function; this implementation uses weaving: each incoming line
// L of field F is written to row 2*L+F of the luma and chroma frame buffers,
// so that after two fields the buffers hold one full progressive frame.
// Pixels beyond W columns or H/2 lines of a field are dropped.
//
// Input: one pixel per clock when `vin_valid` is high; `vin_sof` marks the
// first pixel of a field and `vin_sol` the first pixel of every line (also
// high with `vin_sof`). Y and the interleaved 4:2:2 chroma sample travel
// together. Output: a frame buffer write (row, column, Y, C) one clock after
// the pixel; `frame_done` pulses with the write of the last pixel of field 1.
module deinterlacer #(
  parameter int unsigned W = 320,  // pixels per line
  parameter int unsigned H = 240   // lines per progressive frame (even)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 vin_valid,
  input  logic                 vin_sof,
  input  logic                 vin_sol,
  input  logic                 vin_field,
  input  logic [7:0]           vin_y,
  input  logic [7:0]           vin_c,
  output logic                 wr_en,
  output logic [$clog2(H)-1:0] wr_row,
  output logic [$clog2(W)-1:0] wr_col,
  output logic [7:0]           wr_y,
  output logic [7:0]           wr_c,
  output logic                 frame_done
);
  localparam int unsigned RW = $clog2(H);
  localparam int unsigned CW = $clog2(W);

  logic [RW-1:0] line_q;   // field line of the previous pixel
  logic [CW:0]   col_q;    // column of the previous pixel (one extra bit)
  logic [RW-1:0] line_n;
  logic [CW:0]   col_n;
  logic          started;  // a field start has been seen

  always_comb begin
    line_n = line_q;
    col_n  = col_q + 1'b1;
    if (vin_sof) begin
      line_n = '0;
      col_n  = '0;
    end else if (vin_sol) begin
      line_n = line_q + 1'b1;
      col_n  = '0;
    end
  end

  logic in_range;
  assign in_range = (32'(col_n) < W) && (32'(line_n) < H / 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_q     <= '0;
      col_q      <= '0;
      started    <= 1'b0;
      wr_en      <= 1'b0;
      wr_row     <= '0;
      wr_col     <= '0;
      wr_y       <= '0;
      wr_c       <= '0;
      frame_done <= 1'b0;
    end else begin
      wr_en      <= 1'b0;
      frame_done <= 1'b0;
      if (vin_valid) begin
        line_q <= line_n;
        col_q  <= (col_q[CW] && !vin_sol) ? col_q : col_n;  // saturate
        if (vin_sof) started <= 1'b1;
        if ((started || vin_sof) && in_range) begin
          wr_en      <= 1'b1;
          wr_row     <= RW'({line_n, vin_field});
          wr_col     <= col_n[CW-1:0];
          wr_y       <= vin_y;
          wr_c       <= vin_c;
          frame_done <= vin_field && (32'(line_n) == H / 2 - 1) && (32'(col_n) == W - 1);
        end
      end
    end
  end

  initial begin
    assert (H % 2 == 0) else $error("deinterlacer: H must be even");
  end
endmodule
