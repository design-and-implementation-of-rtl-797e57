// frame_buffer: on-chip frame store with a 2x2 neighbourhood read port.
//
// The platform keeps two of these: one for luminance (Y) and one for the
// interleaved 4:2:2 chroma samples (Cb at even columns, Cr at odd columns),
// as the design description's pair of frame buffers. Each holds W x H
// samples of DW bits.
//
// So that the zoom unit can fetch a whole 2x2 neighbourhood (rows r, r+1,
// columns c, c+1) in one clock, the store is split into four banks by row
// and column parity; any 2x2 window touches each bank exactly once, and each
// bank is a plain one-write, one-read memory (a block RAM). This banking is
// an implementation choice. At the bottom row and right column the window is
// clamped: the missing neighbour repeats the edge sample.
//
// Timing: the write port runs on `wclk` (the video capture clock) and the
// read port on `clk` (the display clock); both may be the same clock. Write
// in the `wclk` cycle `we` is high. Read data q00 (r,c), q01 (r,c+1),
// q10 (r+1,c), q11 (r+1,c+1) appear one `clk` cycle after the address. With
// one clock, a read of a location written in the same cycle returns the old
// value. With two clocks, a location read while it is being written may
// return either value; the display simply shows the frame being captured.
module frame_buffer #(
  parameter int unsigned W  = 320,  // samples per line, even
  parameter int unsigned H  = 240,  // lines, even
  parameter int unsigned DW = 8
) (
  input  logic                  clk,   // read clock
  // write port
  input  logic                  wclk,  // write clock
  input  logic                  we,
  input  logic [$clog2(H)-1:0]  wrow,
  input  logic [$clog2(W)-1:0]  wcol,
  input  logic [DW-1:0]         wdata,
  // 2x2 read port
  input  logic [$clog2(H)-1:0]  rrow,
  input  logic [$clog2(W)-1:0]  rcol,
  output logic [DW-1:0]         q00,
  output logic [DW-1:0]         q01,
  output logic [DW-1:0]         q10,
  output logic [DW-1:0]         q11
);
  localparam int unsigned BW    = W / 2;
  localparam int unsigned BH    = H / 2;
  localparam int unsigned DEPTH = BW * BH;
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned RW    = $clog2(H);
  localparam int unsigned CW    = $clog2(W);

  // Bank b = {row parity, column parity}.
  logic [DW-1:0] bank0 [DEPTH];
  logic [DW-1:0] bank1 [DEPTH];
  logic [DW-1:0] bank2 [DEPTH];
  logic [DW-1:0] bank3 [DEPTH];

  function automatic logic [AW-1:0] addr_of(input logic [RW-1:0] r, input logic [CW-1:0] c);
    return AW'((32'(r) >> 1) * BW + (32'(c) >> 1));
  endfunction

  // ---- write ----
  logic [AW-1:0] waddr;
  assign waddr = addr_of(wrow, wcol);

  always_ff @(posedge wclk) begin
    if (we) begin
      case ({wrow[0], wcol[0]})
        2'b00: bank0[waddr] <= wdata;
        2'b01: bank1[waddr] <= wdata;
        2'b10: bank2[waddr] <= wdata;
        default: bank3[waddr] <= wdata;
      endcase
    end
  end

  // ---- read ----
  // Neighbour row/column, clamped at the frame edge.
  logic          clamp_r, clamp_c;
  logic [RW-1:0] r1;
  logic [CW-1:0] c1;
  assign clamp_r = (32'(rrow) >= H - 1);
  assign clamp_c = (32'(rcol) >= W - 1);
  assign r1 = clamp_r ? rrow : rrow + RW'(1);
  assign c1 = clamp_c ? rcol : rcol + CW'(1);

  // Row (column) of each parity inside the window.
  logic [RW-1:0] row_even, row_odd;
  logic [CW-1:0] col_even, col_odd;
  assign row_even = rrow[0] ? r1 : rrow;
  assign row_odd  = rrow[0] ? rrow : r1;
  assign col_even = rcol[0] ? c1 : rcol;
  assign col_odd  = rcol[0] ? rcol : c1;

  logic [DW-1:0] d0, d1, d2, d3;
  always_ff @(posedge clk) begin
    d0 <= bank0[addr_of(row_even, col_even)];
    d1 <= bank1[addr_of(row_even, col_odd)];
    d2 <= bank2[addr_of(row_odd,  col_even)];
    d3 <= bank3[addr_of(row_odd,  col_odd)];
  end

  logic rp_q, cp_q, clr_q, clc_q;
  always_ff @(posedge clk) begin
    rp_q  <= rrow[0];
    cp_q  <= rcol[0];
    clr_q <= clamp_r;
    clc_q <= clamp_c;
  end

  // Route banks back to window positions; a clamped neighbour repeats the
  // edge sample (its bank was addressed with an unused row/column).
  logic [DW-1:0] t0, t1, b0, b1;  // top/bottom row, at column c / c+1
  always_comb begin
    t0 = rp_q ? (cp_q ? d3 : d2) : (cp_q ? d1 : d0);
    t1 = rp_q ? (cp_q ? d2 : d3) : (cp_q ? d0 : d1);
    b0 = rp_q ? (cp_q ? d1 : d0) : (cp_q ? d3 : d2);
    b1 = rp_q ? (cp_q ? d0 : d1) : (cp_q ? d2 : d3);
    q00 = t0;
    q01 = clc_q ? t0 : t1;
    q10 = clr_q ? t0 : b0;
    q11 = clr_q ? q01 : (clc_q ? b0 : b1);
  end

  initial begin
    assert (W % 2 == 0 && H % 2 == 0) else $error("frame_buffer: W and H must be even");
  end
endmodule
