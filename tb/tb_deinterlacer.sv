// tb_deinterlacer: sends two interlaced fields (with idle gaps and over-long
// lines and an extra line) and checks that every stored write lands at row
// 2*line+field with the right samples, that nothing outside the frame is
// written, that every frame position is written exactly once per frame and
// that frame_done pulses once, with the last write of field 1.
module tb_deinterlacer;
  localparam int W = 8, H = 6;
  logic clk = 0, rst_n = 0;
  logic vin_valid, vin_sof, vin_sol, vin_field;
  logic [7:0] vin_y, vin_c;
  logic wr_en, frame_done;
  logic [$clog2(H)-1:0] wr_row;
  logic [$clog2(W)-1:0] wr_col;
  logic [7:0] wr_y, wr_c;
  int checks = 0, failures = 0;
  int hits [H][W];
  int done_cnt = 0, writes = 0;

  deinterlacer #(.W(W), .H(H)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] ypat(int r, int c); return 8'(r * 16 + c); endfunction
  function automatic logic [7:0] cpat(int r, int c); return 8'(200 - r * 16 - c); endfunction

  always @(posedge clk) if (rst_n && wr_en) begin
    writes++;
    checks++;
    if (wr_row >= H || wr_col >= W || wr_y !== ypat(wr_row, wr_col) || wr_c !== cpat(wr_row, wr_col)) begin
      failures++;
      $display("FAIL: write r%0d c%0d y%h c%h", wr_row, wr_col, wr_y, wr_c);
    end else hits[wr_row][wr_col]++;
    if (frame_done) begin
      done_cnt++;
      checks++;
      if (wr_row != H - 1 || wr_col != W - 1) begin failures++; $display("FAIL: frame_done early"); end
    end
  end

  task automatic send_field(input int f);
    // H/2 lines of W+2 pixels (last two beyond the frame) plus one extra line
    for (int l = 0; l <= H / 2; l++)
      for (int c = 0; c < W + 2; c++) begin
        if (c == 3) begin  // idle clock inside the line
          @(negedge clk); vin_valid = 0; vin_sof = 0; vin_sol = 0;
        end
        @(negedge clk);
        vin_valid = 1; vin_sof = (l == 0 && c == 0); vin_sol = (c == 0); vin_field = f[0];
        vin_y = ypat(2 * l + f, c); vin_c = cpat(2 * l + f, c);
      end
    @(negedge clk); vin_valid = 0; vin_sof = 0; vin_sol = 0;
  endtask

  initial begin
    vin_valid = 0; vin_sof = 0; vin_sol = 0; vin_field = 0; vin_y = 0; vin_c = 0;
    foreach (hits[r, c]) hits[r][c] = 0;
    // pixels before any start of field are ignored
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); vin_valid = 1; vin_y = 8'hEE; vin_c = 8'hEE;
    @(negedge clk); vin_valid = 0;
    for (int fr = 0; fr < 2; fr++) begin
      send_field(0);
      send_field(1);
      repeat (3) @(posedge clk);
      checks++;
      if (done_cnt != fr + 1) begin failures++; $display("FAIL: frame_done count %0d", done_cnt); end
    end
    foreach (hits[r, c]) begin
      checks++;
      if (hits[r][c] != 2) begin failures++; $display("FAIL: pos %0d,%0d written %0d times", r, c, hits[r][c]); end
    end
    checks++;
    if (writes != 2 * W * H) begin failures++; $display("FAIL: %0d writes", writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
