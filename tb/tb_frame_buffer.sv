// tb_frame_buffer: fills a small frame buffer with random samples, then reads
// every (row, column) and random ones and compares the 2x2 neighbourhood,
// with edge clamping, against a plain array model; also checks the one-clock
// read latency and read-before-write on a same-clock access. A last phase
// writes a new image on a separate, faster write clock and reads it back on
// the read clock.
module tb_frame_buffer;
  localparam int W = 8, H = 6;
  logic clk = 0;
  logic we;
  logic [$clog2(H)-1:0] wrow, rrow;
  logic [$clog2(W)-1:0] wcol, rcol;
  logic [7:0] wdata, q00, q01, q10, q11;
  int checks = 0, failures = 0;
  logic [7:0] model [H][W];

    // write clock: the read clock, or (two_clk) a separate, faster clock
  logic clk2 = 0, two_clk = 0, wclk;
  always #3.5 clk2 = ~clk2;
  assign wclk = two_clk ? clk2 : clk;

  frame_buffer #(.W(W), .H(H), .DW(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_win(input int r, input int c);
    int r1, c1;
    r1 = (r + 1 < H) ? r + 1 : r;
    c1 = (c + 1 < W) ? c + 1 : c;
    checks++;
    if (q00 !== model[r][c] || q01 !== model[r][c1] || q10 !== model[r1][c] || q11 !== model[r1][c1]) begin
      failures++;
      $display("FAIL: window (%0d,%0d) got %h %h %h %h exp %h %h %h %h", r, c, q00, q01, q10, q11,
               model[r][c], model[r][c1], model[r1][c], model[r1][c1]);
    end
  endtask

  initial begin
    we = 0; wrow = 0; wcol = 0; wdata = 0; rrow = 0; rcol = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk);
        we = 1; wrow = r[2:0]; wcol = c[2:0]; wdata = 8'($urandom);
        model[r][c] = wdata;
      end
    @(negedge clk); we = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        rrow = r[2:0]; rcol = c[2:0];
        @(posedge clk); #1;
        expect_win(r, c);
      end
    for (int i = 0; i < 200; i++) begin
      int r, c;
      r = $urandom_range(H - 1); c = $urandom_range(W - 1);
      @(negedge clk);
      rrow = r[2:0]; rcol = c[2:0];
      // concurrent write somewhere: old data must be read
      we = 1; wrow = 3'($urandom_range(H - 1)); wcol = 3'($urandom_range(W - 1)); wdata = 8'($urandom);
      @(posedge clk); #1;
      expect_win(r, c);
      model[wrow][wcol] = wdata;
      we = 0;
    end
    // separate write clock
    @(negedge clk); we = 0; two_clk = 1;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        @(negedge clk2);
        we = 1; wrow = r[2:0]; wcol = c[2:0]; wdata = 8'($urandom);
        model[r][c] = wdata;
      end
    @(negedge clk2); we = 0;
    @(negedge clk);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        rrow = r[2:0]; rcol = c[2:0];
        @(posedge clk); #1;
        expect_win(r, c);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
