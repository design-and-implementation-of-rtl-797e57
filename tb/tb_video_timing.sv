// tb_video_timing: checks the 640x480 raster of video_timing over two frames:
// active pixel count per frame, frame period (800x525 clocks), hsync and
// vsync pulse lengths, sof period and the x/y counters during active video.
module tb_video_timing;
  logic clk = 0, rst_n = 0;
  logic [10:0] x, y;
  logic active, hsync_n, vsync_n, sof;
  int checks = 0, failures = 0;

  video_timing dut (.*);

  always #20 clk = ~clk;  // 25 MHz

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  int cyc, act_cnt, hs_low, hs_pulses, vs_low, last_sof, sof_cnt, hs_run;
  bit prev_hs;
  int ex, ey;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // wait for the first sof
    do @(posedge clk); while (!sof);
    last_sof = 0; cyc = 0; sof_cnt = 0;
    act_cnt = 0; hs_pulses = 0; vs_low = 0; prev_hs = 1; hs_run = 0;
    ex = 0; ey = 0;
    while (sof_cnt < 2) begin
      // sample outputs of this clock
      if (active) begin
        act_cnt++;
        if (x != 11'(ex) || y != 11'(ey)) begin
          check(0, $sformatf("active x/y %0d/%0d expected %0d/%0d", x, y, ex, ey));
        end
        ex++;
        if (ex == 640) begin ex = 0; ey++; end
      end
      if (!hsync_n) hs_run++;
      if (prev_hs == 0 && hsync_n == 1) begin
        hs_pulses++;
        if (hs_run != 96) check(0, $sformatf("hsync width %0d", hs_run));
        hs_run = 0;
      end
      prev_hs = hsync_n;
      if (!vsync_n) vs_low++;
      @(posedge clk);
      cyc++;
      if (sof) begin
        sof_cnt++;
        check(cyc == 800 * 525, $sformatf("frame period %0d", cyc));
        check(act_cnt == 640 * 480, $sformatf("active pixels %0d", act_cnt));
        check(hs_pulses == 525, $sformatf("hsync pulses %0d", hs_pulses));
        check(vs_low == 2 * 800, $sformatf("vsync low clocks %0d", vs_low));
        check(x == 0 && y == 0 && active, "sof at first active pixel");
        cyc = 0; act_cnt = 0; hs_pulses = 0; vs_low = 0; ex = 0; ey = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * 800 * 525) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
