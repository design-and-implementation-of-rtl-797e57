// tb_mode_ctrl: presses the buttons with short glitches (must be ignored),
// long presses (accepted once each) and checks that the function selection
// cycles 1:1 -> zoom-in -> zoom-out -> 1:1, that the layer and interpolation
// toggles work, and, clock by clock, that nothing changes except right
// after a start of frame.
module tb_mode_ctrl;
  import video_pkg::*;
  localparam int DEB = 5;
  logic clk = 0, rst_n = 0;
  logic [3:0] btn;
  logic sof, bilinear, edge_en, video_en;
  scale_mode_e mode;
  int checks = 0, failures = 0;

  mode_ctrl #(.DEBOUNCE(DEB)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // every clock: the selection may only change right after a frame start
  logic [4:0] prev_sel;
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if ({mode, bilinear, edge_en, video_en} != prev_sel && !sof) begin  // sof is still the value sampled at this edge
        failures++;
        $display("FAIL: selection changed outside a frame start");
      end
    end
    prev_sel = {mode, bilinear, edge_en, video_en};
  end

  task automatic press(input int b, input int len);
    @(negedge clk); btn[b] = 1;
    repeat (len) @(negedge clk);
    btn[b] = 0;
    repeat (DEB + 4) @(negedge clk);
  endtask

  task automatic frame_start;
    @(negedge clk); sof = 1;
    @(negedge clk); sof = 0;
  endtask

  initial begin
    btn = 0; sof = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(mode == SCALE_1X && bilinear && !edge_en && video_en, "reset state");
    press(0, DEB - 2);  // glitch
    frame_start;
    check(mode == SCALE_1X, "glitch ignored");
    press(0, DEB + 6);
    check(mode == SCALE_1X, "no change before frame start");
    frame_start;
    check(mode == SCALE_ZIN, "zoom-in selected");
    press(0, DEB + 6);
    frame_start;
    check(mode == SCALE_ZOUT, "zoom-out selected");
    press(0, DEB + 6);
    frame_start;
    check(mode == SCALE_1X, "back to 1:1");
    press(1, DEB + 6);
    press(2, DEB + 6);
    press(3, DEB + 6);
    check(!edge_en && video_en && bilinear, "toggles wait for frame start");
    frame_start;
    check(edge_en && !video_en && !bilinear, "toggles applied");
    press(1, 3 * DEB);  // long press counts once
    frame_start;
    check(!edge_en, "edge toggled back once");
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
