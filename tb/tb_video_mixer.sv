// tb_video_mixer: random layer enables, blend factors, image-area flags and
// edge data; each output (one clock later) is compared with a model of the
// layer rules: blend when both layers are present, the single present layer,
// the background, black during blanking. Counts each case.
module tb_video_mixer;
  import video_pkg::*;
  logic clk = 0, rst_n = 0;
  logic video_en, edge_en, edge_binary, in_valid, video_in_img, edge_flag, out_valid;
  logic [7:0] alpha, edge_mag;
  rgb_t bg, edge_color, video, out_pix;
  int checks = 0, failures = 0;
  int n_blend = 0, n_edge = 0, n_video = 0, n_bg = 0, n_blank = 0;

  video_mixer dut (.*);

  always #5 clk = ~clk;

  function automatic logic [7:0] mixc(int e, int v, int a);
    return 8'((a * e + (256 - a) * v) / 256);
  endfunction

  initial begin
    {video_en, edge_en, edge_binary, in_valid, video_in_img, edge_flag} = '0;
    alpha = 0; edge_mag = 0; bg = '0; edge_color = '0; video = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      rgb_t er, ex;
      @(negedge clk);
      video_en = 1'($urandom); edge_en = 1'($urandom); edge_binary = 1'($urandom);
      in_valid = ($urandom_range(9) != 0); video_in_img = 1'($urandom); edge_flag = 1'($urandom);
      alpha = 8'($urandom); edge_mag = 8'($urandom);
      bg = rgb_t'($urandom); edge_color = rgb_t'($urandom); video = rgb_t'($urandom);
      er = edge_binary ? (edge_flag ? edge_color : '0) : '{r: edge_mag, g: edge_mag, b: edge_mag};
      if (!in_valid) begin ex = '0; n_blank++; end
      else if (edge_en && video_en && video_in_img) begin
        ex = '{r: mixc(er.r, video.r, alpha), g: mixc(er.g, video.g, alpha), b: mixc(er.b, video.b, alpha)};
        n_blend++;
      end else if (edge_en) begin ex = er; n_edge++; end
      else if (video_en && video_in_img) begin ex = video; n_video++; end
      else begin ex = bg; n_bg++; end
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid || out_pix !== ex) begin
        failures++;
        if (failures < 10) $display("FAIL: got %h exp %h", out_pix, ex);
      end
    end
    checks++;
    if (n_blend == 0 || n_edge == 0 || n_video == 0 || n_bg == 0 || n_blank == 0) begin
      failures++; $display("FAIL: coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
