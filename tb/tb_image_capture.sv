// tb_image_capture: a camera model drives PCLK (period 40 ns, 4 system
// clocks), VSYNC, HREF and random 10-bit pixels with line and frame
// blanking, changing its outputs on the falling PCLK edge.  The captured
// stream must reproduce every pixel with its x/y, one sof and one eof per
// frame, and nothing while enable is low.  XCLK must toggle every XCLK_DIV
// clocks and PWDN must follow power_down.  Uses a 40x12 frame for speed.
module tb_image_capture;
  import blob_pkg::*;

  localparam int H = 40, V = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic enable, power_down, pclk = 0, href = 0, vsync = 0, xclk, pwdn;
  logic [9:0] ydat = 0;
  logic pix_valid, pix_sof, pix_eof;
  logic [COORD_W-1:0] pix_x, pix_y;
  logic [9:0] pix_data;
  logic [15:0] frame_cnt;
  int checks = 0, failures = 0, nsof = 0, neof = 0, npix = 0;
  int exp_q [$];

  image_capture #(.H_ACTIVE(H), .V_ACTIVE(V)) dut (.clk, .rst_n, .enable, .power_down,
    .cam_pclk(pclk), .cam_href(href), .cam_vsync(vsync), .cam_y(ydat), .cam_xclk(xclk),
    .cam_pwdn(pwdn), .pix_valid, .pix_sof, .pix_eof, .pix_x, .pix_y, .pix_data, .frame_cnt);

  always #20 pclk = ~pclk;

  always @(posedge clk) if (pix_valid) begin
    int e;
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("unexpected pixel"); end
    else begin
      e = exp_q.pop_front();
      if (pix_data != e[9:0] || int'(pix_x) != ((e >> 10) % H) || int'(pix_y) != ((e >> 10) / H)) begin
        failures++;
        $display("pixel %0d,%0d = %0d, expected index %0d value %0d", pix_x, pix_y, pix_data, e >> 10, e[9:0]);
      end
    end
    if (pix_sof) nsof++;
    if (pix_eof) neof++;
    npix++;
  end

  task automatic frame(bit expect_it);
    @(negedge pclk); vsync <= 1;
    repeat (3) @(negedge pclk); vsync <= 0;
    repeat (5) @(negedge pclk);
    for (int r = 0; r < V; r++) begin
      for (int c = 0; c < H; c++) begin
        logic [9:0] v = 10'($urandom);
        href <= 1; ydat <= v;
        if (expect_it) exp_q.push_back(((r * H + c) << 10) | int'(v));
        @(negedge pclk);
      end
      href <= 0; ydat <= 10'($urandom);
      repeat ($urandom_range(2, 6)) @(negedge pclk);
    end
    repeat (4) @(negedge pclk);
  endtask

  initial begin
    int t0, t1;
    enable = 1; power_down = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    frame(1);
    frame(1);
    enable = 0;
    frame(0);
    enable = 1;
    frame(1);
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || nsof != 3 || neof != 3 || frame_cnt != 3 || npix != 3 * H * V) begin
      failures++; $display("left %0d, sof %0d eof %0d frames %0d pixels %0d", exp_q.size(), nsof, neof, frame_cnt, npix);
    end
    // XCLK half period
    @(posedge xclk); t0 = $time; @(negedge xclk); t1 = $time;
    checks++;
    if (t1 - t0 != 20) begin failures++; $display("XCLK half period %0d ns", t1 - t0); end
    power_down = 1; repeat (2) @(posedge clk); #1;
    checks++;
    if (!pwdn) begin failures++; $display("PWDN does not follow"); end
    power_down = 0; repeat (2) @(posedge clk); #1;
    checks++;
    if (pwdn) begin failures++; $display("PWDN stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
