// tb_gaussian_smooth: checks the 5x5 Gaussian filter against a direct
// convolution with the 273-sum kernel, on two random frames of different
// widths (one with random gaps in valid), plus sof/eof placement and the
// two-clock latency.
module tb_gaussian_smooth;
  import blob_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [COORD_W-1:0] width;
  pix_t in, out;
  int checks = 0, failures = 0;

  gaussian_smooth #(.MAX_W(32)) dut (.clk, .rst_n, .width, .in, .out);

  localparam int MW = 32, MH = 16;
  int img [MH][MW];
  int exp_q [$];
  int in_cycle [$];
  int cyc = 0;
  int n_out = 0, out_w, out_h;
  always @(posedge clk) cyc++;

  function automatic int kw(int r, int c);
    int k [5][5] = '{'{1,4,7,4,1}, '{4,16,26,16,4}, '{7,26,41,26,7}, '{4,16,26,16,4}, '{1,4,7,4,1}};
    return k[r][c];
  endfunction

  // output monitor
  always @(posedge clk) if (out.valid) begin
    int e;
    checks++;
    e = exp_q.pop_front();
    if (out.data !== 8'(e)) begin
      failures++; $display("data mismatch at out %0d: got %0d exp %0d", n_out, out.data, e);
    end
    checks++;
    if (out.sof !== (n_out == 0)) begin failures++; $display("sof wrong at %0d", n_out); end
    checks++;
    if (out.eof !== (n_out == out_w*out_h-1)) begin failures++; $display("eof wrong at %0d", n_out); end
    n_out++;
  end

  task automatic run_frame(int w, int h, bit gaps);
    width = COORD_W'(w);
    out_w = w - 4; out_h = h - 4; n_out = 0;
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) img[r][c] = $urandom_range(0, 255);
    for (int r = 2; r < h-2; r++) for (int c = 2; c < w-2; c++) begin
      int s = 0;
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) s += kw(i, j) * img[r-2+i][c-2+j];
      exp_q.push_back(s / 273);
    end
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin in <= '0; @(posedge clk); end
      in.valid <= 1; in.sof <= (r == 0 && c == 0); in.eof <= (r == h-1 && c == w-1);
      in.data <= 8'(img[r][c]);
      @(posedge clk);
    end
    in <= '0;
    repeat (5) @(posedge clk);
    checks++;
    if (n_out != out_w*out_h || exp_q.size() != 0) begin
      failures++; $display("count: got %0d exp %0d", n_out, out_w*out_h);
    end
  endtask

  // latency: output of the first window appears 2 clocks after pixel (4,4)
  int t_in44 = -1, t_out0 = -1;
  always @(posedge clk) begin
    if (in.valid && in.sof) t_in44 = -2;
    if (in.valid && t_in44 == -2 && dut.cur_col == 4 && dut.cur_row == 4) t_in44 = cyc;
    if (out.valid && out.sof) t_out0 = cyc;
  end

  initial begin
    in = '0; width = 16;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run_frame(16, 12, 0);
    checks++;
    if (t_out0 - t_in44 != 2) begin failures++; $display("latency %0d", t_out0 - t_in44); end
    run_frame(32, 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
