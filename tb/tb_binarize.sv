// tb_binarize: checks the 11x11 adaptive threshold against a direct
// evaluation of "centre > mean + Delta" (done in real arithmetic), for
// several Delta values including negative ones, plus output size, sof/eof
// and the two-clock latency.
module tb_binarize;
  import blob_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [COORD_W-1:0] width;
  logic signed [8:0]  delta;
  pix_t in, out;
  int checks = 0, failures = 0, n_out = 0, out_n = 0, ones = 0;

  binarize #(.MAX_W(32)) dut (.clk, .rst_n, .width, .delta, .in, .out);

  localparam int MW = 32, MH = 24;
  int img [MH][MW];
  int exp_q [$];

  always @(posedge clk) if (out.valid) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (out.data !== 8'(e)) begin failures++; $display("mismatch at %0d: got %0d exp %0d", n_out, out.data, e); end
    checks++;
    if (out.sof !== (n_out == 0) || out.eof !== (n_out == out_n-1)) begin failures++; $display("sof/eof at %0d", n_out); end
    if (out.data[0]) ones++;
    n_out++;
  end

  task automatic run_frame(int w, int h, int d, bit gaps);
    width = COORD_W'(w); delta = 9'(d); n_out = 0; out_n = (w-10)*(h-10);
    // smooth random field so that both outcomes occur
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++)
      img[r][c] = (((r*7 + c*13) % 64) * 3 + $urandom_range(0, 63)) % 256;
    for (int r = 5; r < h-5; r++) for (int c = 5; c < w-5; c++) begin
      int s = 0;
      real mean;
      for (int i = -5; i <= 5; i++) for (int j = -5; j <= 5; j++) s += img[r+i][c+j];
      mean = real'(s) / 121.0;
      exp_q.push_back((real'(img[r][c]) > mean + real'(d)) ? 1 : 0);
    end
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin in <= '0; @(posedge clk); end
      in.valid <= 1; in.sof <= (r == 0 && c == 0); in.eof <= (r == h-1 && c == w-1);
      in.data <= 8'(img[r][c]);
      @(posedge clk);
    end
    in <= '0;
    repeat (4) @(posedge clk);
    checks++;
    if (n_out != out_n) begin failures++; $display("count %0d exp %0d", n_out, out_n); end
  endtask

  int t_in = -1, t_out = -1, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (in.valid && dut.cur_col == 10 && dut.cur_row == 10 && t_in < 0) t_in = cyc;
    if (out.valid && out.sof && t_out < 0) t_out = cyc;
  end

  initial begin
    in = '0; width = 16; delta = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    run_frame(20, 16, 0, 0);
    checks++;
    if (t_out - t_in != 2) begin failures++; $display("latency %0d", t_out - t_in); end
    run_frame(32, 24, 10, 1);
    run_frame(24, 20, -20, 0);
    run_frame(24, 20, 40, 1);
    checks++;
    if (ones == 0) begin failures++; $display("no white pixel ever produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
