// tb_downscale: streams two full 640x480 frames (with gaps) and checks that
// exactly the pixels at x%4==0, y%4==0 come out, in order, as 8-bit values,
// with sof/eof on the first and last of the 160x120 output.  Decimation adds
// one clock of delay: every kept input pixel must appear at the output in
// the clock after the one in which it was presented, which is checked for
// every clock (`in_kept` marks the pixels the testbench expects to be kept).
module tb_downscale;
  import blob_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_sof, in_kept, kept_d = 0;
  int lat_err = 0;
  logic [9:0] in_data;
  pix_t out;
  int checks = 0, failures = 0, n_out = 0;
  int exp_q [$];

  downscale dut (.clk, .rst_n, .in_valid, .in_sof, .in_data, .out);

  function automatic int pixval(int f, int x, int y);
    return (x * 3 + y * 5 + f * 17) % 1024;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out.valid !== kept_d) lat_err++;
    kept_d <= in_valid && in_kept;
  end

  always @(posedge clk) if (out.valid) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (out.data !== 8'(e) || out.sof !== (n_out == 0) || out.eof !== (n_out == 160*120-1)) begin
      failures++;
      if (failures < 10) $display("mismatch at %0d: got %0d exp %0d sof %0b eof %0b", n_out, out.data, e, out.sof, out.eof);
    end
    n_out++;
  end

  initial begin
    in_valid = 0; in_sof = 0; in_data = 0; in_kept = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      n_out = 0;
      for (int y = 0; y < 480; y++) for (int x = 0; x < 640; x++) begin
        if (x % 4 == 0 && y % 4 == 0) exp_q.push_back(pixval(f, x, y) >> 2);
        if (f == 1 && $urandom_range(0, 7) == 0) begin in_valid <= 0; @(posedge clk); end
        in_valid <= 1; in_sof <= (x == 0 && y == 0); in_kept <= (x % 4 == 0 && y % 4 == 0); in_data <= 10'(pixval(f, x, y));
        @(posedge clk);
      end
      in_valid <= 0;
      repeat (3) @(posedge clk);
      checks++;
      if (n_out != 160*120) begin failures++; $display("frame %0d: %0d pixels", f, n_out); end
    end
    checks++;
    if (lat_err != 0) begin failures++; $display("output not one clock after input in %0d clocks", lat_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
