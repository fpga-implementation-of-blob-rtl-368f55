// tb_normalize: streams square images of side 32*k for several k (96..480)
// and compares the 96x96 output with a reference bilinear resampler that
// works in real arithmetic: p = (i+0.5)*k/3 - 0.5, weight = nearest quarter
// of frac(p), rows first then columns, truncating each stage.  Also checks
// output count, sof/eof and that all four weight pairs were exercised.
// Rate: without input gaps and k = 3 (96x96 in) the 9,216 outputs must come
// on consecutive clocks, one clock after their input pixels, so a 96x96
// window takes 9,216 clocks (92 us at 100 MHz).
module tb_normalize;
  import blob_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] k;
  pix_t in, out;
  int checks = 0, failures = 0, n_out = 0;
  int cyc = 0, first_out = 0, last_out = 0, first_in = 0;
  int exp_q [$];
  bit wseen [4];

  normalize dut (.clk, .rst_n, .k, .in, .out);

  int img [480][480];

  function automatic void src_pos(int i, int kk, output int j, output int w4);
    real p, f;
    p  = (real'(i) + 0.5) * real'(kk) / 3.0 - 0.5;
    j  = int'($floor(p + 1e-9));
    f  = p - real'(j);
    w4 = int'($floor(f * 4.0 + 0.5));
    if (w4 == 4) begin j++; w4 = 0; end
  endfunction

  function automatic int lerp(int a, int b, int w4);
    return (a * (4 - w4) + b * w4) >> 2;
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in.valid && in.sof) first_in <= cyc;
    if (out.valid) begin
      if (out.sof) first_out <= cyc;
      last_out <= cyc;
    end
  end

  always @(posedge clk) if (out.valid) begin
    int e;
    e = exp_q.pop_front();
    checks++;
    if (out.data !== 8'(e) || out.sof !== (n_out == 0) || out.eof !== (n_out == 96*96-1)) begin
      failures++;
      if (failures < 10) $display("k=%0d out %0d: got %0d exp %0d sof %0b eof %0b", k, n_out, out.data, e, out.sof, out.eof);
    end
    n_out++;
  end

  task automatic run(int kk, bit gaps);
    int s = 32 * kk;
    int hrow [96];
    int jr, wr, jc, wc;
    k = 4'(kk); n_out = 0;
    for (int r = 0; r < s; r++) for (int c = 0; c < s; c++) img[r][c] = $urandom_range(0, 255);
    for (int i = 0; i < 96; i++) begin
      src_pos(i, kk, jr, wr);
      wseen[wr] = 1;
      for (int o = 0; o < 96; o++) begin
        int a, b;
        src_pos(o, kk, jc, wc);
        a = lerp(img[jr][jc], (wc != 0) ? img[jr][jc+1] : 0, wc);
        b = (wr != 0) ? lerp(img[jr+1][jc], (wc != 0) ? img[jr+1][jc+1] : 0, wc) : 0;
        exp_q.push_back(lerp(a, b, wr));
      end
    end
    for (int r = 0; r < s; r++) for (int c = 0; c < s; c++) begin
      if (gaps) while ($urandom_range(0, 3) == 0) begin in <= '0; @(posedge clk); end
      in.valid <= 1; in.sof <= (r == 0 && c == 0); in.eof <= (r == s-1 && c == s-1);
      in.data <= 8'(img[r][c]);
      @(posedge clk);
    end
    in <= '0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_out != 96*96 || exp_q.size() != 0) begin
      failures++; $display("k=%0d: %0d outputs", kk, n_out); exp_q.delete();
    end
    if (kk == 3 && !gaps) begin
      checks++;
      if (first_out != first_in + 1 || last_out - first_out + 1 != 96*96) begin
        failures++;
        $display("k=3 timing: first input %0d, outputs %0d..%0d", first_in, first_out, last_out);
      end
    end
  endtask

  initial begin
    in = '0; k = 3;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    run(3, 0);
    run(4, 1);
    run(5, 0);
    run(6, 0);
    run(11, 1);
    run(15, 0);
    for (int w = 0; w < 4; w++) begin
      checks++;
      if (!wseen[w]) begin failures++; $display("weight %0d/4 never used", w); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
