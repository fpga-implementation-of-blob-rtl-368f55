// tb_dccl: labels random black/white images and checks that the labels plus
// the reported equivalences reproduce exactly the 8-connected components of
// a flood-fill reference, that types follow the pixel colour, that labels
// start at 1 in raster order, and that the black/white contact flags match
// the neighbours' colours.  Latency of one clock is checked.
module tb_dccl;
  import blob_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [COORD_W-1:0] width;
  pix_t in;
  logic               out_valid, out_sof, out_eof, overflow;
  logic [COORD_W-1:0] out_x, out_y;
  tlabel_t            out_label;
  tlabel_t            out_nb [4];
  logic [3:0]         out_eq_v, out_bw_v;
  int checks = 0, failures = 0;

  dccl #(.MAX_W(64)) dut (.clk, .rst_n, .width, .in, .out_valid, .out_sof, .out_eof,
    .out_x, .out_y, .out_label, .out_nb, .out_eq_v, .out_bw_v, .overflow);

  ref_img_t im;
  int lab [RH][RW];
  int uf [1024];
  int n_eq = 0;

  function automatic int find(int a);
    while (uf[a] != a) a = uf[a];
    return a;
  endfunction

  always @(posedge clk) if (out_valid) begin
    int x, y;
    x = int'(out_x); y = int'(out_y);
    lab[y][x] = int'(out_label);
    checks++;
    if (out_label[LBL_W] !== !im.white[y][x] || out_label[LBL_W-1:0] == 0) begin
      failures++; $display("type/zero label at %0d,%0d", x, y);
    end
    for (int i = 0; i < 4; i++) begin
      int nx, ny;
      bit inb;
      nx = x + ((i == 0) ? -1 : (i == 1) ? 0 : (i == 2) ? 1 : -1);
      ny = y + ((i == 3) ? 0 : -1);
      inb = nx >= 0 && ny >= 0 && nx < im.w;
      checks++;
      if (out_bw_v[i] !== (inb && im.white[ny][nx] != im.white[y][x])) begin
        failures++; $display("bw flag %0d at %0d,%0d", i, x, y);
      end
      if (out_eq_v[i]) begin
        n_eq++;
        uf[find(int'(out_label))] = find(int'(out_nb[i]));
      end
    end
  end

  // one clock of latency: out_valid follows in.valid by one edge
  logic vq = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== vq) begin failures++; $display("latency: out_valid %0b", out_valid); end
    end
    vq <= in.valid;
  end

  task automatic run(int w, int h, int nsh, bit gaps);
    gen_image(im, w, h, nsh);
    label_ref(im);
    for (int i = 0; i < 1024; i++) uf[i] = i;
    width = COORD_W'(w);
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) begin
      if (gaps) while ($urandom_range(0, 2) == 0) begin in <= '0; @(posedge clk); end
      in.valid <= 1; in.sof <= (r == 0 && c == 0); in.eof <= (r == h-1 && c == w-1);
      in.data <= {7'b0, im.white[r][c]};
      @(posedge clk);
    end
    in <= '0;
    repeat (3) @(posedge clk);
    // same partition as the reference
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) begin
      int rr, cc;
      // compare with right and lower neighbour and with a random pixel
      rr = $urandom_range(0, h-1); cc = $urandom_range(0, w-1);
      checks++;
      if ((find(lab[r][c]) == find(lab[rr][cc])) != (im.comp[r][c] == im.comp[rr][cc])) begin
        failures++; $display("partition differs: (%0d,%0d) vs (%0d,%0d)", c, r, cc, rr);
      end
      if (c + 1 < w) begin
        checks++;
        if ((find(lab[r][c]) == find(lab[r][c+1])) != (im.comp[r][c] == im.comp[r][c+1])) begin
          failures++; $display("partition differs at (%0d,%0d) right", c, r);
        end
      end
      if (r + 1 < h && c > 0) begin
        checks++;
        if ((find(lab[r][c]) == find(lab[r+1][c-1])) != (im.comp[r][c] == im.comp[r+1][c-1])) begin
          failures++; $display("partition differs at (%0d,%0d) down-left", c, r);
        end
      end
    end
    checks++;
    if ((lab[0][0] & 255) != 1) begin failures++; $display("first label %0d", lab[0][0]); end
    checks++;
    if (overflow) begin failures++; $display("unexpected overflow"); end
  endtask

  initial begin
    in = '0; width = 8;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    run(24, 16, 8, 0);
    run(40, 30, 14, 1);
    run(64, 20, 20, 0);
    checks++;
    if (n_eq == 0) begin failures++; $display("no equivalence ever reported"); end
    $display("equivalences reported: %0d", n_eq);
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
