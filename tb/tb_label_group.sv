// tb_label_group: random black/white images are labelled by dccl and
// grouped by label_group; every 8-connected component of a flood-fill
// reference must appear as exactly one root record (at the smallest label
// of its pixels) with the reference bounding box, pixel count and centre
// floor(sum/count), and the BW_EQ list, translated to components, must
// equal the reference set of touching black/white component pairs.
module tb_label_group;
  import blob_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [COORD_W-1:0] width;
  pix_t in;
  logic               d_valid, d_sof, d_eof, d_ovf;
  logic [COORD_W-1:0] d_x, d_y;
  tlabel_t            d_label;
  tlabel_t            d_nb [4];
  logic [3:0]         d_eq_v, d_bw_v;
  logic               busy, ready, done, overflow;
  tlabel_t            rd_label, bw_black, bw_white;
  comp_t              rd_comp;
  logic [8:0]         bw_count;
  logic [7:0]         bw_idx;
  int checks = 0, failures = 0, merges = 0;

  dccl #(.MAX_W(64)) u_dccl (.clk, .rst_n, .width, .in, .out_valid(d_valid), .out_sof(d_sof),
    .out_eof(d_eof), .out_x(d_x), .out_y(d_y), .out_label(d_label), .out_nb(d_nb),
    .out_eq_v(d_eq_v), .out_bw_v(d_bw_v), .overflow(d_ovf));

  label_group dut (.clk, .rst_n, .in_valid(d_valid), .in_sof(d_sof), .in_eof(d_eof),
    .in_x(d_x), .in_y(d_y), .in_label(d_label), .in_nb(d_nb), .in_eq_v(d_eq_v),
    .in_bw_v(d_bw_v), .busy, .ready, .done, .overflow, .rd_label, .rd_comp,
    .bw_count, .bw_idx, .bw_black, .bw_white);

  ref_img_t im;
  int lab [RH][RW];
  int minlab [RH*RW];

  always @(posedge clk) if (d_valid) lab[int'(d_y)][int'(d_x)] = int'(d_label);

  task automatic run(int w, int h, int nsh);
    int lab2comp [512];
    bit refpair [int][int];
    bit dutpair [int][int];
    int nroot_dut, t0;
    gen_image(im, w, h, nsh);
    label_ref(im);
    width = COORD_W'(w);
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) begin
      in.valid <= 1; in.sof <= (r == 0 && c == 0); in.eof <= (r == h-1 && c == w-1);
      in.data <= {7'b0, im.white[r][c]};
      @(posedge clk);
    end
    in <= '0;
    t0 = 0;
    while (!done) begin @(posedge clk); t0++; end
    @(posedge clk);
    checks++;
    if (!ready || overflow || d_ovf) begin failures++; $display("ready %0b overflow %0b/%0b", ready, overflow, d_ovf); end
    for (int i = 0; i < im.ncomp; i++) minlab[i] = 1 << 30;
    for (int i = 0; i < 512; i++) lab2comp[i] = -1;
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++) begin
      int id = im.comp[r][c];
      if (lab[r][c] < minlab[id]) minlab[id] = lab[r][c];
      lab2comp[lab[r][c]] = id;
      if (lab[r][c] != minlab[id]) merges++;
    end
    // one root record per reference component, with its statistics
    for (int i = 0; i < im.ncomp; i++) begin
      rd_label = tlabel_t'(minlab[i]);
      #1;
      checks++;
      if (!rd_comp.root || rd_comp.min_x != im.minx[i] || rd_comp.max_x != im.maxx[i]
          || rd_comp.min_y != im.miny[i] || rd_comp.max_y != im.maxy[i]
          || rd_comp.count != im.cnt[i]
          || rd_comp.cx != im.sx[i] / im.cnt[i] || rd_comp.cy != im.sy[i] / im.cnt[i]) begin
        failures++;
        $display("component %0d (label %0h) wrong: root %0b box %0d..%0d,%0d..%0d n %0d c %0d,%0d; exp box %0d..%0d,%0d..%0d n %0d",
          i, minlab[i], rd_comp.root, rd_comp.min_x, rd_comp.max_x, rd_comp.min_y, rd_comp.max_y,
          rd_comp.count, rd_comp.cx, rd_comp.cy, im.minx[i], im.maxx[i], im.miny[i], im.maxy[i], im.cnt[i]);
      end
    end
    nroot_dut = 0;
    for (int l = 0; l < 512; l++) begin
      rd_label = tlabel_t'(l); #1;
      if (rd_comp.root) nroot_dut++;
    end
    checks++;
    if (nroot_dut != im.ncomp) begin failures++; $display("roots %0d, components %0d", nroot_dut, im.ncomp); end
    // BW_EQ set
    for (int r = 0; r < h; r++) for (int c = 0; c < w; c++)
      for (int dy = -1; dy <= 1; dy++) for (int dx = -1; dx <= 1; dx++) begin
        int nx = c + dx, ny = r + dy;
        if (nx >= 0 && ny >= 0 && nx < w && ny < h && im.white[ny][nx] != im.white[r][c]) begin
          int a = im.comp[r][c], b = im.comp[ny][nx];
          if (im.ctype[a]) refpair[a][b] = 1; else refpair[b][a] = 1;
        end
      end
    for (int i = 0; i < int'(bw_count); i++) begin
      bw_idx = 8'(i); #1;
      dutpair[lab2comp[int'(bw_black)]][lab2comp[int'(bw_white)]] = 1;
    end
    checks++;
    if (refpair != dutpair) begin failures++; $display("BW_EQ set differs (%0d pairs listed)", bw_count); end
    $display("frame %0dx%0d: %0d components, %0d cycles after the last pixel", w, h, im.ncomp, t0);
  endtask

  initial begin
    in = '0; width = 8; rd_label = '0; bw_idx = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    run(24, 16, 6);
    run(40, 30, 12);
    run(64, 40, 25);
    checks++;
    if (merges == 0) begin failures++; $display("no label was ever merged"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
