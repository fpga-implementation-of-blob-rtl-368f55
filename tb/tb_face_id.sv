// tb_face_id: draws binary 82x82 blob faces (the labelled area of a 96x96
// normalized candidate), labels them with dccl + label_group and lets
// face_id recognise them.  Each face has a black surround, a white frame,
// a black heart block with 0..4 white dots, and 12 black dots in the frame
// of which one (the origin) is larger.  The origin is put in each of the 8
// zones around the heart block and the ID is chosen at random; the expected
// ID follows the clockwise numbering P1..P4 counted from the origin's
// corner (corner origins) or side (side origins).  Faces with 11 dots and
// faces without a heart block must be rejected.
module tb_face_id;
  import blob_pkg::*;

  localparam int S = 82;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pix_t in;
  logic               d_valid, d_sof, d_eof, d_ovf;
  logic [COORD_W-1:0] d_x, d_y;
  tlabel_t            d_label;
  tlabel_t            d_nb [4];
  logic [3:0]         d_eq_v, d_bw_v;
  logic               lg_busy, lg_ready, lg_done, lg_ovf;
  tlabel_t            rd_label, bw_black, bw_white;
  comp_t              rd_comp;
  logic [8:0]         bw_count;
  logic [7:0]         bw_idx;
  logic               start, busy, done, found;
  logic [3:0]         id_out;
  logic [4:0]         n_black_dots;
  logic [2:0]         n_white_dots;
  int checks = 0, failures = 0;
  int ids_seen [16];

  dccl #(.MAX_W(96)) u_dccl (.clk, .rst_n, .width(COORD_W'(S)), .in, .out_valid(d_valid),
    .out_sof(d_sof), .out_eof(d_eof), .out_x(d_x), .out_y(d_y), .out_label(d_label),
    .out_nb(d_nb), .out_eq_v(d_eq_v), .out_bw_v(d_bw_v), .overflow(d_ovf));

  label_group u_lg (.clk, .rst_n, .in_valid(d_valid), .in_sof(d_sof), .in_eof(d_eof),
    .in_x(d_x), .in_y(d_y), .in_label(d_label), .in_nb(d_nb), .in_eq_v(d_eq_v),
    .in_bw_v(d_bw_v), .busy(lg_busy), .ready(lg_ready), .done(lg_done), .overflow(lg_ovf),
    .rd_label, .rd_comp, .bw_count, .bw_idx, .bw_black, .bw_white);

  face_id dut (.clk, .rst_n, .start, .busy, .done, .found, .id_out, .n_black_dots,
    .n_white_dots, .rd_label, .rd_comp, .bw_count, .bw_idx, .bw_black, .bw_white);

  bit white [S][S];

  function automatic void rect(int x0, int y0, int x1, int y1, bit v);
    for (int y = y0; y <= y1; y++) for (int x = x0; x <= x1; x++) white[y][x] = v;
  endfunction

  // zone centres around the heart: corners UL, UR, DR, DL then sides T, R, B, L
  int zx [8] = '{16, 65, 65, 16, 40, 65, 40, 16};
  int zy [8] = '{16, 16, 65, 65, 16, 40, 65, 40};
  // white dot centres inside the heart, same order
  int wx [8] = '{31, 50, 50, 31, 40, 50, 40, 31};
  int wy [8] = '{31, 31, 50, 50, 31, 40, 50, 40};

  task automatic draw(int ozone, int id, bit drop_dot, bit no_heart);
    int fam = (ozone < 4) ? 0 : 4;
    int os  = ozone % 4;
    int extra_x [4] = '{16, 16, 65, 65};
    int extra_y [4] = '{28, 53, 28, 53};
    rect(0, 0, S-1, S-1, 0);          // black surround
    rect(8, 8, 73, 73, 1);            // white frame
    if (!no_heart) rect(25, 25, 56, 56, 0);
    for (int z = 0; z < 8; z++) begin
      int r = (z == ozone) ? 3 : 2;
      if (!(drop_dot && z == (ozone + 1) % 8))
        rect(zx[z]-r, zy[z]-r, zx[z]+r-1, zy[z]+r-1, 0);
    end
    for (int e = 0; e < 4; e++) rect(extra_x[e]-2, extra_y[e]-2, extra_x[e]+1, extra_y[e]+1, 0);
    if (!no_heart)
      for (int b = 0; b < 4; b++) if (id[b]) begin
        int p = fam + ((b + os) % 4);
        rect(wx[p]-2, wy[p]-2, wx[p]+1, wy[p]+1, 1);
      end
  endtask

  task automatic run(int ozone, int id, bit drop_dot, bit no_heart);
    int t;
    draw(ozone, id, drop_dot, no_heart);
    for (int r = 0; r < S; r++) for (int c = 0; c < S; c++) begin
      in.valid <= 1; in.sof <= (r == 0 && c == 0); in.eof <= (r == S-1 && c == S-1);
      in.data <= {7'b0, white[r][c]};
      @(posedge clk);
    end
    in <= '0;
    while (!lg_done) @(posedge clk);
    start <= 1; @(posedge clk); start <= 0;
    t = 0;
    while (!done) begin @(posedge clk); t++; end
    checks++;
    if (drop_dot || no_heart) begin
      if (found) begin failures++; $display("bad face (drop %0b, no heart %0b) accepted", drop_dot, no_heart); end
    end else if (!found || id_out != 4'(id) || n_black_dots != 12 || n_white_dots != 3'($countones(4'(id)))) begin
      failures++;
      $display("origin zone %0d id %0d: found %0b id %0d, %0d black dots, %0d white dots",
        ozone, id, found, id_out, n_black_dots, n_white_dots);
    end else ids_seen[id]++;
  endtask

  initial begin
    in = '0; start = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int z = 0; z < 8; z++) run(z, (z * 5 + 3) % 16, 0, 0);
    for (int i = 0; i < 16; i++) run($urandom_range(0, 7), i, 0, 0);
    run(2, 9, 1, 0);
    run(5, 0, 0, 1);
    checks++;
    if (ids_seen.sum() != 24) begin failures++; $display("only %0d faces recognised", ids_seen.sum()); end
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
