// tb_candidate_search: a behavioural record memory stands in for
// label_group.  Random black records (squares, oblong boxes, small, large,
// near the border, non-root) are filled in and the candidate buffer is
// compared with a reference selection: square within 25 %, side 8..40,
// window 12*side rounded up to 32*k (k >= 3) centred on 4*(centre+7), and
// fully inside the 640x480 image.  White records carry the same shapes and
// must never be selected.  Also checks the buffer limit of MAX_CAND.
module tb_candidate_search;
  import blob_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done;
  tlabel_t rd_label;
  comp_t   rd_comp;
  logic [3:0] cand_count;
  logic [2:0] cand_idx;
  logic [COORD_W-1:0] cand_x0, cand_y0;
  logic [3:0] cand_k;
  int checks = 0, failures = 0, n_sel = 0, n_full = 0;

  comp_t recs [512];
  assign rd_comp = recs[rd_label];

  candidate_search dut (.clk, .rst_n, .start, .busy, .done, .rd_label, .rd_comp,
    .cand_count, .cand_idx, .cand_x0, .cand_y0, .cand_k);

  function automatic comp_t mk(bit root, int x0, int y0, int w, int h);
    comp_t c;
    c.root = root;
    c.min_x = COORD_W'(x0); c.max_x = COORD_W'(x0 + w - 1);
    c.min_y = COORD_W'(y0); c.max_y = COORD_W'(y0 + h - 1);
    c.cx = COORD_W'(x0 + w / 2); c.cy = COORD_W'(y0 + h / 2);
    c.count = 18'(w * h);
    return c;
  endfunction

  task automatic run(int nrec);
    int ex [$], ey [$], ek [$];
    foreach (recs[i]) recs[i] = '0;
    for (int l = 1; l < 256; l++) if (l <= nrec) begin
      int side = $urandom_range(4, 48);
      int w = side, h = side;
      int x0, y0;
      case ($urandom_range(0, 3))
        0: h = side + $urandom_range(0, side / 2);     // oblong, sometimes still square
        1: w = side - $urandom_range(0, side / 3);
        default: ;
      endcase
      if (w < 1) w = 1;
      x0 = $urandom_range(0, 146 - w - 1);
      y0 = $urandom_range(0, 106 - h - 1);
      recs[256 + l] = mk($urandom_range(0, 5) != 0, x0, y0, w, h);
      recs[l]       = mk(1, x0, y0, w, h);           // white twin, never read
    end
    for (int l = 1; l < 256; l++) begin
      comp_t c = recs[256 + l];
      int w = int'(c.max_x) - int'(c.min_x) + 1, h = int'(c.max_y) - int'(c.min_y) + 1;
      int side = (w > h) ? w : h, d = (w > h) ? w - h : h - w;
      int k = (12 * side + 31) / 32, half, vx, vy;
      if (k < 3) k = 3;
      half = 16 * k; vx = 4 * (int'(c.cx) + 7); vy = 4 * (int'(c.cy) + 7);
      if (c.root && 4 * d <= side && side >= 8 && side <= 40 &&
          vx >= half && vx + half <= 640 && vy >= half && vy + half <= 480 && ex.size() < 8) begin
        ex.push_back(vx - half); ey.push_back(vy - half); ek.push_back(k);
      end
    end
    start <= 1; @(posedge clk); start <= 0;
    while (!done) @(posedge clk);
    checks++;
    if (int'(cand_count) != ex.size()) begin
      failures++; $display("%0d candidates, expected %0d", cand_count, ex.size());
    end
    for (int i = 0; i < ex.size() && i < int'(cand_count); i++) begin
      cand_idx = 3'(i); #1;
      checks++;
      if (int'(cand_x0) != ex[i] || int'(cand_y0) != ey[i] || int'(cand_k) != ek[i]) begin
        failures++;
        $display("candidate %0d: %0d,%0d k %0d; expected %0d,%0d k %0d", i, cand_x0, cand_y0, cand_k, ex[i], ey[i], ek[i]);
      end
    end
    n_sel += ex.size();
    if (ex.size() == 8) n_full++;
  endtask

  initial begin
    start = 0; cand_idx = 0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    for (int t = 0; t < 20; t++) run($urandom_range(0, 12));
    for (int t = 0; t < 5; t++) run(255);
    checks++;
    if (n_sel == 0 || n_full == 0) begin failures++; $display("selection or buffer limit never exercised"); end
    $display("%0d candidates selected", n_sel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
