// tb_blob_recognition_top: end-to-end test of the full-size design (default
// parameters).  A 640x480 scene is drawn with one blob face (heart block
// with white dots, white frame, 12 black dots, one of them the larger
// origin), one plain black square and one oblong bar, on a white ground.
//   1. the camera register interface writes and reads a register of an
//      SCCB slave model that stretches SCL;
//   2. locate: a camera model sends the scene through the camera port; the
//      frame-buffer write stream is checked against the scene and the
//      candidate list must hold the face and the plain square (not the bar);
//   3. identify: for each candidate the testbench streams the window from
//      its copy of the frame buffer; the face must give the drawn ID with
//      12 black dots, the plain square must be rejected;
//   4. USB: a video transfer of 1.5 packets into an FX2 FIFO model that
//      drains slowly (full stalls, PKTEND on the short packet) and a
//      command word read from the OUT FIFO.
// Mechanism counters (label equivalences, black/white contacts, candidates
// accepted, faces recognised and rejected, SCL stretches, FIFO full
// stalls, PKTEND, USB reads, frames captured) must all be non-zero.
// Timing, against the figures given for the original system at 100 MHz:
// candidate location must end within 4.1 ms of the last camera pixel, and
// a true face must be recognised within 450 us of the last pixel of its
// normalized window (the window streaming itself, 92 us..2.3 ms, is not
// counted in this figure).
module tb_blob_recognition_top;
  import blob_pkg::*;

  localparam int W = 640, H = 480;
  localparam logic [7:0] BLK = 8'd30, WHT = 8'd220;

  logic clk = 0, rst_n = 0, ifclk = 0, pclk = 0;
  always #5 clk = ~clk;
  int unsigned cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int unsigned t_last_pix, t_located, t_win_end, t_face;
  always #10.4 ifclk = ~ifclk;
  always #20 pclk = ~pclk;

  // DUT connections
  logic mode = 0, cap_enable = 0, cam_power_down = 0;
  logic signed [8:0] delta = 9'sd8;
  logic [3:0] cand_k = 3, cand_kout;
  logic [2:0] cand_idx = 0;
  logic [3:0] cand_count;
  logic [COORD_W-1:0] cand_x0, cand_y0;
  logic locate_done, face_done, face_found, label_overflow;
  logic [3:0] face_id_out;
  logic [4:0] face_black_dots;
  logic [2:0] face_white_dots;
  logic [15:0] frame_cnt;
  logic href = 0, vsync = 0, xclk, pwdn;
  logic [9:0] cam_y = 0;
  logic fb_wr_valid, fb_wr_sof, fb_wr_eof, pipe_busy, labels_ready, i2c_bus_busy, usb_busy;
  logic [COORD_W-1:0] fb_wr_x, fb_wr_y;
  logic [7:0] fb_wr_data;
  pix_t fb_rd = '0;
  logic i2c_start = 0, i2c_read = 0, i2c_busy, i2c_done, i2c_ack_err, i2c_arb_lost;
  logic [6:0] i2c_dev = 7'h30;
  logic [7:0] i2c_reg = 0, i2c_wdata = 0, i2c_rdata;
  logic scl, sda, m_scl_oe, m_sda_oe, s_scl_oe, s_sda_oe;
  int   stretches, slave_writes;
  logic usb_wr_launch = 0, usb_rd_launch = 0, usb_wr_done, usb_rd_done, usb_src_valid = 0, usb_src_ready;
  logic [23:0] usb_wr_words = 0;
  logic [15:0] usb_rd_word, usb_src_data, usb_fd_i = 0, usb_fd_o;
  logic [3:0] usb_flags_n = 4'b1011;
  logic usb_sloe_n, usb_slrd_n, usb_slwr_n, usb_pktend_n, usb_fd_oe;
  logic [1:0] usb_fifoadr;

  assign scl = !(m_scl_oe | s_scl_oe);
  assign sda = !(m_sda_oe | s_sda_oe);

  blob_recognition_top dut (
    .clk, .rst_n, .mode, .cap_enable, .cam_power_down, .delta, .cand_k, .cand_idx,
    .cand_count, .cand_x0, .cand_y0, .cand_kout, .locate_done, .face_done, .face_found,
    .face_id_out, .face_black_dots, .face_white_dots, .label_overflow, .pipe_busy, .labels_ready,
    .frame_cnt,
    .cam_pclk(pclk), .cam_href(href), .cam_vsync(vsync), .cam_y, .cam_xclk(xclk), .cam_pwdn(pwdn),
    .fb_wr_valid, .fb_wr_sof, .fb_wr_eof, .fb_wr_x, .fb_wr_y, .fb_wr_data, .fb_rd,
    .i2c_start, .i2c_read, .i2c_dev, .i2c_reg, .i2c_wdata, .i2c_rdata, .i2c_busy, .i2c_done,
    .i2c_ack_err, .i2c_arb_lost, .i2c_bus_busy, .scl_i(scl), .sda_i(sda), .scl_oe(m_scl_oe), .sda_oe(m_sda_oe),
    .ifclk, .usb_wr_launch, .usb_wr_words, .usb_rd_launch, .usb_wr_done, .usb_rd_done, .usb_busy,
    .usb_rd_word, .usb_src_valid, .usb_src_data, .usb_src_ready, .usb_flags_n, .usb_sloe_n,
    .usb_slrd_n, .usb_slwr_n, .usb_pktend_n, .usb_fifoadr, .usb_fd_i, .usb_fd_o, .usb_fd_oe);

  i2c_slave_model #(.ADDR(7'h30)) u_sccb (.clk, .scl, .sda, .scl_oe(s_scl_oe), .sda_oe(s_sda_oe),
    .stretches, .writes(slave_writes));

  int checks = 0, failures = 0;
  int n_eq = 0, n_bw = 0, n_cand = 0, n_face = 0, n_reject = 0, n_full = 0, n_pktend = 0;
  int n_usb_rd = 0, n_fb = 0, n_eof = 0;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- scene ----------------
  logic [7:0] scene [H][W];
  int face_ozone, face_idv;
  // face window: 32*FK pixels at (FX0, FY0); layout drawn in 96 units
  localparam int FK = 10, FX0 = 80, FY0 = 80;

  function automatic bit in_box(int u, int v, int x0, int x1, int y0, int y1);
    return u >= x0 && u <= x1 && v >= y0 && v <= y1;
  endfunction

  // 1 = white, in 96x96 units
  function automatic bit face_px(int u, int v, int ozone, int id);
    int dx0 [12] = '{26, 66, 66, 26, 46, 66, 46, 26, 26, 26, 66, 66};
    int dy0 [12] = '{26, 26, 66, 66, 26, 46, 66, 46, 36, 56, 36, 56};
    int wx0 [8]  = '{36, 56, 56, 36, 46, 56, 46, 36};
    int wy0 [8]  = '{36, 36, 56, 56, 36, 46, 56, 46};
    bit px;
    px = in_box(u, v, 23, 72, 23, 72);
    if (in_box(u, v, 33, 62, 33, 62)) begin
      int fam = (ozone < 4) ? 0 : 4;
      px = 0;
      for (int b = 0; b < 4; b++) if (id[b]) begin
        int p = fam + (b + ozone % 4) % 4;
        if (in_box(u, v, wx0[p], wx0[p] + 3, wy0[p], wy0[p] + 3)) px = 1;
      end
    end
    for (int d = 0; d < 12; d++) begin
      int x0 = dx0[d], x1 = dx0[d] + 3, y0 = dy0[d], y1 = dy0[d] + 3;
      if (d == ozone) begin   // the origin is longer along its band
        case (d)
          0, 1:    y1 += 3;
          2, 3:    y0 -= 3;
          4, 6:    x1 += 3;
          default: y1 += 3;
        endcase
      end
      if (in_box(u, v, x0, x1, y0, y1)) px = 0;
    end
    return px;
  endfunction

  task automatic draw_scene();
    for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) scene[y][x] = WHT;
    for (int y = 0; y < 32 * FK; y++) for (int x = 0; x < 32 * FK; x++)
      scene[FY0 + y][FX0 + x] = face_px(x * 3 / FK, y * 3 / FK, face_ozone, face_idv) ? WHT : BLK;
    for (int y = 160; y < 224; y++) for (int x = 480; x < 544; x++) scene[y][x] = BLK;  // plain square
    for (int y = 320; y < 360; y++) for (int x = 440; x < 620; x++) scene[y][x] = BLK; // bar
  endtask

  // ---------------- camera model ----------------
  task automatic send_frame();
    @(negedge pclk); vsync <= 1;
    repeat (4) @(negedge pclk); vsync <= 0;
    repeat (10) @(negedge pclk);
    for (int r = 0; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        href <= 1; cam_y <= {scene[r][c], 2'b00};
        @(negedge pclk);
      end
      href <= 0;
      if (r == H - 1) t_last_pix = cyc;
      repeat (20) @(negedge pclk);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (fb_wr_valid) begin
      n_fb++;
      if (fb_wr_eof) n_eof++;
      if (fb_wr_data != scene[fb_wr_y][fb_wr_x]) begin
        failures++;
        if (failures < 5) $display("frame buffer write %0d,%0d = %0d", fb_wr_x, fb_wr_y, fb_wr_data);
      end
    end
    if (dut.d_valid && dut.d_eq_v != 0) n_eq++;
    if (dut.d_valid && dut.d_bw_v != 0) n_bw++;
  end

  // ---------------- frame buffer read (candidate window) ----------------
  task automatic stream_window(int x0, int y0, int k);
    int s = 32 * k;
    for (int r = 0; r < s; r++) for (int c = 0; c < s; c++) begin
      fb_rd.valid <= 1; fb_rd.sof <= (r == 0 && c == 0); fb_rd.eof <= (r == s-1 && c == s-1);
      fb_rd.data <= scene[y0 + r][x0 + c];
      @(posedge clk);
    end
    fb_rd <= '0;
  endtask

  // ---------------- FX2 model ----------------
  int in_words = 0, in_pkt_words = 0, full_cnt = 0, host_pkts [$];
  logic [15:0] host_rx [$];
  logic [15:0] next_word = 0;
  localparam int PKT = 256;
  always @(negedge ifclk) begin
    usb_flags_n[1] <= in_words < PKT;              // FLAGB: EP6 full after one packet
    usb_flags_n[2] <= 1'b1;                        // FLAGC: EP2 never empty
    usb_fd_i       <= 16'hC0DE;
    usb_src_valid  <= 1'b1;
  end
  assign usb_src_data = next_word;
  always @(posedge ifclk) if (rst_n) begin
    if (!usb_slwr_n) begin
      if (!usb_flags_n[1] || usb_fifoadr != 2'b10) begin failures++; $display("write to a full FIFO"); end
      host_rx.push_back(usb_fd_o); in_words++; in_pkt_words++;
      next_word <= next_word + 1;
      if (in_pkt_words == PKT) begin host_pkts.push_back(PKT); in_pkt_words = 0; end
    end
    if (!usb_pktend_n) begin n_pktend++; host_pkts.push_back(in_pkt_words); in_pkt_words = 0; end
    if (!usb_slrd_n) n_usb_rd++;
    if (usb_busy && usb_src_valid && !usb_flags_n[1]) n_full++;
    // the host collects the FIFO contents 40 clocks after it has become full
    full_cnt = (in_words >= PKT) ? full_cnt + 1 : 0;
    if (full_cnt == 40) in_words = 0;
  end

  initial begin
    int cx, cy;
    face_ozone = $urandom_range(0, 7);
    face_idv   = $urandom_range(1, 15);
    draw_scene();
    repeat (5) @(posedge clk); rst_n = 1; repeat (5) @(posedge clk);

    // 1. camera registers
    i2c_reg <= 8'h12; i2c_wdata <= 8'h5C; i2c_read <= 0; i2c_start <= 1; @(posedge clk); i2c_start <= 0;
    while (!i2c_done) @(posedge clk);
    i2c_read <= 1; i2c_start <= 1; @(posedge clk); i2c_start <= 0;
    while (!i2c_done) @(posedge clk);
    check(!i2c_ack_err && i2c_rdata == 8'h5C && u_sccb.regs[8'h12] == 8'h5C, "SCCB write and read back");

    // 2. locate
    mode <= 0; cap_enable <= 1;
    fork
      send_frame();
      begin
        while (!locate_done) @(posedge clk);
        t_located = cyc;
      end
    join
    // signed: the last rows of the camera frame are not used by the 160x120
    // image, so location can end before the camera frame does
    $display("locate: done %0d clocks after the last camera pixel", int'(t_located) - int'(t_last_pix));
    check(int'(t_located) - int'(t_last_pix) < 410000, "candidate location within 4.1 ms");
    check(n_fb == W * H && n_eof == 1 && frame_cnt == 1, $sformatf("frame captured (%0d pixels)", n_fb));
    check(!label_overflow, "no label overflow in the 160x120 image");
    $display("locate: %0d candidates", cand_count);
    check(cand_count == 2, $sformatf("%0d candidates, expected 2", cand_count));
    for (int i = 0; i < int'(cand_count); i++) begin
      cand_idx = 3'(i); #1;
      $display("  candidate %0d: %0d,%0d side %0d", i, cand_x0, cand_y0, 32 * cand_kout);
      // 3. identify
      mode <= 1; cand_k <= cand_kout;
      @(posedge clk);
      stream_window(int'(cand_x0), int'(cand_y0), int'(cand_kout));
      t_win_end = cyc;
      while (!face_done) @(posedge clk);
      t_face = cyc;
      $display("  identify: done %0d clocks after the last window pixel", t_face - t_win_end);
      $display("  face: found %0b id %0d, %0d black dots, %0d white dots", face_found, face_id_out,
        face_black_dots, face_white_dots);
      if (int'(cand_x0) + 16 * int'(cand_kout) < 400) begin   // window centre left of the square
        n_cand++;
        // window centred on the heart within 8 pixels; side rounded up from 12x the heart
        cx = int'(cand_x0) + 16 * int'(cand_kout); cy = int'(cand_y0) + 16 * int'(cand_kout);
        check((cand_kout == FK || cand_kout == FK + 1) && cx >= FX0 + 16 * FK - 8 && cx <= FX0 + 16 * FK + 8
              && cy >= FY0 + 16 * FK - 8 && cy <= FY0 + 16 * FK + 8, "face candidate window");
        check(face_found && face_id_out == 4'(face_idv) && face_black_dots == 12,
          $sformatf("face ID %0d expected %0d (origin zone %0d)", face_id_out, face_idv, face_ozone));
        check(t_face - t_win_end < 45000, "face recognised within 450 us");
        if (face_found && face_id_out == 4'(face_idv)) n_face++;
      end else begin
        n_cand++;
        check(!face_found, "plain square rejected");
        if (!face_found) n_reject++;
      end
      mode <= 0;
    end

    // 4. USB
    @(posedge ifclk);
    usb_wr_words <= 24'(PKT + PKT / 2); usb_wr_launch <= 1; @(posedge ifclk); usb_wr_launch <= 0;
    while (!usb_wr_done) @(posedge ifclk);
    usb_rd_launch <= 1; @(posedge ifclk); usb_rd_launch <= 0;
    while (!usb_rd_done) @(posedge ifclk);
    check(host_rx.size() == PKT + PKT / 2 && host_pkts.size() == 2 && host_pkts[1] == PKT / 2,
      "USB packets");
    foreach (host_rx[i]) if (host_rx[i] != 16'(i)) begin check(0, "USB data order"); break; end
    check(usb_rd_word == 16'hC0DE, "USB command word");

    // mechanisms
    check(n_eq > 0,      "label equivalences");
    check(n_bw > 0,      "black/white contacts");
    check(n_cand > 0,    "candidates");
    check(n_face > 0,    "face recognised");
    check(n_reject > 0,  "candidate rejected");
    check(stretches > 0, "SCL stretched");
    check(n_full > 0,    "USB FIFO full stall");
    check(n_pktend > 0,  "USB PKTEND");
    check(n_usb_rd > 0,  "USB read");
    $display("mechanisms: eq %0d bw %0d cand %0d face %0d reject %0d stretch %0d full %0d pktend %0d usbrd %0d",
      n_eq, n_bw, n_cand, n_face, n_reject, stretches, n_full, n_pktend, n_usb_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
