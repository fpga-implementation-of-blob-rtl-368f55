// blob_recognition_top: camera-to-face-ID datapath with its peripherals.
//
// The system recognises a printed blob face (a black heart block with up to
// four white dots, ringed by a white frame holding 12 black dots, the
// largest of which is the origin) and reports the face ID.  Two passes use
// one shared filter/labelling chain, selected by `mode`:
//
//  mode 0, locate: camera pixels (image_capture) go to the frame buffer
//    write port and, decimated to 160x120 (downscale), through Gaussian
//    smoothing, adaptive binarization, DCCL labelling and label grouping;
//    candidate_search then stores the windows that may hold a face.
//  mode 1, identify: the frame-buffer read port streams one candidate window
//    (side 32*cand_k); normalize reduces it to 96x96 and the same chain
//    labels it; face_id computes the ID.
//
// The frame buffer itself (DDR2 behind the vendor multi-port memory
// controller and its video frame buffer ports) and the processor that
// sequences the passes are outside this design: their streams and controls
// are ports here.  The I2C (SCCB) master for the camera registers and the
// USB FX2 FIFO controller stand beside the datapath with their own ports;
// the USB controller runs on the FX2's IFCLK.
// `mode`, `cand_k` and `delta` must be stable while a pass runs.  Each pass
// ends with locate_done or face_done (one-clock pulses).
// Lint note: rst_n is reported as used both synchronously and asynchronously
// because the USB controller's assertions name it in `disable iff`; all
// flops reset asynchronously.
module blob_recognition_top
  import blob_pkg::*;
#(
  parameter int MAX_CAND = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // control (processor side)
  input  logic               mode,            // 0 locate, 1 identify
  input  logic               cap_enable,
  input  logic               cam_power_down,
  input  logic signed [8:0]  delta,
  input  logic [3:0]         cand_k,          // side of the streamed candidate = 32*k
  input  logic [$clog2(MAX_CAND)-1:0] cand_idx,
  output logic [$clog2(MAX_CAND):0]   cand_count,
  output logic [COORD_W-1:0] cand_x0,
  output logic [COORD_W-1:0] cand_y0,
  output logic [3:0]         cand_kout,
  output logic               locate_done,
  output logic               face_done,
  output logic               face_found,
  output logic [3:0]         face_id_out,
  output logic [4:0]         face_black_dots,
  output logic [2:0]         face_white_dots,
  output logic               label_overflow,
  output logic               pipe_busy,       // labelling, search or recognition running
  output logic               labels_ready,    // component records of the last image readable
  output logic [15:0]        frame_cnt,
  // camera
  input  logic               cam_pclk,
  input  logic               cam_href,
  input  logic               cam_vsync,
  input  logic [9:0]         cam_y,
  output logic               cam_xclk,
  output logic               cam_pwdn,
  // frame buffer write stream (captured VGA frame)
  output logic               fb_wr_valid,
  output logic               fb_wr_sof,
  output logic [COORD_W-1:0] fb_wr_x,
  output logic [COORD_W-1:0] fb_wr_y,
  output logic [7:0]         fb_wr_data,
  output logic               fb_wr_eof,
  // frame buffer read stream (candidate window, raster order)
  input  pix_t               fb_rd,
  // I2C / SCCB
  input  logic               i2c_start,
  input  logic               i2c_read,
  input  logic [6:0]         i2c_dev,
  input  logic [7:0]         i2c_reg,
  input  logic [7:0]         i2c_wdata,
  output logic [7:0]         i2c_rdata,
  output logic               i2c_busy,
  output logic               i2c_done,
  output logic               i2c_ack_err,
  output logic               i2c_arb_lost,
  output logic               i2c_bus_busy,
  input  logic               scl_i,
  input  logic               sda_i,
  output logic               scl_oe,
  output logic               sda_oe,
  // USB FX2 slave FIFO
  input  logic               ifclk,
  input  logic               usb_wr_launch,
  input  logic [23:0]        usb_wr_words,
  input  logic               usb_rd_launch,
  output logic               usb_wr_done,
  output logic               usb_rd_done,
  output logic               usb_busy,
  output logic [15:0]        usb_rd_word,
  input  logic               usb_src_valid,
  input  logic [15:0]        usb_src_data,
  output logic               usb_src_ready,
  input  logic [3:0]         usb_flags_n,     // FLAGA..FLAGD
  output logic               usb_sloe_n,
  output logic               usb_slrd_n,
  output logic               usb_slwr_n,
  output logic               usb_pktend_n,
  output logic [1:0]         usb_fifoadr,
  input  logic [15:0]        usb_fd_i,
  output logic [15:0]        usb_fd_o,
  output logic               usb_fd_oe
);

  localparam int PAIR_DEPTH = 256;

  // ---------------- capture and decimation ----------------
  logic               cap_valid, cap_sof, cap_eof;
  logic [COORD_W-1:0] cap_x, cap_y;
  logic [9:0]         cap_data;

  image_capture u_cap (
    .clk, .rst_n, .enable(cap_enable), .power_down(cam_power_down),
    .cam_pclk, .cam_href, .cam_vsync, .cam_y, .cam_xclk, .cam_pwdn,
    .pix_valid(cap_valid), .pix_sof(cap_sof), .pix_eof(cap_eof),
    .pix_x(cap_x), .pix_y(cap_y), .pix_data(cap_data), .frame_cnt
  );

  assign fb_wr_valid = cap_valid;
  assign fb_wr_sof   = cap_sof;
  assign fb_wr_x     = cap_x;
  assign fb_wr_y     = cap_y;
  assign fb_wr_data  = cap_data[9:2];
  assign fb_wr_eof   = cap_eof;

  pix_t qq;
  downscale u_down (
    .clk, .rst_n, .in_valid(cap_valid && !mode), .in_sof(cap_sof), .in_data(cap_data), .out(qq)
  );

  // ---------------- candidate normalization ----------------
  pix_t nrm;
  pix_t fb_rd_m;
  always_comb begin
    fb_rd_m = fb_rd;
    fb_rd_m.valid = fb_rd.valid && mode;
  end
  normalize u_norm (.clk, .rst_n, .k(cand_k), .in(fb_rd_m), .out(nrm));

  // ---------------- shared filter and labelling chain ----------------
  pix_t               src, gs, bz;
  logic [COORD_W-1:0] w0;
  assign src = mode ? nrm : qq;
  assign w0  = mode ? COORD_W'(96) : COORD_W'(160);

  gaussian_smooth u_gauss (.clk, .rst_n, .width(w0), .in(src), .out(gs));
  binarize        u_bin   (.clk, .rst_n, .width(w0 - COORD_W'(4)), .delta, .in(gs), .out(bz));

  logic               d_valid, d_sof, d_eof, d_ovf;
  logic [COORD_W-1:0] d_x, d_y;
  tlabel_t            d_label;
  tlabel_t            d_nb [4];
  logic [3:0]         d_eq_v, d_bw_v;

  dccl u_dccl (
    .clk, .rst_n, .width(w0 - COORD_W'(14)), .in(bz),
    .out_valid(d_valid), .out_sof(d_sof), .out_eof(d_eof), .out_x(d_x), .out_y(d_y),
    .out_label(d_label), .out_nb(d_nb), .out_eq_v(d_eq_v), .out_bw_v(d_bw_v), .overflow(d_ovf)
  );

  logic    lg_busy, lg_ready, lg_done, lg_ovf;
  tlabel_t lg_rd_label, cs_rd_label, fi_rd_label;
  comp_t   lg_comp;
  logic [$clog2(PAIR_DEPTH):0]   lg_bw_count;
  logic [$clog2(PAIR_DEPTH)-1:0] lg_bw_idx;
  tlabel_t lg_bw_black, lg_bw_white;

  label_group #(.PAIR_DEPTH(PAIR_DEPTH)) u_lg (
    .clk, .rst_n,
    .in_valid(d_valid), .in_sof(d_sof), .in_eof(d_eof), .in_x(d_x), .in_y(d_y),
    .in_label(d_label), .in_nb(d_nb), .in_eq_v(d_eq_v), .in_bw_v(d_bw_v),
    .busy(lg_busy), .ready(lg_ready), .done(lg_done), .overflow(lg_ovf),
    .rd_label(lg_rd_label), .rd_comp(lg_comp),
    .bw_count(lg_bw_count), .bw_idx(lg_bw_idx), .bw_black(lg_bw_black), .bw_white(lg_bw_white)
  );
  assign lg_rd_label    = mode ? fi_rd_label : cs_rd_label;
  assign label_overflow = lg_ovf | d_ovf;

  // ---------------- candidate search (mode 0) ----------------
  logic cs_busy;
  candidate_search #(.MAX_CAND(MAX_CAND)) u_cs (
    .clk, .rst_n, .start(lg_done && !mode), .busy(cs_busy), .done(locate_done),
    .rd_label(cs_rd_label), .rd_comp(lg_comp),
    .cand_count, .cand_idx, .cand_x0, .cand_y0, .cand_k(cand_kout)
  );

  // ---------------- face ID recognition (mode 1) ----------------
  logic fi_busy;
  face_id #(.PAIR_DEPTH(PAIR_DEPTH)) u_face (
    .clk, .rst_n, .start(lg_done && mode), .busy(fi_busy), .done(face_done),
    .found(face_found), .id_out(face_id_out),
    .n_black_dots(face_black_dots), .n_white_dots(face_white_dots),
    .rd_label(fi_rd_label), .rd_comp(lg_comp),
    .bw_count(lg_bw_count), .bw_idx(lg_bw_idx), .bw_black(lg_bw_black), .bw_white(lg_bw_white)
  );

  assign pipe_busy    = lg_busy | cs_busy | fi_busy;
  assign labels_ready = lg_ready;

  // ---------------- peripherals ----------------
  i2c_master u_i2c (
    .clk, .rst_n, .cmd_start(i2c_start), .cmd_read(i2c_read), .dev_addr(i2c_dev),
    .reg_addr(i2c_reg), .wr_data(i2c_wdata), .rd_data(i2c_rdata), .busy(i2c_busy),
    .done(i2c_done), .ack_err(i2c_ack_err), .arb_lost(i2c_arb_lost), .bus_busy(i2c_bus_busy),
    .scl_i, .sda_i, .scl_oe, .sda_oe
  );

  logic usb_wr_busy, usb_rd_busy;
  assign usb_busy = usb_wr_busy | usb_rd_busy;
  usb_fifo_ctrl u_usb (
    .ifclk, .rst_n, .wr_launch(usb_wr_launch), .wr_words(usb_wr_words), .rd_launch(usb_rd_launch),
    .wr_busy(usb_wr_busy), .wr_done(usb_wr_done), .rd_busy(usb_rd_busy), .rd_done(usb_rd_done),
    .rd_word(usb_rd_word), .src_valid(usb_src_valid), .src_data(usb_src_data),
    .src_ready(usb_src_ready),
    .flaga_n(usb_flags_n[0]), .flagb_n(usb_flags_n[1]), .flagc_n(usb_flags_n[2]),
    .flagd_n(usb_flags_n[3]),
    .sloe_n(usb_sloe_n), .slrd_n(usb_slrd_n), .slwr_n(usb_slwr_n), .pktend_n(usb_pktend_n),
    .fifoadr(usb_fifoadr), .fd_i(usb_fd_i), .fd_o(usb_fd_o), .fd_oe(usb_fd_oe)
  );

endmodule
