// candidate_search: heart-block candidates of the 160x120 image.
//
// After label_group has resolved a QQVGA frame, this block walks all black
// component records and keeps those that can be the black heart block of a
// blob face.  Following the source: the component must be square (the
// width/height ratio is checked), of plausible size (background noise that
// is too big or too small is ignored), and centred so that the whole face
// can be cropped from the 640x480 image.  The face around the heart block
// is about three times its side, so the candidate window in the VGA image
// is 4 * 3 * side, rounded up to the next size of the normalization list
// (32*k, k = 3..15).  Candidate position and size are stored in a buffer of
// MAX_CAND entries that the normalization step reads one by one.
//
// Design choices: "square" means |w-h|*4 <= max(w,h); the side limits are
// MIN_SIDE..MAX_SIDE QQVGA pixels; COORD_OFS (7) converts label coordinates
// back to QQVGA coordinates (the 5x5 and 11x11 filters trim 2+5 pixels);
// candidates are kept in label order and extra ones are dropped.
// Timing: start pulses after label_group is ready; the walk takes one clock
// per black label (2^LBL_W clocks); done pulses at the end.
// Lint note: the pixel count of a record is read but not needed here, so
// those bits of rd_comp are reported unused; the record type is shared.
module candidate_search
  import blob_pkg::*;
#(
  parameter int MAX_CAND  = 8,
  parameter int MIN_SIDE  = 8,
  parameter int MAX_SIDE  = 40,
  parameter int COORD_OFS = 7,
  parameter int IMG_W     = 640,
  parameter int IMG_H     = 480
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  output logic                         busy,
  output logic                         done,
  // label_group read port
  output tlabel_t                      rd_label,
  input  comp_t                        rd_comp,
  // candidate buffer
  output logic [$clog2(MAX_CAND):0]    cand_count,
  input  logic [$clog2(MAX_CAND)-1:0]  cand_idx,
  output logic [COORD_W-1:0]           cand_x0,   // VGA top-left corner
  output logic [COORD_W-1:0]           cand_y0,
  output logic [3:0]                   cand_k     // side = 32*k
);

  localparam int CW = $clog2(MAX_CAND);

  logic [COORD_W-1:0] bx [MAX_CAND], by [MAX_CAND];
  logic [3:0]         bk [MAX_CAND];
  logic [LBL_W-1:0]   l;
  logic [CW:0]        n;

  assign rd_label = {1'b1, l};

  logic [COORD_W-1:0] w, h, big, diff;
  logic [11:0]        vside, half, vcx, vcy;
  logic [3:0]         kk;
  logic               ok;
  always_comb begin
    w    = rd_comp.max_x - rd_comp.min_x + 1'b1;
    h    = rd_comp.max_y - rd_comp.min_y + 1'b1;
    big  = (w > h) ? w : h;
    diff = (w > h) ? w - h : h - w;
    vside = 12'(big) * 12'd12;                        // 4 (VGA) * 3 (face/heart)
    kk    = 4'((vside + 12'd31) >> 5);
    if (kk < 4'd3) kk = 4'd3;
    half  = {3'b0, kk, 5'b0} >> 1;
    vcx   = 12'(rd_comp.cx + COORD_W'(COORD_OFS)) << 2;
    vcy   = 12'(rd_comp.cy + COORD_W'(COORD_OFS)) << 2;
    ok = rd_comp.root
      && (12'(diff) * 12'd4 <= 12'(big))
      && (big >= COORD_W'(MIN_SIDE)) && (big <= COORD_W'(MAX_SIDE))
      && (vcx >= half) && (vcx + half <= 12'(IMG_W))
      && (vcy >= half) && (vcy + half <= 12'(IMG_H));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; l <= '0; n <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; l <= LBL_W'(1); n <= '0;
      end else if (busy) begin
        if (ok && n < (CW+1)'(MAX_CAND)) begin
          bx[n[CW-1:0]] <= COORD_W'(vcx - half);
          by[n[CW-1:0]] <= COORD_W'(vcy - half);
          bk[n[CW-1:0]] <= kk;
          n <= n + 1'b1;
        end
        l <= l + 1'b1;
        if (l == '1) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

  assign cand_count = n;
  assign cand_x0    = bx[cand_idx];
  assign cand_y0    = by[cand_idx];
  assign cand_k     = bk[cand_idx];

endmodule
