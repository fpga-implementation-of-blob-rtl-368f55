// face_id: face ID recognition on the labelled 96x96 candidate image.
//
// The source's recognition flow, run by a state machine over the records
// and the BW_EQ (black/white contact) list of label_group:
//   1. heart block: a black square component centred near the image centre
//      (within BIAS); the largest such component is taken;
//   2. white frame: a white component in contact with the heart block whose
//      box surrounds the heart block and whose centre is within BIAS of the
//      heart centre;
//   3. black dots: black components in contact with the white frame whose
//      box lies inside the frame box; there must be exactly 12, and the
//      largest is the origin of the face;
//   4. white dots: white components in contact with the heart block lying
//      inside its box (up to 4 are used);
//   5. ID = W1*1 + W2*2 + W3*4 + W4*8: the origin zone (8 zones around the
//      heart block) selects corner zones (origin in a corner) or edge zones
//      (origin at a side) for the white dots, and a look-up table gives the
//      position P1..P4 of each dot, counted clockwise from the corner or
//      edge nearest the origin.
// No ID (found = 0) is reported when a step fails.  Each label is checked
// once per step through a visited mask, because the BW_EQ list may hold the
// same pair of components several times.  Thresholds (BIAS, heart size,
// "square" as |w-h|*4 <= max(w,h)) are this design's choices.
// Timing: start after label_group is ready; about 2^LBL_W + 3*bw_count
// clocks; done pulses with found/id_out valid until the next start.
// Lint note: each record copy uses only some fields of blob_pkg::comp_t
// (centre of the heart hb and origin oc, bounds of the frame fc), so the
// other bits of hb/fc/oc are reported unused; the record type is shared.
module face_id
  import blob_pkg::*;
#(
  parameter int IMG_C     = 41,   // image centre in label coordinates ((96-14)/2)
  parameter int BIAS      = 8,
  parameter int MIN_HEART = 12,
  parameter int MAX_HEART = 48,
  parameter int PAIR_DEPTH = 256
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          found,
  output logic [3:0]                    id_out,
  output logic [4:0]                    n_black_dots,
  output logic [2:0]                    n_white_dots,
  // label_group read ports
  output tlabel_t                       rd_label,
  input  comp_t                         rd_comp,
  input  logic [$clog2(PAIR_DEPTH):0]   bw_count,
  output logic [$clog2(PAIR_DEPTH)-1:0] bw_idx,
  input  tlabel_t                       bw_black,
  input  tlabel_t                       bw_white
);

  localparam int PW = $clog2(PAIR_DEPTH);
  typedef enum logic [2:0] {F_IDLE, F_HEART, F_FRAME, F_BDOTS, F_WDOTS, F_ID, F_END} fstate_e;
  fstate_e st;

  logic [LBL_W-1:0]   l;
  logic [PW:0]        pi;
  logic               vis [2**LBL_W];
  tlabel_t            heart, frame;
  comp_t              hc, fc, oc;
  logic               have;
  logic [17:0]        best;
  logic [COORD_W-1:0] dx_c [4], dy_c [4];

  // record currently looked at
  always_comb begin
    unique case (st)
      F_HEART: rd_label = {1'b1, l};
      F_BDOTS: rd_label = bw_black;
      default: rd_label = bw_white;
    endcase
  end
  assign bw_idx = pi[PW-1:0];

  function automatic logic [COORD_W-1:0] adiff(logic [COORD_W-1:0] a, logic [COORD_W-1:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [COORD_W-1:0] w, h, big, sq;
  logic heart_ok, frame_ok, bdot_ok, wdot_ok, pairs_left;
  always_comb begin
    w   = rd_comp.max_x - rd_comp.min_x + 1'b1;
    h   = rd_comp.max_y - rd_comp.min_y + 1'b1;
    big = (w > h) ? w : h;
    sq  = (w > h) ? w - h : h - w;
    heart_ok = rd_comp.root && (sq * 4 <= big)
            && big >= COORD_W'(MIN_HEART) && big <= COORD_W'(MAX_HEART)
            && adiff(rd_comp.cx, COORD_W'(IMG_C)) <= COORD_W'(BIAS)
            && adiff(rd_comp.cy, COORD_W'(IMG_C)) <= COORD_W'(BIAS);
    frame_ok = rd_comp.root && bw_black == heart && !vis[bw_white[LBL_W-1:0]]
            && rd_comp.min_x < hc.min_x && rd_comp.max_x > hc.max_x
            && rd_comp.min_y < hc.min_y && rd_comp.max_y > hc.max_y
            && adiff(rd_comp.cx, hc.cx) <= COORD_W'(BIAS)
            && adiff(rd_comp.cy, hc.cy) <= COORD_W'(BIAS);
    bdot_ok  = rd_comp.root && bw_white == frame && bw_black != heart
            && !vis[bw_black[LBL_W-1:0]]
            && rd_comp.min_x > fc.min_x && rd_comp.max_x < fc.max_x
            && rd_comp.min_y > fc.min_y && rd_comp.max_y < fc.max_y;
    wdot_ok  = rd_comp.root && bw_black == heart && bw_white != frame
            && !vis[bw_white[LBL_W-1:0]]
            && rd_comp.min_x > hc.min_x && rd_comp.max_x < hc.max_x
            && rd_comp.min_y > hc.min_y && rd_comp.max_y < hc.max_y;
    pairs_left = pi < bw_count;
  end

  // origin zone of the origin record oc around the heart block
  ozone_e oz;
  always_comb begin
    logic [1:0] zx, zy;   // 0 low, 1 mid, 2 high
    zx = (oc.cx < hc.min_x) ? 2'd0 : (oc.cx > hc.max_x) ? 2'd2 : 2'd1;
    zy = (oc.cy < hc.min_y) ? 2'd0 : (oc.cy > hc.max_y) ? 2'd2 : 2'd1;
    unique case ({zy, zx})
      {2'd0, 2'd0}: oz = Z_TOP_LEFT;
      {2'd0, 2'd1}: oz = Z_TOP_MID;
      {2'd0, 2'd2}: oz = Z_TOP_RIGHT;
      {2'd1, 2'd0}: oz = Z_MID_LEFT;
      {2'd1, 2'd2}: oz = Z_MID_RIGHT;
      {2'd2, 2'd0}: oz = Z_BOTTOM_LEFT;
      {2'd2, 2'd1}: oz = Z_BOTTOM_MID;
      {2'd2, 2'd2}: oz = Z_BOTTOM_RIGHT;
      default:      oz = Z_CENTRE;
    endcase
  end

  // zone of a white dot; corner zones for corner origins, edge zones otherwise
  function automatic dzone_e dot_zone(logic [COORD_W-1:0] x, logic [COORD_W-1:0] y,
                                      comp_t hb, logic corner);
    logic left, up;
    left = x < hb.cx;
    up   = y < hb.cy;
    if (corner) return up ? (left ? D_UP_LEFT : D_UP_RIGHT) : (left ? D_DOWN_LEFT : D_DOWN_RIGHT);
    if (adiff(x, hb.cx) > adiff(y, hb.cy)) return left ? D_LEFT_EDGE : D_RIGHT_EDGE;
    return up ? D_TOP_EDGE : D_BOTTOM_EDGE;
  endfunction

  // look-up table: position (P1..P4 -> 0..3) of a dot zone for an origin zone.
  // Clockwise order of corners UL, UR, DR, DL and of edges TOP, RIGHT, BOTTOM, LEFT.
  function automatic logic [2:0] pos_lut(ozone_e o, dzone_e d);
    logic [1:0] os, ds;
    logic       oc_corner, dc_corner;
    unique case (o)
      Z_TOP_LEFT:     begin os = 2'd0; oc_corner = 1'b1; end
      Z_TOP_RIGHT:    begin os = 2'd1; oc_corner = 1'b1; end
      Z_BOTTOM_RIGHT: begin os = 2'd2; oc_corner = 1'b1; end
      Z_BOTTOM_LEFT:  begin os = 2'd3; oc_corner = 1'b1; end
      Z_TOP_MID:      begin os = 2'd0; oc_corner = 1'b0; end
      Z_MID_RIGHT:    begin os = 2'd1; oc_corner = 1'b0; end
      Z_BOTTOM_MID:   begin os = 2'd2; oc_corner = 1'b0; end
      Z_MID_LEFT:     begin os = 2'd3; oc_corner = 1'b0; end
      default:        begin os = 2'd0; oc_corner = 1'b0; end
    endcase
    unique case (d)
      D_UP_LEFT:     begin ds = 2'd0; dc_corner = 1'b1; end
      D_UP_RIGHT:    begin ds = 2'd1; dc_corner = 1'b1; end
      D_DOWN_RIGHT:  begin ds = 2'd2; dc_corner = 1'b1; end
      D_DOWN_LEFT:   begin ds = 2'd3; dc_corner = 1'b1; end
      D_TOP_EDGE:    begin ds = 2'd0; dc_corner = 1'b0; end
      D_RIGHT_EDGE:  begin ds = 2'd1; dc_corner = 1'b0; end
      D_BOTTOM_EDGE: begin ds = 2'd2; dc_corner = 1'b0; end
      default:       begin ds = 2'd3; dc_corner = 1'b0; end
    endcase
    // bit 2: valid (zone family matches the origin)
    return {(o != Z_CENTRE) && (oc_corner == dc_corner), ds - os};
  endfunction

  logic corner_origin;
  assign corner_origin = (oz == Z_TOP_LEFT) || (oz == Z_TOP_RIGHT) ||
                         (oz == Z_BOTTOM_LEFT) || (oz == Z_BOTTOM_RIGHT);

  logic [3:0] id_calc;
  always_comb begin
    id_calc = '0;
    for (int i = 0; i < 4; i++) begin
      logic [2:0] p;
      p = pos_lut(oz, dot_zone(dx_c[i], dy_c[i], hc, corner_origin));
      if (3'(i) < n_white_dots && p[2]) id_calc[p[1:0]] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= F_IDLE; busy <= 1'b0; done <= 1'b0; found <= 1'b0; id_out <= '0;
      l <= '0; pi <= '0; heart <= '0; frame <= '0; hc <= '0; fc <= '0; oc <= '0;
      have <= 1'b0; best <= '0; n_black_dots <= '0; n_white_dots <= '0;
      for (int i = 0; i < 2**LBL_W; i++) vis[i] <= 1'b0;
      for (int i = 0; i < 4; i++) begin dx_c[i] <= '0; dy_c[i] <= '0; end
    end else begin
      done <= 1'b0;
      unique case (st)
        F_IDLE: if (start) begin
          st <= F_HEART; busy <= 1'b1; found <= 1'b0; id_out <= '0;
          l <= LBL_W'(1); have <= 1'b0; best <= '0;
          n_black_dots <= '0; n_white_dots <= '0;
        end
        F_HEART: begin
          if (heart_ok && rd_comp.count > best) begin
            have <= 1'b1; best <= rd_comp.count; heart <= rd_label; hc <= rd_comp;
          end
          l <= l + 1'b1;
          if (l == '1) begin
            st <= (have || (heart_ok && rd_comp.count > best)) ? F_FRAME : F_END;
            pi <= '0; have <= 1'b0; best <= '0;
            for (int i = 0; i < 2**LBL_W; i++) vis[i] <= 1'b0;
          end
        end
        F_FRAME: begin
          if (pairs_left) begin
            if (frame_ok && rd_comp.count > best) begin
              have <= 1'b1; best <= rd_comp.count; frame <= rd_label; fc <= rd_comp;
            end
            if (rd_comp.root && bw_black == heart) vis[bw_white[LBL_W-1:0]] <= 1'b1;
            pi <= pi + 1'b1;
          end else begin
            st <= have ? F_BDOTS : F_END;
            pi <= '0; best <= '0;
            for (int i = 0; i < 2**LBL_W; i++) vis[i] <= 1'b0;
          end
        end
        F_BDOTS: begin
          if (pairs_left) begin
            if (bdot_ok) begin
              vis[bw_black[LBL_W-1:0]] <= 1'b1;
              n_black_dots <= n_black_dots + 1'b1;
              if (rd_comp.count > best) begin best <= rd_comp.count; oc <= rd_comp; end
            end
            pi <= pi + 1'b1;
          end else begin
            st <= (n_black_dots == 5'd12) ? F_WDOTS : F_END;
            pi <= '0;
            for (int i = 0; i < 2**LBL_W; i++) vis[i] <= 1'b0;
          end
        end
        F_WDOTS: begin
          if (pairs_left) begin
            if (wdot_ok) begin
              vis[bw_white[LBL_W-1:0]] <= 1'b1;
              if (n_white_dots < 3'd4) begin
                dx_c[n_white_dots[1:0]] <= rd_comp.cx;
                dy_c[n_white_dots[1:0]] <= rd_comp.cy;
                n_white_dots <= n_white_dots + 1'b1;
              end
            end
            pi <= pi + 1'b1;
          end else st <= F_ID;
        end
        F_ID: begin
          id_out <= id_calc;
          found   <= (oz != Z_CENTRE);
          st      <= F_END;
        end
        F_END: begin
          st <= F_IDLE; busy <= 1'b0; done <= 1'b1;
        end
        default: st <= F_IDLE;
      endcase
    end
  end

endmodule
