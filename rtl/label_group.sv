// label_group: collects the DCCL label stream into per-component records.
//
// The source's Label Group stores, instead of every labelled pixel, the
// bounding box (min/max x and y), the coordinate sums for the centre
// (x_c = sum x / N, y_c = sum y / N) and the equivalent labels of every
// label, with separate processing for black and white components, and
// keeps the BW_EQ (black/white contact) information for face recognition.
// This module does that in four phases:
//
//  COLLECT  one DCCL pixel per clock: the record of the pixel's label is
//           updated (compare for the box, add for the sums and count).
//           Equivalence and contact pairs are de-duplicated against a
//           32-entry queue of recent pairs and appended, one per clock, to
//           the EQ list or the BW_EQ list (PAIR_DEPTH entries each).
//  RESOLVE  (after the eof pixel) repeated passes over the EQ list set both
//           labels of each pair and their parents to the smaller parent,
//           each pass followed by a flatten sweep parent[l]=parent[parent[l]];
//           passes repeat until one changes nothing.  Every label then
//           points at the smallest label of its component.
//  MERGE    each non-root record is folded into its root record.
//  CENTRE   for every root the centre is computed by a 9-step shift/subtract
//           divider (x and y together).
//
// Then `done` pulses and `ready` stays high until the next sof.  Records are
// read combinationally through rd_label/rd_comp; BW_EQ pairs through
// bw_idx/bw_black/bw_white, already translated to root labels.  How
// equivalences are resolved, the queue, list sizes and label width are this
// design's choices; the source does not describe them.  `overflow` reports
// a full queue or list (a pair was lost).
// Lint note: the pair-kind bit of a queued equivalence entry (pe.bw) is
// not needed once the entry is in the equivalence list; it is reported unused.
module label_group
  import blob_pkg::*;
#(
  parameter int PAIR_DEPTH = 256,
  parameter int Q_DEPTH    = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  // DCCL stream
  input  logic               in_valid,
  input  logic               in_sof,
  input  logic               in_eof,
  input  logic [COORD_W-1:0] in_x,
  input  logic [COORD_W-1:0] in_y,
  input  tlabel_t            in_label,
  input  tlabel_t            in_nb [4],
  input  logic [3:0]         in_eq_v,
  input  logic [3:0]         in_bw_v,
  // results
  output logic               busy,
  output logic               ready,
  output logic               done,
  output logic               overflow,
  input  tlabel_t            rd_label,
  output comp_t              rd_comp,
  output logic [$clog2(PAIR_DEPTH):0] bw_count,
  input  logic [$clog2(PAIR_DEPTH)-1:0] bw_idx,
  output tlabel_t            bw_black,
  output tlabel_t            bw_white
);

  localparam int NL  = 2 ** (LBL_W + 1);       // records, both types
  localparam int SUM = 24;
  localparam int PW  = $clog2(PAIR_DEPTH);
  localparam int QW  = $clog2(Q_DEPTH);
  typedef logic [LBL_W-1:0] lval_t;

  typedef struct packed {
    logic    bw;        // 0: equivalence, 1: black/white contact
    tlabel_t a;         // eq: smaller label; bw: black label
    tlabel_t b;         // eq: larger label;  bw: white label
  } pair_t;

  // ---------------- record storage ----------------
  logic               used  [NL];
  lval_t              par   [NL];
  logic [COORD_W-1:0] mnx [NL], mxx [NL], mny [NL], mxy [NL], cxa [NL], cya [NL];
  logic [SUM-1:0]     sx  [NL], sy  [NL];
  logic [17:0]        cnt [NL];

  pair_t        eql [PAIR_DEPTH];
  pair_t        bwl [PAIR_DEPTH];
  logic [PW:0]  eq_n, bw_n;

  pair_t        q   [Q_DEPTH];
  logic         q_v [Q_DEPTH];      // slot holds a pair of this frame (for de-dup)
  logic [QW-1:0] q_wp, q_rp;
  logic [QW:0]   q_cnt;

  typedef enum logic [2:0] {S_IDLE, S_COLLECT, S_PASS, S_FLAT, S_MERGE, S_CDIV, S_DONE} state_e;
  state_e state;
  logic        seen_eof, changed;
  logic [PW:0] pidx;
  logic [LBL_W:0] lidx;             // walks all NL records
  logic [3:0]  dbit;
  logic [SUM-1:0] remx, remy;

  // ---------------- candidate pairs of the incoming pixel ----------------
  pair_t cand [8];
  logic  cand_ok [8];
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      cand[i].bw = 1'b0;
      cand[i].a  = (in_label < in_nb[i]) ? in_label : in_nb[i];
      cand[i].b  = (in_label < in_nb[i]) ? in_nb[i] : in_label;
      cand_ok[i] = in_valid && in_eq_v[i];
      cand[i+4].bw = 1'b1;
      cand[i+4].a  = in_label[LBL_W] ? in_label : in_nb[i];
      cand[i+4].b  = in_label[LBL_W] ? in_nb[i] : in_label;
      cand_ok[i+4] = in_valid && in_bw_v[i];
    end
    for (int i = 0; i < 8; i++) begin
      for (int j = 0; j < i; j++)
        if (cand_ok[j] && cand[j] == cand[i]) cand_ok[i] = 1'b0;
      for (int k = 0; k < Q_DEPTH; k++)
        if (!in_sof && q_v[k] && q[k] == cand[i]) cand_ok[i] = 1'b0;
    end
  end

  // ---------------- resolve helpers ----------------
  pair_t pe;
  lval_t pa, pb, pm;
  assign pe = eql[pidx[PW-1:0]];
  assign pa = par[pe.a];
  assign pb = par[pe.b];
  assign pm = (pa < pb) ? pa : pb;

  tlabel_t lroot;                    // root of record lidx
  assign lroot = {lidx[LBL_W], par[lidx]};

  function automatic logic [COORD_W-1:0] umin(logic [COORD_W-1:0] a, logic [COORD_W-1:0] b);
    return (a < b) ? a : b;
  endfunction
  function automatic logic [COORD_W-1:0] umax(logic [COORD_W-1:0] a, logic [COORD_W-1:0] b);
    return (a > b) ? a : b;
  endfunction

  logic [SUM+COORD_W-1:0] dsub;
  assign dsub = (SUM+COORD_W)'(cnt[lidx]) << dbit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; seen_eof <= 1'b0; changed <= 1'b0;
      eq_n <= '0; bw_n <= '0; q_wp <= '0; q_rp <= '0; q_cnt <= '0;
      pidx <= '0; lidx <= '0; dbit <= '0; remx <= '0; remy <= '0;
      busy <= 1'b0; ready <= 1'b0; done <= 1'b0; overflow <= 1'b0;
      for (int i = 0; i < NL; i++) begin used[i] <= 1'b0; par[i] <= lval_t'(i); end
      for (int k = 0; k < Q_DEPTH; k++) q_v[k] <= 1'b0;
    end else begin
      done <= 1'b0;

      // ---- COLLECT: record update and pair queue ----
      if (in_valid && in_sof) begin
        state <= S_COLLECT; busy <= 1'b1; ready <= 1'b0; seen_eof <= 1'b0;
        eq_n <= '0; bw_n <= '0; q_wp <= '0; q_rp <= '0; overflow <= 1'b0;
        for (int i = 0; i < NL; i++) begin used[i] <= 1'b0; par[i] <= lval_t'(i); end
        for (int k = 0; k < Q_DEPTH; k++) q_v[k] <= 1'b0;
      end
      if (in_valid && (state == S_COLLECT || in_sof)) begin
        if (in_eof) seen_eof <= 1'b1;
        used[in_label] <= 1'b1;
        if (in_sof || !used[in_label]) begin
          mnx[in_label] <= in_x; mxx[in_label] <= in_x;
          mny[in_label] <= in_y; mxy[in_label] <= in_y;
          sx[in_label]  <= SUM'(in_x); sy[in_label] <= SUM'(in_y);
          cnt[in_label] <= 18'd1;
        end else begin
          mnx[in_label] <= umin(mnx[in_label], in_x);
          mxx[in_label] <= umax(mxx[in_label], in_x);
          mny[in_label] <= umin(mny[in_label], in_y);
          mxy[in_label] <= umax(mxy[in_label], in_y);
          sx[in_label]  <= sx[in_label] + SUM'(in_x);
          sy[in_label]  <= sy[in_label] + SUM'(in_y);
          cnt[in_label] <= cnt[in_label] + 1'b1;
        end
      end

      begin : queue
        logic [QW-1:0] wp;
        logic [QW:0]   n;
        logic          pop;
        wp  = in_sof ? '0 : q_wp;
        n   = in_sof ? '0 : q_cnt;
        pop = (state == S_COLLECT) && !in_sof && (q_cnt != 0);
        if (pop) begin
          if (!q[q_rp].bw) begin
            if (eq_n < (PW+1)'(PAIR_DEPTH)) begin eql[eq_n[PW-1:0]] <= q[q_rp]; eq_n <= eq_n + 1'b1; end
            else overflow <= 1'b1;
          end else begin
            if (bw_n < (PW+1)'(PAIR_DEPTH)) begin bwl[bw_n[PW-1:0]] <= q[q_rp]; bw_n <= bw_n + 1'b1; end
            else overflow <= 1'b1;
          end
          q_rp <= q_rp + 1'b1;
          n = n - 1'b1;
        end
        for (int i = 0; i < 8; i++) begin
          if (cand_ok[i] && (state == S_COLLECT || in_sof)) begin
            if (n < (QW+1)'(Q_DEPTH)) begin
              q[wp] <= cand[i]; q_v[wp] <= 1'b1;
              wp = wp + 1'b1; n = n + 1'b1;
            end else overflow <= 1'b1;
          end
        end
        q_wp  <= wp;
        q_cnt <= n;
      end

      // ---- phase sequencing ----
      unique case (state)
        S_COLLECT: if (seen_eof && q_cnt == 0 && !in_valid) begin
          state <= S_PASS; pidx <= '0; changed <= 1'b0;
        end
        S_PASS: begin
          if (pidx == eq_n) begin
            state <= S_FLAT; lidx <= '0;
          end else begin
            if (pa != pm || pb != pm) changed <= 1'b1;
            par[pe.a] <= pm; par[pe.b] <= pm;
            par[{pe.a[LBL_W], pa}] <= pm; par[{pe.b[LBL_W], pb}] <= pm;
            pidx <= pidx + 1'b1;
          end
        end
        S_FLAT: begin
          par[lidx] <= par[{lidx[LBL_W], par[lidx]}];
          lidx <= lidx + 1'b1;
          if (lidx == (LBL_W+1)'(NL - 1)) begin
            if (changed) begin state <= S_PASS; pidx <= '0; changed <= 1'b0; end
            else begin state <= S_MERGE; lidx <= '0; end
          end
        end
        S_MERGE: begin
          if (used[lidx] && lroot != lidx) begin
            mnx[lroot] <= umin(mnx[lroot], mnx[lidx]);
            mxx[lroot] <= umax(mxx[lroot], mxx[lidx]);
            mny[lroot] <= umin(mny[lroot], mny[lidx]);
            mxy[lroot] <= umax(mxy[lroot], mxy[lidx]);
            sx[lroot]  <= sx[lroot] + sx[lidx];
            sy[lroot]  <= sy[lroot] + sy[lidx];
            cnt[lroot] <= cnt[lroot] + cnt[lidx];
          end
          lidx <= lidx + 1'b1;
          if (lidx == (LBL_W+1)'(NL - 1)) begin state <= S_CDIV; lidx <= '0; dbit <= 4'(COORD_W); end
        end
        S_CDIV: begin
          // centre of record lidx: COORD_W quotient bits, MSB first
          if (!(used[lidx] && lroot == lidx)) begin
            lidx <= lidx + 1'b1; dbit <= 4'(COORD_W);
            if (lidx == (LBL_W+1)'(NL - 1)) state <= S_DONE;
          end else if (dbit == 4'(COORD_W)) begin
            remx <= sx[lidx]; remy <= sy[lidx];
            cxa[lidx] <= '0; cya[lidx] <= '0;
            dbit <= dbit - 1'b1;
          end else begin
            if (dsub <= (SUM+COORD_W)'(remx)) begin remx <= remx - SUM'(dsub); cxa[lidx][dbit] <= 1'b1; end
            if (dsub <= (SUM+COORD_W)'(remy)) begin remy <= remy - SUM'(dsub); cya[lidx][dbit] <= 1'b1; end
            if (dbit == 0) begin
              dbit <= 4'(COORD_W);
              lidx <= lidx + 1'b1;
              if (lidx == (LBL_W+1)'(NL - 1)) state <= S_DONE;
            end else dbit <= dbit - 1'b1;
          end
        end
        S_DONE: begin
          state <= S_IDLE; busy <= 1'b0; ready <= 1'b1; done <= 1'b1;
        end
        default: ;
      endcase
    end
  end

  // ---------------- read ports ----------------
  always_comb begin
    rd_comp.root  = ready && used[rd_label] && (par[rd_label] == rd_label[LBL_W-1:0]);
    rd_comp.min_x = mnx[rd_label];
    rd_comp.max_x = mxx[rd_label];
    rd_comp.min_y = mny[rd_label];
    rd_comp.max_y = mxy[rd_label];
    rd_comp.cx    = cxa[rd_label];
    rd_comp.cy    = cya[rd_label];
    rd_comp.count = cnt[rd_label];
  end

  assign bw_count = bw_n;
  assign bw_black = {1'b1, par[bwl[bw_idx].a]};
  assign bw_white = {1'b0, par[bwl[bw_idx].b]};

endmodule
