// dccl: Dual Connected Component Labelling, one pass, one pixel per clock.
//
// Unlike ordinary labelling, both black and white pixels are labelled.  A
// label word is {type, value}: type 1 = black, 0 = white (blob_pkg::tlabel_t).
// A 2x3 mask holds the pixel under test A, its left neighbour B, and the
// three neighbours of the row above: E (up-left), D (up) and C (up-right).
// As the source specifies, the neighbours are searched in the order
// E, D, C, B: A takes the label of the first one of its own type, otherwise
// a new label of its type.  Every other same-type neighbour whose label
// differs from A's is an equivalence (eq_v), and every neighbour of the
// other type is a black/white contact for the BW_EQ table (bw_v).
//
// Structure: the source's two row RAMs are reduced here to one row buffer
// of label words (the previous row); E is kept in a register.  Labels are
// counted separately for each type, starting at 1; when a type runs out of
// labels the last label is reused and `overflow` is raised (this design's
// choice).  Neighbours outside the image read as label 0 and are ignored.
// Outputs are registered: one clock of latency.  The line width is a
// run-time input (<= MAX_W); the frame height follows from sof/eof.
module dccl
  import blob_pkg::*;
#(
  parameter int MAX_W = 160
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] width,
  input  pix_t               in,          // data[0]: 1 = white, 0 = black
  output logic               out_valid,
  output logic               out_sof,
  output logic               out_eof,
  output logic [COORD_W-1:0] out_x,
  output logic [COORD_W-1:0] out_y,
  output tlabel_t            out_label,
  output tlabel_t            out_nb [4],  // E, D, C, B
  output logic [3:0]         out_eq_v,    // same type, different label
  output logic [3:0]         out_bw_v,    // other type
  output logic               overflow
);

  localparam logic [LBL_W-1:0] LMAX = '1;

  tlabel_t            prev [MAX_W];
  tlabel_t            e_q, b_q;
  logic [COORD_W-1:0] col, row, cur_col, cur_row;
  logic [$clog2(MAX_W)-1:0] ci;   // line-buffer index (cur_col < MAX_W)
  assign ci = cur_col[$clog2(MAX_W)-1:0];
  logic [LBL_W-1:0]   next_lbl [2];

  always_comb begin
    cur_col = in.sof ? '0 : col;
    cur_row = in.sof ? '0 : row;
  end

  // neighbours of the current pixel
  tlabel_t nb [4];
  always_comb begin
    nb[0] = (cur_row != 0 && cur_col != 0) ? e_q : '0;
    nb[1] = (cur_row != 0) ? prev[ci] : '0;
    nb[2] = (cur_row != 0 && cur_col + 1 < width) ? prev[cur_col + 1] : '0;
    nb[3] = (cur_col != 0) ? b_q : '0;
  end

  logic            a_type;
  logic [3:0]      same;
  tlabel_t         a_lbl;
  logic            take_new;
  always_comb begin
    a_type = ~in.data[0];
    for (int i = 0; i < 4; i++)
      same[i] = (nb[i][LBL_W] == a_type) && (nb[i][LBL_W-1:0] != '0);
    take_new = (same == 4'b0);
    a_lbl    = {a_type, in.sof ? LBL_W'(1) : next_lbl[a_type]};
    for (int i = 3; i >= 0; i--)
      if (same[i]) a_lbl = nb[i];     // lowest index (E first) wins
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; e_q <= '0; b_q <= '0;
      next_lbl[0] <= LBL_W'(1); next_lbl[1] <= LBL_W'(1);
      out_valid <= 1'b0; out_sof <= 1'b0; out_eof <= 1'b0;
      out_x <= '0; out_y <= '0; out_label <= '0;
      for (int i = 0; i < 4; i++) out_nb[i] <= '0;
      out_eq_v <= '0; out_bw_v <= '0; overflow <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      if (in.valid) begin
        if (in.sof) begin
          next_lbl[0] <= LBL_W'(1);
          next_lbl[1] <= LBL_W'(1);
          overflow    <= 1'b0;
        end
        if (take_new) begin
          if (a_lbl[LBL_W-1:0] != LMAX) next_lbl[a_type] <= a_lbl[LBL_W-1:0] + 1'b1;
          else overflow <= 1'b1;
        end
        if (cur_col == width - 1) begin
          col <= '0;
          row <= cur_row + 1'b1;
        end else begin
          col <= cur_col + 1'b1;
          row <= cur_row;
        end
        e_q <= nb[1];
        b_q <= a_lbl;
        out_valid <= 1'b1;
        out_sof   <= in.sof;
        out_eof   <= in.eof;
        out_x     <= cur_col;
        out_y     <= cur_row;
        out_label <= a_lbl;
        for (int i = 0; i < 4; i++) begin
          out_nb[i]   <= nb[i];
          out_eq_v[i] <= same[i] && (nb[i] != a_lbl);
          out_bw_v[i] <= (nb[i][LBL_W] != a_type) && (nb[i][LBL_W-1:0] != '0);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in.valid) prev[ci] <= a_lbl;
  end

endmodule
