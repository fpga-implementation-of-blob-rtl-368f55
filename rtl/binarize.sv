// binarize: adaptive-threshold binarization with an 11x11 average filter.
//
// Each pixel becomes white (1) when its intensity is greater than the mean
// of its 11x11 neighbourhood plus Delta, and black (0) otherwise, as the
// source defines it.  The source gives the 11x11 size, the rule, and a
// structure of row buffers (dual-port RAMs) around a run-time image width.
//
// How it works: ten row buffers give, for every incoming pixel, the column
// of the 11 most recent rows at that x.  The column sum is pushed through an
// 11-deep shift register, and the sum of those 11 column sums is the window
// sum S.  The mean is not divided out: the test is done exactly as
//   centre*121 > S + Delta*121
// (this design's choice; it needs no divider).  The centre pixel is row
// buffer 5 delayed by five columns.
// Only pixels whose window lies inside the image are produced: the output is
// (width-10) x (rows-10), starting at input pixel (5,5).  Output data is
// 8'h01 for white, 8'h00 for black.  Latency: two clocks.
module binarize
  import blob_pkg::*;
#(
  parameter int MAX_W = 160,
  parameter int K     = 11
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] width,
  input  logic signed [8:0]  delta,     // threshold offset in gray levels
  input  pix_t               in,
  output pix_t               out
);

  localparam int R  = K / 2;
  localparam int SW = 16;               // holds 121*255 = 30855
  typedef logic [PIX_W-1:0] px_t;

  px_t              lb  [K-1][MAX_W];
  logic [SW-1:0]    cs  [K];            // column sums, cs[K-1] newest
  px_t              ctr [K];            // centre-row pixels, ctr[K-1] newest
  logic [COORD_W-1:0] col, row;
  logic v1, sof1, eof1;

  logic [COORD_W-1:0] cur_col, cur_row;

  logic [$clog2(MAX_W)-1:0] ci;   // line-buffer index (cur_col < MAX_W)

  assign ci = cur_col[$clog2(MAX_W)-1:0];
  always_comb begin
    cur_col = in.sof ? '0 : col;
    cur_row = in.sof ? '0 : row;
  end

  logic [SW-1:0] colsum;
  always_comb begin
    colsum = SW'(in.data);
    for (int k = 0; k < K-1; k++) colsum += SW'(lb[k][ci]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0;
      v1 <= 1'b0; sof1 <= 1'b0; eof1 <= 1'b0;
    end else begin
      v1 <= 1'b0; sof1 <= 1'b0; eof1 <= 1'b0;
      if (in.valid) begin
        if (cur_col == width - 1) begin
          col <= '0;
          row <= cur_row + 1'b1;
        end else begin
          col <= cur_col + 1'b1;
          row <= cur_row;
        end
        v1   <= (cur_col >= COORD_W'(K-1)) && (cur_row >= COORD_W'(K-1));
        sof1 <= (cur_col == COORD_W'(K-1)) && (cur_row == COORD_W'(K-1));
        eof1 <= in.eof;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in.valid) begin
      for (int c = 0; c < K-1; c++) begin
        cs[c]  <= cs[c+1];
        ctr[c] <= ctr[c+1];
      end
      cs[K-1]  <= colsum;
      ctr[K-1] <= lb[R-1][ci];     // row R above the incoming one
      lb[0][ci] <= in.data;
      for (int k = 1; k < K-1; k++)
        lb[k][ci] <= lb[k-1][ci];
    end
  end

  logic [SW-1:0] wsum;
  always_comb begin
    wsum = '0;
    for (int c = 0; c < K; c++) wsum += cs[c];
  end

  logic signed [SW+2:0] lhs, rhs;
  assign lhs = (SW+3)'(ctr[R]) * (SW+3)'(K*K);
  assign rhs = (SW+3)'(wsum) + (SW+3)'(delta) * (SW+3)'(K*K);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else begin
      out.valid <= v1;
      out.sof   <= sof1;
      out.eof   <= eof1 & v1;
      out.data  <= {7'b0, lhs > rhs};
    end
  end

endmodule
