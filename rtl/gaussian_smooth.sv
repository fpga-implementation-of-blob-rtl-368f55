// gaussian_smooth: 5x5 Gaussian smoothing of a streamed gray-scale image.
//
// The kernel is the integer mask 1-4-7-4-1 / 4-16-26-16-4 / 7-26-41-26-7 /
// 4-16-26-16-4 / 1-4-7-4-1 (sum 273) given by the source; the source also
// gives the structure: four row buffers (dual-port RAMs in the original) feed
// a 5x5 window, and the image width is a run-time input so the one instance
// serves both the 160x120 frame and the 96x96 normalized candidate.
//
// Design choices of this implementation:
//  * Only pixels whose 5x5 window lies inside the image are produced, so the
//    output image is (width-4) x (rows-4); its first pixel is the input
//    pixel (2,2).
//  * The weighted sum is divided by 273 as floor(sum*122911 / 2^25), a
//    multiply by the rounded-up reciprocal; this equals floor(sum/273)
//    for every sum an 8-bit image can produce (0..255*273).
//  * Latency is two clock cycles from an input pixel to the output pixel it
//    completes.  One pixel per clock is accepted; gaps in valid are allowed.
// Interface: in/out are blob_pkg::pix_t streams; width must be stable during
// a frame and width <= MAX_W; the frame ends at the pixel flagged eof, so the
// height needs no input.
// Lint note: only bits [32:25] of the divider product `scaled` form the
// result; the fraction bits and the always-zero top bit are reported unused.
module gaussian_smooth
  import blob_pkg::*;
#(
  parameter int MAX_W = 160
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] width,
  input  pix_t               in,
  output pix_t               out
);

  localparam int K = 5;
  typedef logic [PIX_W-1:0] px_t;

  px_t lb [K-1][MAX_W];          // previous rows, lb[0] is the row just above
  px_t win [K][K];               // win[r][c]: r=0 oldest row, c=0 oldest column
  logic [COORD_W-1:0] col, row;
  logic v1, sof1, eof1;

  // kernel weight of window position (r,c)
  function automatic int unsigned kw(int r, int c);
    int unsigned a [K] = '{1, 4, 7, 4, 1};
    if (r == 2 && c == 2) return 41;
    if ((r == 2 && (c == 1 || c == 3)) || (c == 2 && (r == 1 || r == 3))) return 26;
    return a[r] * a[c];
  endfunction

  logic [COORD_W-1:0] cur_col, cur_row;

  logic [$clog2(MAX_W)-1:0] ci;   // line-buffer index (cur_col < MAX_W)

  assign ci = cur_col[$clog2(MAX_W)-1:0];
  always_comb begin
    cur_col = in.sof ? '0 : col;
    cur_row = in.sof ? '0 : row;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0;
      v1 <= 1'b0; sof1 <= 1'b0; eof1 <= 1'b0;
    end else begin
      v1   <= 1'b0;
      sof1 <= 1'b0;
      eof1 <= 1'b0;
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

  // row buffers and window; contents need no reset (never used before filled)
  always_ff @(posedge clk) begin
    if (in.valid) begin
      for (int r = 0; r < K; r++)
        for (int c = 0; c < K-1; c++)
          win[r][c] <= win[r][c+1];
      win[K-1][K-1] <= in.data;
      for (int r = 0; r < K-1; r++)
        win[r][K-1] <= lb[K-2-r][ci];
      lb[0][ci] <= in.data;
      for (int k = 1; k < K-1; k++)
        lb[k][ci] <= lb[k-1][ci];
    end
  end

  logic [16:0] sum;
  always_comb begin
    sum = '0;
    for (int r = 0; r < K; r++)
      for (int c = 0; c < K; c++)
        sum += 17'(kw(r, c)) * 17'(win[r][c]);
  end

  // sum / 273 = floor(sum * 122911 / 2^25), exact for every sum up to 255*273
  logic [33:0] scaled;
  assign scaled = 34'(sum) * 34'd122911;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out <= '0;
    else begin
      out.valid <= v1;
      out.sof   <= sof1;
      out.eof   <= eof1 & v1;
      out.data  <= scaled[32:25];
    end
  end

endmodule
