// normalize: bilinear down-scaling of a square candidate image to 96x96.
//
// The candidate side is 32*k pixels, k = 3..15 (96x96 up to 480x480, the
// list of transformations the source allows).  Output pixel i of a row
// (and likewise of a column) samples the input at p = (i+0.5)*k/3 - 0.5
// (centre-aligned mapping, this design's choice).  The fraction of p is
// rounded to a quarter, so only the four weight pairs the source lists
// occur: (1,0), (0.75,0.25), (0.5,0.5), (0.25,0.75); each is an add/shift:
//   w=0: a   w=1/4: (3a+b)/4   w=1/2: (a+b)/2   w=3/4: (a+3b)/4
// with 3a = a + 2a, so no multiplier is used.
//
// Structure (as the source draws it): a two-register row mask interpolates
// along the row as pixels stream in; every row-interpolated line is written
// into one 96-entry row buffer, and a column mask interpolates between that
// buffer (the previous input row) and the line being produced.  An output
// pixel is emitted while the input pixel that completes it arrives:
// at column j when the weight is 0, otherwise at j+1.  The circuit is one
// pass: input one pixel per clock in raster order, size*size pixels; output
// 96*96 pixels with sof/eof, one clock after the completing input pixel.
// Lint note: eof of the input stream is not used (the frame length is
// size*size pixels), and the two fraction bits of the weighted sum `s` are
// dropped by design; both are reported unused.
module normalize
  import blob_pkg::*;
#(
  parameter int OUT_SIZE = 96
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] k,          // input side = 32*k, 3..15
  input  pix_t       in,
  output pix_t       out
);

  localparam int OW = $clog2(OUT_SIZE);
  typedef logic [PIX_W-1:0] px_t;

  px_t                rowbuf [OUT_SIZE];
  px_t                a_q;                 // previous pixel of the row
  logic [COORD_W-1:0] col, row, cur_col, cur_row, side;
  logic [OW-1:0]      oc, orow, cur_oc, cur_orow;

  assign side = COORD_W'({k, 5'b0});

  // source position of output index i: integer part and quarter weight
  function automatic logic [COORD_W-1:0] src_j(logic [OW-1:0] i, logic [3:0] kk);
    logic [12:0] p6;
    p6 = (13'(i) * 13'd2 + 13'd1) * 13'(kk) - 13'd3;
    return COORD_W'(p6 / 13'd6);
  endfunction
  function automatic logic [1:0] src_w(logic [OW-1:0] i, logic [3:0] kk);
    logic [12:0] p6;
    logic [2:0]  r6;
    p6 = (13'(i) * 13'd2 + 13'd1) * 13'(kk) - 13'd3;
    r6 = 3'(p6 % 13'd6);
    case (r6)
      3'd0:       return 2'd0;
      3'd1, 3'd2: return 2'd1;
      3'd3:       return 2'd2;
      default:    return 2'd3;
    endcase
  endfunction
  function automatic px_t lerp(px_t a, px_t b, logic [1:0] w);
    logic [PIX_W+1:0] s;
    case (w)
      2'd0: s = {a, 2'b00};
      2'd1: s = (PIX_W+2)'(a) + (PIX_W+2)'({a, 1'b0}) + (PIX_W+2)'(b);
      2'd2: s = {(PIX_W+1)'(a) + (PIX_W+1)'(b), 1'b0};
      default: s = (PIX_W+2)'(a) + (PIX_W+2)'({b, 1'b0}) + (PIX_W+2)'(b);
    endcase
    return s[PIX_W+1:2];
  endfunction

  always_comb begin
    cur_col  = in.sof ? '0 : col;
    cur_row  = in.sof ? '0 : row;
    cur_oc   = (in.sof || col == 0) ? '0 : oc;
    cur_orow = in.sof ? '0 : orow;
  end

  logic [COORD_W-1:0] jc, jr;
  logic [1:0]         wc, wr;
  logic               col_hit, row_hit;
  px_t                h, v;
  always_comb begin
    jc = src_j(cur_oc, k);   wc = src_w(cur_oc, k);
    jr = src_j(cur_orow, k); wr = src_w(cur_orow, k);
    col_hit = (cur_col == ((wc == 0) ? jc : jc + 1'b1)) && (cur_oc < OW'(OUT_SIZE));
    row_hit = (cur_row == ((wr == 0) ? jr : jr + 1'b1)) && (cur_orow < OW'(OUT_SIZE));
    h = (wc == 0) ? in.data : lerp(a_q, in.data, wc);
    v = (wr == 0) ? h : lerp(rowbuf[cur_oc], h, wr);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; oc <= '0; orow <= '0; a_q <= '0; out <= '0;
    end else begin
      out.valid <= 1'b0; out.sof <= 1'b0; out.eof <= 1'b0;
      if (in.valid) begin
        a_q <= in.data;
        if (cur_col == side - 1) begin
          col <= '0;
          row <= cur_row + 1'b1;
          orow <= row_hit ? cur_orow + 1'b1 : cur_orow;
        end else begin
          col  <= cur_col + 1'b1;
          row  <= cur_row;
          orow <= cur_orow;
        end
        oc <= col_hit ? cur_oc + 1'b1 : cur_oc;
        if (col_hit) begin
          out.valid <= row_hit;
          out.sof   <= row_hit && cur_oc == 0 && cur_orow == 0;
          out.eof   <= row_hit && cur_oc == OW'(OUT_SIZE - 1) && cur_orow == OW'(OUT_SIZE - 1);
          out.data  <= v;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (in.valid && col_hit) rowbuf[cur_oc] <= h;
  end

endmodule
