// downscale: VGA to QQVGA decimation.
//
// The source reduces the 640x480 camera image by four in each direction to
// 160x120 and describes this step as a plain data decimation.  This block
// keeps the pixel at every fourth column of every fourth row (x%4==0,
// y%4==0) and drops the two least significant bits of the 10-bit sensor
// value (the 8-bit width of the later stages is this design's choice).
// Input: the capture stream (valid, sof, 10-bit data) in raster order of an
// IN_W x IN_H frame; output: a blob_pkg::pix_t stream with sof on pixel
// (0,0) and eof on the last kept pixel.  Latency: one clock.
// Lint note: the two low bits of the 10-bit sample are dropped on purpose
// (8-bit pixels) and are reported unused.
module downscale
  import blob_pkg::*;
#(
  parameter int IN_W   = 640,
  parameter int IN_H   = 480,
  parameter int FACTOR = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       in_sof,
  input  logic [9:0] in_data,
  output pix_t       out
);

  logic [COORD_W-1:0] col, row, cur_col, cur_row;
  always_comb begin
    cur_col = in_sof ? '0 : col;
    cur_row = in_sof ? '0 : row;
  end

  logic keep, last;
  assign keep = (cur_col % COORD_W'(FACTOR) == '0) && (cur_row % COORD_W'(FACTOR) == '0);
  assign last = (cur_col == COORD_W'(IN_W - FACTOR)) && (cur_row == COORD_W'(IN_H - FACTOR));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col <= '0; row <= '0; out <= '0;
    end else begin
      out.valid <= 1'b0;
      out.sof   <= 1'b0;
      out.eof   <= 1'b0;
      if (in_valid) begin
        if (cur_col == COORD_W'(IN_W - 1)) begin
          col <= '0;
          row <= (cur_row == COORD_W'(IN_H - 1)) ? '0 : cur_row + 1'b1;
        end else begin
          col <= cur_col + 1'b1;
          row <= cur_row;
        end
        out.valid <= keep;
        out.sof   <= keep && cur_col == 0 && cur_row == 0;
        out.eof   <= keep && last;
        out.data  <= in_data[9:2];
      end
    end
  end

endmodule
