// image_capture: Image Capture Interface for the OV10121 digital video port.
//
// The camera drives PCLK, HREF, VSYNC and Y[9:0]; the FPGA drives XCLK and
// PWDN (pin list of the sensor).  Per the sensor's VGA timing, a frame starts
// with a VSYNC pulse, then 480 lines each carrying 640 pixels while HREF is
// high, with data sampled on the rising edge of PCLK.
//
// This design samples the camera port in the system clock domain: PCLK,
// HREF, VSYNC and Y pass together through a two-flop synchronizer and a
// rising PCLK edge is detected, so clk must be at least four times PCLK
// (100 MHz against at most 30 MHz here).  Capture is armed by a VSYNC
// rising edge while `enable` is high; the next HREF pixel is flagged sof,
// pixel (H_ACTIVE-1, V_ACTIVE-1) eof, and the frame counter increments.
// XCLK is clk divided by 2*XCLK_DIV (25 MHz by default, inside the sensor's
// 6..30 MHz range) and PWDN follows the `power_down` control input.
// Output: one pixel per valid cycle with its x/y, three clocks after the
// PCLK edge reaches the synchronizer.
// Lint note: the third synchronizer stage s3 is kept only for edge
// detection of PCLK and VSYNC, so its HREF and Y bits are reported unused.
module image_capture
  import blob_pkg::*;
#(
  parameter int H_ACTIVE = 640,
  parameter int V_ACTIVE = 480,
  parameter int XCLK_DIV = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               enable,
  input  logic               power_down,
  // camera port
  input  logic               cam_pclk,
  input  logic               cam_href,
  input  logic               cam_vsync,
  input  logic [9:0]         cam_y,
  output logic               cam_xclk,
  output logic               cam_pwdn,
  // pixel stream
  output logic               pix_valid,
  output logic               pix_sof,
  output logic               pix_eof,
  output logic [COORD_W-1:0] pix_x,
  output logic [COORD_W-1:0] pix_y,
  output logic [9:0]         pix_data,
  output logic [15:0]        frame_cnt
);

  typedef struct packed {
    logic       pclk;
    logic       href;
    logic       vsync;
    logic [9:0] y;
  } camsig_t;

  camsig_t s1, s2, s3;
  logic    armed, active, href_d;
  logic [COORD_W-1:0] x, y;
  logic [$clog2(XCLK_DIV+1)-1:0] xdiv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
      armed <= 1'b0; active <= 1'b0; href_d <= 1'b0;
      x <= '0; y <= '0; frame_cnt <= '0;
      pix_valid <= 1'b0; pix_sof <= 1'b0; pix_eof <= 1'b0;
      pix_x <= '0; pix_y <= '0; pix_data <= '0;
      cam_xclk <= 1'b0; xdiv <= '0; cam_pwdn <= 1'b1;
    end else begin
      s1 <= {cam_pclk, cam_href, cam_vsync, cam_y};
      s2 <= s1;
      s3 <= s2;
      cam_pwdn <= power_down;
      if (xdiv == ($bits(xdiv))'(XCLK_DIV - 1)) begin xdiv <= '0; cam_xclk <= ~cam_xclk; end
      else xdiv <= xdiv + 1'b1;

      pix_valid <= 1'b0; pix_sof <= 1'b0; pix_eof <= 1'b0;
      // frame start
      if (s2.vsync && !s3.vsync) begin
        armed  <= enable;
        active <= 1'b0;
        x <= '0; y <= '0;
      end
      if (s2.pclk && !s3.pclk) begin           // rising PCLK edge
        href_d <= s2.href;
        if (!s2.href && href_d && (armed || active)) begin   // line end
          x <= '0;
          y <= y + 1'b1;
        end
        if (s2.href && (armed || active)) begin
          pix_valid <= 1'b1;
          pix_sof   <= armed;
          pix_eof   <= (x == COORD_W'(H_ACTIVE-1)) && (y == COORD_W'(V_ACTIVE-1));
          pix_x     <= x;
          pix_y     <= y;
          pix_data  <= s2.y;
          x <= x + 1'b1;
          if (armed) begin armed <= 1'b0; active <= 1'b1; end
          if ((x == COORD_W'(H_ACTIVE-1)) && (y == COORD_W'(V_ACTIVE-1))) begin
            active    <= 1'b0;
            frame_cnt <= frame_cnt + 1'b1;
          end
        end
      end
    end
  end

endmodule
