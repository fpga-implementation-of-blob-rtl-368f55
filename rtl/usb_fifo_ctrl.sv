// usb_fifo_ctrl: FIFO controller for the EZ-USB FX2 slave FIFO interface.
//
// The FX2 runs in slave FIFO mode, synchronous, clocked by its own IFCLK
// output; the FPGA is the master and reads or writes the FX2's endpoint
// FIFOs like a 16-bit FIFO over FD[15:0].  FIFOADR[1:0] selects the FIFO,
// SLRD/SLWR are active-low enables sampled on the IFCLK rising edge, SLOE
// enables the FX2's FD drivers and PKTEND commits a short IN packet.  Two
// state machines share the bus (the source gives the write one; the read one
// mirrors it):
//   write (video to the host): IDLE -launch-> W1 select the IN FIFO ->
//     W2 wait while the FIFO is full -> W3 drive FD and pulse SLWR ->
//     W4 count the word; more words -> W2, last word -> PKTEND if the
//     transfer does not end on a packet boundary -> done.
//   read (commands from the host): IDLE -launch-> R1 select the OUT FIFO,
//     assert SLOE -> R2 wait while the FIFO is empty -> R3 pulse SLRD and
//     capture FD -> done.
// Design choices: EP2 (FIFOADR 00) is the OUT FIFO and EP6 (FIFOADR 10) the
// IN FIFO; FLAGB is EP6 full and FLAGC is EP2 empty, both active low (the
// FX2's default flag assignment); a packet is PKT_WORDS 16-bit words.  A read
// request has priority when both are launched together.  Write data comes
// as a valid/ready stream (the path from the frame buffer).
// Lint note: FLAGA and FLAGD are part of the FX2 pin set but unused in this
// flag assignment, so they are reported unused.  The two assertions use rst_n
// in `disable iff`, which a linter reports as rst_n being used both
// synchronously and asynchronously; the flops themselves reset asynchronously.
module usb_fifo_ctrl #(
  parameter int PKT_WORDS = 256
) (
  input  logic        ifclk,
  input  logic        rst_n,
  // control
  input  logic        wr_launch,
  input  logic [23:0] wr_words,
  input  logic        rd_launch,
  output logic        wr_busy,
  output logic        wr_done,
  output logic        rd_busy,
  output logic        rd_done,
  output logic [15:0] rd_word,
  // video data to send
  input  logic        src_valid,
  input  logic [15:0] src_data,
  output logic        src_ready,
  // FX2 slave FIFO pins
  input  logic        flaga_n,
  input  logic        flagb_n,   // IN FIFO full
  input  logic        flagc_n,   // OUT FIFO empty
  input  logic        flagd_n,
  output logic        sloe_n,
  output logic        slrd_n,
  output logic        slwr_n,
  output logic        pktend_n,
  output logic [1:0]  fifoadr,
  input  logic [15:0] fd_i,
  output logic [15:0] fd_o,
  output logic        fd_oe
);

  localparam logic [1:0] EP2_OUT = 2'b00;
  localparam logic [1:0] EP6_IN  = 2'b10;

  typedef enum logic [3:0] {IDLE, W1, W2, W3, W4, WEND, R1, R2, R3, REND} ustate_e;
  ustate_e st;
  logic [23:0] left;
  logic [$clog2(PKT_WORDS)-1:0] in_pkt;

  assign src_ready = (st == W2) && flagb_n;

  always_ff @(posedge ifclk or negedge rst_n) begin
    if (!rst_n) begin
      st <= IDLE; left <= '0; in_pkt <= '0;
      sloe_n <= 1'b1; slrd_n <= 1'b1; slwr_n <= 1'b1; pktend_n <= 1'b1;
      fifoadr <= EP2_OUT; fd_o <= '0; fd_oe <= 1'b0;
      wr_busy <= 1'b0; wr_done <= 1'b0; rd_busy <= 1'b0; rd_done <= 1'b0; rd_word <= '0;
    end else begin
      wr_done <= 1'b0; rd_done <= 1'b0;
      slwr_n <= 1'b1; slrd_n <= 1'b1; pktend_n <= 1'b1;
      unique case (st)
        IDLE: begin
          fd_oe <= 1'b0; sloe_n <= 1'b1;
          if (rd_launch) begin
            st <= R1; rd_busy <= 1'b1;
          end else if (wr_launch && wr_words != 0) begin
            st <= W1; wr_busy <= 1'b1; left <= wr_words; in_pkt <= '0;
          end
        end
        W1: begin fifoadr <= EP6_IN; st <= W2; end
        W2: if (flagb_n && src_valid) begin        // not full, data available
          fd_o <= src_data; fd_oe <= 1'b1; slwr_n <= 1'b0;
          st <= W3;
        end
        W3: begin
          left <= left - 1'b1;
          in_pkt <= (in_pkt == ($bits(in_pkt))'(PKT_WORDS - 1)) ? '0 : in_pkt + 1'b1;
          st <= W4;
        end
        W4: begin
          if (left != 0) st <= W2;
          else begin
            if (in_pkt != 0) pktend_n <= 1'b0;     // short packet
            st <= WEND;
          end
        end
        WEND: begin fd_oe <= 1'b0; wr_busy <= 1'b0; wr_done <= 1'b1; st <= IDLE; end
        R1: begin fifoadr <= EP2_OUT; sloe_n <= 1'b0; st <= R2; end
        R2: if (flagc_n) begin slrd_n <= 1'b0; rd_word <= fd_i; st <= R3; end
        R3: st <= REND;
        REND: begin sloe_n <= 1'b1; rd_busy <= 1'b0; rd_done <= 1'b1; st <= IDLE; end
        default: st <= IDLE;
      endcase
    end
  end

  // SLWR and SLRD are never asserted together, and SLWR only with FD driven
  assert property (@(posedge ifclk) disable iff (!rst_n) !(!slwr_n && !slrd_n));
  assert property (@(posedge ifclk) disable iff (!rst_n) !slwr_n |-> fd_oe);

endmodule
