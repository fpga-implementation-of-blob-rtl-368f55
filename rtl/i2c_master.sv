// i2c_master: SCCB/I2C master for the camera's register interface.
//
// Feature set, as the source specifies it: master only; multi-master
// (arbitration and bus-busy detection); the WAIT state, i.e. a slave holding
// SCL low stretches the clock; single-byte write and single-byte read with a
// 7-bit address; 400 kHz SCL.
//
// Transactions (chosen by this design):
//   write: S, addr+W, A, reg, A, data, A, P
//   read:  S, addr+W, A, reg, A, Sr, addr+R, A, data, NACK, P
// The read uses a repeated START (Sr) so that the bus stays owned between
// the two halves and no other master can start in between.
// Structure: a main state machine steps through the segments of a
// transaction (START, byte, STOP) and a one-bit state machine produces each
// bit in four quarter-periods of SCL: SDA is set while SCL is low, SCL is
// released, SDA is sampled while SCL is high, SCL is pulled low.  While SCL
// is released but still held low by another device the quarter timer stops.  A master that releases SDA for a 1
// but samples 0 has lost arbitration: it releases both lines and reports
// arb_lost.  START/STOP detection on the bus drives bus_busy, and a new
// transaction waits until the bus is free.  A missing acknowledge aborts
// with a STOP and ack_err.
// Lines are open drain: scl_oe/sda_oe = 1 pulls the line low.
// Timing: cmd_start is taken when busy is low; done pulses at the end.
module i2c_master #(
  parameter int CLK_HZ = 100_000_000,
  parameter int SCL_HZ = 400_000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       cmd_start,
  input  logic       cmd_read,
  input  logic [6:0] dev_addr,
  input  logic [7:0] reg_addr,
  input  logic [7:0] wr_data,
  output logic [7:0] rd_data,
  output logic       busy,
  output logic       done,
  output logic       ack_err,
  output logic       arb_lost,
  output logic       bus_busy,
  input  logic       scl_i,
  input  logic       sda_i,
  output logic       scl_oe,
  output logic       sda_oe
);

  localparam int QTR = (CLK_HZ / (4 * SCL_HZ)) < 2 ? 2 : CLK_HZ / (4 * SCL_HZ);
  localparam int QW  = $clog2(QTR + 1);

  typedef enum logic [2:0] {SEG_START, SEG_TX, SEG_RX, SEG_STOP, SEG_END} seg_e;
  typedef enum logic [2:0] {M_IDLE, M_WAITBUS, M_RUN, M_ABORT} mstate_e;

  mstate_e     mst;
  logic [3:0]  step;          // segment index within the transaction
  logic [1:0]  q;             // quarter of the current bit or condition
  logic [3:0]  bitn;          // bit within a byte segment (0..8)
  logic [QW-1:0] tq;
  logic [7:0]  sh;            // shift register
  logic        rd_q;
  logic        scl_d, sda_d;
  logic        sda_r, scl_r;

  // segment list of the two transaction types
  seg_e seg;
  logic [7:0] seg_byte;
  always_comb begin
    seg = SEG_END; seg_byte = '0;
    if (!rd_q) begin
      unique case (step)
        4'd0: seg = SEG_START;
        4'd1: begin seg = SEG_TX; seg_byte = {dev_addr, 1'b0}; end
        4'd2: begin seg = SEG_TX; seg_byte = reg_addr; end
        4'd3: begin seg = SEG_TX; seg_byte = wr_data; end
        4'd4: seg = SEG_STOP;
        default: seg = SEG_END;
      endcase
    end else begin
      unique case (step)
        4'd0: seg = SEG_START;
        4'd1: begin seg = SEG_TX; seg_byte = {dev_addr, 1'b0}; end
        4'd2: begin seg = SEG_TX; seg_byte = reg_addr; end
        4'd3: seg = SEG_START;      // repeated START
        4'd4: begin seg = SEG_TX; seg_byte = {dev_addr, 1'b1}; end
        4'd5: seg = SEG_RX;
        4'd6: seg = SEG_STOP;
        default: seg = SEG_END;
      endcase
    end
  end

  // START / STOP detection on the bus
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_d <= 1'b1; sda_d <= 1'b1; bus_busy <= 1'b0;
    end else begin
      scl_d <= scl_i; sda_d <= sda_i;
      if (scl_i && scl_d && sda_d && !sda_i) bus_busy <= 1'b1;   // START
      if (scl_i && scl_d && !sda_d && sda_i) bus_busy <= 1'b0;   // STOP
    end
  end

  // SCL released by this master but still low: another device stretches
  // the clock (WAIT state) or is slower in clock synchronization
  logic stretch;
  assign stretch = scl_r && !scl_i;

  logic tick;
  assign tick = (tq == QW'(QTR - 1));

  // value this master puts on SDA during the current bit (1 = released)
  logic tx_bit;
  always_comb begin
    if (seg == SEG_TX) tx_bit = (bitn == 4'd8) ? 1'b1 : sh[7];
    else               tx_bit = 1'b1;   // RX: release SDA, then NACK
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mst <= M_IDLE; step <= '0; q <= '0; bitn <= '0; tq <= '0; sh <= '0; rd_q <= 1'b0;
      scl_r <= 1'b1; sda_r <= 1'b1; busy <= 1'b0; done <= 1'b0;
      ack_err <= 1'b0; arb_lost <= 1'b0; rd_data <= '0;
    end else begin
      done <= 1'b0;
      unique case (mst)
        M_IDLE: if (cmd_start) begin
          mst <= M_WAITBUS; busy <= 1'b1; rd_q <= cmd_read; step <= '0; q <= '0;
          ack_err <= 1'b0; arb_lost <= 1'b0; tq <= '0;
        end
        M_WAITBUS: if (!bus_busy) begin mst <= M_RUN; tq <= '0; end
        M_RUN, M_ABORT: begin
          // quarter-period timer; q1 of a bit and of STOP waits for SCL high
          if (!stretch) tq <= tick ? '0 : tq + 1'b1;
          if (tick && !stretch) begin
            q <= q + 1'b1;
            unique case (seg)
              SEG_START: unique case (q)
                2'd0: sda_r <= 1'b1;
                2'd1: scl_r <= 1'b1;
                2'd2: sda_r <= 1'b0;
                default: begin
                  scl_r <= 1'b0; q <= '0; step <= step + 1'b1; bitn <= '0; sh <= '0;
                end
              endcase
              SEG_STOP: unique case (q)
                2'd0: begin sda_r <= 1'b0; scl_r <= 1'b0; end
                2'd1: scl_r <= 1'b1;
                2'd2: sda_r <= 1'b1;
                default: begin
                  q <= '0;
                  if (mst == M_ABORT) begin
                    mst <= M_IDLE; busy <= 1'b0; done <= 1'b1;
                  end else step <= step + 1'b1;
                end
              endcase
              SEG_TX, SEG_RX: unique case (q)
                2'd0: begin
                  if (bitn == 4'd0 && seg == SEG_TX) begin
                    sh <= seg_byte; sda_r <= seg_byte[7];
                  end else sda_r <= tx_bit;
                end
                2'd1: scl_r <= 1'b1;
                2'd2: begin
                  if (seg == SEG_TX && bitn != 4'd8 && sda_r && !sda_i) begin
                    // arbitration lost: release the bus and stop
                    arb_lost <= 1'b1; scl_r <= 1'b1; sda_r <= 1'b1;
                    mst <= M_IDLE; busy <= 1'b0; done <= 1'b1; q <= '0;
                  end else if (seg == SEG_TX && bitn == 4'd8 && sda_i) begin
                    ack_err <= 1'b1;
                  end else if (seg == SEG_RX && bitn != 4'd8) begin
                    sh <= {sh[6:0], sda_i};
                  end
                  if (seg == SEG_TX && bitn != 4'd8) sh <= {sh[6:0], 1'b0};
                end
                default: begin
                  scl_r <= 1'b0;
                  q <= '0;
                  if (bitn == 4'd8) begin
                    bitn <= '0;
                    if (seg == SEG_RX) rd_data <= sh;
                    if (ack_err) mst <= M_ABORT;
                    step <= ack_err ? (rd_q ? 4'd6 : 4'd4) : step + 1'b1;
                  end else bitn <= bitn + 1'b1;
                end
              endcase
              default: begin   // SEG_END
                q <= '0; mst <= M_IDLE; busy <= 1'b0; done <= 1'b1;
              end
            endcase
          end
        end
        default: mst <= M_IDLE;
      endcase
    end
  end

  assign scl_oe = ~scl_r;
  assign sda_oe = ~sda_r;

endmodule
