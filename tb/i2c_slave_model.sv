// i2c_slave_model: behavioural SCCB/I2C register slave for testbenches.
//
// Samples the open-drain bus in the system clock domain.  Recognises START
// and STOP, receives the address byte, acknowledges its own 7-bit ADDR,
// then takes a register pointer and write data (write) or returns the
// register at the pointer (read after a repeated START).  With STRETCH set
// it holds SCL low for a random 50..300 clocks after about one SCL falling
// edge in three; `stretches` counts these.  `writes` counts stored bytes.
// Interface: scl/sda are the resolved bus levels, scl_oe/sda_oe = 1 pulls
// the line low.
module i2c_slave_model #(
  parameter logic [6:0] ADDR    = 7'h30,
  parameter bit         STRETCH = 1'b1
) (
  input  logic clk,
  input  logic scl,
  input  logic sda,
  output logic scl_oe,
  output logic sda_oe,
  output int   stretches,
  output int   writes
);
  typedef enum {P_IDLE, P_ADDR, P_REG, P_WDATA, P_RDATA} phase_e;
  phase_e     ph = P_IDLE;
  logic [7:0] regs [256];
  logic [7:0] ptr = 0, sh = 0, rbyte = 0;
  logic       scl_d = 1, sda_d = 1;
  int         slot = -1, hold = 0;

  initial begin
    scl_oe = 0; sda_oe = 0; stretches = 0; writes = 0;
    foreach (regs[i]) regs[i] = 8'(i * 7 + 3);
  end

  always @(posedge clk) begin
    scl_d <= scl; sda_d <= sda;
    if (hold > 0) begin
      hold <= hold - 1;
      if (hold == 1) scl_oe <= 0;
    end
    if (scl && scl_d && sda_d && !sda) begin            // START
      ph <= P_ADDR; slot <= -1; sda_oe <= 0;
    end else if (scl && scl_d && !sda_d && sda) begin   // STOP
      ph <= P_IDLE; sda_oe <= 0;
    end else if (ph != P_IDLE) begin
      if (scl && !scl_d) begin                          // rising: sample
        if (slot >= 0 && slot < 8) sh <= {sh[6:0], sda};
        if (slot == 8 && ph == P_RDATA && sda) ph <= P_IDLE;   // master NACK
      end
      if (!scl && scl_d) begin                          // falling: drive next slot
        int s;
        s = (slot == 8) ? 0 : slot + 1;
        slot <= s;
        sda_oe <= 0;
        if (s == 8) begin
          case (ph)
            P_ADDR: if (sh[7:1] == ADDR) begin
              sda_oe <= 1;
              ph <= sh[0] ? P_RDATA : P_REG;
              rbyte <= regs[ptr];
            end else ph <= P_IDLE;
            P_REG:   begin sda_oe <= 1; ptr <= sh; ph <= P_WDATA; end
            P_WDATA: begin sda_oe <= 1; regs[ptr] <= sh; ptr <= ptr + 1; writes <= writes + 1; end
            default: ;
          endcase
        end else if (ph == P_RDATA) begin
          sda_oe <= !rbyte[7 - s];
        end
        if (STRETCH && $urandom_range(0, 2) == 0) begin
          scl_oe <= 1; hold <= $urandom_range(50, 300); stretches <= stretches + 1;
        end
      end
    end
  end
endmodule
