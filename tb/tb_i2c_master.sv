// tb_i2c_master: two i2c_master instances and two register slaves share an
// open-drain bus (wired AND with pull-ups).  Checks, at the default 400 kHz
// SCL from a 100 MHz clock:
//   - register writes and reads (read data and slave contents), with the
//     slaves stretching SCL at random;
//   - a missing slave gives ack_err and the bus ends idle (STOP);
//   - both masters starting together: the one whose address has the first
//     1 where the other has 0 loses arbitration, the other completes;
//   - a master started while the other owns the bus waits for bus_busy to
//     drop, then completes;
//   - the measured SCL high period of an unstretched bit.
module tb_i2c_master;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       st [2], rd [2], busy [2], done [2], aerr [2], alost [2], bbusy [2];
  logic [6:0] da [2];
  logic [7:0] ra [2], wd [2], rdat [2];
  logic       m_scl_oe [2], m_sda_oe [2];
  logic       s_scl_oe [2], s_sda_oe [2];
  int         stretches [2], writes [2];
  logic       scl, sda;
  int checks = 0, failures = 0, n_arb = 0, n_wait = 0, n_nack = 0;

  assign scl = !(m_scl_oe[0] | m_scl_oe[1] | s_scl_oe[0] | s_scl_oe[1]);
  assign sda = !(m_sda_oe[0] | m_sda_oe[1] | s_sda_oe[0] | s_sda_oe[1]);

  for (genvar g = 0; g < 2; g++) begin : g_m
    i2c_master dut (.clk, .rst_n, .cmd_start(st[g]), .cmd_read(rd[g]), .dev_addr(da[g]),
      .reg_addr(ra[g]), .wr_data(wd[g]), .rd_data(rdat[g]), .busy(busy[g]), .done(done[g]),
      .ack_err(aerr[g]), .arb_lost(alost[g]), .bus_busy(bbusy[g]), .scl_i(scl), .sda_i(sda),
      .scl_oe(m_scl_oe[g]), .sda_oe(m_sda_oe[g]));
  end
  i2c_slave_model #(.ADDR(7'h30)) s0 (.clk, .scl, .sda, .scl_oe(s_scl_oe[0]), .sda_oe(s_sda_oe[0]),
    .stretches(stretches[0]), .writes(writes[0]));
  i2c_slave_model #(.ADDR(7'h21), .STRETCH(1'b0)) s1 (.clk, .scl, .sda, .scl_oe(s_scl_oe[1]),
    .sda_oe(s_sda_oe[1]), .stretches(stretches[1]), .writes(writes[1]));

  task automatic issue(int m, bit r, logic [6:0] a, logic [7:0] reg_a, logic [7:0] d);
    rd[m] <= r; da[m] <= a; ra[m] <= reg_a; wd[m] <= d; st[m] <= 1;
    @(posedge clk); st[m] <= 0;
  endtask

  task automatic wait_done(int m);
    while (!done[m]) @(posedge clk);
    @(posedge clk);
  endtask

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    logic [7:0] ref0 [256];
    int t0, t1;
    foreach (st[i]) begin st[i] = 0; rd[i] = 0; da[i] = 0; ra[i] = 0; wd[i] = 0; end
    foreach (ref0[i]) ref0[i] = 8'(i * 7 + 3);
    repeat (3) @(posedge clk); rst_n = 1; repeat (3) @(posedge clk);
    // writes and reads with a stretching slave
    for (int n = 0; n < 8; n++) begin
      logic [7:0] a, d;
      a = 8'($urandom); d = 8'($urandom);
      issue(0, 0, 7'h30, a, d); wait_done(0);
      ref0[a] = d;
      check(!aerr[0] && !alost[0], $sformatf("write acknowledged (ack_err %0b arb_lost %0b)", aerr[0], alost[0]));
      check(s0.regs[a] == d, $sformatf("slave register %0h = %0h, wrote %0h", a, s0.regs[a], d));
      a = 8'($urandom);
      issue(0, 1, 7'h30, a, 0); wait_done(0);
      check(!aerr[0] && rdat[0] == ref0[a], $sformatf("read %0h: %0h expected %0h", a, rdat[0], ref0[a]));
    end
    check(stretches[0] > 0, "slave stretched the clock");
    // no such slave
    issue(1, 0, 7'h55, 8'h10, 8'h99); wait_done(1);
    check(aerr[1], "NACK reported");
    if (aerr[1]) n_nack++;
    repeat (10) @(posedge clk);
    check(scl && sda && !bbusy[0], "bus idle after abort");
    // simultaneous start: 0x30 (0110000) loses against 0x21 (0100001) at bit 5
    fork
      issue(0, 0, 7'h30, 8'h40, 8'hA5);
      issue(1, 0, 7'h21, 8'h41, 8'h5A);
    join
    fork wait_done(0); wait_done(1); join
    check(alost[0] && !alost[1] && !aerr[1], "arbitration: master 0 lost, master 1 won");
    check(s1.regs[8'h41] == 8'h5A && s0.regs[8'h40] != 8'hA5, "winner's write landed, loser's did not");
    if (alost[0]) n_arb++;
    // bus busy: master 0 must wait for master 1's transfer
    issue(1, 1, 7'h21, 8'h41, 0);
    repeat (2000) @(posedge clk);
    check(bbusy[0], "bus busy seen by the other master");
    issue(0, 0, 7'h30, 8'h22, 8'h77);
    t0 = 0;
    while (!done[1]) begin @(posedge clk); if (!m_scl_oe[0] && !m_sda_oe[0] && busy[0]) t0++; end
    check(rdat[1] == 8'h5A, "read back by master 1");
    wait_done(0);
    check(!alost[0] && !aerr[0] && s0.regs[8'h22] == 8'h77, "waiting master completed afterwards");
    if (t0 > 1000) n_wait++;
    // SCL high time of an unstretched bit (slave 1 never stretches)
    issue(1, 0, 7'h21, 8'h00, 8'hFF);
    @(posedge scl); @(posedge scl); t0 = $time; @(negedge scl); t1 = $time;
    wait_done(1);
    check(t1 - t0 >= 1200 && t1 - t0 <= 1260, $sformatf("SCL high %0d ns", t1 - t0));
    check(n_arb > 0 && n_wait > 0 && n_nack > 0, "all bus mechanisms exercised");
    $display("stretches %0d, arbitration losses %0d", stretches[0], n_arb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
