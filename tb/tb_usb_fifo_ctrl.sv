// tb_usb_fifo_ctrl: an FX2 slave FIFO model (synchronous mode) serves the
// controller.  The IN FIFO (EP6) holds two packets of PKT_WORDS words and a
// host model drains whole packets at random times, so FLAGB (full) stalls
// the writer; PKTEND commits short packets.  The OUT FIFO (EP2) is filled
// by the host model at random, so FLAGC (empty) stalls the reader.  Checks
// that every word arrives in order, packets are full except a final short
// one, no write hits a full FIFO, no read hits an empty one, and every
// read returns the host's next word.  Uses PKT_WORDS = 16 to reach full
// quickly.
module tb_usb_fifo_ctrl;
  localparam int PKT = 16, CAP = 2 * PKT;
  logic ifclk = 0, rst_n = 0;
  always #10.4 ifclk = ~ifclk;    // 48 MHz

  logic wr_launch, rd_launch, wr_busy, wr_done, rd_busy, rd_done;
  logic [23:0] wr_words;
  logic [15:0] rd_word, src_data, fd_i, fd_o;
  logic src_valid, src_ready, sloe_n, slrd_n, slwr_n, pktend_n, fd_oe;
  logic flagb_n, flagc_n;
  logic [1:0] fifoadr;
  int checks = 0, failures = 0, n_full_stall = 0, n_empty_stall = 0, n_pktend = 0, n_pkts = 0;

  usb_fifo_ctrl #(.PKT_WORDS(PKT)) dut (.ifclk, .rst_n, .wr_launch, .wr_words, .rd_launch,
    .wr_busy, .wr_done, .rd_busy, .rd_done, .rd_word, .src_valid, .src_data, .src_ready,
    .flaga_n(1'b1), .flagb_n, .flagc_n, .flagd_n(1'b1), .sloe_n, .slrd_n, .slwr_n, .pktend_n,
    .fifoadr, .fd_i, .fd_o, .fd_oe);

  // FX2 model
  logic [15:0] in_fifo [$];     // words not yet committed to a packet
  int          pkts [$];        // committed packet lengths waiting for the host
  int          in_words = 0;    // words in the IN FIFO buffer
  logic [15:0] host_rx [$];
  int          host_pkt_len [$];
  logic [15:0] out_fifo [$];
  logic [15:0] out_ref [$];

  // model outputs change on the falling edge, away from the sampling edge
  always @(negedge ifclk) begin
    flagb_n <= in_words < CAP;
    flagc_n <= out_fifo.size() != 0;
    fd_i    <= (!sloe_n && fifoadr == 2'b00 && out_fifo.size() != 0) ? out_fifo[0] : 16'hDEAD;
  end

  always @(posedge ifclk) if (rst_n) begin
    if (!slwr_n) begin
      checks++;
      if (fifoadr != 2'b10 || !flagb_n || !fd_oe) begin failures++; $display("bad write: adr %b full %b", fifoadr, !flagb_n); end
      else begin
        in_fifo.push_back(fd_o); in_words++;
        if (in_fifo.size() == PKT) begin pkts.push_back(PKT); foreach (in_fifo[i]) host_rx.push_back(in_fifo[i]); in_fifo.delete(); end
      end
    end
    if (!pktend_n) begin
      n_pktend++;
      if (in_fifo.size() != 0) begin pkts.push_back(in_fifo.size()); foreach (in_fifo[i]) host_rx.push_back(in_fifo[i]); in_fifo.delete(); end
    end
    if (!slrd_n) begin
      checks++;
      if (fifoadr != 2'b00 || out_fifo.size() == 0) begin failures++; $display("bad read"); end
      else void'(out_fifo.pop_front());
    end
    // host side
    if (pkts.size() != 0 && $urandom_range(0, 40) == 0) begin
      int n;
      n = pkts.pop_front(); in_words -= n; host_pkt_len.push_back(n); n_pkts++;
    end
    if ($urandom_range(0, 30) == 0) begin
      logic [15:0] w;
      w = 16'($urandom); out_fifo.push_back(w); out_ref.push_back(w);
    end
    if (wr_busy && src_valid && !flagb_n) n_full_stall++;
    if (rd_busy && !sloe_n && !flagc_n) n_empty_stall++;
  end

  // video source: counting pattern with random gaps
  logic [15:0] next_word = 0;
  always @(posedge ifclk) begin
    if (src_valid && src_ready) next_word <= next_word + 1;
  end
  always @(negedge ifclk) src_valid <= $urandom_range(0, 3) != 0;
  assign src_data = next_word;

  task automatic send(int n);
    int base = int'(next_word);
    wr_words <= 24'(n); wr_launch <= 1; @(posedge ifclk); wr_launch <= 0;
    while (!wr_done) @(posedge ifclk);
    repeat (2000) @(posedge ifclk);    // let the host drain
    checks++;
    if (host_rx.size() != n) begin failures++; $display("sent %0d words, host got %0d", n, host_rx.size()); end
    for (int i = 0; i < host_rx.size(); i++) if (host_rx[i] != 16'(base + i)) begin
      failures++; $display("word %0d = %0h", i, host_rx[i]); break;
    end
    for (int i = 0; i < host_pkt_len.size(); i++) begin
      checks++;
      if (host_pkt_len[i] != PKT && !(i == host_pkt_len.size() - 1 && n % PKT != 0)) begin
        failures++; $display("packet %0d of %0d words", i, host_pkt_len[i]);
      end
    end
    host_rx.delete(); host_pkt_len.delete();
  endtask

  task automatic receive();
    rd_launch <= 1; @(posedge ifclk); rd_launch <= 0;
    while (!rd_done) @(posedge ifclk);
    checks++;
    if (out_ref.size() == 0 || rd_word != out_ref[0]) begin failures++; $display("read %0h", rd_word); end
    if (out_ref.size() != 0) void'(out_ref.pop_front());
  endtask

  initial begin
    wr_launch = 0; rd_launch = 0; wr_words = 0; src_valid = 0;
    flagb_n = 1; flagc_n = 0; fd_i = 0;
    repeat (3) @(posedge ifclk); rst_n = 1; @(posedge ifclk);
    for (int i = 0; i < 10; i++) receive();
    send(3 * PKT);
    send(100);
    for (int i = 0; i < 10; i++) receive();
    send(PKT - 1);
    receive();
    checks++;
    if (n_full_stall == 0 || n_empty_stall == 0 || n_pktend != 2) begin
      failures++; $display("stalls full %0d empty %0d, pktend %0d", n_full_stall, n_empty_stall, n_pktend);
    end
    $display("packets %0d, full stalls %0d, empty stalls %0d", n_pkts, n_full_stall, n_empty_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge ifclk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
