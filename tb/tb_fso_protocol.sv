// tb_fso_protocol: end-to-end test of two FSO terminals linked back to back.
//
// Terminal A runs at 50 MHz. Terminal B runs at 51.67 MHz for the first
// half of the test and at 48.44 MHz for the second, so the receivers must
// follow a far transmitter that is about 3 % faster and then 3 % slower.
// Both directions carry random bytes at the same time (full duplex). The
// serial lines pass through a channel model that can flip bits (noise),
// hold the line low (loss of signal) or add a delay step (bit slip).
// Phases:
//   1  link start-up, 400 bytes each way, exact compare, throughput check
//   2  B stops reading its output FIFO: the receive FIFO nearly fills, B
//      asks A to stop, A's input FIFO fills; then B reads again - all 2500
//      bytes must arrive exactly, none lost
//   3  B switches to 48.44 MHz; noise burst on A->B (short-term error)
//   4  A->B held low for 60 words (long-term error)
//   5  delay step of 2.5 bits on A->B (alignment slip)
// After every error phase the link must recover by itself and a further
// 300-byte transfer must arrive exactly. Every mechanism (synchronisation,
// sper, syncer, dser, stoprec/startrec commands, stoptrans, receive FIFO
// threshold, input FIFO full, error entries) is counted and must occur.
// Runs with the design's default parameters.
`timescale 1ns/1ps
module tb_fso_protocol;
  // ---------------- clocks ----------------
  logic a_clk = 0, a_rclk = 0, b_clk = 0, b_rclk = 0;
  logic a_wclk = 0, b_wclk = 0, a_oclk = 0, b_oclk = 0;
  realtime b_half = 9.677;  // 51.67 MHz
  always #10.0 a_clk = ~a_clk;
  initial begin #3.1; forever #10.0 a_rclk = ~a_rclk; end       // A's second PLL output
  always #(b_half) b_clk = ~b_clk;
  always @(b_clk) b_rclk <= #2.3 b_clk;                             // B's second PLL output
  always #15.0 a_wclk = ~a_wclk;
  always #13.0 b_wclk = ~b_wclk;
  always #12.5 a_oclk = ~a_oclk;
  always #11.0 b_oclk = ~b_oclk;

  logic rst_n = 0;

  // ---------------- DUTs and channel ----------------
  logic       a_wr = 0, b_wr = 0, a_rd = 0, b_rd = 0;
  logic [7:0] a_din = 0, b_din = 0, a_dout, b_dout;
  logic       a_full, b_full, a_empty, b_empty, a_derr, b_derr;
  logic       a_tx, b_tx, ab_line, ba_line;
  logic       a_sync, a_sper, a_syncer, a_dser, b_sync, b_sper, b_syncer, b_dser;

  // channel A->B: noise, stuck-low, delay step
  logic ab_flip = 0, ab_stuck = 0, ab_slip = 0, ab_del;
  logic [199:0] ab_dl = '0;   // 200 ns delay line sampled every 1 ns
  logic ch_clk = 0;
  always #0.5 ch_clk = ~ch_clk;
  always @(posedge ch_clk) ab_dl <= {ab_dl[198:0], a_tx};
  assign ab_del = ab_dl[199];
  assign ab_line = ab_stuck ? 1'b0 : ((ab_slip ? ab_del : a_tx) ^ ab_flip);
  assign ba_line = b_tx;

  fso_protocol dut_a (
    .tx_clk(a_clk), .rx_clk(a_rclk), .rst_n(rst_n),
    .input_fifo_clk(a_wclk), .input_fifo_wrreq(a_wr), .input_data(a_din), .input_fifo_full(a_full),
    .output_fifo_clk(a_oclk), .output_fifo_rdreq(a_rd), .output_fifo_empty(a_empty),
    .output_data(a_dout), .output_data_err(a_derr),
    .serial_from_pin(ba_line), .serial_to_LD(a_tx),
    .rx_sync(a_sync), .rx_sper(a_sper), .rx_syncer(a_syncer), .rx_dser(a_dser)
  );
  fso_protocol dut_b (
    .tx_clk(b_clk), .rx_clk(b_rclk), .rst_n(rst_n),
    .input_fifo_clk(b_wclk), .input_fifo_wrreq(b_wr), .input_data(b_din), .input_fifo_full(b_full),
    .output_fifo_clk(b_oclk), .output_fifo_rdreq(b_rd), .output_fifo_empty(b_empty),
    .output_data(b_dout), .output_data_err(b_derr),
    .serial_from_pin(ab_line), .serial_to_LD(b_tx),
    .rx_sync(b_sync), .rx_sper(b_sper), .rx_syncer(b_syncer), .rx_dser(b_dser)
  );

  // ---------------- scoreboard ----------------
  int checks = 0, failures = 0;
  logic [7:0] q_ab[$], q_ba[$];
  int  to_send_a = 0, to_send_b = 0;
  bit  rd_en_a = 1, rd_en_b = 1;
  bit  strict = 1;          // compare exactly; off during error phases
  int  got_ab = 0, got_ba = 0, err_entries = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: %s", $realtime, what);
    end
  endtask

  // writers: decide on the falling edge, the FIFO samples on the rising edge
  always @(negedge a_wclk) begin
    a_wr <= 0;
    if (rst_n && to_send_a > 0 && !a_full) begin
      logic [7:0] v;
      v = 8'($urandom);
      a_wr <= 1; a_din <= v; q_ab.push_back(v); to_send_a--;
    end
  end
  always @(negedge b_wclk) begin
    b_wr <= 0;
    if (rst_n && to_send_b > 0 && !b_full) begin
      logic [7:0] v;
      v = 8'($urandom);
      b_wr <= 1; b_din <= v; q_ba.push_back(v); to_send_b--;
    end
  end

  // readers: q is valid after the rising edge that took rdreq
  bit b_rd_q = 0, a_rd_q = 0;
  always @(negedge b_oclk) begin
    if (b_rd_q) begin
      if (b_derr) err_entries++;
      else if (strict) begin
        check(q_ab.size() > 0 && b_dout == q_ab[0],
              $sformatf("A->B byte %0d: got %02h exp %02h", got_ab, b_dout, q_ab.size() ? q_ab[0] : 8'h0));
        if (q_ab.size() > 0) void'(q_ab.pop_front());
      end
      got_ab++;
    end
    b_rd   <= rst_n && rd_en_b && !b_empty;
    b_rd_q <= rst_n && rd_en_b && !b_empty;
  end
  always @(negedge a_oclk) begin
    if (a_rd_q) begin
      if (a_derr) err_entries++;
      else if (strict) begin
        check(q_ba.size() > 0 && a_dout == q_ba[0],
              $sformatf("B->A byte %0d: got %02h exp %02h", got_ba, a_dout, q_ba.size() ? q_ba[0] : 8'h0));
        if (q_ba.size() > 0) void'(q_ba.pop_front());
      end
      got_ba++;
    end
    a_rd   <= rst_n && rd_en_a && !a_empty;
    a_rd_q <= rst_n && rd_en_a && !a_empty;
  end

  // ---------------- mechanism counters ----------------
  int n_sync = 0, n_sper = 0, n_syncer = 0, n_dser = 0;
  int n_stoprec = 0, n_startrec = 0, n_stoptrans = 0, n_rxfifo_stop = 0, n_infull = 0;
  logic p_sync = 0, p_sper = 0, p_syncer = 0, p_dser = 0, p_st = 0, p_af = 0, p_inf = 0;
  logic pa_sync = 0;
  always @(posedge b_rclk) begin
    if (b_sync && !p_sync) n_sync++;
    if (b_sper && !p_sper) n_sper++;
    if (b_syncer && !p_syncer) n_syncer++;
    if (b_dser && !p_dser) n_dser++;
    if (dut_b.inst1.u_recfifo.wrafull && !p_af) n_rxfifo_stop++;
    p_sync <= b_sync; p_sper <= b_sper; p_syncer <= b_syncer; p_dser <= b_dser;
    p_af <= dut_b.inst1.u_recfifo.wrafull;
  end
  always @(posedge a_rclk) begin
    if (a_sync && !pa_sync) n_sync++;
    pa_sync <= a_sync;
    if (dut_a.inst1.stoptrans && rst_n && !p_st) n_stoptrans++;
    p_st <= dut_a.inst1.stoptrans && rst_n;
  end
  always @(posedge a_clk) begin
    if (dut_a.inst.u_putmng.regcon == fso_pkg::SEL_STOPREC && dut_a.inst.u_register.load) n_stoprec++;
    if (dut_a.inst.u_putmng.regcon == fso_pkg::SEL_STARTREC && dut_a.inst.u_register.load) n_startrec++;
  end
  always @(posedge b_clk) begin
    if (dut_b.inst.u_putmng.regcon == fso_pkg::SEL_STOPREC && dut_b.inst.u_register.load) n_stoprec++;
    if (dut_b.inst.u_putmng.regcon == fso_pkg::SEL_STARTREC && dut_b.inst.u_register.load) n_startrec++;
  end
  always @(posedge a_wclk) begin
    if (a_full && !p_inf) n_infull++;
    p_inf <= a_full;
  end

  // ---------------- helpers ----------------
  localparam realtime BIT_NS = 80.0;   // 4 cycles of 50 MHz

  task automatic wait_link_up(input string what);
    int t = 0;
    while (!(a_sync && b_sync && !a_sper && !b_sper && !a_dser && !b_dser &&
             !dut_a.inst1.stoptrans && !dut_b.inst1.stoptrans) && t < 200000) begin
      #100; t++;
    end
    check(t < 200000, {"link up: ", what});
    $display("%0t link up: %s", $realtime, what);
  endtask

  task automatic wait_drained(input int max_us);
    int t = 0;
    while ((q_ab.size() != 0 || q_ba.size() != 0 || to_send_a != 0 || to_send_b != 0) && t < max_us * 10) begin
      #100; t++;
    end
  endtask

  task automatic clean_transfer(input int n, input string what);
    strict = 1;
    to_send_a = n; to_send_b = n;
    wait_drained(4000);
    check(q_ab.size() == 0 && q_ba.size() == 0 && to_send_a == 0 && to_send_b == 0,
          $sformatf("%s: all bytes delivered (left %0d/%0d)", what, q_ab.size(), q_ba.size()));
  endtask

  task automatic flush_after_error(input string what);
    // stop sending, let the link recover and everything in flight drain,
    // then forget what was lost
    to_send_a = 0; to_send_b = 0;
    #(BIT_NS * 12 * 400);
    wait_link_up(what);
    #(BIT_NS * 12 * 2200);
    q_ab.delete(); q_ba.delete();
    #(BIT_NS * 12 * 20);
  endtask

  // ---------------- watchdog ----------------
  initial begin
    #30ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- test sequence ----------------
  initial begin
    realtime t0, t1;
    int n0, k;
    #200 rst_n = 1;

    // 1: start-up and clean transfer at +3.3 %
    wait_link_up("start-up");
    n0 = got_ab;
    t0 = $realtime;
    clean_transfer(400, "phase 1");
    t1 = $realtime;
    // throughput: 12 bits per byte, commands steal about 1 slot in 32
    check((got_ab - n0) == 400, "phase 1 byte count");
    check((t1 - t0) < 400 * 12 * BIT_NS * 1.15 + 20000.0 && (t1 - t0) > 400 * 12 * BIT_NS * 0.95,
          $sformatf("phase 1 rate: %0.0f ns for 400 bytes", t1 - t0));
    $display("phase 1: 400 bytes in %0.1f us (line capacity %0.1f us)", (t1 - t0) / 1000.0, 400 * 12 * BIT_NS / 1000.0);

    // 2: receive FIFO fills, flow control, nothing lost
    rd_en_b = 0;
    to_send_a = 2500;
    #(BIT_NS * 12 * 2200);
    check(q_ab.size() > 1014 + 1014 - 60, $sformatf("phase 2: backlog %0d while B does not read", q_ab.size()));
    check(dut_a.inst1.stoptrans == 1, "phase 2: A told to stop");
    $display("%0t phase 2: backlog %0d, A input full %0b", $realtime, q_ab.size(), a_full);
    rd_en_b = 1;
    wait_drained(4000);
    $display("%0t phase 2: drained, left %0d", $realtime, q_ab.size());
    check(q_ab.size() == 0 && to_send_a == 0, "phase 2: all 2500 bytes delivered");
    wait_link_up("after FIFO full");

    // 3: 48.44 MHz, noise burst
    b_half = 10.322;
    #(BIT_NS * 12 * 100);
    wait_link_up("after clock change");
    clean_transfer(300, "phase 3a");
    strict = 0;
    to_send_a = 300; to_send_b = 300;
    #(BIT_NS * 12 * 60);
    k = n_sper;
    repeat (6) begin
      ab_flip = 1; #(BIT_NS); ab_flip = 0; #(BIT_NS * 7);
    end
    check(n_sper > k, "phase 3: short-term error (sper) raised");
    flush_after_error("after noise");
    clean_transfer(300, "phase 3b");

    // 4: line held low
    strict = 0;
    to_send_a = 100;
    #(BIT_NS * 12 * 20);
    k = n_dser;
    ab_stuck = 1;
    #(BIT_NS * 6 * 60);
    ab_stuck = 0;
    check(n_dser > k, "phase 4: long-term error (dser) raised");
    flush_after_error("after loss of signal");
    clean_transfer(300, "phase 4");

    // 5: delay step (bit slip)
    strict = 0;
    to_send_a = 100;
    #(BIT_NS * 12 * 20);
    k = n_syncer;
    ab_slip = 1;
    #(BIT_NS * 12 * 400);
    check(n_syncer > k, "phase 5: alignment slip (syncer) raised");
    flush_after_error("after slip");
    clean_transfer(300, "phase 5");

    $display("mechanisms: sync=%0d sper=%0d syncer=%0d dser=%0d stoprec_cmd=%0d startrec_cmd=%0d stoptrans=%0d rxfifo_threshold=%0d input_full=%0d error_entries=%0d",
             n_sync, n_sper, n_syncer, n_dser, n_stoprec, n_startrec, n_stoptrans, n_rxfifo_stop, n_infull, err_entries);
    check(n_sync > 0, "synchronisation happened");
    check(n_sper > 0, "short-term error happened");
    check(n_syncer > 0, "alignment slip happened");
    check(n_dser > 0, "long-term error happened");
    check(n_stoprec > 0, "stoprec command sent");
    check(n_startrec > 0, "startrec command sent");
    check(n_stoptrans > 0, "stoptrans raised");
    check(n_rxfifo_stop > 0, "receive FIFO threshold reached");
    check(n_infull > 0, "input FIFO full");
    check(err_entries > 0, "error entries written");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
