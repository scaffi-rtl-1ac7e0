// tb_scaffi_bundled: end-to-end test of a bundled-data SCAFFI channel with
// the sender island at 50 MHz and the receiver island at 78 MHz.
//  1. 150 random words with random gaps: all arrive, once, in order.
//  2. Back-to-back words: the time per word must stay below two sender clock
//     periods, and the throughput is printed.
//  3. Receiver holds accept low for 1 us: the sender clock must be frozen
//     for that time while the receiver clock keeps running; no word is lost.
// Throughout: every clock phase of both islands is at least a nominal half
// period long (stretching only ever lengthens a phase), and stretches of the
// receiver clock are seen at both levels.
`timescale 1ps/1ps
module tb_scaffi_bundled;
  import scaffi_pkg::*;
  localparam int W = DATA_W;
  localparam int TX_HALF = 500_000 / SENDER_MHZ;
  localparam int RX_HALF = 500_000 / RECEIVER_MHZ;

  logic rst;
  logic tx_clk, tx_valid, tx_ready, rx_clk, rx_valid, rx_accept;
  logic [W-1:0] tx_data, rx_data;
  int checks = 0, failures = 0;
  int rx_count = 0, tx_count = 0;
  int tx_stretch = 0, rx_stretch_hi = 0, rx_stretch_lo = 0;
  logic [W-1:0] expected_q[$];

  scaffi_bundled dut (.rst, .tx_clk, .tx_data, .tx_valid, .tx_ready,
    .rx_clk, .rx_data, .rx_valid, .rx_accept);

  task automatic fail(input string msg);
    failures++;
    $display("%0t: %s", $time, msg);
  endtask

  initial begin
    #5_000_000_000;
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // no clock phase shorter than nominal
  time tx_last = 0, rx_last = 0;
  always @(tx_clk) begin
    if (!rst && $time - tx_last < TX_HALF) fail("short sender clock phase");
    if ($time - tx_last > TX_HALF + 1000) tx_stretch++;
    tx_last = $time;
  end
  always @(rx_clk) begin
    if (!rst && $time - rx_last < RX_HALF) fail($sformatf("short receiver clock phase %0t", $time - rx_last));
    rx_last = $time;
  end
  always @(posedge dut.rx_as) begin
    if (rx_clk) rx_stretch_hi++; else rx_stretch_lo++;
  end

  // latency of single transfers: sender SR toggle to receiver SR toggle
  // (word available to the receiver), and length of the sender stretch
  time t_sr = 0, lat_sum = 0, t_rs = 0, str_sum = 0;
  int  lat_n = 0, str_n = 0;
  always @(dut.tx_sr) if (!rst) t_sr = $time;
  always @(dut.rx_sr) if (!rst && t_sr != 0) begin lat_sum += $time - t_sr; lat_n++; end
  always @(posedge dut.tx_rs) if (!rst) t_rs = $time;
  always @(negedge dut.tx_rs) if (!rst && t_rs != 0) begin str_sum += $time - t_rs; str_n++; end

  // sender island logic
  int  gap_mode = 1;   // 1: random gaps, 0: back to back
  int  to_send  = 0;
  always @(posedge tx_clk) begin
    if (rst) begin
      tx_valid <= 1'b0;
      tx_data  <= '0;
    end else begin
      if (tx_valid && tx_ready) begin
        expected_q.push_back(tx_data);
        tx_count++;
        to_send--;
      end
      if (!(tx_valid && !tx_ready)) begin
        tx_valid <= (to_send - ((tx_valid && tx_ready) ? 1 : 0) > 0) &&
                    (gap_mode == 0 || $urandom_range(2) == 0);
        tx_data  <= W'($urandom);
      end
    end
  end

  // receiver island logic
  time last_rx_time = 0;
  always @(posedge rx_clk) begin
    if (!rst && rx_valid) begin
      checks++;
      rx_count++;
      last_rx_time = $time;
      if (expected_q.size() == 0) fail("unexpected word");
      else if (rx_data !== expected_q.pop_front()) fail("wrong word");
    end
  end

  initial begin
    time t0, t1;
    int n0, txe;
    rst = 1; rx_accept = 1;
    #200_000 rst = 0;
    // 1. random gaps
    to_send = 150;
    wait (rx_count == 150);
    // 2. back to back
    gap_mode = 0;
    to_send = 201;
    wait (rx_count == 151);
    t0 = last_rx_time; n0 = rx_count;
    wait (rx_count == 351);
    t1 = last_rx_time;
    checks++;
    $display("back to back: %0d ps per word, %0d kwords/s",
             (t1 - t0) / (rx_count - n0), 1_000_000_000 / ((t1 - t0) / (rx_count - n0)));
    if ((t1 - t0) / (rx_count - n0) >= 4 * TX_HALF) fail("slower than two sender periods per word");
    // 3. back-pressure
    @(negedge rx_clk) rx_accept = 0;
    to_send = 20;
    #200_000;
    txe = 0;
    fork
      begin : count_tx
        forever begin @(posedge tx_clk); txe++; end
      end
      #1_000_000;
    join_any
    disable fork;
    checks++;
    if (txe != 0) fail($sformatf("sender clock ran %0d edges while receiver refused", txe));
    @(negedge rx_clk) rx_accept = 1;
    wait (rx_count == 371);
    #500_000;
    checks++;
    if (expected_q.size() != 0) fail("words left in flight");
    checks++;
    if (tx_stretch == 0 || rx_stretch_hi == 0 || rx_stretch_lo == 0)
      fail("stretch not seen on both islands and both levels");
    $display("request to data available: %0d ps, sender stretch: %0d ps (averages)",
             lat_sum / lat_n, str_sum / str_n);
    $display("words %0d, sender stretches %0d, receiver stretches high %0d low %0d",
             rx_count, tx_stretch, rx_stretch_hi, rx_stretch_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
