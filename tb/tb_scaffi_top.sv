// tb_scaffi_top: end-to-end run of the whole design at its default sizes.
// All three designs run at the same time:
//  - bundled channel: 300 random words with random gaps and random receiver
//    back-pressure, then a 1 us refusal during which the sender clock must
//    stay frozen;
//  - dual-rail channel: 300 random words, random gaps and back-pressure;
//  - GALS RSA: one 128-bit exponentiation checked against a reference.
// Every word must arrive once and in order. Each mechanism of the design is
// counted and must occur at least once: sender clock stretch, receiver clock
// stretch at the high and at the low level, back-pressure holding a word,
// sender frozen by a refusing receiver, dual-rail valid and spacer phases,
// and the exponentiation clock stopped across a multiplication.
`timescale 1ps/1ps
module tb_scaffi_top;
  import scaffi_pkg::*;
  localparam int W = DATA_W;
  localparam int RW = RSA_W;
  localparam int TX_HALF = 500_000 / SENDER_MHZ;
  localparam int RX_HALF = 500_000 / RECEIVER_MHZ;
  localparam int NWORDS = 300;

  logic rst;
  logic bnd_tx_clk, bnd_tx_valid, bnd_tx_ready, bnd_rx_clk, bnd_rx_valid, bnd_rx_accept;
  logic [W-1:0] bnd_tx_data, bnd_rx_data;
  logic dr_tx_clk, dr_tx_valid, dr_tx_ready, dr_rx_clk, dr_rx_valid, dr_rx_accept;
  logic [W-1:0] dr_tx_data, dr_rx_data, dr_rail_t, dr_rail_f;
  logic rsa_mx_clk, rsa_mm_clk, rsa_start, rsa_busy, rsa_done, rsa_mm_busy;
  logic [RW-1:0] rsa_base, rsa_exponent, rsa_modulus, rsa_result;

  int checks = 0, failures = 0;

  scaffi_top dut (.*);

  task automatic fail(input string msg);
    failures++;
    $display("%0t: %s", $time, msg);
  endtask

  initial begin
    #20_000_000_000;
    fail("watchdog expired");
    $display("bnd sent %0d recv %0d, dr sent %0d recv %0d", bnd_sent, bnd_recv, dr_sent, dr_recv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int bnd_tx_stretch = 0, bnd_rx_hi = 0, bnd_rx_lo = 0, bnd_hold = 0;
  int dr_valid = 0, dr_spacer = 0, dr_rx_hi = 0, dr_rx_lo = 0, dr_hold = 0;
  int sender_frozen = 0, rsa_stopped = 0;
  always @(posedge dut.u_bundled.tx_as) if (!rst) bnd_tx_stretch++;
  always @(posedge dut.u_bundled.rx_as) if (!rst) begin
    if (bnd_rx_clk) bnd_rx_hi++; else bnd_rx_lo++;
  end
  always @(posedge dut.u_dual_rail.rx_as) if (!rst) begin
    if (dr_rx_clk) dr_rx_hi++; else dr_rx_lo++;
  end
  always @(posedge dut.u_dual_rail.rx_ar) if (!rst) dr_valid++;
  always @(negedge dut.u_dual_rail.rx_ar) if (!rst) dr_spacer++;
  always @(dr_rail_t or dr_rail_f) if ((dr_rail_t & dr_rail_f) != '0) fail("rail pair (1,1)");

  // no clock phase shorter than nominal on the channel islands
  time tl[4] = '{0, 0, 0, 0};
  always @(bnd_tx_clk) begin if (!rst && $time - tl[0] < TX_HALF) fail("short clock phase"); tl[0] = $time; end
  always @(bnd_rx_clk) begin if (!rst && $time - tl[1] < RX_HALF) fail("short clock phase"); tl[1] = $time; end
  always @(dr_tx_clk)  begin if (!rst && $time - tl[2] < TX_HALF) fail("short clock phase"); tl[2] = $time; end
  always @(dr_rx_clk)  begin if (!rst && $time - tl[3] < RX_HALF) fail("short clock phase"); tl[3] = $time; end

  // ---------------- bundled channel ----------------
  logic [W-1:0] bq[$], dq[$];
  int bnd_sent = 0, bnd_recv = 0, dr_sent = 0, dr_recv = 0;
  logic bnd_throttle = 1;
  always @(posedge bnd_tx_clk) begin
    if (rst) begin
      bnd_tx_valid <= 1'b0; bnd_tx_data <= '0;
    end else begin
      if (bnd_tx_valid && bnd_tx_ready) begin bq.push_back(bnd_tx_data); bnd_sent++; end
      if (!(bnd_tx_valid && !bnd_tx_ready)) begin
        bnd_tx_valid <= (bnd_sent + ((bnd_tx_valid && bnd_tx_ready) ? 1 : 0) < NWORDS + 20) &&
                        $urandom_range(3) != 0;
        bnd_tx_data  <= W'($urandom);
      end
    end
  end
  always @(posedge bnd_rx_clk) begin
    if (rst) bnd_rx_accept <= 1'b1;
    else begin
      if (bnd_rx_valid) begin
        checks++; bnd_recv++;
        if (bq.size() == 0 || bnd_rx_data !== bq.pop_front()) fail("bundled: wrong word");
      end
      if (dut.u_bundled.rx_sr != dut.u_bundled.rx_sa && !bnd_rx_accept) bnd_hold++;
      if (bnd_throttle) bnd_rx_accept <= $urandom_range(2) != 0;
    end
  end

  // ---------------- dual-rail channel ----------------
  always @(posedge dr_tx_clk) begin
    if (rst) begin
      dr_tx_valid <= 1'b0; dr_tx_data <= '0;
    end else begin
      if (dr_tx_valid && dr_tx_ready) begin dq.push_back(dr_tx_data); dr_sent++; end
      if (!(dr_tx_valid && !dr_tx_ready)) begin
        dr_tx_valid <= (dr_sent + ((dr_tx_valid && dr_tx_ready) ? 1 : 0) < NWORDS) &&
                       $urandom_range(3) != 0;
        dr_tx_data  <= W'($urandom);
      end
    end
  end
  always @(posedge dr_rx_clk) begin
    if (rst) dr_rx_accept <= 1'b1;
    else begin
      if (dr_rx_valid) begin
        checks++; dr_recv++;
        if (dq.size() == 0 || dr_rx_data !== dq.pop_front()) fail("dual rail: wrong word");
      end
      if (dut.u_dual_rail.rx_sr != dut.u_dual_rail.rx_sa && !dr_rx_accept) dr_hold++;
      dr_rx_accept <= $urandom_range(2) != 0;
    end
  end

  // ---------------- RSA reference ----------------
  function automatic logic [RW-1:0] mulmod(input logic [RW-1:0] x, y, m);
    logic [2*RW-1:0] p;
    p = {{RW{1'b0}}, x} * {{RW{1'b0}}, y};
    return RW'(p % {{RW{1'b0}}, m});
  endfunction
  function automatic logic [RW-1:0] powmod(input logic [RW-1:0] x, e, m);
    logic [RW-1:0] r = 1;
    for (int i = RW - 1; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, x, m);
    end
    return r;
  endfunction

  // the exponentiation clock must not move while a product is computed
  int mx_edges_in_product = 0;
  always @(posedge rsa_mx_clk) if (rsa_mm_busy) mx_edges_in_product++;
  always @(negedge rsa_mm_busy) if (!rst) rsa_stopped++;

  initial begin
    logic [RW-1:0] m, x, e, expect_r;
    int txe;
    rst = 1; rsa_start = 0; rsa_base = '0; rsa_exponent = '0; rsa_modulus = 7;
    #300_000 rst = 0;
    fork
      begin : rsa
        m = {$urandom, $urandom, $urandom, $urandom} | (RW'(1) << (RW - 1)) | 1;
        x = {$urandom, $urandom, $urandom, $urandom} % m;
        e = {$urandom, $urandom, $urandom, $urandom};
        expect_r = powmod(x, e, m);
        @(posedge rsa_mx_clk);
        rsa_modulus <= m; rsa_base <= x; rsa_exponent <= e; rsa_start <= 1'b1;
        @(posedge rsa_mx_clk) rsa_start <= 1'b0;
        do @(posedge rsa_mx_clk); while (!rsa_done);
        checks++;
        if (rsa_result !== expect_r) fail("RSA: wrong result");
        checks++;
        if (mx_edges_in_product != 0) fail("RSA: exponentiation clock ran during a product");
      end
      begin : channels
        wait (bnd_recv >= NWORDS);
        // refusal window on the bundled channel
        bnd_throttle = 0;
        @(posedge bnd_rx_clk) bnd_rx_accept <= 1'b0;
        #200_000;
        txe = 0;
        fork
          begin forever begin @(posedge bnd_tx_clk); txe++; end end
          #1_000_000;
        join_any
        disable fork;
        checks++;
        if (txe != 0) fail("sender clock ran while receiver refused");
        else sender_frozen++;
        @(posedge bnd_rx_clk) bnd_rx_accept <= 1'b1;
        wait (bnd_recv == NWORDS + 20 && dr_recv == NWORDS);
      end
    join
    #1_000_000;
    checks++;
    if (bq.size() != 0 || dq.size() != 0) fail("words left in flight");
    $display("bundled: %0d words, sender stretches %0d, receiver stretches high %0d low %0d, held %0d",
             bnd_recv, bnd_tx_stretch, bnd_rx_hi, bnd_rx_lo, bnd_hold);
    $display("dual rail: %0d words, valid %0d spacer %0d, receiver stretches high %0d low %0d, held %0d",
             dr_recv, dr_valid, dr_spacer, dr_rx_hi, dr_rx_lo, dr_hold);
    $display("sender frozen by refusal %0d, RSA products with exponentiation clock stopped %0d",
             sender_frozen, rsa_stopped);
    checks++;
    if (bnd_tx_stretch == 0 || bnd_rx_hi == 0 || bnd_rx_lo == 0 || bnd_hold == 0 ||
        dr_valid == 0 || dr_spacer == 0 || dr_rx_hi == 0 || dr_rx_lo == 0 || dr_hold == 0 ||
        sender_frozen == 0 || rsa_stopped == 0)
      fail("a mechanism never occurred");
    checks++;
    if (dr_valid != dr_recv || dr_spacer != dr_recv) fail("dual rail phases do not match words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
