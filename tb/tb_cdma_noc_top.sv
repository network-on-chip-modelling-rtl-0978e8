// tb_cdma_noc_top: end-to-end test of the whole design at its default sizes
// (six nodes, 8-chip codes, 32-bit data path, 4-word packets).
//
// Every host runs on its own clock (7..17 ns; the network runs at 10 ns) and
// sends random messages of 1..11 words to random nodes, itself included. Each
// word received by a host is checked against a per (source, destination)
// queue kept here: data, source and end-of-message mark. Host 5 stops reading
// for a while so its receive buffer fills and its packet receiver has to hold
// off the arbiter. Every packet must occupy exactly five consecutive slots on
// the channel (the constant transfer time). Beside the network, the
// three-user transmission model is fed random messages and decoded here.
// The mechanisms the design has are counted, and each must occur:
// concurrent senders in one slot, senders waiting for a busy receiver, the
// arbiter choosing among several waiting senders (arrival order is checked in
// its own testbench),
// receivers holding off for lack of room, messages split into several packets,
// padded short packets, loopback to the sending node, and model messages.
module tb_cdma_noc_top;
  import cdma_noc_pkg::*;
  localparam int N = NODES, FW = FLIT_W, PL = PKT_LEN, AW = $clog2(NODES);
  localparam int NSYM = (PL + 1) * FW / DP_W;
  localparam int NMSG = 25;     // messages per host

  logic net_clk = 0, net_rst = 1;
  logic [N-1:0] host_clk = '0, host_rst = '1;
  logic [N-1:0] h_tx_valid, h_tx_ready, h_tx_last, h_rx_valid, h_rx_ready, h_rx_last;
  logic [N-1:0][AW-1:0] h_tx_dest, h_rx_src;
  logic [N-1:0][FW-1:0] h_tx_data, h_rx_data;
  logic [N-1:0][7:0] h_rx_seq;
  logic slot_sync;
  logic [N-1:0] ch_active, node_sending, node_receiving, node_waiting;
  logic m_clk = 0, m_rst, m_sync;
  logic [2:0] m_msg, m_cycle;
  logic [1:0] m_txout;

  cdma_noc_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  always #5 net_clk = ~net_clk;
  always #4 m_clk = ~m_clk;
  for (genvar n = 0; n < N; n++) begin : g_clk
    always #(3.5 + n) host_clk[n] = ~host_clk[n];
  end

  initial begin
    #1ms;         // a normal run ends after about 60 us
    failures++;
    $display("watchdog: hosts done %0d, words %0d of %0d, req %b gnt %b open %b ack %b",
             hosts_done, got_words, sent_words, dut.tx_req, dut.tx_gnt, dut.rx_open, dut.rx_ack);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- scoreboard ----------------
  typedef struct { logic [FW-1:0] d; bit last; } w_t;
  w_t exp_q [N][N][$];          // [src][dest]
  int sent_words = 0, got_words = 0;
  int n_split = 0, n_pad = 0, n_loop = 0;
  int hosts_done = 0;

  for (genvar n = 0; n < N; n++) begin : g_host
    // receive side of host n: ready is chosen at the falling edge; a word
    // shown with ready high then is taken at the next rising edge
    bit hold_off = 0;
    always @(negedge host_clk[n]) begin
      h_rx_ready[n] = !host_rst[n] && !hold_off && ($urandom_range(0, 3) != 0);
      if (h_rx_valid[n] && h_rx_ready[n]) begin
        int s;
        s = int'(h_rx_src[n]);
        if (exp_q[s][n].size() == 0) check(0, $sformatf("node %0d: unexpected word from %0d", n, s));
        else begin
          check(h_rx_data[n] == exp_q[s][n][0].d && h_rx_last[n] == exp_q[s][n][0].last,
                $sformatf("node %0d from %0d: %h/%0d exp %h/%0d", n, s, h_rx_data[n], h_rx_last[n],
                          exp_q[s][n][0].d, exp_q[s][n][0].last));
          void'(exp_q[s][n].pop_front());
        end
        got_words++;
      end
    end

    // host 5 stops reading for a fixed time once its third message starts
    initial begin
      wait (hold_off);
      repeat (1500) @(posedge host_clk[n]);
      hold_off = 0;
    end

    // transmit side of host n
    initial begin
      int len, dest;
      logic [FW-1:0] w;
      h_tx_valid[n] = 0; h_tx_last[n] = 0; h_tx_dest[n] = '0; h_tx_data[n] = '0;
      wait (!host_rst[n]);
      repeat (5) @(posedge host_clk[n]);
      for (int m = 0; m < NMSG; m++) begin
        len  = (m < 3) ? 4 * (m + 1) - 2 * m : $urandom_range(1, 11);  // 4, 6, 8 first
        dest = (m == 0) ? n : $urandom_range(0, N - 1);
        if (n == 5 && m == 2) hold_off = 1;
        if (len > PL) n_split++;
        if (len % PL != 0) n_pad++;
        if (dest == n) n_loop++;
        for (int i = 0; i < len; i++) begin
          w_t e;
          w = FW'($urandom);
          e.d = w; e.last = (i == len - 1);
          exp_q[n][dest].push_back(e);
          sent_words++;
          @(negedge host_clk[n]);
          h_tx_valid[n] = 1; h_tx_data[n] = w; h_tx_dest[n] = AW'(dest); h_tx_last[n] = (i == len - 1);
          while (!h_tx_ready[n]) @(negedge host_clk[n]);   // taken at the next rising edge
        end
        @(negedge host_clk[n]);
        h_tx_valid[n] = 0;
        if ($urandom_range(0, 2) == 0) repeat ($urandom_range(1, 60)) @(posedge host_clk[n]);
      end
      hosts_done++;
    end
  end

  // ---------------- channel observation (network clock) ----------------
  int run [N];
  int multi_slots = 0, wait_busy = 0, rx_holdoff = 0, packets = 0;
  int holdcnt [N];
  int queued_picks = 0;          // receiver chosen among several waiting senders
  logic [N-1:0] open_q = '0;
  always @(posedge net_clk) if (!net_rst) begin
    if (slot_sync) begin
      if ($countones(ch_active) >= 2) multi_slots++;
      for (int n = 0; n < N; n++) begin
        if (ch_active[n]) run[n]++;
        else if (run[n] > 0) begin
          check(run[n] == NSYM, $sformatf("node %0d packet took %0d slots", n, run[n]));
          packets++;
          run[n] = 0;
        end
      end
    end
    for (int s = 0; s < N; s++)
      if (node_waiting[s])
        for (int o = 0; o < N; o++)
          if (o != s && dut.tx_gnt[o] && dut.tx_dest[o] == dut.tx_dest[s]) wait_busy++;
    for (int d = 0; d < N; d++)
      if (dut.rx_open[d] && !open_q[d])
        for (int o = 0; o < N; o++)
          if (node_waiting[o] && !dut.tx_gnt[o] && int'(dut.tx_dest[o]) == d && o != int'(dut.rx_src[d])) begin
            queued_picks++;
            break;
          end
    open_q <= dut.rx_open;
    for (int d = 0; d < N; d++) begin
      if (dut.rx_open[d] && !dut.rx_ack[d]) holdcnt[d]++;
      else holdcnt[d] = 0;
      if (holdcnt[d] == 8) rx_holdoff++;
    end
  end

  // ---------------- three-user model ----------------
  logic [2:0] pn_st [7] = '{3'b001, 3'b010, 3'b101, 3'b011, 3'b111, 3'b110, 3'b100};
  int m_msgs = 0;
  initial begin
    logic [2:0] cur;
    int pos [3], neg [3];
    m_rst = 1; m_msg = 3'd5;
    repeat (3) @(posedge m_clk);
    #0.1 m_rst = 0;
    cur = m_msg;
    @(posedge m_clk); #0.1;
    forever begin
      for (int c = 0; c < 7; c++) begin
        int e;
        e = 0;
        for (int u = 0; u < 3; u++) e += int'(cur[u] ^ pn_st[c][u]);
        check(m_cycle == 3'(c) && m_sync == (c == 0) && int'(m_txout) == e, "model chip");
        for (int u = 0; u < 3; u++) begin
          if (c == 0) begin pos[u] = 0; neg[u] = 0; end
          if (pn_st[c][u]) neg[u] += int'(m_txout); else pos[u] += int'(m_txout);
        end
        if (c == 6) m_msg = 3'($urandom);
        @(posedge m_clk); #0.1;
      end
      for (int u = 0; u < 3; u++) check((pos[u] > neg[u]) == cur[u], "model decode");
      m_msgs++;
      cur = m_msg;
    end
  end

  // ---------------- run ----------------
  initial begin
    net_rst = 1; host_rst = '1;
    repeat (10) @(posedge net_clk);
    #0.1 net_rst = 0; host_rst = '0;
    wait (hosts_done == N);
    wait (got_words == sent_words);
    repeat (200) @(posedge net_clk);
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        check(exp_q[s][d].size() == 0, $sformatf("words from %0d to %0d not delivered", s, d));
    check(got_words == sent_words, "word count");
    $display("words %0d, packets %0d, concurrent slots %0d, waits for busy receiver %0d, receiver hold-offs %0d",
             got_words, packets, multi_slots, wait_busy, rx_holdoff);
    $display("arbiter choices among several waiting senders %0d", queued_picks);
    $display("split messages %0d, padded packets %0d, loopback messages %0d, model messages %0d",
             n_split, n_pad, n_loop, m_msgs);
    check(multi_slots > 0,  "concurrent senders seen");
    check(wait_busy > 0,    "sender waited for busy receiver");
    check(queued_picks > 0, "arbiter chose among waiting senders");
    check(rx_holdoff > 0,   "receiver held off for room");
    check(n_split > 0,      "split messages");
    check(n_pad > 0,        "padded packets");
    check(n_loop > 0,       "loopback messages");
    check(m_msgs > 10,      "model messages");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
