// tb_noc_width_run: one run of the whole network with a chosen data path
// width DP_W (1, 8, 16 or 32 bits between packet sender, CDMA transmitter and
// packet receiver). Used by tb_cdma_noc_widths, which runs the narrower
// configurations side by side.
//
// Each of the six hosts (own clock) sends NMSG random messages of 1..9 words
// to random nodes; every received word is checked against a queue per
// (source, destination) pair. On the channel each packet must occupy exactly
// (PKT_LEN+1)*FLIT_W/DP_W consecutive slots. The run reports through its
// ports when it is done, with its own check and failure counts; the
// three-user model in the top is held in reset here.
module tb_noc_width_run #(
  parameter int DP_W = 8,
  parameter int NMSG = 6
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import cdma_noc_pkg::*;
  localparam int N = NODES, FW = FLIT_W, PL = PKT_LEN, AW = $clog2(NODES);
  localparam int NSYM = (PL + 1) * FW / DP_W;

  logic net_clk = 0, net_rst = 1;
  logic [N-1:0] host_clk = '0, host_rst = '1;
  logic [N-1:0] h_tx_valid, h_tx_ready, h_tx_last, h_rx_valid, h_rx_ready, h_rx_last;
  logic [N-1:0][AW-1:0] h_tx_dest, h_rx_src;
  logic [N-1:0][FW-1:0] h_tx_data, h_rx_data;
  logic [N-1:0][7:0] h_rx_seq;
  logic slot_sync;
  logic [N-1:0] ch_active, node_sending, node_receiving, node_waiting;
  logic m_clk = 0, m_rst = 1, m_sync;
  logic [2:0] m_msg = '0, m_cycle;
  logic [1:0] m_txout;

  cdma_noc_top #(.DP_W(DP_W)) dut (.*);

  initial begin checks = 0; failures = 0; done = 0; end
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL (DP_W=%0d): %s", DP_W, what); end
  endtask

  always #5 net_clk = ~net_clk;
  for (genvar n = 0; n < N; n++) begin : g_clk
    always #(4 + 2 * n) host_clk[n] = ~host_clk[n];
  end

  typedef struct { logic [FW-1:0] d; bit last; } w_t;
  w_t exp_q [N][N][$];
  int sent_words = 0, got_words = 0, hosts_done = 0;

  for (genvar n = 0; n < N; n++) begin : g_host
    always @(negedge host_clk[n]) begin
      h_rx_ready[n] = !host_rst[n] && ($urandom_range(0, 3) != 0);
      if (h_rx_valid[n] && h_rx_ready[n]) begin
        int s;
        s = int'(h_rx_src[n]);
        if (exp_q[s][n].size() == 0) check(0, $sformatf("node %0d: unexpected word from %0d", n, s));
        else begin
          check(h_rx_data[n] == exp_q[s][n][0].d && h_rx_last[n] == exp_q[s][n][0].last,
                $sformatf("node %0d from %0d: %h exp %h", n, s, h_rx_data[n], exp_q[s][n][0].d));
          void'(exp_q[s][n].pop_front());
        end
        got_words++;
      end
    end

    initial begin
      int len, dest;
      logic [FW-1:0] w;
      h_tx_valid[n] = 0; h_tx_last[n] = 0; h_tx_dest[n] = '0; h_tx_data[n] = '0;
      wait (!host_rst[n]);
      repeat (3) @(posedge host_clk[n]);
      for (int m = 0; m < NMSG; m++) begin
        len  = $urandom_range(1, 9);
        dest = $urandom_range(0, N - 1);
        for (int i = 0; i < len; i++) begin
          w_t e;
          w = FW'($urandom);
          e.d = w; e.last = (i == len - 1);
          exp_q[n][dest].push_back(e);
          sent_words++;
          @(negedge host_clk[n]);
          h_tx_valid[n] = 1; h_tx_data[n] = w; h_tx_dest[n] = AW'(dest); h_tx_last[n] = (i == len - 1);
          while (!h_tx_ready[n]) @(negedge host_clk[n]);
        end
        @(negedge host_clk[n]);
        h_tx_valid[n] = 0;
      end
      hosts_done++;
    end
  end

  // every packet holds the channel for exactly NSYM slots
  int run [N];
  int packets = 0, multi_slots = 0;
  always @(posedge net_clk) if (!net_rst && slot_sync) begin
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

  initial begin
    repeat (10) @(posedge net_clk);
    #0.1 net_rst = 0; host_rst = '0;
    wait (hosts_done == N);
    wait (got_words == sent_words);
    repeat (20 * NSYM + 100) @(posedge net_clk);
    for (int s = 0; s < N; s++)
      for (int d = 0; d < N; d++)
        check(exp_q[s][d].size() == 0, $sformatf("words from %0d to %0d not delivered", s, d));
    check(got_words == sent_words, "word count");
    check(multi_slots > 0, "concurrent senders seen");
    $display("DP_W=%0d: words %0d, packets %0d (%0d slots each), concurrent slots %0d",
             DP_W, got_words, packets, NSYM, multi_slots);
    done = 1;
  end
endmodule
