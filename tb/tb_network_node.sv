// tb_network_node: one network node (number 2, host clock 13 ns, network clock
// 10 ns) joined to a real cdma_transmitter and network_arbiter. The other five
// nodes exist only as random interfering symbols on the channel. The host sends
// messages of 1..11 words to itself, so every word crosses the transmit buffer,
// the sender, the channel, the receiver and the receive buffer. Checks the
// words, source, packet numbers and end-of-message marks the host gets back,
// and that each packet takes five consecutive slots.
module tb_network_node;
  localparam int N = 6, FW = 32, DW = 32, PL = 4, L = 8, ID = 2;
  localparam int NSYM = (PL + 1) * FW / DW;
  logic h_clk = 0, n_clk = 0, h_rst = 1, n_rst = 1;
  logic h_tx_valid, h_tx_ready, h_tx_last, h_rx_valid, h_rx_ready, h_rx_last;
  logic [2:0] h_tx_dest, h_rx_src;
  logic [7:0] h_rx_seq;
  logic [FW-1:0] h_tx_data, h_rx_data;
  logic [N-1:0] tx_req, tx_gnt, rx_open, rx_ack, sym_valid, active;
  logic [N-1:0][2:0] tx_dest, rx_src;
  logic [N-1:0][DW-1:0] sym_data;
  logic slot_load, sync, ch_valid, sending, receiving;
  logic [2:0] ch_chip;
  logic [DW-1:0][2:0] ch_sum;
  int checks = 0, failures = 0;

  network_node #(.NODES(N), .FLIT_W(FW), .DP_W(DW), .PKT_LEN(PL), .CODE_LEN(L), .FIFO_DEPTH(16), .NODE_ID(ID)) dut (
    .h_clk, .h_rst, .n_clk, .n_rst,
    .h_tx_valid, .h_tx_ready, .h_tx_dest, .h_tx_data, .h_tx_last,
    .h_rx_valid, .h_rx_ready, .h_rx_src, .h_rx_seq, .h_rx_data, .h_rx_last,
    .tx_req(tx_req[ID]), .tx_dest(tx_dest[ID]), .tx_gnt(tx_gnt[ID]),
    .rx_open(rx_open[ID]), .rx_src(rx_src[ID]), .rx_ack(rx_ack[ID]),
    .sym_valid(sym_valid[ID]), .sym_data(sym_data[ID]), .slot_load,
    .ch_valid, .ch_chip, .ch_sum, .sending, .receiving);

  network_arbiter #(.NODES(N)) u_arb (.clk(n_clk), .rst(n_rst), .tx_req, .tx_dest, .tx_gnt, .rx_open, .rx_src, .rx_ack);
  cdma_transmitter #(.NODES(N), .DP_W(DW), .CODE_LEN(L)) u_ch (
    .clk(n_clk), .rst(n_rst), .sym_valid, .sym_data, .slot_load, .sync, .active, .ch_valid, .ch_chip, .ch_sum);

  always #5   n_clk = ~n_clk;
  always #6.5 h_clk = ~h_clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the other nodes: no requests, no acknowledges, random symbols
  for (genvar n = 0; n < N; n++) begin : g_other
    if (n != ID) begin : g_o
      assign tx_req[n] = 1'b0;
      assign tx_dest[n] = '0;
      assign rx_ack[n] = 1'b0;
      always @(posedge n_clk) if (slot_load) begin
        sym_valid[n] <= ($urandom_range(0, 2) != 0);
        sym_data[n]  <= DW'($urandom);
      end
    end
  end

  typedef struct { logic [FW-1:0] d; bit last; int seq; } w_t;
  w_t exp_q [$];
  int nrx = 0, run = 0, packets = 0;

  always @(negedge h_clk) begin
    h_rx_ready = !h_rst && ($urandom_range(0, 2) != 0);
    if (h_rx_valid && h_rx_ready) begin
      check(exp_q.size() > 0 && h_rx_data == exp_q[0].d && h_rx_last == exp_q[0].last &&
            int'(h_rx_seq) == exp_q[0].seq && h_rx_src == 3'(ID),
            $sformatf("word %0d: %h last %0d seq %0d", nrx, h_rx_data, h_rx_last, h_rx_seq));
      if (exp_q.size() > 0) void'(exp_q.pop_front());
      nrx++;
    end
  end

  always @(posedge n_clk) if (!n_rst && sync) begin
    if (active[ID]) run++;
    else if (run > 0) begin
      check(run == NSYM, $sformatf("packet took %0d slots", run));
      packets++;
      run = 0;
    end
  end

  initial begin
    int len;
    h_tx_valid = 0; h_tx_last = 0; h_tx_dest = 0; h_tx_data = 0;
    repeat (5) @(posedge h_clk);
    #0.1 h_rst = 0; n_rst = 0;
    repeat (3) @(posedge h_clk);
    for (int m = 0; m < 30; m++) begin
      len = $urandom_range(1, 11);
      for (int i = 0; i < len; i++) begin
        w_t e;
        e.d = FW'($urandom); e.last = (i == len - 1); e.seq = i / PL;
        exp_q.push_back(e);
        @(negedge h_clk);
        h_tx_valid = 1; h_tx_data = e.d; h_tx_dest = 3'(ID); h_tx_last = e.last;
        while (!h_tx_ready) @(negedge h_clk);
      end
      @(negedge h_clk);
      h_tx_valid = 0;
    end
    wait (exp_q.size() == 0);
    repeat (100) @(posedge n_clk);
    check(exp_q.size() == 0, "all words back");
    check(packets > 30, $sformatf("packets %0d", packets));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
