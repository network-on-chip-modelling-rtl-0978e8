// tb_node_if: the host sends messages of 1..11 words to random destinations.
// The transmit buffer (modelled here, sometimes full) must receive, per packet,
// a header with the right destination, source (3), word count, last flag and
// packet number, then four payload words zero-padded. Every packet written is
// looped back into the receive buffer model (sometimes empty), and the host
// must get back exactly the message words, with source 3, the packet numbers
// and `last` on the final word of each message, under random host back-pressure.
module tb_node_if;
  localparam int N = 6, FW = 32, PL = 4, ID = 3;
  logic clk = 0, rst;
  logic h_tx_valid, h_tx_ready, h_tx_last, h_rx_valid, h_rx_ready, h_rx_last;
  logic [2:0] h_tx_dest, h_rx_src;
  logic [7:0] h_rx_seq;
  logic [FW-1:0] h_tx_data, h_rx_data, txb_data;
  logic txb_full, txb_wr, rxb_empty, rxb_rd;
  logic [FW-1:0] rxb_data;
  int checks = 0, failures = 0;

  node_if #(.NODES(N), .FLIT_W(FW), .PKT_LEN(PL), .NODE_ID(ID)) dut (
    .clk, .rst, .h_tx_valid, .h_tx_ready, .h_tx_dest, .h_tx_data, .h_tx_last,
    .h_rx_valid, .h_rx_ready, .h_rx_src, .h_rx_seq, .h_rx_data, .h_rx_last,
    .txb_full, .txb_wr, .txb_data, .rxb_empty, .rxb_data, .rxb_rd);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected packet stream (header + PL words) and expected host words
  logic [FW-1:0] exp_txb [$];
  typedef struct { logic [FW-1:0] d; bit last; int seq; } hw_t;
  hw_t exp_rx [$];
  logic [FW-1:0] loop [$];
  bit  empty_gate;

  always_comb begin
    rxb_empty = (loop.size() == 0) || empty_gate;
    rxb_data  = (loop.size() == 0) ? '0 : loop[0];
  end

  int ntx = 0, nrx = 0;
  always @(posedge clk) if (!rst) begin
    if (txb_wr) begin
      check(!txb_full, "no write when full");
      check(exp_txb.size() > 0 && txb_data == exp_txb[0],
            $sformatf("buffer word %0d: %h exp %h", ntx, txb_data, exp_txb.size() ? exp_txb[0] : 0));
      if (exp_txb.size() > 0) void'(exp_txb.pop_front());
      loop.push_back(txb_data);
      ntx++;
    end
    if (rxb_rd) begin
      check(!rxb_empty, "no read when empty");
      void'(loop.pop_front());
    end
    if (h_rx_valid && h_rx_ready) begin
      check(exp_rx.size() > 0 && h_rx_data == exp_rx[0].d && h_rx_last == exp_rx[0].last
            && int'(h_rx_seq) == exp_rx[0].seq && h_rx_src == 3'(ID),
            $sformatf("host word %0d: %h last %0d seq %0d", nrx, h_rx_data, h_rx_last, h_rx_seq));
      if (exp_rx.size() > 0) void'(exp_rx.pop_front());
      nrx++;
    end
  end

  always @(negedge clk) begin
    txb_full   = ($urandom_range(0, 3) == 0);
    empty_gate = ($urandom_range(0, 3) == 0);
    h_rx_ready = ($urandom_range(0, 2) != 0);
  end

  initial begin
    int len, dest, seq, npk;
    logic [FW-1:0] w [12];
    rst = 1; h_tx_valid = 0; h_tx_last = 0; h_tx_dest = 0; h_tx_data = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int m = 0; m < 60; m++) begin
      len  = $urandom_range(1, 11);
      dest = $urandom_range(0, N - 1);
      for (int i = 0; i < len; i++) w[i] = FW'($urandom);
      // expected buffer contents
      npk = (len + PL - 1) / PL;
      for (int p = 0; p < npk; p++) begin
        int plen;
        logic [FW-1:0] h;
        plen = (p == npk - 1) ? len - p * PL : PL;
        h = '0;
        h[5:0]   = 6'(dest);
        h[9:6]   = 4'(ID);
        h[13:10] = 4'(plen);
        h[14]    = (p == npk - 1);
        h[22:15] = 8'(p);
        exp_txb.push_back(h);
        for (int i = 0; i < PL; i++) exp_txb.push_back(i < plen ? w[p*PL+i] : '0);
        for (int i = 0; i < plen; i++) begin
          hw_t e;
          e.d = w[p*PL+i]; e.last = (p == npk - 1) && (i == plen - 1); e.seq = p;
          exp_rx.push_back(e);
        end
      end
      // host sends the words
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        h_tx_valid = 1; h_tx_data = w[i]; h_tx_dest = 3'(dest); h_tx_last = (i == len - 1);
        while (!h_tx_ready) @(negedge clk);   // taken at the next rising edge
        @(negedge clk);
        h_tx_valid = 0;
        if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 5)) @(posedge clk);
      end
    end
    wait (exp_rx.size() == 0 && exp_txb.size() == 0);
    repeat (10) @(posedge clk);
    check(exp_rx.size() == 0 && exp_txb.size() == 0, "everything delivered");
    check(!h_rx_valid, "nothing extra delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
