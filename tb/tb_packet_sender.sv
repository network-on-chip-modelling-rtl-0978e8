// tb_packet_sender: the transmit buffer, the arbiter and the channel slots are
// modelled here. Random packets (header naming a random destination, four
// payload words) are queued; the arbiter grants after a random delay. Checks:
// tx_dest is the header's destination; no symbol is offered before the grant;
// the symbols taken are the packet's words cut into 8-bit pieces, low piece
// first, header first; they go in back-to-back slots (20 slots per packet, the
// constant transfer time); tx_req is held for exactly one slot after the last
// symbol and then dropped.
module tb_packet_sender;
  localparam int N = 6, FW = 32, DW = 8, PL = 4, L = 8;
  localparam int NSYM = (PL + 1) * FW / DW;
  logic clk = 0, rst;
  logic buf_empty, buf_rd, tx_req, tx_gnt, sym_valid, slot_load, sending;
  logic [FW-1:0] buf_data;
  logic [2:0] tx_dest;
  logic [DW-1:0] sym_data;
  int checks = 0, failures = 0;
  logic [FW-1:0] fifo [$];
  logic [DW-1:0] exp_sym [$];
  int exp_dest [$];
  bit ended = 0;
  int npkts = 0, slots_in_pkt = 0, cyc = 0, last_take = -100;

  packet_sender #(.NODES(N), .FLIT_W(FW), .DP_W(DW), .PKT_LEN(PL)) dut (
    .clk, .rst, .buf_empty, .buf_data, .buf_rd, .tx_req, .tx_dest, .tx_gnt,
    .sym_valid, .sym_data, .slot_load, .sending);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first-word-fall-through buffer model
  always_comb begin
    buf_empty = (fifo.size() == 0);
    buf_data  = buf_empty ? '0 : fifo[0];
  end

  task automatic queue_packet();
    logic [FW-1:0] w;
    int d;
    d = $urandom_range(0, N - 1);
    w = '0;
    w[5:0] = 6'(d);
    w[9:6] = 4'($urandom);
    exp_dest.push_back(d);
    for (int i = 0; i <= PL; i++) begin
      if (i > 0) w = FW'($urandom);
      fifo.push_back(w);
      for (int k = 0; k < FW / DW; k++) exp_sym.push_back(w[k*DW +: DW]);
    end
  endtask

  // arbiter model and slot timing
  int gdelay = 0;
  always @(posedge clk) begin
    if (rst) begin
      tx_gnt <= 0; cyc <= 0; gdelay <= 0;
    end else begin
      cyc <= cyc + 1;
      if (buf_rd) void'(fifo.pop_front());
      if (tx_req && !tx_gnt) begin
        if (gdelay == 0) gdelay <= $urandom_range(1, 30);
        else if (gdelay == 1) begin
          tx_gnt <= 1; gdelay <= 0;
          check(exp_dest.size() > 0 && int'(tx_dest) == exp_dest[0], $sformatf("dest %0d", tx_dest));
          void'(exp_dest.pop_front());
        end else gdelay <= gdelay - 1;
      end
      if (!tx_req && tx_gnt) tx_gnt <= 0;
    end
  end
  always_comb slot_load = !rst && (cyc % L == L - 1);

  always @(negedge clk) if (!rst) begin
    if (sym_valid) check(tx_gnt, "offer only with grant");
    if (sym_valid && slot_load) begin
      check(exp_sym.size() > 0 && sym_data == exp_sym[0],
            $sformatf("symbol %0d of packet %0d: %h exp %h", slots_in_pkt, npkts, sym_data, exp_sym[0]));
      void'(exp_sym.pop_front());
      if (slots_in_pkt > 0) check(cyc - last_take == L, "symbols in back-to-back slots");
      last_take = cyc;
      slots_in_pkt++;
      if (slots_in_pkt == NSYM) begin npkts++; slots_in_pkt = 0; ended = 1; end
    end
    // after the last symbol the request stays for exactly one more slot
    if (ended && !tx_req) begin
      check(cyc - last_take == L + 1, $sformatf("request dropped one slot after the end (%0d)", cyc - last_take));
      ended = 0;
    end
  end

  initial begin
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int p = 0; p < 40; p++) begin
      queue_packet();
      if ($urandom_range(0, 1)) repeat ($urandom_range(0, 200)) @(posedge clk);
    end
    wait (npkts == 40);
    repeat (50) @(posedge clk);
    check(npkts == 40, "all packets sent");
    check(!tx_req && !sending, "idle at end");
    check(exp_sym.size() == 0, "no symbols left");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
