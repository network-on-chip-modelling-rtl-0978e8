// tb_packet_receiver: a real cdma_transmitter forms the channel. The testbench
// plays the arbiter (opens the receiver for a random sender), the chosen
// sender (offers the packet as 8-bit symbols, sometimes skipping a slot) and
// the other five nodes (random interfering symbols in most slots). Checks:
// the receiver does not acknowledge while its buffer reports less room than a
// packet; it acknowledges once there is room; the words it writes are the
// packet's words despite the interference and the skipped slots; it holds
// rx_ack until rx_open falls.
module tb_packet_receiver;
  localparam int N = 6, FW = 32, DW = 8, PL = 4, L = 8, SW = 3;
  localparam int NSYM = (PL + 1) * FW / DW;
  logic clk = 0, rst;
  logic rx_open, rx_ack, ch_valid, buf_wr, receiving, slot_load, sync;
  logic [2:0] rx_src, ch_chip;
  logic [DW-1:0][SW-1:0] ch_sum;
  logic [4:0] buf_free;
  logic [FW-1:0] buf_data;
  logic [N-1:0] sym_valid, active;
  logic [N-1:0][DW-1:0] sym_data;
  int checks = 0, failures = 0;
  logic [FW-1:0] exp_w [$];
  int nwords = 0, stalled = 0;

  cdma_transmitter #(.NODES(N), .DP_W(DW), .CODE_LEN(L)) u_ch (
    .clk, .rst, .sym_valid, .sym_data, .slot_load, .sync, .active, .ch_valid, .ch_chip, .ch_sum);

  packet_receiver #(.NODES(N), .FLIT_W(FW), .DP_W(DW), .PKT_LEN(PL), .CODE_LEN(L), .FREE_W(5)) dut (
    .clk, .rst, .rx_open, .rx_src, .rx_ack, .ch_valid, .ch_chip, .ch_sum,
    .buf_free, .buf_wr, .buf_data, .receiving);

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

  always @(posedge clk) if (!rst && buf_wr) begin
    check(exp_w.size() > 0 && buf_data == exp_w[0], $sformatf("word %0d: %h exp %h", nwords, buf_data, exp_w.size() ? exp_w[0] : 0));
    if (exp_w.size() > 0) void'(exp_w.pop_front());
    nwords++;
  end

  int src;
  logic [FW-1:0] pkt [PL+1];
  logic [DW-1:0] syms [$];
  // interferers: random symbols in most slots
  always @(posedge clk) begin
    if (rst) begin
      sym_valid <= '0;
    end else if (slot_load) begin
      for (int n = 0; n < N; n++) if (n != src) begin
        sym_valid[n] <= ($urandom_range(0, 3) != 0);
        sym_data[n]  <= DW'($urandom);
      end
    end
  end

  initial begin
    rst = 1; rx_open = 0; rx_src = 0; buf_free = 5'd16; src = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int p = 0; p < 30; p++) begin
      src = $urandom_range(0, N - 1);
      for (int i = 0; i <= PL; i++) begin
        pkt[i] = FW'($urandom);
        exp_w.push_back(pkt[i]);
        for (int k = 0; k < FW / DW; k++) syms.push_back(pkt[i][k*DW +: DW]);
      end
      @(negedge clk);
      sym_valid[src] = 0;
      // sometimes too little room first
      if (p % 3 == 0) begin
        buf_free = 5'($urandom_range(0, PL));
        rx_open = 1; rx_src = 3'(src);
        repeat (40) begin
          @(negedge clk);
          check(!rx_ack, "no acknowledge without room");
        end
        stalled++;
        buf_free = 5'd16;
      end
      rx_open = 1; rx_src = 3'(src);
      fork
        begin : wait_ack
          repeat (10) @(negedge clk);
        end
        wait (rx_ack);
      join_any
      disable fork;
      check(rx_ack, "acknowledge with room");
      // the sender offers its symbols, one per slot, sometimes skipping a slot
      while (syms.size() > 0) begin
        @(negedge clk);
        if (slot_load) begin
          if ($urandom_range(0, 4) == 0) sym_valid[src] = 0;
          else begin
            sym_valid[src] = 1; sym_data[src] = syms.pop_front();
          end
          @(negedge clk);
          sym_valid[src] = 0;
        end
      end
      // wait for the last symbol to pass, then release
      wait (exp_w.size() == 0);
      @(negedge clk);
      check(rx_ack, "ack held until open falls");
      rx_open = 0;
      repeat (3) @(negedge clk);
      check(!rx_ack, "ack dropped after open falls");
    end
    check(nwords == 30 * (PL + 1), $sformatf("words received %0d", nwords));
    check(stalled == 10, "stalls exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
