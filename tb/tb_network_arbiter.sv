// tb_network_arbiter: six senders and six receivers are modelled here and
// follow the four-phase exchange with random delays. Checks: a grant comes
// only after the destination was opened for that sender and acknowledged;
// no destination ever has two granted senders; every request is granted;
// transfers to different destinations overlap; when all six senders ask
// for the same destination at once they are served in round-robin order
// 0,1,2,3,4,5 and then again from the one after the last winner; when they
// ask one after another while the destination is busy they are served in the
// order they asked (4,1,5,2). Under random traffic every choice is checked
// against the arrival times kept here: no sender that asked earlier for the
// same destination may still be waiting when another one is chosen.
module tb_network_arbiter;
  localparam int N = 6, AW = 3;
  logic clk = 0, rst;
  logic [N-1:0] tx_req, tx_gnt, rx_open, rx_ack;
  logic [N-1:0][AW-1:0] tx_dest, rx_src;
  int checks = 0, failures = 0;
  int grants = 0, requests = 0, parallel_cycles = 0;
  int order [$];
  bit random_mode;
  bit hold_long;                 // directed test: transfers last 200 cycles
  longint cyc = 0, arr [N];      // cycle in which each request was raised
  always @(posedge clk) cyc <= cyc + 1;

  network_arbiter #(.NODES(N)) dut (.clk, .rst, .tx_req, .tx_dest, .tx_gnt, .rx_open, .rx_src, .rx_ack);

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

  // ---- sender models ----
  typedef enum {S_IDLE, S_WAIT, S_XFER, S_REL} sst_e;
  sst_e sst [N];
  int   scnt [N];
  always @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < N; s++) begin sst[s] <= S_IDLE; scnt[s] <= 0; end
      tx_req <= '0; tx_dest <= '0;
    end else begin
      for (int s = 0; s < N; s++) begin
        case (sst[s])
          S_IDLE: if (random_mode && $urandom_range(0, 9) == 0) begin
            tx_req[s]  <= 1'b1;
            tx_dest[s] <= AW'($urandom_range(0, N - 1));
            requests++;
            arr[s] = cyc;
            sst[s] <= S_WAIT;
          end
          S_WAIT: if (tx_gnt[s]) begin
            grants++;
            order.push_back(s);
            check(rx_open[tx_dest[s]] && rx_ack[tx_dest[s]] && rx_src[tx_dest[s]] == AW'(s),
                  $sformatf("grant to %0d without open+ack of %0d", s, tx_dest[s]));
            scnt[s] <= hold_long ? 200 : $urandom_range(1, 20);
            sst[s] <= S_XFER;
          end
          S_XFER: begin
            check(tx_gnt[s], "grant held during transfer");
            if (scnt[s] == 0) begin tx_req[s] <= 1'b0; sst[s] <= S_REL; end
            else scnt[s] <= scnt[s] - 1;
          end
          S_REL: if (!tx_gnt[s]) sst[s] <= S_IDLE;
        endcase
      end
    end
  end

  // ---- receiver models ----
  typedef enum {R_IDLE, R_ACK, R_DONE} rst_e;
  rst_e rstt [N];
  int   rcnt [N];
  always @(posedge clk) begin
    if (rst) begin
      for (int d = 0; d < N; d++) begin rstt[d] <= R_IDLE; rcnt[d] <= 0; end
      rx_ack <= '0;
    end else begin
      for (int d = 0; d < N; d++) begin
        case (rstt[d])
          R_IDLE: if (rx_open[d]) begin
            if (rcnt[d] == 0) rcnt[d] <= $urandom_range(1, 4);
            else if (rcnt[d] == 1) begin rx_ack[d] <= 1'b1; rstt[d] <= R_ACK; rcnt[d] <= 0; end
            else rcnt[d] <= rcnt[d] - 1;
          end
          R_ACK: if (!rx_open[d]) rstt[d] <= R_DONE;
          R_DONE: begin rx_ack[d] <= 1'b0; rstt[d] <= R_IDLE; end
        endcase
      end
    end
  end

  // ---- first come, first served ----
  logic [N-1:0] open_q = '0;
  int fcfs_checked = 0;
  always @(posedge clk) if (!rst) begin
    for (int d = 0; d < N; d++)
      if (rx_open[d] && !open_q[d]) begin
        int w;
        w = int'(rx_src[d]);
        for (int j = 0; j < N; j++)
          if (j != w && sst[j] == S_WAIT && int'(tx_dest[j]) == d && arr[j] < arr[w])
            check(0, $sformatf("dest %0d chose %0d (asked at %0d) before %0d (asked at %0d)",
                               d, w, arr[w], j, arr[j]));
        fcfs_checked++;
      end
    open_q <= rx_open;
  end

  // ---- global properties ----
  always @(posedge clk) if (!rst) begin
    int per_dest [N];
    int ng;
    ng = 0;
    for (int d = 0; d < N; d++) per_dest[d] = 0;
    for (int s = 0; s < N; s++) if (tx_gnt[s]) begin per_dest[tx_dest[s]]++; ng++; end
    for (int d = 0; d < N; d++) check(per_dest[d] <= 1, "one sender per destination");
    if (ng >= 2) parallel_cycles++;
  end

  int fcfs_seq [4] = '{4, 1, 5, 2};
  initial begin
    rst = 1; random_mode = 0; hold_long = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // directed: everybody asks for node 2 at once, twice
    for (int round = 0; round < 2; round++) begin
      @(negedge clk);
      for (int s = 0; s < N; s++) begin sst[s] = S_WAIT; tx_req[s] = 1; tx_dest[s] = 3'd2; arr[s] = cyc; end
      requests += N;
      wait (order.size() == N * (round + 1));
      repeat (30) @(posedge clk);
    end
    for (int i = 0; i < 2 * N; i++) check(order[i] == i % N, $sformatf("round robin order %0d: %0d", i, order[i]));
    // directed: sender 0 holds node 3, then 4, 1, 5, 2 ask for it in turn
    hold_long = 1;
    @(negedge clk);
    sst[0] = S_WAIT; tx_req[0] = 1; tx_dest[0] = 3'd3; arr[0] = cyc; requests++;
    wait (order.size() == 2 * N + 1);
    foreach (fcfs_seq[k]) begin
      repeat (7) @(negedge clk);
      sst[fcfs_seq[k]] = S_WAIT; tx_req[fcfs_seq[k]] = 1; tx_dest[fcfs_seq[k]] = 3'd3;
      arr[fcfs_seq[k]] = cyc; requests++;
    end
    wait (order.size() == 2 * N + 5);
    hold_long = 0;
    repeat (300) @(posedge clk);
    foreach (fcfs_seq[k])
      check(order[2 * N + 1 + k] == fcfs_seq[k], $sformatf("arrival order %0d: %0d", k, order[2 * N + 1 + k]));
    // random traffic
    random_mode = 1;
    repeat (20000) @(posedge clk);
    random_mode = 0;
    repeat (500) @(posedge clk);
    check(grants == requests, $sformatf("every request granted: %0d/%0d", grants, requests));
    check(fcfs_checked > 1000, $sformatf("choices checked for arrival order: %0d", fcfs_checked));
    check(parallel_cycles > 100, $sformatf("parallel transfers seen: %0d cycles", parallel_cycles));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
