// tb_async_fifo: writes and reads the dual-clock FIFO from two unrelated
// clocks (10 ns and 7 ns) with random push and pop pressure, and checks every
// word read against a queue kept here, that nothing is lost or duplicated,
// that `full` and `wr_free` never let the writer overrun, that the FIFO fills
// completely (full seen) and drains completely (empty seen).
module tb_async_fifo;
  localparam int W = 16, D = 8;
  logic wclk = 0, rclk = 0, wrst, rrst;
  logic wr_en, rd_en, full, empty;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] wr_free;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  int nwr = 0, nrd = 0, full_seen = 0;
  int wprob = 50, rprob = 50;

  async_fifo #(.W(W), .DEPTH(D)) dut (.wclk, .wrst, .wr_en, .wr_data, .full, .wr_free,
                                      .rclk, .rrst, .rd_en, .rd_data, .empty);

  always #5   wclk = ~wclk;
  always #3.5 rclk = ~rclk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // writer: drives between clock edges, the FIFO samples on the edge
  always @(posedge wclk) if (!wrst) begin
    check(int'(wr_free) + (nwr - nrd) <= D, "wr_free never over-reports");
    if (wr_en && !full) begin q.push_back(wr_data); nwr++; end
    if (full) full_seen++;
  end
  always @(negedge wclk) begin
    wr_en   = !wrst && !full && nwr < 600 && ($urandom_range(0, 99) < wprob);
    wr_data = W'($urandom);
  end

  // reader
  always @(posedge rclk) begin
    if (rrst) begin
      rd_en <= 0;
    end else begin
      if (rd_en && !empty) begin
        check(q.size() > 0, "read with data written");
        if (q.size() > 0) begin
          check(rd_data == q[0], $sformatf("word %0d: %h exp %h", nrd, rd_data, q[0]));
          void'(q.pop_front());
        end
        nrd++;
      end
    end
  end
  always @(negedge rclk) rd_en = !rrst && !empty && ($urandom_range(0, 99) < rprob);

  initial begin
    wrst = 1; rrst = 1;
    repeat (4) @(posedge wclk);
    wrst = 0; rrst = 0;
    // phase 1: writer fast, reader slow -> fills
    wprob = 90; rprob = 10;
    repeat (600) @(posedge wclk);
    // phase 2: reader fast -> drains
    wprob = 20; rprob = 95;
    repeat (600) @(posedge wclk);
    wprob = 60; rprob = 60;
    wait (nwr >= 600);
    wprob = 0; rprob = 100;
    repeat (200) @(posedge wclk);
    check(nwr == 600, "all words written");
    check(nrd == nwr, $sformatf("all words read: %0d of %0d", nrd, nwr));
    check(full_seen > 0, "FIFO reached full");
    check(empty, "FIFO empty at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
