// tb_bisync_fifo -- self-checking test of the dual-clock FIFO.
// Writer and reader run on unrelated clocks (10 ns / 7 ns, then 10 ns /
// 23 ns) with random requests. A queue model checks that data come out in
// order and unchanged, that a write is never taken when the FIFO already
// holds DEPTH words and a read never when it is empty. Directed parts check
// that `full` rises when the reader stops, that `empty` falls within three
// read-clock edges of a write into an empty FIFO, and that after reset both
// flags are in their idle state.
module tb_bisync_fifo;
  localparam int W = 16, D = 8;

  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  int   rper = 7;
  always #5 wclk = ~wclk;
  always begin #(rper / 2.0); rclk = ~rclk; end

  logic         wreq, rreq, full, empty;
  logic [W-1:0] wdata, rdata;

  bisync_fifo #(.DATA_W(W), .DEPTH(D)) dut (
    .write_clk(wclk), .write_rst_n(wrst_n), .write_req(wreq), .write_data(wdata), .full,
    .read_clk(rclk), .read_rst_n(rrst_n), .read_req(rreq), .read_data(rdata), .empty);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic [W-1:0] model [$];
  int wr_pct = 50, rd_pct = 50;
  bit saw_full = 0;
  int n_wr = 0, n_rd = 0;

  initial begin wreq = 0; wdata = 0; rreq = 0; end

  always @(posedge wclk) if (wrst_n) begin
    if (wreq && !full) begin
      check(model.size() < D, "write accepted with FIFO full");
      model.push_back(wdata);
      n_wr++;
    end
    if (full) saw_full = 1;
    wreq  <= ($urandom % 100) < wr_pct;
    wdata <= W'($urandom);
  end

  always @(posedge rclk) if (rrst_n) begin
    if (rreq && !empty) begin
      check(model.size() > 0, "read accepted with FIFO empty");
      if (model.size() > 0) check(rdata == model.pop_front(), "data mismatch");
      n_rd++;
    end
    rreq <= ($urandom % 100) < rd_pct;
  end

  initial begin
    repeat (3) @(posedge wclk);
    #1;
    check(empty && !full, "flags after reset");
    wrst_n = 1; rrst_n = 1;
    // random, both clocks
    repeat (3000) @(posedge wclk);
    // reader stopped: FIFO must fill up
    rd_pct = 0;
    repeat (40) @(posedge wclk);
    check(saw_full && full, "full never asserted");
    check(model.size() == D, "FIFO did not hold DEPTH words when full");
    rd_pct = 100; wr_pct = 0;
    repeat (60) @(posedge wclk);
    check(empty && model.size() == 0, "did not drain");
    // write into empty FIFO: empty must fall within 3 read edges
    rd_pct = 0;
    @(posedge wclk); #1;
    wreq = 1; wdata = 16'hbeef;
    @(posedge wclk); #1;
    wreq = 0;
    begin
      int edges;
      edges = 0;
      while (empty && edges < 10) begin @(posedge rclk); #0.1; edges++; end
      check(edges <= 3, $sformatf("write-to-read latency %0d read edges", edges));
      check(rdata == 16'hbeef, "fall-through data");
    end
    // slow reader
    rper = 23; rd_pct = 70; wr_pct = 50;
    repeat (3000) @(posedge wclk);
    wr_pct = 0; rd_pct = 100;
    repeat (200) @(posedge wclk);
    check(model.size() == 0 && empty, "not empty at end");
    $display("writes=%0d reads=%0d", n_wr, n_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge wclk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
