// tb_cit_noc -- end-to-end test of the 64-node CIT network at its default
// size (4 layers x 2x2 cluster routers x 4 nodes, four pipeline buses), with
// each layer on its own clock (10, 8, 12, 10 ns; bus 10 ns). Traffic,
// memory model and checks are in noc_traffic: uniform, non-uniform and
// hotspot request/response traffic from 16 processors to 48 memories.
module tb_cit_noc;
  import noc_pkg::*;

  localparam int L = 4, NODES = 64;
  localparam int PER [L] = '{10, 8, 12, 10};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rclk [L], rrst_n [L];
  for (genvar l = 0; l < L; l++) begin : g_clk
    initial begin
      rclk[l] = 0; rrst_n[l] = 0;
      forever #(PER[l] / 2.0) rclk[l] = ~rclk[l];
    end
  end

  logic  tx_v [NODES], tx_r [NODES], rx_v [NODES], rx_r [NODES], nb [16];
  flit_t tx_f [NODES], rx_f [NODES];
  logic  done;
  int    checks, failures;

  cit_noc dut (
    .clk, .rst_n, .rclk, .rrst_n,
    .node_tx_valid(tx_v), .node_tx_ready(tx_r), .node_tx_flit(tx_f),
    .node_rx_valid(rx_v), .node_rx_ready(rx_r), .node_rx_flit(rx_f),
    .nb_event(nb));

  noc_traffic #(.TOPO(0), .NAME("CIT")) u_trf (
    .clk, .rclk, .rrst_n, .tx_v, .tx_r, .tx_f, .rx_v, .rx_r, .rx_f, .nb,
    .done, .checks, .failures);

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < L; l++) rrst_n[l] = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
