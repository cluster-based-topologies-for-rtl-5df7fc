// tb_noc3d_top -- end-to-end test of the whole design at its default size:
// the 64-node CIT and the 64-node CMIT networks run side by side under the
// same clocks (layers at 10, 8, 12, 10 ns; bus 10 ns), each driven by its own
// noc_traffic instance (uniform, non-uniform and hotspot request/response
// traffic, full packet checking, mechanism counters).
// Timing: both networks are released from reset together; the test ends when
// both traffic engines are done, or after 400000 bus cycles (watchdog).
// The traffic mix (request/response, burst 1-8, uniform, non-uniform,
// hotspot) follows the described evaluation; the node placement, the request
// counts and the clock periods are this testbench's own choices.
// Result: TB_RESULT with the checks and failures of both networks summed.
module tb_noc3d_top;
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

  logic  a_tx_v [NODES], a_tx_r [NODES], a_rx_v [NODES], a_rx_r [NODES], a_nb [16];
  flit_t a_tx_f [NODES], a_rx_f [NODES];
  logic  b_tx_v [NODES], b_tx_r [NODES], b_rx_v [NODES], b_rx_r [NODES], b_nb [16];
  flit_t b_tx_f [NODES], b_rx_f [NODES];
  logic  a_done, b_done;
  int    a_checks, a_fail, b_checks, b_fail;

  noc3d_top dut (
    .clk, .rst_n, .rclk, .rrst_n,
    .cit_tx_valid(a_tx_v), .cit_tx_ready(a_tx_r), .cit_tx_flit(a_tx_f),
    .cit_rx_valid(a_rx_v), .cit_rx_ready(a_rx_r), .cit_rx_flit(a_rx_f), .cit_nb_event(a_nb),
    .cmit_tx_valid(b_tx_v), .cmit_tx_ready(b_tx_r), .cmit_tx_flit(b_tx_f),
    .cmit_rx_valid(b_rx_v), .cmit_rx_ready(b_rx_r), .cmit_rx_flit(b_rx_f), .cmit_nb_event(b_nb));

  noc_traffic #(.TOPO(0), .NAME("CIT")) u_cit (
    .clk, .rclk, .rrst_n, .tx_v(a_tx_v), .tx_r(a_tx_r), .tx_f(a_tx_f),
    .rx_v(a_rx_v), .rx_r(a_rx_r), .rx_f(a_rx_f), .nb(a_nb),
    .done(a_done), .checks(a_checks), .failures(a_fail));
  noc_traffic #(.TOPO(1), .NAME("CMIT")) u_cmit (
    .clk, .rclk, .rrst_n, .tx_v(b_tx_v), .tx_r(b_tx_r), .tx_f(b_tx_f),
    .rx_v(b_rx_v), .rx_r(b_rx_r), .rx_f(b_rx_f), .nb(b_nb),
    .done(b_done), .checks(b_checks), .failures(b_fail));

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int l = 0; l < L; l++) rrst_n[l] = 1;
    wait (a_done && b_done);
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_fail + b_fail);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", a_checks + b_checks, a_fail + b_fail + 1);
    $finish;
  end
endmodule
