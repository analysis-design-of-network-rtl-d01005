// tb_onoc_workload: scheduling-criteria and buffer-size comparison on a
// 3x1 mesh, where no flit crosses more than two hops.
//
// Four copies of the network run the same random traffic (10/20/70 %
// high/mid/low, random destinations) at 0.2 flits per cycle per node for
// 4000 cycles and then drain:
//   FCFS with buffer size 1, FCFS with buffer size 10,
//   PB with buffer size 5, PBRR with buffer size 5
// (the service level applies to buffers and scheduler alike).
// Mean latency per class is printed for each. Checks: every copy delivers
// every flit; with PB and with PBRR high-priority flits are faster on
// average than low-priority ones; with FCFS the classes see similar latency
// (no class twice as fast as another); under FCFS, latency grows with the
// buffer size (size 10 slower than size 1).
module tb_onoc_workload;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 3, NC = 4;
  logic        prod_en [N];
  logic [6:0]  inj_rate = 7'd20;
  coord_t      adx [N], ady [N];
  prio_e       apr [N];
  logic        hold [N];
  logic [31:0] tx [NC][N], rx [NC][N][3], ls [NC][N][3], er [NC][N];
  ts_t         lm [NC][N][3];

  onoc_top #(.MESH_X(3), .MESH_Y(1), .BUFF_SIZE(1), .BUF_SL(SL_FCFS), .SCHED_SL(SL_FCFS)) u_0 (
    .clk, .rst_n, .prod_en, .inj_rate, .app_dst_x(adx), .app_dst_y(ady), .app_prio(apr), .cons_hold(hold),
    .tx_count(tx[0]), .rx_count(rx[0]), .lat_sum(ls[0]), .lat_max(lm[0]), .err_count(er[0]));
  onoc_top #(.MESH_X(3), .MESH_Y(1), .BUFF_SIZE(10), .BUF_SL(SL_FCFS), .SCHED_SL(SL_FCFS)) u_1 (
    .clk, .rst_n, .prod_en, .inj_rate, .app_dst_x(adx), .app_dst_y(ady), .app_prio(apr), .cons_hold(hold),
    .tx_count(tx[1]), .rx_count(rx[1]), .lat_sum(ls[1]), .lat_max(lm[1]), .err_count(er[1]));
  onoc_top #(.MESH_X(3), .MESH_Y(1), .BUFF_SIZE(5), .BUF_SL(SL_PB), .SCHED_SL(SL_PB)) u_2 (
    .clk, .rst_n, .prod_en, .inj_rate, .app_dst_x(adx), .app_dst_y(ady), .app_prio(apr), .cons_hold(hold),
    .tx_count(tx[2]), .rx_count(rx[2]), .lat_sum(ls[2]), .lat_max(lm[2]), .err_count(er[2]));
  onoc_top #(.MESH_X(3), .MESH_Y(1), .BUFF_SIZE(5), .BUF_SL(SL_PBRR), .SCHED_SL(SL_PBRR)) u_3 (
    .clk, .rst_n, .prod_en, .inj_rate, .app_dst_x(adx), .app_dst_y(ady), .app_prio(apr), .cons_hold(hold),
    .tx_count(tx[3]), .rx_count(rx[3]), .lat_sum(ls[3]), .lat_max(lm[3]), .err_count(er[3]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int tot_tx(int k);
    int s = 0;
    for (int n = 0; n < N; n++) s += int'(tx[k][n]);
    return s;
  endfunction
  function automatic int tot_rx(int k, int c);
    int s = 0;
    for (int n = 0; n < N; n++) s += int'(rx[k][n][c]);
    return s;
  endfunction
  function automatic int mean_lat(int k, int c);
    longint s = 0;
    for (int n = 0; n < N; n++) s += longint'(ls[k][n][c]);
    return (tot_rx(k, c) > 0) ? int'(s / tot_rx(k, c)) : 0;
  endfunction

  string names [NC] = '{"FCFS bs1", "FCFS bs10", "PB bs5", "PBRR bs5"};

  initial begin
    int m [NC][3];
    for (int n = 0; n < N; n++) begin
      prod_en[n] = 1'b0; hold[n] = 1'b0; adx[n] = '0; ady[n] = '0; apr[n] = PRIO_LOW;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < N; n++) prod_en[n] = 1'b1;
    repeat (4000) @(negedge clk);
    for (int n = 0; n < N; n++) prod_en[n] = 1'b0;
    // drain: producers still send the flits they owe, then the network empties
    for (int t = 0; t < 30000; t++) begin
      bit done = 1'b1;
      for (int k = 0; k < NC; k++)
        if (tot_rx(k, 0) + tot_rx(k, 1) + tot_rx(k, 2) != tot_tx(k)) done = 1'b0;
      if (done && t > 100) break;
      @(negedge clk);
    end
    for (int k = 0; k < NC; k++) begin
      int r;
      r = tot_rx(k, 0) + tot_rx(k, 1) + tot_rx(k, 2);
      for (int c = 0; c < 3; c++) m[k][c] = mean_lat(k, c);
      $display("%-10s sent %0d received %0d  mean latency high %0d mid %0d low %0d",
               names[k], tot_tx(k), r, m[k][0], m[k][1], m[k][2]);
      check(tot_tx(k) > 500 && r == tot_tx(k), $sformatf("%s delivers every flit", names[k]));
      for (int n = 0; n < N; n++) check(er[k][n] == 0, "no misdelivered flit");
    end
    check(m[2][0] < m[2][2], "PB: high faster than low");
    check(m[3][0] < m[3][2], "PBRR: high faster than low");
    check(m[0][0] * 2 > m[0][2] && m[0][2] * 2 > m[0][0], "FCFS: high and low alike");
    check(m[1][2] > m[0][2], "FCFS: buffer size 10 slower than size 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
