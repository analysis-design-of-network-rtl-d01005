// tb_onoc_top: end-to-end test of the 4x4 network at its default configuration
// (buffer size 5, PBRR, X-first routing, random traffic: 10/20/70 % high/mid/
// low, random destinations).
//
// Phase 1, light load: all sixteen producers at 0.1 flits per cycle.
// Phase 2, maximum load: all sixteen nodes produce and consume at 1.0 flits
// per cycle until 10,000 flits have been injected in total; during part of
// it four consumers are held to back traffic up into the mesh.
// Then the producers stop and the network drains.
//
// Checks: every flit injected is delivered (sum of tx_count = sum of
// rx_count), none at the wrong node; every flit's latency is at least six
// cycles per router it crosses (monitored on the local outputs); at maximum
// load high-priority flits see a lower average latency than low-priority ones.
// Mechanisms that must each occur at least once (counted, a failure if
// never): producer stall on a full input buffer, retry by a scheduler for a
// full output buffer, output buffer full, consumer hold, use of every mesh
// direction, delivery of each priority class, and a flit overtaking an older
// flit of lower priority in an input buffer.
module tb_onoc_top;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 16;
  logic        prod_en [N];
  logic [6:0]  inj_rate;
  coord_t      app_dst_x [N], app_dst_y [N];
  prio_e       app_prio [N];
  logic        cons_hold [N];
  logic [31:0] tx_count [N], rx_count [N][3], lat_sum [N][3], err_count [N];
  ts_t         lat_max [N][3];

  onoc_top dut (.clk, .rst_n, .prod_en, .inj_rate, .app_dst_x, .app_dst_y, .app_prio,
                .cons_hold, .tx_count, .rx_count, .lat_sum, .lat_max, .err_count);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- mechanism counters ----------------
  int n_stall = 0, n_retry = 0, n_ob_full = 0, n_hold = 0, n_overtake = 0, n_short = 0;
  int n_dir [NPORTS];
  int n_flits_seen = 0;
  initial for (int p = 0; p < NPORTS; p++) n_dir[p] = 0;

  for (genvar y = 0; y < 4; y++) begin : g_y
    for (genvar x = 0; x < 4; x++) begin : g_x
      localparam int n = y * 4 + x;
      always @(posedge clk) if (rst_n) begin
        if (dut.local_in[n].prio != PRIO_NONE && !dut.local_in_avail[n]) n_stall++;
        if (cons_hold[n]) n_hold++;
        // latency lower bound on delivery
        if (dut.local_out[n].prio != PRIO_NONE && dut.local_out_avail[n]) begin
          int hops;
          ts_t lat;
          hops = ((int'(dut.local_out[n].src_x) > x) ? int'(dut.local_out[n].src_x) - x : x - int'(dut.local_out[n].src_x)) +
                 ((int'(dut.local_out[n].src_y) > y) ? int'(dut.local_out[n].src_y) - y : y - int'(dut.local_out[n].src_y));
          lat = dut.now - dut.local_out[n].ts;
          if (int'(lat) < 6 * (hops + 1)) n_short++;
          n_flits_seen++;
        end
      end
      for (genvar p = 0; p < NPORTS; p++) begin : g_p
        always @(posedge clk) if (rst_n) begin
          if (dut.u_mesh.g_y[y].g_x[x].u_router.u_sched.retry[p]) n_retry++;
          if (!dut.u_mesh.g_y[y].g_x[x].u_router.g_port[p].u_ob.room) n_ob_full++;
          if (dut.u_mesh.g_y[y].g_x[x].u_router.node_out[p].prio != PRIO_NONE) n_dir[p]++;
          // overtaking: a high or mid flit leaves an input buffer that also
          // holds an older low flit
          if (dut.u_mesh.g_y[y].g_x[x].u_router.ib_out[p].prio inside {PRIO_HIGH, PRIO_MID} &&
              older_low(dut.u_mesh.g_y[y].g_x[x].u_router.g_port[p].u_ib.u_store.valid,
                        dut.u_mesh.g_y[y].g_x[x].u_router.g_port[p].u_ib.u_store.mem,
                        dut.u_mesh.g_y[y].g_x[x].u_router.ib_out[p].ts))
            n_overtake++;
        end
      end
    end
  end

  function automatic bit older_low(logic [4:0] valid, flit_t mem [5], ts_t ts);
    for (int i = 0; i < 5; i++)
      if (valid[i] && mem[i].prio == PRIO_LOW && $signed(16'(mem[i].ts - ts)) < 0) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int sum_tx();
    int s = 0;
    for (int n = 0; n < N; n++) s += int'(tx_count[n]);
    return s;
  endfunction
  function automatic int sum_rx(int c);
    int s = 0;
    for (int n = 0; n < N; n++) s += int'(rx_count[n][c]);
    return s;
  endfunction
  function automatic longint sum_lat(int c);
    longint s = 0;
    for (int n = 0; n < N; n++) s += longint'(lat_sum[n][c]);
    return s;
  endfunction

  initial begin
    int cyc;
    longint l0 [3], r0 [3];
    for (int n = 0; n < N; n++) begin
      prod_en[n] = 1'b0; cons_hold[n] = 1'b0;
      app_dst_x[n] = '0; app_dst_y[n] = '0; app_prio[n] = PRIO_LOW;
    end
    inj_rate = 7'd10;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // ---- phase 1: light load
    for (int n = 0; n < N; n++) prod_en[n] = 1'b1;
    repeat (3000) @(negedge clk);
    for (int c = 0; c < 3; c++) begin
      r0[c] = sum_rx(c);
      l0[c] = sum_lat(c);
      if (r0[c] > 0) $display("light load (0.1): class %0d: %0d flits, mean latency %0d", c, r0[c], l0[c] / r0[c]);
    end
    // ---- phase 2: maximum load until 10,000 flits have been injected
    inj_rate = 7'd100;
    cyc = 0;
    while (sum_tx() < 10000 && cyc < 200000) begin
      for (int n = 0; n < 4; n++) cons_hold[n * 5] = (cyc % 4000) >= 1000 && (cyc % 4000) < 1400;
      @(negedge clk);
      cyc++;
    end
    for (int n = 0; n < N; n++) begin prod_en[n] = 1'b0; cons_hold[n] = 1'b0; end
    // ---- drain
    cyc = 0;
    while (sum_rx(0) + sum_rx(1) + sum_rx(2) < sum_tx() && cyc < 20000) begin
      @(negedge clk);
      cyc++;
    end
    repeat (50) @(negedge clk);
    check(sum_tx() >= 10000, $sformatf("10000 flits injected (%0d)", sum_tx()));
    check(sum_rx(0) + sum_rx(1) + sum_rx(2) == sum_tx(),
          $sformatf("all flits delivered: %0d sent, %0d received", sum_tx(), sum_rx(0) + sum_rx(1) + sum_rx(2)));
    for (int n = 0; n < N; n++) check(err_count[n] == 0, $sformatf("node %0d: no misdelivered flit", n));
    check(n_short == 0, $sformatf("%0d flits faster than six cycles per router", n_short));
    check(n_flits_seen == sum_tx(), "monitor saw every delivery");
    begin
      longint mean [3];
      for (int c = 0; c < 3; c++) begin
        longint r;
        r = sum_rx(c) - r0[c];
        mean[c] = (r > 0) ? (sum_lat(c) - l0[c]) / r : 0;
        check(r > 0, $sformatf("class %0d delivered at maximum load", c));
        $display("maximum load (1.0): class %0d: %0d flits, mean latency %0d", c, r, mean[c]);
      end
      check(mean[0] < mean[2], "high priority faster than low priority at maximum load");
    end
    $display("mechanisms: stall=%0d retry=%0d ob_full=%0d hold=%0d overtake=%0d", n_stall, n_retry, n_ob_full, n_hold, n_overtake);
    $display("directions: local=%0d north=%0d east=%0d south=%0d west=%0d", n_dir[0], n_dir[1], n_dir[2], n_dir[3], n_dir[4]);
    check(n_stall > 0, "producer stall happened");
    check(n_retry > 0, "scheduler retry happened");
    check(n_ob_full > 0, "output buffer full happened");
    check(n_hold > 0, "consumer hold happened");
    check(n_overtake > 0, "priority overtaking happened");
    for (int p = 0; p < NPORTS; p++) check(n_dir[p] > 0, $sformatf("direction %0d used", p));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
