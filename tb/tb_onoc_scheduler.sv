// tb_onoc_scheduler: self-checking test of the scheduler state machine.
//
// Five simple input-buffer models hold fixed lists of requests (port 1: one
// low, port 2: two high, port 3: one high, port 4: one mid). Like the real
// buffer, a model's request is registered and withdrawn while its flit is in
// flight. The node's output_port is modelled as (granted port + 1) mod 5.
// Checks, for the PBRR scheduler:
//   * grant order 2, 3, 2, 4, 1 (most urgent first, round robin among equals);
//   * the grant carries the requested priority and is a single-cycle pulse;
//   * router_load in the grant cycle, req_buff_avail on the right output
//     buffer one cycle later, confirm and router_xfer together one cycle after
//     that, i.e. two cycles after the grant;
//   * with the output buffer full, retry instead of confirm, and no transfer.
module tb_onoc_scheduler;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  prio_e data_in_buff [NPORTS];
  prio_e node_grant   [NPORTS];
  logic  confirm [NPORTS], retry [NPORTS];
  logic  router_load, router_xfer;
  port_e output_port;
  logic  req_buff_avail [NPORTS];
  logic  buff_avail     [NPORTS];

  onoc_scheduler dut (
    .clk, .rst_n, .data_in_buff, .node_grant, .confirm, .retry,
    .router_load, .router_xfer, .output_port, .req_buff_avail, .buff_avail);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- input buffer models ----------------
  prio_e q [NPORTS][$];
  logic  pend [NPORTS];
  logic  ob_full = 1'b0;
  int    last_sel = 0;
  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (!rst_n) begin
        pend[p] <= 1'b0;
      end else if (node_grant[p] != PRIO_NONE) begin
        pend[p] <= 1'b1;
        last_sel <= p;
      end else if (confirm[p]) begin
        pend[p] <= 1'b0;
        void'(q[p].pop_front());
      end else if (retry[p]) pend[p] <= 1'b0;
      if (pend[p] || node_grant[p] != PRIO_NONE || confirm[p] || retry[p] || q[p].size() == 0)
        data_in_buff[p] <= PRIO_NONE;
      else
        data_in_buff[p] <= q[p][0];
    end
  end
  assign output_port = port_e'((last_sel + 1) % NPORTS);
  always_comb for (int p = 0; p < NPORTS; p++) buff_avail[p] = req_buff_avail[p] && !ob_full;

  // ---------------- protocol monitor ----------------
  int grants [$];
  int n_grant = 0, n_confirm = 0, n_retry = 0, n_xfer = 0;
  int t_grant = -100, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    int ng;
    cyc++;
    ng = 0;
    for (int p = 0; p < NPORTS; p++) begin
      if (node_grant[p] != PRIO_NONE) begin
        ng++;
        grants.push_back(p);
        check(node_grant[p] == q[p][0], "grant carries the requested priority");
        t_grant = cyc;
      end
      if (confirm[p]) begin
        n_confirm++;
        check(cyc == t_grant + 2, "confirm two cycles after grant");
        check(p == last_sel, "confirm goes to the granted buffer");
      end
      if (retry[p]) begin
        n_retry++;
        check(cyc == t_grant + 2, "retry two cycles after grant");
      end
      if (req_buff_avail[p]) check(p == int'(output_port) && cyc == t_grant + 1,
                                   "req_buff_avail names the routed output one cycle after load");
    end
    check(ng <= 1, "at most one grant at a time");
    n_grant += ng;
    if (router_load) check(cyc == t_grant, "router_load in the grant cycle");
    if (router_xfer) begin
      n_xfer++;
      check(cyc == t_grant + 2, "router_xfer in the confirm cycle");
    end
  end

  initial begin
    q[1] = '{PRIO_LOW};
    q[2] = '{PRIO_HIGH, PRIO_HIGH};
    q[3] = '{PRIO_HIGH};
    q[4] = '{PRIO_MID};
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (60) @(negedge clk);
    check(grants.size() == 5, $sformatf("five grants (%0d)", grants.size()));
    if (grants.size() == 5) begin
      static int exp [5] = '{2, 3, 2, 4, 1};
      for (int i = 0; i < 5; i++)
        check(grants[i] == exp[i], $sformatf("grant %0d went to port %0d, expected %0d", i, grants[i], exp[i]));
    end
    check(n_confirm == 5 && n_xfer == 5 && n_retry == 0, "five confirms and transfers, no retry");
    // output buffer full: expect retries only
    ob_full = 1'b1;
    q[0] = '{PRIO_MID};
    repeat (30) @(negedge clk);
    check(n_retry >= 2, $sformatf("retries while the output buffer is full (%0d)", n_retry));
    check(n_confirm == 5 && n_xfer == 5, "no confirm while the output buffer is full");
    ob_full = 1'b0;
    repeat (20) @(negedge clk);
    check(n_confirm == 6 && q[0].size() == 0, "flit confirmed once room returns");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
