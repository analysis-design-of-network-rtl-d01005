// tb_onoc_router_node: self-checking test of one complete router.
//
// Router (1,1) of a 4x4 mesh with buffer size 5, PBRR and X-first routing.
//  1. A single flit from the local input to (3,1) must appear on the east
//     output exactly six clock edges after the edge that stores it: the
//     minimum latency of one hop.
//  2. Traffic on all five inputs with random destinations and priorities
//     while the receivers behind the outputs randomly refuse room. Every flit
//     must come out once, unchanged, on the port that X-first routing gives
//     for its destination (checked with a scoreboard); no flit may appear on
//     an output without room. The test also requires that backpressure
//     happened: input buffers reported full and the scheduler answered with
//     retry at least once.
module tb_onoc_router_node;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t in_flit  [NPORTS];
  logic  in_avail [NPORTS];
  flit_t out_flit [NPORTS];
  logic  out_avail [NPORTS];

  onoc_router_node #(.X(1), .Y(1)) dut (.clk, .rst_n, .in_flit, .in_avail, .out_flit, .out_avail);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic port_e xy_port(flit_t f);
    if (int'(f.dst_x) > 1) return PORT_EAST;
    if (int'(f.dst_x) < 1) return PORT_WEST;
    if (int'(f.dst_y) > 1) return PORT_SOUTH;
    if (int'(f.dst_y) < 1) return PORT_NORTH;
    return PORT_LOCAL;
  endfunction

  // scoreboard: payload -> expected port
  int exp_port [int];
  int n_in = 0, n_out = 0, n_full = 0, n_retry = 0;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) begin
      if (out_flit[p].prio != PRIO_NONE) begin
        int key;
        key = int'(out_flit[p].payload);
        check(out_avail[p], "no flit without room downstream");
        check(exp_port.exists(key), $sformatf("flit %0d expected once", key));
        if (exp_port.exists(key)) begin
          check(exp_port[key] == p, $sformatf("flit %0d on port %0d expected %0d", key, p, exp_port[key]));
          exp_port.delete(key);
        end
        n_out++;
      end
      if (!in_avail[p]) n_full++;
      if (dut.u_sched.retry[p]) n_retry++;
    end
  end

  initial begin
    for (int p = 0; p < NPORTS; p++) begin in_flit[p] = NO_FLIT; out_avail[p] = 1'b1; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // ---- 1: single-hop latency
    begin
      flit_t f;
      int t;
      f = NO_FLIT;
      f.prio = PRIO_HIGH; f.dst_x = 2'd3; f.dst_y = 2'd1; f.payload = PAYLOAD_W'(7);
      exp_port[7] = PORT_EAST;
      check(in_avail[PORT_LOCAL], "room in the local input buffer");
      in_flit[PORT_LOCAL] = f;
      @(negedge clk);
      in_flit[PORT_LOCAL] = NO_FLIT;
      t = 1;
      while (out_flit[PORT_EAST].prio == PRIO_NONE && t < 30) begin
        @(negedge clk);
        t++;
      end
      check(t == 6, $sformatf("one hop takes %0d clock edges, expected 6", t));
      check(out_flit[PORT_EAST] == f, "flit unchanged");
      @(negedge clk);
    end
    // ---- 2: random traffic with backpressure
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int p = 0; p < NPORTS; p++) begin
        in_flit[p] = NO_FLIT;
        if (cyc < 2400 && in_avail[p] && ($urandom % 100) < 30) begin
          flit_t f;
          f = NO_FLIT;
          f.prio = prio_e'(1 + $urandom % 3);
          f.ts = ts_t'(cyc);
          f.dst_x = coord_t'($urandom % 4);
          f.dst_y = coord_t'($urandom % 4);
          f.payload = PAYLOAD_W'(1000 + n_in);
          exp_port[1000 + n_in] = int'(xy_port(f));
          n_in++;
          in_flit[p] = f;
        end
        out_avail[p] = (cyc >= 2400) || (($urandom % 100) < ((cyc < 1200) ? 40 : 5));
      end
      @(negedge clk);
    end
    check(exp_port.size() == 0, $sformatf("%0d flits never came out", exp_port.size()));
    check(n_out == n_in + 1, $sformatf("%0d in, %0d out", n_in + 1, n_out));
    check(n_in > 300, "enough traffic");
    check(n_full > 0, "input buffers filled up");
    check(n_retry > 0, $sformatf("scheduler retried (%0d)", n_retry));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
