// tb_onoc_mesh: self-checking test of the 4x4 mesh backbone.
//
//  1. One flit from router 0 at (0,0) to router 15 at (3,3) passes seven
//     routers (X-first: three hops east, three south, then out locally). With
//     six clock edges per router it must reach the local output after 7*6 =
//     42 edges.
//  2. Every local port injects random flits (random destination and
//     priority, payload = unique tag) whenever its input buffer has room, at
//     about 0.2 flits per cycle, while the local receivers occasionally
//     refuse room. Each flit must arrive exactly once, unchanged, at the local
//     output of its destination router.
module tb_onoc_mesh;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 16;
  flit_t local_in [N];
  logic  local_in_avail [N];
  flit_t local_out [N];
  logic  local_out_avail [N];

  onoc_mesh dut (.clk, .rst_n, .local_in, .local_in_avail, .local_out, .local_out_avail);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int exp_node [int];
  flit_t sent [int];
  int n_in = 0, n_out = 0;
  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (local_out[n].prio != PRIO_NONE) begin
        int key;
        key = int'(local_out[n].payload);
        check(local_out_avail[n], "no flit without room");
        check(exp_node.exists(key), $sformatf("flit %0d delivered once", key));
        if (exp_node.exists(key)) begin
          check(exp_node[key] == n, $sformatf("flit %0d at node %0d expected %0d", key, n, exp_node[key]));
          check(local_out[n] == sent[key], "flit unchanged");
          exp_node.delete(key);
          sent.delete(key);
        end
        n_out++;
      end
    end
  end

  initial begin
    for (int n = 0; n < N; n++) begin local_in[n] = NO_FLIT; local_out_avail[n] = 1'b1; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    begin
      flit_t f;
      int t;
      f = NO_FLIT;
      f.prio = PRIO_MID; f.dst_x = 2'd3; f.dst_y = 2'd3; f.payload = PAYLOAD_W'(5);
      exp_node[5] = 15; sent[5] = f;
      local_in[0] = f;
      @(negedge clk);
      local_in[0] = NO_FLIT;
      t = 1;
      while (local_out[15].prio == PRIO_NONE && t < 100) begin
        @(negedge clk);
        t++;
      end
      check(t == 42, $sformatf("(0,0) to (3,3) took %0d clock edges, expected 42", t));
      @(negedge clk);
    end
    for (int cyc = 0; cyc < 6000; cyc++) begin
      for (int n = 0; n < N; n++) begin
        local_in[n] = NO_FLIT;
        if (cyc < 4000 && local_in_avail[n] && ($urandom % 100) < 20) begin
          flit_t f;
          int d;
          f = NO_FLIT;
          d = $urandom % N;
          f.prio = prio_e'(1 + $urandom % 3);
          f.ts = ts_t'(cyc);
          f.src_x = coord_t'(n % 4); f.src_y = coord_t'(n / 4);
          f.dst_x = coord_t'(d % 4); f.dst_y = coord_t'(d / 4);
          f.payload = PAYLOAD_W'(100 + n_in);
          exp_node[100 + n_in] = d;
          sent[100 + n_in] = f;
          n_in++;
          local_in[n] = f;
        end
        local_out_avail[n] = (cyc >= 4000) || (($urandom % 100) < 70);
      end
      @(negedge clk);
    end
    check(exp_node.size() == 0, $sformatf("%0d flits never arrived", exp_node.size()));
    check(n_out == n_in + 1, $sformatf("%0d in, %0d out", n_in + 1, n_out));
    check(n_in > 1000, $sformatf("enough traffic (%0d)", n_in));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
