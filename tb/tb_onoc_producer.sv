// tb_onoc_producer: self-checking test of the traffic producer.
//
// Three producers at node (1,0) of a 4x4 mesh:
//  * uniform pattern, rate 100 (a flit every cycle), input buffer always
//    ready: destinations must walk 2,3,...,15,0,2,... (own node 1 skipped),
//    priorities high, mid, low in turn, timestamp = cycle of creation,
//    source (1,0), payload = sequence number;
//  * random pattern, rate 33: about 33 flits per 100 cycles, destinations in
//    range and never the own node, priority mix near 10/20/70 %;
//  * application pattern: destination and priority from the input ports;
//    while buff_avail is low the flit is held unchanged, and credits are not
//    lost: after the stall all of them leave.
module tb_onoc_producer;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ts_t   now;
  logic  en [3];
  logic [6:0] rate [3];
  logic  bavail [3];
  flit_t dout [3];
  logic [31:0] txc [3];
  coord_t adx = 2'd3, ady = 2'd2;
  prio_e  aprio = PRIO_MID;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0; else now <= now + 1'b1;

  onoc_producer #(.X(1), .Y(0), .PATTERN(PAT_UNIFORM)) u_uni (
    .clk, .rst_n, .en(en[0]), .inj_rate(rate[0]), .app_dst_x(adx), .app_dst_y(ady), .app_prio(aprio),
    .now, .buff_avail(bavail[0]), .data_out(dout[0]), .tx_count(txc[0]));
  onoc_producer #(.X(1), .Y(0), .PATTERN(PAT_RANDOM)) u_rnd (
    .clk, .rst_n, .en(en[1]), .inj_rate(rate[1]), .app_dst_x(adx), .app_dst_y(ady), .app_prio(aprio),
    .now, .buff_avail(bavail[1]), .data_out(dout[1]), .tx_count(txc[1]));
  onoc_producer #(.X(1), .Y(0), .PATTERN(PAT_APP)) u_app (
    .clk, .rst_n, .en(en[2]), .inj_rate(rate[2]), .app_dst_x(adx), .app_dst_y(ady), .app_prio(aprio),
    .now, .buff_avail(bavail[2]), .data_out(dout[2]), .tx_count(txc[2]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- monitors: a flit is transferred when it is valid and buff_avail is high
  int n_sent [3] = '{0, 0, 0};
  int exp_dst = 2, exp_pr = 0, exp_seq = 0;
  int rnd_cls [3] = '{0, 0, 0};
  flit_t held;
  logic  held_v = 1'b0;
  always @(posedge clk) if (rst_n) begin
    // uniform
    if (dout[0].prio != PRIO_NONE && bavail[0]) begin
      int d;
      d = int'(dout[0].dst_y) * 4 + int'(dout[0].dst_x);
      check(d == exp_dst, $sformatf("uniform destination %0d expected %0d", d, exp_dst));
      check(dout[0].prio == prio_e'(exp_pr + 1), "uniform priority rotation");
      check(dout[0].src_x == 2'd1 && dout[0].src_y == 2'd0, "source coordinates");
      check(int'(dout[0].payload) == exp_seq, "sequence number");
      check(dout[0].ts == now - 1'b1, "timestamp is the creation cycle");
      exp_dst = (exp_dst + 1) % 16;
      if (exp_dst == 1) exp_dst = 2;
      exp_pr = (exp_pr + 1) % 3;
      exp_seq++;
      n_sent[0]++;
    end
    // random
    if (dout[1].prio != PRIO_NONE && bavail[1]) begin
      int d;
      d = int'(dout[1].dst_y) * 4 + int'(dout[1].dst_x);
      check(d != 1, "random destination is never the own node");
      rnd_cls[prio_rank(dout[1].prio)]++;
      n_sent[1]++;
    end
    // application, with stalls
    if (dout[2].prio != PRIO_NONE) begin
      if (held_v) check(dout[2] == held, "held flit unchanged while stalled");
      if (bavail[2]) begin
        check(dout[2].dst_x == adx && dout[2].dst_y == ady && dout[2].prio == aprio, "application destination and priority");
        n_sent[2]++;
        held_v <= 1'b0;
      end else begin
        held   <= dout[2];
        held_v <= 1'b1;
      end
    end
  end

  initial begin
    for (int i = 0; i < 3; i++) begin en[i] = 1'b0; bavail[i] = 1'b1; end
    rate[0] = 7'd100; rate[1] = 7'd33; rate[2] = 7'd50;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    en[0] = 1'b1; en[1] = 1'b1; en[2] = 1'b1;
    repeat (40) @(negedge clk);
    bavail[2] = 1'b0;                 // stall the application producer
    repeat (40) @(negedge clk);
    check(n_sent[2] >= 19 && n_sent[2] <= 21, $sformatf("rate 50: %0d flits in 40 cycles", n_sent[2]));
    bavail[2] = 1'b1;
    repeat (220) @(negedge clk);
    en[0] = 1'b0; en[2] = 1'b0;
    check(n_sent[0] >= 299 && n_sent[0] <= 301, $sformatf("rate 100: %0d flits in 300 cycles", n_sent[0]));
    check(n_sent[2] >= 149 && n_sent[2] <= 151, $sformatf("rate 50 with stall: %0d flits, none lost", n_sent[2]));
    check(int'(txc[0]) == n_sent[0] && int'(txc[2]) == n_sent[2], "tx_count matches");
    repeat (2700) @(negedge clk);
    en[1] = 1'b0;
    @(negedge clk);
    check(n_sent[1] >= 985 && n_sent[1] <= 995, $sformatf("rate 33: %0d flits in 3000 cycles", n_sent[1]));
    check(rnd_cls[0] > n_sent[1] * 5 / 100 && rnd_cls[0] < n_sent[1] * 15 / 100, $sformatf("about 10%% high (%0d)", rnd_cls[0]));
    check(rnd_cls[1] > n_sent[1] * 14 / 100 && rnd_cls[1] < n_sent[1] * 26 / 100, $sformatf("about 20%% mid (%0d)", rnd_cls[1]));
    check(rnd_cls[2] > n_sent[1] * 62 / 100 && rnd_cls[2] < n_sent[1] * 78 / 100, $sformatf("about 70%% low (%0d)", rnd_cls[2]));
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
