// tb_onoc_input_buffer: self-checking test of the input buffer.
//
// Three buffers of size 5 run side by side with the service levels PBRR,
// PB and FCFS. Each receives the same five flits (low, high, high, mid, low,
// each tagged in its payload), which fills it: buff_avail must drop. Then
// each buffer is served through the request / grant / confirm handshake and
// the order of flits on data_out is compared with the order each service
// level must give:
//   PBRR: H1 M1 L1 H2 L2   PB: H1 H2 M1 L1 L2   FCFS: L1 H1 H2 M1 L2
// The first grant of every buffer is answered with retry, after which the same
// flit must be offered again. Also checked: the request appears one cycle
// after a flit is stored, data_out is empty without a grant, no new request
// while a flit is in flight, and buff_avail returns when a slot is released.
module tb_onoc_input_buffer;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NB = 3;
  flit_t din;
  logic  avail      [NB];
  prio_e req        [NB];
  prio_e grant      [NB];
  logic  confirm    [NB], retry [NB];
  flit_t dout       [NB];

  onoc_input_buffer #(.BUFF_SIZE(5), .SL(SL_PBRR)) u_pbrr (
    .clk, .rst_n, .data_in(din), .buff_avail(avail[0]), .data_in_buff(req[0]),
    .node_grant(grant[0]), .confirm(confirm[0]), .retry(retry[0]), .data_out(dout[0]));
  onoc_input_buffer #(.BUFF_SIZE(5), .SL(SL_PB)) u_pb (
    .clk, .rst_n, .data_in(din), .buff_avail(avail[1]), .data_in_buff(req[1]),
    .node_grant(grant[1]), .confirm(confirm[1]), .retry(retry[1]), .data_out(dout[1]));
  onoc_input_buffer #(.BUFF_SIZE(5), .SL(SL_FCFS)) u_fcfs (
    .clk, .rst_n, .data_in(din), .buff_avail(avail[2]), .data_in_buff(req[2]),
    .node_grant(grant[2]), .confirm(confirm[2]), .retry(retry[2]), .data_out(dout[2]));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic flit_t mk(prio_e p, int tag);
    flit_t f;
    f = NO_FLIT;
    f.prio    = p;
    f.ts      = ts_t'(tag * 3);
    f.dst_x   = coord_t'(tag % 4);
    f.payload = PAYLOAD_W'(tag);
    return f;
  endfunction

  // tags: 1=L1 2=H1 3=H2 4=M1 5=L2
  prio_e in_prio [5] = '{PRIO_LOW, PRIO_HIGH, PRIO_HIGH, PRIO_MID, PRIO_LOW};
  int exp_order [NB][5] = '{'{2, 4, 1, 3, 5}, '{2, 3, 4, 1, 5}, '{1, 2, 3, 4, 5}};

  // Serve buffer b once: wait for a request, grant it, capture data_out.
  task automatic serve(int b, bit do_retry, output int tag);
    int guard = 0;
    prio_e r;
    tag = -1;
    while (req[b] == PRIO_NONE && guard < 20) begin
      @(negedge clk);
      guard++;
    end
    check(req[b] != PRIO_NONE, $sformatf("buffer %0d raises a request", b));
    // like the scheduler, grant one cycle after sampling the request
    r = req[b];
    @(negedge clk);
    grant[b] = r;
    #1;
    check(dout[b].prio == r, $sformatf("buffer %0d data_out carries the granted priority", b));
    tag = int'(dout[b].payload);
    @(negedge clk);
    grant[b] = PRIO_NONE;
    check(dout[b].prio == PRIO_NONE, $sformatf("buffer %0d data_out empty after grant", b));
    check(req[b] == PRIO_NONE, $sformatf("buffer %0d no request while in flight", b));
    @(negedge clk);
    check(req[b] == PRIO_NONE, $sformatf("buffer %0d still no request while in flight", b));
    if (do_retry) retry[b] = 1'b1; else confirm[b] = 1'b1;
    @(negedge clk);
    retry[b] = 1'b0;
    confirm[b] = 1'b0;
  endtask

  initial begin
    din = NO_FLIT;
    for (int b = 0; b < NB; b++) begin
      grant[b] = PRIO_NONE; confirm[b] = 1'b0; retry[b] = 1'b0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < NB; b++) begin
      check(avail[b], "empty buffer has room");
      check(req[b] == PRIO_NONE, "empty buffer raises no request");
    end
    // store one flit, request must follow one cycle later
    for (int i = 0; i < 5; i++) begin
      din = mk(in_prio[i], i + 1);
      @(negedge clk);
      din = NO_FLIT;
      if (i == 0) begin
        for (int b = 0; b < NB; b++) check(req[b] == PRIO_NONE, "request not yet registered");
        @(negedge clk);
        for (int b = 0; b < NB; b++) check(req[b] == PRIO_LOW, "request one cycle after store");
      end
    end
    for (int b = 0; b < NB; b++) check(!avail[b], $sformatf("buffer %0d full after five flits", b));

    for (int b = 0; b < NB; b++) begin
      int tag, first;
      serve(b, 1'b1, first);
      check(first == exp_order[b][0], $sformatf("buffer %0d first offer tag %0d", b, first));
      check(!avail[b], "retry keeps the flit");
      for (int k = 0; k < 5; k++) begin
        serve(b, 1'b0, tag);
        check(tag == exp_order[b][k], $sformatf("buffer %0d flit %0d: tag %0d expected %0d", b, k, tag, exp_order[b][k]));
        check(avail[b], "confirm frees a slot");
      end
      repeat (2) @(negedge clk);
      check(req[b] == PRIO_NONE, "drained buffer raises no request");
    end
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
