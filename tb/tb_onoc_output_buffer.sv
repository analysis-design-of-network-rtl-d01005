// tb_onoc_output_buffer: self-checking test of the output buffer.
//
// A PBRR output buffer of size 5 and a PB one receive the same five flits
// from the router side (low, high, high, mid, low). Checks: buff_avail only
// answers while req_buff_avail is raised and drops when the buffer is full;
// nothing leaves while the next router reports no room (out_buff_avail low);
// once it does, one flit leaves per cycle in the order of the service level
// (PBRR: H1 M1 L1 H2 L2, PB: H1 H2 M1 L1 L2); a write and a read in the same
// cycle both happen.
module tb_onoc_output_buffer;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t din;
  logic  req = 1'b0;
  logic  oavail [2];
  logic  avail  [2];
  flit_t dout   [2];

  onoc_output_buffer #(.BUFF_SIZE(5), .SL(SL_PBRR)) u_pbrr (
    .clk, .rst_n, .req_buff_avail(req), .buff_avail(avail[0]), .data_in(din),
    .out_buff_avail(oavail[0]), .data_out(dout[0]));
  onoc_output_buffer #(.BUFF_SIZE(5), .SL(SL_PB)) u_pb (
    .clk, .rst_n, .req_buff_avail(req), .buff_avail(avail[1]), .data_in(din),
    .out_buff_avail(oavail[1]), .data_out(dout[1]));

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
    f.prio = p;
    f.dst_y = coord_t'(tag % 4);
    f.payload = PAYLOAD_W'(tag);
    return f;
  endfunction

  prio_e in_prio [5] = '{PRIO_LOW, PRIO_HIGH, PRIO_HIGH, PRIO_MID, PRIO_LOW};
  int exp_order [2][5] = '{'{2, 4, 1, 3, 5}, '{2, 3, 4, 1, 5}};

  initial begin
    din = NO_FLIT;
    oavail[0] = 1'b0; oavail[1] = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int b = 0; b < 2; b++) check(!avail[b], "no buff_avail without req_buff_avail");
    for (int i = 0; i < 5; i++) begin
      req = 1'b1;
      #1;
      for (int b = 0; b < 2; b++) check(avail[b], $sformatf("room for flit %0d", i));
      @(negedge clk);
      req = 1'b0;
      din = mk(in_prio[i], i + 1);
      @(negedge clk);
      din = NO_FLIT;
      for (int b = 0; b < 2; b++) check(dout[b] == NO_FLIT, "nothing leaves without room downstream");
    end
    req = 1'b1;
    #1;
    for (int b = 0; b < 2; b++) check(!avail[b], "full buffer reports no room");
    @(negedge clk);
    req = 1'b0;
    for (int b = 0; b < 2; b++) begin
      oavail[b] = 1'b1;
      for (int k = 0; k < 5; k++) begin
        #1;
        check(dout[b].prio != PRIO_NONE, "flit leaves when the next router has room");
        check(int'(dout[b].payload) == exp_order[b][k],
              $sformatf("buffer %0d flit %0d: tag %0d expected %0d", b, k, int'(dout[b].payload), exp_order[b][k]));
        @(negedge clk);
      end
      #1;
      check(dout[b] == NO_FLIT, "empty buffer sends nothing");
      oavail[b] = 1'b0;
    end
    // simultaneous write and read
    din = mk(PRIO_MID, 9);
    @(negedge clk);
    din = mk(PRIO_HIGH, 10);
    oavail[0] = 1'b1;
    #1;
    check(int'(dout[0].payload) == 9, "read while writing");
    @(negedge clk);
    din = NO_FLIT;
    #1;
    check(int'(dout[0].payload) == 10, "flit written during a read is kept");
    @(negedge clk);
    #1;
    check(dout[0] == NO_FLIT, "both flits delivered once");
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
