// tb_onoc_consumer: self-checking test of the consumer.
//
// A consumer at node (2,3) receives a list of flits of all three priorities
// with known timestamps. Checks: the payload appears for one cycle with the
// header stripped; latency = arrival cycle - timestamp, also across the
// 16-bit wrap of the time base; per-class counts, latency sums and maxima
// equal the values the test accumulates itself; a flit for another node
// counts as an error; hold removes the room signal.
module tb_onoc_consumer;
  import onoc_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  ts_t   now;
  logic  hold = 1'b0;
  flit_t din;
  logic  bavail, pvalid;
  logic [PAYLOAD_W-1:0] payload;
  ts_t   latency;
  logic [31:0] rx_count [3], lat_sum [3], err_count;
  ts_t   lat_max [3];

  onoc_consumer #(.X(2), .Y(3)) dut (
    .clk, .rst_n, .hold, .now, .data_in(din), .buff_avail(bavail), .payload, .payload_valid(pvalid),
    .latency, .rx_count, .lat_sum, .lat_max, .err_count);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  int e_cnt [3] = '{0, 0, 0}, e_sum [3] = '{0, 0, 0}, e_max [3] = '{0, 0, 0};

  initial begin
    din = NO_FLIT;
    now = 16'hFFC0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 60; i++) begin
      flit_t f;
      int lat, c;
      lat = 6 + (i * 37) % 90;
      c = i % 3;
      f = NO_FLIT;
      f.prio = prio_e'(c + 1);
      f.ts = now - ts_t'(lat);
      f.dst_x = 2'd2;
      f.dst_y = (i == 17) ? 2'd1 : 2'd3;
      f.src_x = coord_t'(i);
      f.payload = PAYLOAD_W'(64'h1234_5600 + i);
      check(bavail, "room while not held");
      din = f;
      @(negedge clk);
      din = NO_FLIT;
      now = now + 1'b1;
      check(pvalid && payload == f.payload, $sformatf("payload %0d delivered", i));
      check(int'(latency) == lat, $sformatf("latency %0d expected %0d", latency, lat));
      e_cnt[c]++;
      e_sum[c] += lat;
      if (lat > e_max[c]) e_max[c] = lat;
      @(negedge clk);
      now = now + 1'b1;
      check(!pvalid, "payload valid for one cycle");
    end
    for (int c = 0; c < 3; c++) begin
      check(int'(rx_count[c]) == e_cnt[c], $sformatf("class %0d count", c));
      check(int'(lat_sum[c]) == e_sum[c], $sformatf("class %0d latency sum", c));
      check(int'(lat_max[c]) == e_max[c], $sformatf("class %0d latency max", c));
    end
    check(err_count == 1, "misdelivered flit counted");
    hold = 1'b1;
    #1;
    check(!bavail, "hold removes room");
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
