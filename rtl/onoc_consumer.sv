// onoc_consumer: traffic sink of one node (network interface plus resource).
//
// Accepts a flit from the local output buffer whenever hold is low (its room
// signal buff_avail is then high), strips the header and presents the
// payload on payload/payload_valid for one cycle. It also measures each
// flit's network latency as now - timestamp (modulo 2^16) and keeps, per
// priority class (index 0 high, 1 mid, 2 low), the number of flits received,
// the sum of their latencies and the largest latency. A flit that arrives at
// the wrong node increments err_count. Depacketisation and timestamp-based
// latency follow the design; the statistics registers and the hold input
// (to model a busy resource) are choices of this implementation.
module onoc_consumer
  import onoc_pkg::*;
#(
  parameter int unsigned X = 0,
  parameter int unsigned Y = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hold,
  input  ts_t                  now,
  input  flit_t                data_in,
  output logic                 buff_avail,
  output logic [PAYLOAD_W-1:0] payload,
  output logic                 payload_valid,
  output ts_t                  latency,       // of the flit in payload
  output logic [31:0]          rx_count [3],
  output logic [31:0]          lat_sum  [3],
  output ts_t                  lat_max  [3],
  output logic [31:0]          err_count
);
  ts_t        lat;
  logic [1:0] cls;

  assign buff_avail = !hold;
  assign lat        = now - data_in.ts;
  assign cls        = prio_rank(data_in.prio);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      payload       <= '0;
      payload_valid <= 1'b0;
      latency       <= '0;
      err_count     <= '0;
      for (int c = 0; c < 3; c++) begin
        rx_count[c] <= '0;
        lat_sum[c]  <= '0;
        lat_max[c]  <= '0;
      end
    end else begin
      payload_valid <= 1'b0;
      if (data_in.prio != PRIO_NONE) begin
        payload       <= data_in.payload;
        payload_valid <= 1'b1;
        latency       <= lat;
        rx_count[cls] <= rx_count[cls] + 1'b1;
        lat_sum[cls]  <= lat_sum[cls] + 32'(lat);
        if (lat > lat_max[cls]) lat_max[cls] <= lat;
        if (int'(data_in.dst_x) != X || int'(data_in.dst_y) != Y) err_count <= err_count + 1'b1;
      end
    end
  end

  a_no_flit_when_held: assert property (@(posedge clk) disable iff (!rst_n)
    hold |-> data_in.prio == PRIO_NONE);

endmodule
