// onoc_top: a 4x4 mesh network-on-chip with a traffic producer and a consumer
// at every node.
//
// Each node n = y*MESH_X + x has a producer (traffic source with network
// interface) on the local input port of its router and a consumer (sink with
// network interface) on the local output port. A free-running 16-bit cycle
// counter is the common time base: producers stamp flits with it and
// consumers subtract the stamp to get the latency.
//
// Ports: prod_en enables each producer; inj_rate (flits per 100 cycles) is
// the injection rate for all; app_dst_x/app_dst_y/app_prio feed producers
// built with the PAT_APP pattern; cons_hold stalls a consumer. Per node the
// top reports the flits sent, and per node and priority class (0 high, 1
// mid, 2 low) the flits received, the latency sum and maximum, plus the count
// of misdelivered flits. Defaults: 4x4 mesh, buffer size 5, PBRR in buffers
// and schedulers, X-first dimension-order routing, random traffic - the
// configuration the design recommends and uses for its full-load runs.
module onoc_top
  import onoc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUFF_SIZE = 5,
  parameter sl_e         BUF_SL    = SL_PBRR,
  parameter sl_e         SCHED_SL  = SL_PBRR,
  parameter route_e      ROUTING   = RT_XY,
  parameter pattern_e    PATTERN   = PAT_RANDOM,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        prod_en   [N],
  input  logic [6:0]  inj_rate,
  input  coord_t      app_dst_x [N],
  input  coord_t      app_dst_y [N],
  input  prio_e       app_prio  [N],
  input  logic        cons_hold [N],
  output logic [31:0] tx_count  [N],
  output logic [31:0] rx_count  [N][3],
  output logic [31:0] lat_sum   [N][3],
  output ts_t         lat_max   [N][3],
  output logic [31:0] err_count [N]
);
  ts_t   now;
  flit_t local_in        [N];
  logic  local_in_avail  [N];
  flit_t local_out       [N];
  logic  local_out_avail [N];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;

  onoc_mesh #(
    .MESH_X(MESH_X), .MESH_Y(MESH_Y), .BUFF_SIZE(BUFF_SIZE),
    .BUF_SL(BUF_SL), .SCHED_SL(SCHED_SL), .ROUTING(ROUTING)
  ) u_mesh (
    .clk, .rst_n, .local_in, .local_in_avail, .local_out, .local_out_avail
  );

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;
      logic [PAYLOAD_W-1:0] payload;
      logic                 payload_valid;
      ts_t                  latency;

      onoc_producer #(
        .X(x), .Y(y), .MESH_X(MESH_X), .MESH_Y(MESH_Y), .PATTERN(PATTERN),
        .SEED(32'h1234_5678 ^ 32'(n * 2654435761))
      ) u_prod (
        .clk, .rst_n,
        .en        (prod_en[n]),
        .inj_rate  (inj_rate),
        .app_dst_x (app_dst_x[n]),
        .app_dst_y (app_dst_y[n]),
        .app_prio  (app_prio[n]),
        .now       (now),
        .buff_avail(local_in_avail[n]),
        .data_out  (local_in[n]),
        .tx_count  (tx_count[n])
      );

      onoc_consumer #(.X(x), .Y(y)) u_cons (
        .clk, .rst_n,
        .hold         (cons_hold[n]),
        .now          (now),
        .data_in      (local_out[n]),
        .buff_avail   (local_out_avail[n]),
        .payload      (payload),
        .payload_valid(payload_valid),
        .latency      (latency),
        .rx_count     (rx_count[n]),
        .lat_sum      (lat_sum[n]),
        .lat_max      (lat_max[n]),
        .err_count    (err_count[n])
      );
    end
  end

endmodule
