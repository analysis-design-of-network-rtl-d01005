// onoc_router_node: one router of the mesh with its ten buffers.
//
// The router is split into a control part, the scheduler, and a data part,
// the node. Each of the five ports (local, north, east, south, west) has an
// input buffer in front of the router and an output buffer behind it:
//
//   in_flit[p] -> input buffer[p] --data_out--> node --> output buffer[q] -> out_flit[q]
//                      ^  request / grant / confirm      ^ reqBuffAvail / buffAvail
//                      +-------------- scheduler --------+
//
// The scheduler grants one input buffer at a time, the node computes the
// output port of the flit, the scheduler checks that output buffer for room
// and confirms, and the flit moves on (six cycles per hop, see
// onoc_scheduler). Output buffers forward to the next router whenever its
// input buffer reports room on out_avail.
//
// Link signals per port: in_flit / in_avail connect to the upstream sender,
// out_flit / out_avail to the downstream receiver. A flit with priority 00 is
// no flit. BUFF_SIZE, the service levels and the routing are parameters as in
// the design; one scheduler per router and five ports follow it too.
module onoc_router_node
  import onoc_pkg::*;
#(
  parameter int unsigned X         = 0,
  parameter int unsigned Y         = 0,
  parameter int unsigned BUFF_SIZE = 5,
  parameter sl_e         BUF_SL    = SL_PBRR,
  parameter sl_e         SCHED_SL  = SL_PBRR,
  parameter route_e      ROUTING   = RT_XY,
  parameter logic [15:0] SEED      = 16'hACE1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t in_flit   [NPORTS],
  output logic  in_avail  [NPORTS],
  output flit_t out_flit  [NPORTS],
  input  logic  out_avail [NPORTS]
);
  prio_e data_in_buff [NPORTS];
  prio_e node_grant   [NPORTS];
  logic  confirm      [NPORTS];
  logic  retry        [NPORTS];
  flit_t ib_out       [NPORTS];
  flit_t node_out     [NPORTS];
  logic  req_buff_avail [NPORTS];
  logic  ob_avail     [NPORTS];
  logic  router_load, router_xfer;
  port_e output_port;

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    onoc_input_buffer #(.BUFF_SIZE(BUFF_SIZE), .SL(BUF_SL)) u_ib (
      .clk, .rst_n,
      .data_in     (in_flit[p]),
      .buff_avail  (in_avail[p]),
      .data_in_buff(data_in_buff[p]),
      .node_grant  (node_grant[p]),
      .confirm     (confirm[p]),
      .retry       (retry[p]),
      .data_out    (ib_out[p])
    );
    onoc_output_buffer #(.BUFF_SIZE(BUFF_SIZE), .SL(BUF_SL)) u_ob (
      .clk, .rst_n,
      .req_buff_avail(req_buff_avail[p]),
      .buff_avail    (ob_avail[p]),
      .data_in       (node_out[p]),
      .out_buff_avail(out_avail[p]),
      .data_out      (out_flit[p])
    );
  end

  onoc_scheduler #(.SL(SCHED_SL)) u_sched (
    .clk, .rst_n,
    .data_in_buff, .node_grant, .confirm, .retry,
    .router_load, .router_xfer, .output_port,
    .req_buff_avail, .buff_avail(ob_avail)
  );

  onoc_node #(.X(X), .Y(Y), .ROUTING(ROUTING), .SEED(SEED)) u_node (
    .clk, .rst_n,
    .data_in    (ib_out),
    .load       (router_load),
    .xfer       (router_xfer),
    .output_port(output_port),
    .data_out   (node_out)
  );

endmodule
