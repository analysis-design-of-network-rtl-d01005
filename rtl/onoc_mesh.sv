// onoc_mesh: communication backbone, MESH_X x MESH_Y routers joined by links.
//
// Router (x,y) sits at column x, row y. Its east output feeds the west input
// of router (x+1,y), its south output the north input of (x,y+1), and the
// reverse links run the other way; each link is a flit bus plus the room
// signal of the receiving input buffer. Ports on the mesh edge have no
// neighbour: their input carries no flit and their output never has room, so
// a router never sends a flit there (dimension-order routing cannot pick
// them). The local port of router n = y*MESH_X + x is brought out as
// local_in/local_in_avail (from the producer's network interface) and
// local_out/local_out_avail (to the consumer's). Every router has the same
// buffer size, service levels and routing algorithm; each gets its own seed
// for XY-random routing. The 4x4 size is the design's main configuration.
module onoc_mesh
  import onoc_pkg::*;
#(
  parameter int unsigned MESH_X    = 4,
  parameter int unsigned MESH_Y    = 4,
  parameter int unsigned BUFF_SIZE = 5,
  parameter sl_e         BUF_SL    = SL_PBRR,
  parameter sl_e         SCHED_SL  = SL_PBRR,
  parameter route_e      ROUTING   = RT_XY,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t local_in        [N],
  output logic  local_in_avail  [N],
  output flit_t local_out       [N],
  input  logic  local_out_avail [N]
);
  // per router, per port
  flit_t in_flit   [N][NPORTS];
  logic  in_avail  [N][NPORTS];
  flit_t out_flit  [N][NPORTS];
  logic  out_avail [N][NPORTS];

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;

      onoc_router_node #(
        .X(x), .Y(y), .BUFF_SIZE(BUFF_SIZE), .BUF_SL(BUF_SL), .SCHED_SL(SCHED_SL),
        .ROUTING(ROUTING), .SEED(16'hACE1 ^ 16'(n * 40503 + 1))
      ) u_router (
        .clk, .rst_n,
        .in_flit  (in_flit[n]),
        .in_avail (in_avail[n]),
        .out_flit (out_flit[n]),
        .out_avail(out_avail[n])
      );

      // local port
      assign in_flit[n][PORT_LOCAL]   = local_in[n];
      assign local_in_avail[n]        = in_avail[n][PORT_LOCAL];
      assign local_out[n]             = out_flit[n][PORT_LOCAL];
      assign out_avail[n][PORT_LOCAL] = local_out_avail[n];

      // north neighbour (x, y-1)
      if (y > 0) begin : g_n
        assign in_flit[n][PORT_NORTH]   = out_flit[n-MESH_X][PORT_SOUTH];
        assign out_avail[n][PORT_NORTH] = in_avail[n-MESH_X][PORT_SOUTH];
      end else begin : g_n_edge
        assign in_flit[n][PORT_NORTH]   = NO_FLIT;
        assign out_avail[n][PORT_NORTH] = 1'b0;
      end
      // south neighbour (x, y+1)
      if (y < MESH_Y - 1) begin : g_s
        assign in_flit[n][PORT_SOUTH]   = out_flit[n+MESH_X][PORT_NORTH];
        assign out_avail[n][PORT_SOUTH] = in_avail[n+MESH_X][PORT_NORTH];
      end else begin : g_s_edge
        assign in_flit[n][PORT_SOUTH]   = NO_FLIT;
        assign out_avail[n][PORT_SOUTH] = 1'b0;
      end
      // east neighbour (x+1, y)
      if (x < MESH_X - 1) begin : g_e
        assign in_flit[n][PORT_EAST]   = out_flit[n+1][PORT_WEST];
        assign out_avail[n][PORT_EAST] = in_avail[n+1][PORT_WEST];
      end else begin : g_e_edge
        assign in_flit[n][PORT_EAST]   = NO_FLIT;
        assign out_avail[n][PORT_EAST] = 1'b0;
      end
      // west neighbour (x-1, y)
      if (x > 0) begin : g_w
        assign in_flit[n][PORT_WEST]   = out_flit[n-1][PORT_EAST];
        assign out_avail[n][PORT_WEST] = in_avail[n-1][PORT_EAST];
      end else begin : g_w_edge
        assign in_flit[n][PORT_WEST]   = NO_FLIT;
        assign out_avail[n][PORT_WEST] = 1'b0;
      end
    end
  end

endmodule
