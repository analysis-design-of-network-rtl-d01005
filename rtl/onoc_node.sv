// onoc_node: data half of a router ("node"); captures a flit and routes it.
//
// When the scheduler raises load, the node captures the one flit driven by
// the granted input buffer (all other buffers drive 00 = no flit, so the five
// inputs are OR-combined). From the captured flit's destination it computes
// the output port, which it reports to the scheduler on output_port. When the
// scheduler raises xfer, the flit is driven to the output buffer of that port
// (every other output carries no flit).
//
// Routing (ROUTING):
//   RT_XY         X direction first, then Y (dimension order, the main choice);
//   RT_YX         Y direction first, then X;
//   RT_XY_RANDOM  for each flit, X first or Y first chosen by a free-running
//                 pseudo-random bit (a 16-bit LFSR seeded by SEED).
// East is x+1, south is y+1. A flit whose destination is this node leaves on
// PORT_LOCAL. The three algorithms are the design's; the LFSR is this
// implementation's choice of random source.
module onoc_node
  import onoc_pkg::*;
#(
  parameter int unsigned X       = 0,
  parameter int unsigned Y       = 0,
  parameter route_e      ROUTING = RT_XY,
  parameter logic [15:0] SEED    = 16'hACE1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  flit_t data_in  [NPORTS],
  input  logic  load,
  input  logic  xfer,
  output port_e output_port,
  output flit_t data_out [NPORTS]
);
  flit_t       cur;
  logic        x_first;
  logic [15:0] lfsr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur     <= NO_FLIT;
      x_first <= 1'b1;
      lfsr    <= SEED;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      if (load) begin
        flit_t f;
        f = NO_FLIT;
        for (int i = 0; i < NPORTS; i++) f = f | data_in[i];
        cur <= f;
        unique case (ROUTING)
          RT_XY:   x_first <= 1'b1;
          RT_YX:   x_first <= 1'b0;
          default: x_first <= lfsr[0];
        endcase
      end
    end
  end

  always_comb begin
    port_e px, py;
    px = (int'(cur.dst_x) > X) ? PORT_EAST  : PORT_WEST;
    py = (int'(cur.dst_y) > Y) ? PORT_SOUTH : PORT_NORTH;
    if (int'(cur.dst_x) == X && int'(cur.dst_y) == Y) output_port = PORT_LOCAL;
    else if (int'(cur.dst_x) == X)                    output_port = py;
    else if (int'(cur.dst_y) == Y)                    output_port = px;
    else                                              output_port = x_first ? px : py;
  end

  always_comb
    for (int p = 0; p < NPORTS; p++)
      data_out[p] = (xfer && int'(output_port) == p) ? cur : NO_FLIT;

endmodule
