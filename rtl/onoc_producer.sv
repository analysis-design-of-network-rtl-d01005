// onoc_producer: traffic source of one node (resource plus network interface).
//
// Injection rate: inj_rate is in flits per 100 cycles (100 = one flit every
// cycle, 33 = one flit in about every three cycles). A credit accumulator adds
// inj_rate every cycle while en is high and creates a flit each time it
// passes 100. A created flit is packetised into the header fields (priority,
// timestamp = now, own coordinates as source, destination) with a 32-bit
// sequence number in the payload, and waits in the output register until the
// input buffer raises buff_avail; it is transferred on that clock edge. Credits
// earned while the register is full are counted (up to 255) and turned into
// flits, each timestamped when it is created, as the register empties.
//
// Distribution patterns (PATTERN):
//   PAT_UNIFORM  destinations walk through all other nodes in linear order
//                (index y*MESH_X+x); priorities run high, mid, low, so every
//                third flit is high priority;
//   PAT_RANDOM   destination from a xorshift32 generator (own node skipped);
//                10 % high, 20 % mid, 70 % low;
//   PAT_APP      destination and priority taken from app_dst_x/app_dst_y/app_prio.
// The patterns, the timestamp and the header fields follow the design; the
// accumulator, the generator and the backlog counter are choices of this
// implementation.
module onoc_producer
  import onoc_pkg::*;
#(
  parameter int unsigned X       = 0,
  parameter int unsigned Y       = 0,
  parameter int unsigned MESH_X  = 4,
  parameter int unsigned MESH_Y  = 4,
  parameter pattern_e    PATTERN = PAT_RANDOM,
  parameter logic [31:0] SEED    = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  logic [6:0]  inj_rate,    // flits per 100 cycles, 0..100
  input  coord_t      app_dst_x,
  input  coord_t      app_dst_y,
  input  prio_e       app_prio,
  input  ts_t         now,
  input  logic        buff_avail,
  output flit_t       data_out,
  output logic [31:0] tx_count     // flits handed to the network
);
  localparam int unsigned N    = MESH_X * MESH_Y;
  localparam int unsigned SELF = Y * MESH_X + X;
  localparam int unsigned NW   = (N > 1) ? $clog2(N) : 1;

  logic [7:0]  acc;
  logic [7:0]  backlog;
  logic        tick;
  logic [31:0] rng, seq;
  logic [NW-1:0] lin_dst;
  logic [1:0]  lin_prio;
  flit_t       hold;
  logic        sent, make;

  assign tick     = en && (int'(acc) + int'(inj_rate) >= 100);
  assign sent     = (hold.prio != PRIO_NONE) && buff_avail;
  assign make     = (hold.prio == PRIO_NONE || sent) && (tick || backlog != 0);
  assign data_out = hold;

  function automatic logic [31:0] xorshift(logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 17);
    return t ^ (t << 5);
  endfunction

  // fields of the next flit
  flit_t       nxt;
  logic [3:0]  r10;     // 0..9, uniform from the upper generator bits
  logic [NW:0] d;
  assign r10 = 4'((32'(rng[31:16]) * 32'd10) >> 16);
  always_comb begin
    nxt         = NO_FLIT;
    nxt.ts      = now;
    nxt.src_x   = coord_t'(X);
    nxt.src_y   = coord_t'(Y);
    nxt.payload = PAYLOAD_W'(seq);
    d           = '0;
    unique case (PATTERN)
      PAT_UNIFORM: begin
        d        = (NW+1)'(lin_dst);
        nxt.prio = (lin_prio == 2'd0) ? PRIO_HIGH : (lin_prio == 2'd1) ? PRIO_MID : PRIO_LOW;
      end
      PAT_RANDOM: begin
        d = (NW+1)'(int'(rng[15:0]) % N);
        if (int'(d) == SELF) d = (NW+1)'((SELF + 1) % N);
        nxt.prio = (r10 == 0) ? PRIO_HIGH : (r10 <= 2) ? PRIO_MID : PRIO_LOW;
      end
      default: begin
        d        = (NW+1)'(int'(app_dst_y) * MESH_X + int'(app_dst_x));
        nxt.prio = (app_prio == PRIO_NONE) ? PRIO_LOW : app_prio;
      end
    endcase
    nxt.dst_x = coord_t'(int'(d) % MESH_X);
    nxt.dst_y = coord_t'(int'(d) / MESH_X);
  end

  function automatic logic [NW-1:0] next_lin(logic [NW-1:0] cur);
    int unsigned n;
    n = (int'(cur) + 1) % N;
    if (n == SELF) n = (n + 1) % N;
    return NW'(n);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      backlog  <= '0;
      rng      <= (SEED == 0) ? 32'h1 : SEED;
      seq      <= '0;
      lin_dst  <= next_lin(NW'(SELF));
      lin_prio <= '0;
      hold     <= NO_FLIT;
      tx_count <= '0;
    end else begin
      if (en) acc <= tick ? 8'(int'(acc) + int'(inj_rate) - 100) : acc + 8'(inj_rate);
      // backlog: +1 for a credit that cannot become a flit now, -1 for a flit made from it
      if (tick && !make && backlog != 8'hFF) backlog <= backlog + 1'b1;
      else if (!tick && make)                backlog <= backlog - 1'b1;
      if (sent) begin
        tx_count <= tx_count + 1'b1;
        hold     <= NO_FLIT;
      end
      if (make) begin
        hold     <= nxt;
        seq      <= seq + 1'b1;
        rng      <= xorshift(rng);
        lin_dst  <= next_lin(lin_dst);
        lin_prio <= (lin_prio == 2'd2) ? 2'd0 : lin_prio + 1'b1;
      end
    end
  end

endmodule
