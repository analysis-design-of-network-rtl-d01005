// onoc_flit_store: the shared flit memory used by the input and output buffers.
//
// DEPTH slots form one common pool that holds flits of all three priorities.
// Grouping the slots by priority code gives three virtual buffers (A high,
// B mid, C low) whose sizes are not fixed: any free slot takes any flit, so
// only the combined size DEPTH is a parameter. Each slot keeps an age counter
// (cycles since it was written, saturating) so the store knows arrival order.
//
// Every cycle the store names one slot to forward next, according to the
// service level SL:
//   SL_FCFS  the oldest flit, whatever its priority;
//   SL_PB    the oldest flit of the most urgent priority present;
//   SL_PBRR  the priority classes take turns (high, mid, low, high ...), empty
//            classes are skipped; the oldest flit of the chosen class.
//            (SL_RR is treated as SL_PBRR.)
// Slots set in lock_mask (a flit already handed on and awaiting its
// confirmation) are not offered again.
//
// Interface: wr_en writes wr_flit into the lowest free slot (the caller checks
// `avail` first). req_flit reads slot req_flit_idx. free_en releases slot free_idx. served/served_prio move the
// PBRR turn past the class just served. All updates are on the rising clock
// edge; sel_* and avail are combinational from the registered state.
module onoc_flit_store
  import onoc_pkg::*;
#(
  parameter int unsigned DEPTH = 5,
  parameter sl_e         SL    = SL_PBRR,
  localparam int unsigned IW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  flit_t           wr_flit,
  output logic            avail,       // at least one free slot
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic [DEPTH-1:0] lock_mask,
  output logic            sel_valid,
  output logic [IW-1:0]   sel_idx,
  output flit_t           sel_flit,
  input  logic            free_en,
  input  logic [IW-1:0]   free_idx,
  input  logic            served,
  input  prio_e           served_prio,
  input  logic [IW-1:0]   req_flit_idx,  // second read port
  output flit_t           req_flit
);
  localparam int unsigned AGE_W = 8;

  flit_t              mem   [DEPTH];
  logic [DEPTH-1:0]   valid;
  logic [AGE_W-1:0]   age   [DEPTH];
  logic [1:0]         rr_cls;      // PBRR: class (rank 0..2) whose turn it is

  // ---------------- write slot: lowest free ----------------
  logic [IW-1:0] wr_idx;
  always_comb begin
    wr_idx = '0;
    avail  = 1'b0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!valid[i]) begin
        wr_idx = IW'(i);
        avail  = 1'b1;
      end
    end
  end

  always_comb begin
    count = '0;
    for (int i = 0; i < DEPTH; i++) count = count + valid[i];
  end

  // ---------------- selection ----------------
  logic [DEPTH-1:0] elig;
  logic [2:0]       cls_present;   // by rank: 0 high, 1 mid, 2 low
  logic [1:0]       want_cls;
  logic             any_cls;        // 0: class filter off (FCFS)

  always_comb begin
    elig        = valid & ~lock_mask;
    cls_present = '0;
    for (int i = 0; i < DEPTH; i++)
      if (elig[i] && prio_rank(mem[i].prio) < 2'd3) cls_present[prio_rank(mem[i].prio)] = 1'b1;

    want_cls = 2'd0;
    any_cls  = 1'b0;
    unique case (SL)
      SL_FCFS: any_cls = 1'b1;
      SL_PB: begin
        if      (cls_present[0]) want_cls = 2'd0;
        else if (cls_present[1]) want_cls = 2'd1;
        else                     want_cls = 2'd2;
      end
      default: begin  // SL_PBRR, SL_RR
        want_cls = 2'd0;
        for (int k = 2; k >= 0; k--) begin
          logic [1:0] c;
          c = 2'((int'(rr_cls) + k) % 3);
          if (cls_present[c]) want_cls = c;
        end
      end
    endcase
  end

  always_comb begin
    logic [AGE_W-1:0] best_age;
    sel_valid = 1'b0;
    sel_idx   = '0;
    best_age  = '0;
    for (int i = 0; i < DEPTH; i++) begin
      if (elig[i] && (any_cls || prio_rank(mem[i].prio) == want_cls)) begin
        if (!sel_valid || age[i] > best_age) begin
          sel_valid = 1'b1;
          sel_idx   = IW'(i);
          best_age  = age[i];
        end
      end
    end
    sel_flit = sel_valid ? mem[sel_idx] : NO_FLIT;
  end

  assign req_flit = mem[req_flit_idx];

  // ---------------- state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid  <= '0;
      rr_cls <= 2'd0;
      for (int i = 0; i < DEPTH; i++) begin
        age[i] <= '0;
        mem[i] <= NO_FLIT;
      end
    end else begin
      for (int i = 0; i < DEPTH; i++)
        if (valid[i] && age[i] != '1) age[i] <= age[i] + 1'b1;
      if (free_en) valid[free_idx] <= 1'b0;
      if (wr_en && avail) begin
        valid[wr_idx] <= 1'b1;
        mem[wr_idx]   <= wr_flit;
        age[wr_idx]   <= '0;
      end
      if (served && prio_rank(served_prio) < 2'd3)
        rr_cls <= (prio_rank(served_prio) == 2'd2) ? 2'd0 : prio_rank(served_prio) + 2'd1;
    end
  end

  // A write must carry a flit and find room; a release must name a full slot.
  a_wr_room: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> avail && wr_flit.prio != PRIO_NONE);
  a_free_ok: assert property (@(posedge clk) disable iff (!rst_n) free_en |-> valid[free_idx]);

endmodule
