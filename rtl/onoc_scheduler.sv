// onoc_scheduler: control half of a router; arbitrates the five input buffers.
//
// A four-state machine moves one flit at a time through the router:
//   IDLE   pick one requesting input buffer (data_in_buff != 00) by the
//          service level SL and register a one-cycle node_grant to it;
//   FWD    the granted buffer drives its flit; router_load tells the router
//          (node) to capture it;
//   CHECK  the node reports the output port it computed on output_port; the
//          scheduler raises req_buff_avail to that output buffer and, if it
//          answers buff_avail, registers confirm to the input buffer,
//          otherwise retry;
//   XFER   router_xfer moves the flit from the node into the output buffer
//          while the input buffer releases its slot.
// With the store into the input buffer and the register on its request, a
// flit needs six clock edges per hop: store, request, grant, forward to node,
// confirm, write into the output buffer.
//
// Service levels: SL_FCFS serves the request that has waited longest;
// SL_RR rotates over the inputs; SL_PB serves the most urgent priority, lowest
// port first; SL_PBRR serves the most urgent priority and rotates among the
// inputs that offer it. An input whose flit was refused is passed over
// while other inputs request, until some transfer succeeds or no other input
// requests. The state sequence and signal names follow the design;
// the retry signal and the exact cycle split are this implementation's.
module onoc_scheduler
  import onoc_pkg::*;
#(
  parameter sl_e         SL = SL_PBRR,
  parameter int unsigned NP = NPORTS
) (
  input  logic  clk,
  input  logic  rst_n,
  // input buffers
  input  prio_e data_in_buff [NP],
  output prio_e node_grant   [NP],
  output logic  confirm      [NP],
  output logic  retry        [NP],
  // node (router data part)
  output logic  router_load,
  output logic  router_xfer,
  input  port_e output_port,
  // output buffers
  output logic  req_buff_avail [NP],
  input  logic  buff_avail     [NP]
);
  localparam int unsigned IW = $clog2(NP);

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_CHECK, S_XFER} state_e;
  state_e state;

  logic [IW-1:0] sel, rr_ptr, win;
  logic          win_valid;
  logic [7:0]    wait_cnt [NP];
  logic [NP-1:0] blocked;          // input refused for lack of room, not yet retried
  prio_e         cand [NP];        // requests taking part in arbitration

  // Inputs whose last attempt was refused stand aside while any other input
  // requests; once none does, they are all tried again. Without this, a
  // refused urgent flit would be retried forever and starve the other inputs
  // of the router, and neighbouring routers starving each other this way
  // can lock the mesh.
  always_comb begin
    logic any_free;
    any_free = 1'b0;
    for (int i = 0; i < NP; i++)
      if (data_in_buff[i] != PRIO_NONE && !blocked[i]) any_free = 1'b1;
    for (int i = 0; i < NP; i++)
      cand[i] = (blocked[i] && any_free) ? PRIO_NONE : data_in_buff[i];
  end

  // ---------------- arbitration ----------------
  always_comb begin
    logic [1:0] best_rank;
    logic [7:0] best_wait;
    win       = '0;
    win_valid = 1'b0;
    best_rank = 2'd3;
    best_wait = '0;
    for (int i = 0; i < NP; i++)
      if (cand[i] != PRIO_NONE && prio_rank(cand[i]) < best_rank)
        best_rank = prio_rank(cand[i]);
    unique case (SL)
      SL_FCFS: begin
        for (int i = 0; i < NP; i++)
          if (cand[i] != PRIO_NONE && (!win_valid || wait_cnt[i] > best_wait)) begin
            win = IW'(i); win_valid = 1'b1; best_wait = wait_cnt[i];
          end
      end
      SL_PB: begin
        for (int i = NP - 1; i >= 0; i--)
          if (cand[i] != PRIO_NONE && prio_rank(cand[i]) == best_rank) begin
            win = IW'(i); win_valid = 1'b1;
          end
      end
      default: begin  // SL_RR, SL_PBRR: first eligible at or after rr_ptr
        for (int k = NP - 1; k >= 0; k--) begin
          int unsigned i;
          i = (int'(rr_ptr) + k) % NP;
          if (cand[i] != PRIO_NONE && (SL == SL_RR || prio_rank(cand[i]) == best_rank)) begin
            win = IW'(i); win_valid = 1'b1;
          end
        end
      end
    endcase
  end

  // ---------------- control outputs ----------------
  assign router_load = (state == S_FWD);
  assign router_xfer = (state == S_XFER);
  always_comb
    for (int p = 0; p < NP; p++)
      req_buff_avail[p] = (state == S_CHECK) && (int'(output_port) == p);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      sel    <= '0;
      rr_ptr <= '0;
      blocked <= '0;
      for (int i = 0; i < NP; i++) begin
        node_grant[i] <= PRIO_NONE;
        confirm[i]    <= 1'b0;
        retry[i]      <= 1'b0;
        wait_cnt[i]   <= '0;
      end
    end else begin
      for (int i = 0; i < NP; i++) begin
        node_grant[i] <= PRIO_NONE;
        confirm[i]    <= 1'b0;
        retry[i]      <= 1'b0;
        if (data_in_buff[i] == PRIO_NONE) wait_cnt[i] <= '0;
        else if (wait_cnt[i] != '1)       wait_cnt[i] <= wait_cnt[i] + 1'b1;
      end
      unique case (state)
        S_IDLE: if (win_valid) begin
          node_grant[win] <= data_in_buff[win];
          blocked[win]    <= 1'b0;
          sel             <= win;
          rr_ptr          <= (int'(win) == NP - 1) ? '0 : win + 1'b1;
          wait_cnt[win]   <= '0;
          state           <= S_FWD;
        end
        S_FWD:   state <= S_CHECK;
        S_CHECK: begin
          if (buff_avail[output_port]) begin
            confirm[sel] <= 1'b1;
            blocked      <= '0;
            state        <= S_XFER;
          end else begin
            retry[sel]   <= 1'b1;
            blocked[sel] <= 1'b1;
            state        <= S_IDLE;
          end
        end
        default: state <= S_IDLE;  // S_XFER
      endcase
    end
  end

  a_port_range: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_CHECK |-> int'(output_port) < NP);

endmodule
