// onoc_input_buffer: input buffer of one router port, with three virtual channels.
//
// Incoming flits of every priority share one pool of BUFF_SIZE slots
// (onoc_flit_store); the slots holding high, mid and low flits form the three
// virtual buffers, whose sizes float within the fixed total. buff_avail tells
// the sender (a producer or the output buffer of the neighbouring router)
// that a slot is free; a flit on data_in (prio != 00) is stored at the clock
// edge only while buff_avail is high, so a sender may keep a flit on data_in
// until it is taken.
//
// Forwarding uses a request / grant / confirm handshake with the scheduler:
//   1. the buffer's virtual-channel control picks the flit to send next by its
//      service level SL and registers its priority on data_in_buff (00 = none);
//   2. the scheduler answers with node_grant, a one-cycle pulse carrying the
//      same priority code, one cycle after it sampled the request (the buffer
//      keeps a copy of the request of the previous cycle, since its own
//      request register may have moved on to a newer flit meanwhile);
//   3. during the grant cycle the buffer drives that flit on data_out to the
//      router and marks the slot as in flight (it stays stored);
//   4. confirm releases the slot (and, under PBRR, passes the turn to the
//      next priority class); retry (the output path was busy) returns the
//      flit to the queue, and it is requested again later.
// While a flit is in flight the buffer raises no new request.
// The priority codes and the request, grant and confirm signals are the
// design's; the explicit retry line and the register on data_in_buff are
// choices of this implementation.
module onoc_input_buffer
  import onoc_pkg::*;
#(
  parameter int unsigned BUFF_SIZE = 5,
  parameter sl_e         SL        = SL_PBRR
) (
  input  logic  clk,
  input  logic  rst_n,
  // upstream
  input  flit_t data_in,        // prio == PRIO_NONE: no flit
  output logic  buff_avail,
  // scheduler
  output prio_e data_in_buff,   // request: priority of the flit on offer
  input  prio_e node_grant,     // grant: priority granted, one cycle
  input  logic  confirm,        // path confirmed: flit has left
  input  logic  retry,          // path refused: keep flit
  // router
  output flit_t data_out
);
  localparam int unsigned IW = (BUFF_SIZE > 1) ? $clog2(BUFF_SIZE) : 1;

  logic            pending;
  logic [IW-1:0]   pend_idx, req_idx;
  prio_e           pend_prio;
  prio_e           seen_prio;   // request as the scheduler sampled it
  logic [IW-1:0]   seen_idx;
  logic            sel_valid;
  logic [IW-1:0]   sel_idx;
  flit_t           sel_flit;
  logic [BUFF_SIZE-1:0] lock_mask;
  logic            granted;
  logic [$clog2(BUFF_SIZE+1)-1:0] count;
  flit_t           req_flit;

  assign lock_mask = pending ? (BUFF_SIZE'(1) << pend_idx) : '0;
  assign granted   = (node_grant != PRIO_NONE) && (seen_prio != PRIO_NONE) && !pending;

  onoc_flit_store #(.DEPTH(BUFF_SIZE), .SL(SL)) u_store (
    .clk, .rst_n,
    .wr_en      (data_in.prio != PRIO_NONE && buff_avail),
    .wr_flit    (data_in),
    .avail      (buff_avail),
    .count      (count),
    .lock_mask  (lock_mask),
    .sel_valid  (sel_valid),
    .sel_idx    (sel_idx),
    .sel_flit   (sel_flit),
    .free_en    (pending && confirm),
    .free_idx   (pend_idx),
    .served     (pending && confirm),
    .served_prio(pend_prio),
    .req_flit_idx(seen_idx),
    .req_flit   (req_flit)
  );

  assign data_out = granted ? req_flit : NO_FLIT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending      <= 1'b0;
      pend_idx     <= '0;
      pend_prio    <= PRIO_NONE;
      req_idx      <= '0;
      seen_idx     <= '0;
      seen_prio    <= PRIO_NONE;
      data_in_buff <= PRIO_NONE;
    end else begin
      seen_prio <= data_in_buff;
      seen_idx  <= req_idx;
      if (granted) begin
        pending  <= 1'b1;
        pend_idx  <= seen_idx;
        pend_prio <= seen_prio;
      end else if (pending && (confirm || retry)) begin
        pending <= 1'b0;
      end
      if (pending || granted || confirm || retry || !sel_valid) begin
        data_in_buff <= PRIO_NONE;
      end else begin
        data_in_buff <= sel_flit.prio;
        req_idx      <= sel_idx;
      end
    end
  end

  a_grant_matches: assert property (@(posedge clk) disable iff (!rst_n)
    node_grant != PRIO_NONE |-> node_grant == seen_prio && !pending);
  a_confirm_pending: assert property (@(posedge clk) disable iff (!rst_n)
    (confirm || retry) |-> pending);

endmodule
