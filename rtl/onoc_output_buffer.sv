// onoc_output_buffer: output buffer of one router port.
//
// Two processes run side by side on a shared pool of BUFF_SIZE slots
// (onoc_flit_store):
//  * the input side answers the scheduler: while req_buff_avail is raised it
//    reports free room on buff_avail, and it stores the flit the router then
//    drives on data_in (prio != 00) at the next clock edge;
//  * the output side watches out_buff_avail, the room signal of the input
//    buffer of the next router (or of the local consumer), and whenever it is
//    raised drives the next flit, chosen by the service level SL, on data_out;
//    the receiver stores it at the same clock edge at which this buffer
//    releases the slot.
// The two-sided organisation and the reqBuffAvail/buffAvail exchange follow the
// design; that a flit may be written and another read out in the same cycle,
// and the combinational forward path, are choices of this implementation.
module onoc_output_buffer
  import onoc_pkg::*;
#(
  parameter int unsigned BUFF_SIZE = 5,
  parameter sl_e         SL        = SL_PBRR
) (
  input  logic  clk,
  input  logic  rst_n,
  // scheduler / router side
  input  logic  req_buff_avail,
  output logic  buff_avail,
  input  flit_t data_in,
  // link side
  input  logic  out_buff_avail,
  output flit_t data_out
);
  localparam int unsigned IW = (BUFF_SIZE > 1) ? $clog2(BUFF_SIZE) : 1;

  logic          room, sel_valid, send;
  logic [IW-1:0] sel_idx;
  flit_t         sel_flit, unused_rd;
  logic [$clog2(BUFF_SIZE+1)-1:0] count;

  onoc_flit_store #(.DEPTH(BUFF_SIZE), .SL(SL)) u_store (
    .clk, .rst_n,
    .wr_en       (data_in.prio != PRIO_NONE),
    .wr_flit     (data_in),
    .avail       (room),
    .count       (count),
    .lock_mask   ('0),
    .sel_valid   (sel_valid),
    .sel_idx     (sel_idx),
    .sel_flit    (sel_flit),
    .free_en     (send),
    .free_idx    (sel_idx),
    .served      (send),
    .served_prio (sel_flit.prio),
    .req_flit_idx('0),
    .req_flit    (unused_rd)
  );

  assign buff_avail = req_buff_avail && room;
  assign send       = out_buff_avail && sel_valid;
  assign data_out   = send ? sel_flit : NO_FLIT;

endmodule
