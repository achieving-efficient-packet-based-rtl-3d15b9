// spmr_mem_system: a packet-based memory system whose link packets carry
// several memory requests each (SPMR) instead of one (SPSR).
// On-chip controller: requests from the processor side (read or write, 8 B to
// 4 KB, tagged with an id and a destination module CUB) are put in a read
// buffer or a write buffer. The packing scheduler picks a batch of same-type,
// same-module requests, preferring close addresses; the packet generator
// compresses each address against a base address table and emits one request
// packet, which serdes_tx sends as 32-bit words over the request link.
// Off-chip controller: serdes_rx and the packet decoder restore the requests
// (with a mirror of the base table) into the request queue; the command
// scheduler turns them into DDR3 commands for sub-ranked memory, brought out on
// the ddr_* ports for the DDRx interface. Read data coming back on ddr_rdata is
// packed by the response generator into response packets, which travel over the
// response link to the response decoder, and leave on rsp_* in request order.
// Each read's id and size wait in an outstanding-read queue until its data is
// back. Writes are posted: no response. Reads and writes are buffered
// separately and may pass each other; ordering between them is the requester's
// business. Both controllers share one clock here.
module spmr_mem_system
  import spmr_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 16,
  parameter int unsigned MAX_REQS  = 8,
  parameter int unsigned RQ_DEPTH  = 16,
  parameter int unsigned OS_DEPTH  = 64,
  parameter int unsigned TRCD      = 9,
  parameter int unsigned TRP       = 9
) (
  input  logic               clk,
  input  logic               rst_n,
  // requests in
  input  logic               req_valid,
  output logic               req_ready,
  input  mem_req_t           req,
  // read data out
  output logic               rsp_valid,
  input  logic               rsp_ready,
  output logic [ID_W-1:0]    rsp_id,
  output logic [WDATA_W-1:0] rsp_data,
  output logic [2:0]         rsp_gran,
  output logic               rsp_last,
  // DDRx interface (sub-ranked)
  output ddr_cmd_e           ddr_cmd,
  output logic               ddr_rank,
  output logic [2:0]         ddr_bank,
  output logic [14:0]        ddr_row,
  output logic [9:0]         ddr_col,
  output logic [2:0]         ddr_subrank,
  output logic [BEAT_W-1:0]  ddr_wdata,
  input  logic               ddr_rdata_valid,
  input  logic [BEAT_W-1:0]  ddr_rdata,
  // observation
  output logic               req_link_busy,
  output logic               rsp_link_busy,
  output logic               addr_hit_pulse,
  output logic               row_hit_pulse,
  output logic               row_conflict_pulse,
  output logic               crc_err
);
  localparam int unsigned NW = $clog2(MAX_REQS+1);

  // ------------------------------------------------------------ on-chip side
  mem_req_t          rd_ent [BUF_DEPTH];
  mem_req_t          wr_ent [BUF_DEPTH];
  logic [BUF_DEPTH-1:0] rd_vld, wr_vld, rd_pop, wr_pop;
  logic              rd_in_ready, wr_in_ready;

  assign req_ready = req.wr ? wr_in_ready : rd_in_ready;

  req_buffer #(.DEPTH(BUF_DEPTH)) u_rd_buf (
    .clk, .rst_n,
    .in_valid (req_valid && !req.wr), .in_ready (rd_in_ready), .in_req (req),
    .ent (rd_ent), .ent_valid (rd_vld), .count (), .pop_mask (rd_pop)
  );
  req_buffer #(.DEPTH(BUF_DEPTH)) u_wr_buf (
    .clk, .rst_n,
    .in_valid (req_valid && req.wr), .in_ready (wr_in_ready), .in_req (req),
    .ent (wr_ent), .ent_valid (wr_vld), .count (), .pop_mask (wr_pop)
  );

  logic             b_valid, b_ready, b_wr;
  logic [CUB_W-1:0] b_cub;
  logic [NW-1:0]    b_n;
  mem_req_t         b_req [MAX_REQS];

  packing_scheduler #(.DEPTH(BUF_DEPTH), .MAX_REQS(MAX_REQS)) u_sched (
    .clk, .rst_n,
    .rd_ent, .rd_valid (rd_vld), .wr_ent, .wr_valid (wr_vld),
    .rd_pop, .wr_pop,
    .batch_valid (b_valid), .batch_ready (b_ready), .batch_wr (b_wr),
    .batch_cub (b_cub), .batch_n (b_n), .batch_req (b_req)
  );

  logic              iss_valid, iss_ready, iss_wr;
  logic [ID_W-1:0]   iss_id;
  logic [GRAN_W-1:0] iss_gran;
  logic              os_in_ready;
  logic              qf_valid, qf_ready, qf_last;
  logic [FLIT_W-1:0] qf_data;

  assign iss_ready = iss_wr || os_in_ready;

  packet_generator #(.MAX_REQS(MAX_REQS)) u_pgen (
    .clk, .rst_n,
    .batch_valid (b_valid), .batch_ready (b_ready), .batch_wr (b_wr),
    .batch_cub (b_cub), .batch_n (b_n), .batch_req (b_req),
    .issue_valid (iss_valid), .issue_ready (iss_ready),
    .issue_id (iss_id), .issue_gran (iss_gran), .issue_wr (iss_wr),
    .flit_valid (qf_valid), .flit_ready (qf_ready), .flit_data (qf_data), .flit_last (qf_last),
    .addr_hit_pulse
  );

  logic              os_valid, os_pop;
  logic [ID_W+GRAN_W-1:0] os_data;
  sync_fifo #(.W(ID_W + GRAN_W), .DEPTH(OS_DEPTH)) u_outstanding (
    .clk, .rst_n,
    .in_valid (iss_valid && !iss_wr), .in_ready (os_in_ready), .in_data ({iss_id, iss_gran}),
    .out_valid (os_valid), .out_ready (os_pop), .out_data (os_data), .count ()
  );

  // request link
  logic              ql_valid, ql_rdy;
  logic [LINK_W-1:0] ql_data;
  serdes_tx u_req_tx (
    .clk, .rst_n,
    .flit_valid (qf_valid), .flit_ready (qf_ready), .flit_data (qf_data),
    .link_rdy (ql_rdy), .link_valid (ql_valid), .link_data (ql_data)
  );
  assign req_link_busy = ql_valid;

  // ----------------------------------------------------------- off-chip side
  logic              of_valid, of_ready;
  logic [FLIT_W-1:0] of_data;
  serdes_rx u_req_rx (
    .clk, .rst_n,
    .link_valid (ql_valid), .link_data (ql_data), .link_rdy (ql_rdy),
    .flit_valid (of_valid), .flit_ready (of_ready), .flit_data (of_data)
  );

  logic     d_valid, d_ready, crc_err_req;
  dec_req_t d_req;
  packet_decoder u_pdec (
    .clk, .rst_n,
    .flit_valid (of_valid), .flit_ready (of_ready), .flit_data (of_data),
    .req_valid (d_valid), .req_ready (d_ready), .req (d_req),
    .crc_err (crc_err_req)
  );

  logic     q_valid, q_ready;
  dec_req_t q_req;
  sync_fifo #(.W($bits(dec_req_t)), .DEPTH(RQ_DEPTH)) u_req_queue (
    .clk, .rst_n,
    .in_valid (d_valid), .in_ready (d_ready), .in_data (d_req),
    .out_valid (q_valid), .out_ready (q_ready), .out_data (q_req), .count ()
  );

  logic              ds_valid, ds_ready, rd_allow, rd_issue;
  logic [GRAN_W-1:0] ds_gran;
  cmd_scheduler #(.TRCD(TRCD), .TRP(TRP)) u_cmd (
    .clk, .rst_n,
    .req_valid (q_valid), .req_ready (q_ready), .req (q_req),
    .desc_valid (ds_valid), .desc_ready (ds_ready), .desc_gran (ds_gran),
    .rd_allow, .rd_issue,
    .ddr_cmd, .ddr_rank, .ddr_bank, .ddr_row, .ddr_col, .ddr_subrank, .ddr_wdata,
    .row_hit_pulse, .row_conflict_pulse
  );

  logic              rf_valid, rf_ready, rf_last;
  logic [FLIT_W-1:0] rf_data;
  response_generator u_rgen (
    .clk, .rst_n,
    .desc_valid (ds_valid), .desc_ready (ds_ready), .desc_gran (ds_gran),
    .rd_issue, .rd_allow,
    .rdata_valid (ddr_rdata_valid), .rdata (ddr_rdata),
    .flit_valid (rf_valid), .flit_ready (rf_ready), .flit_data (rf_data), .flit_last (rf_last)
  );

  // response link
  logic              rl_valid, rl_rdy;
  logic [LINK_W-1:0] rl_data;
  serdes_tx u_rsp_tx (
    .clk, .rst_n,
    .flit_valid (rf_valid), .flit_ready (rf_ready), .flit_data (rf_data),
    .link_rdy (rl_rdy), .link_valid (rl_valid), .link_data (rl_data)
  );
  assign rsp_link_busy = rl_valid;

  // ------------------------------------------------- back on the on-chip side
  logic              cf_valid, cf_ready, crc_err_rsp;
  logic [FLIT_W-1:0] cf_data;
  serdes_rx u_rsp_rx (
    .clk, .rst_n,
    .link_valid (rl_valid), .link_data (rl_data), .link_rdy (rl_rdy),
    .flit_valid (cf_valid), .flit_ready (cf_ready), .flit_data (cf_data)
  );

  response_decoder u_rdec (
    .clk, .rst_n,
    .flit_valid (cf_valid), .flit_ready (cf_ready), .flit_data (cf_data),
    .os_valid, .os_pop, .os_id (os_data[GRAN_W +: ID_W]), .os_gran (os_data[GRAN_W-1:0]),
    .rsp_valid, .rsp_ready, .rsp_id, .rsp_data, .rsp_gran, .rsp_last,
    .crc_err (crc_err_rsp)
  );

  assign crc_err = crc_err_req || crc_err_rsp;
endmodule
