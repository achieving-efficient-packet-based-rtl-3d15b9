// packet_generator: turns one batch from the packing scheduler into one SPMR
// request packet. The universal header (CUB, TAG, LNG/DLN, CMD and the request
// count) is written once for the whole batch; every request adds only its
// compressed ADDR field, its GRAN field and, for writes, its data. The packet
// tail carries a sequence number and a CRC-32.
// Timing: the batch is taken in one cycle; then one request per cycle is run
// through the address compressor and appended at the running bit offset (the
// compressor's table must see the requests in packet order, exactly as the
// receiver will); one cycle finishes the header; then the flits are sent one
// per accepted cycle on a valid/ready stream, with flit_last on the final one.
// For each request placed in the packet an issue record (id, gran, wr) is
// offered; packing waits while issue_ready is low, so the requester side can
// keep its list of outstanding reads. Field layout: see spmr_pkg.
module packet_generator
  import spmr_pkg::*;
#(
  parameter int unsigned MAX_REQS = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // batch from the packing scheduler
  input  logic                          batch_valid,
  output logic                          batch_ready,
  input  logic                          batch_wr,
  input  logic [CUB_W-1:0]              batch_cub,
  input  logic [$clog2(MAX_REQS+1)-1:0] batch_n,
  input  mem_req_t                      batch_req [MAX_REQS],
  // record of every request placed in a packet
  output logic                          issue_valid,
  input  logic                          issue_ready,
  output logic [ID_W-1:0]               issue_id,
  output logic [GRAN_W-1:0]             issue_gran,
  output logic                          issue_wr,
  // flit stream towards the link
  output logic                          flit_valid,
  input  logic                          flit_ready,
  output logic [FLIT_W-1:0]             flit_data,
  output logic                          flit_last,
  // statistics
  output logic                          addr_hit_pulse
);
  localparam int unsigned NW = $clog2(MAX_REQS+1);
  localparam int unsigned CW = AF_MAX_W + GRAN_W + WDATA_W;
  localparam int unsigned OW = $clog2(PKT_W+1);

  typedef enum logic [1:0] {S_IDLE, S_PACK, S_FIN, S_SEND} state_e;
  state_e state;

  mem_req_t          req   [MAX_REQS];
  logic [NW-1:0]     n, i;
  logic              wr;
  logic [CUB_W-1:0]  cub;
  logic [PKT_W-1:0]  pkt;
  logic [OW-1:0]     off;
  logic [3:0]        nfl, k;
  logic [TAG_W-1:0]  tag;
  logic [2:0]        seq;
  logic [31:0]       crc;

  // current request through the compressor
  mem_req_t              cur;
  logic                  c_hit;
  logic [IDX_W-1:0]      c_idx;
  logic [AF_MAX_W-1:0]   c_field;
  logic [5:0]            c_len;
  logic                  step;
  logic [CW-1:0]         chunk;
  logic [10:0]           chunk_len;

  assign cur  = req[i[$clog2(MAX_REQS)-1:0]];
  assign step = (state == S_PACK) && issue_ready;

  addr_compressor u_comp (
    .clk, .rst_n,
    .addr      (cur.addr),
    .commit    (step),
    .hit       (c_hit),
    .idx       (c_idx),
    .field     (c_field),
    .field_len (c_len)
  );

  always_comb begin
    logic [WDATA_W-1:0] d;
    d = '0;
    for (int b = 0; b < WDATA_W / BEAT_W; b++)
      if (b <= int'(cur.gran)) d[b*BEAT_W +: BEAT_W] = cur.data[b*BEAT_W +: BEAT_W];
    chunk = CW'(c_field) | (CW'(cur.gran) << c_len);
    chunk_len = 11'(c_len) + 11'(GRAN_W);
    if (wr) begin
      chunk = chunk | (CW'(d) << (c_len + 6'(GRAN_W)));
      chunk_len = chunk_len + 11'((int'(cur.gran) + 1) * BEAT_W);
    end
  end

  assign batch_ready    = (state == S_IDLE);
  assign issue_valid    = (state == S_PACK);
  assign issue_id       = cur.id;
  assign issue_gran     = cur.gran;
  assign issue_wr       = wr;
  assign addr_hit_pulse = step && c_hit;

  // flit k of the packet, with the tail and CRC on the last one
  logic [FLIT_W-1:0] fl_raw;
  logic [31:0]       crc_nxt;
  always_comb begin
    fl_raw = pkt[k*FLIT_W +: FLIT_W];
    flit_last = (k == nfl - 1'b1);
    if (flit_last) begin
      fl_raw[FLIT_W-TAIL_W +: TAIL_W] = '0;
      fl_raw[FLIT_W-TAIL_W + 16 +: 3] = seq;
    end
    crc_nxt   = crc32_flit(crc, fl_raw);
    flit_data = fl_raw;
    if (flit_last) flit_data[FLIT_W-32 +: 32] = crc_nxt;
  end
  assign flit_valid = (state == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n <= '0; i <= '0; wr <= 1'b0; cub <= '0;
      pkt <= '0; off <= '0; nfl <= '0; k <= '0;
      tag <= '0; seq <= '0; crc <= '1;
      for (int j = 0; j < MAX_REQS; j++) req[j] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (batch_valid && batch_n != '0) begin
          for (int j = 0; j < MAX_REQS; j++) req[j] <= batch_req[j];
          n     <= batch_n;
          wr    <= batch_wr;
          cub   <= batch_cub;
          i     <= '0;
          pkt   <= '0;
          off   <= OW'(HDR_W);
          state <= S_PACK;
        end
        S_PACK: if (step) begin
          pkt <= pkt | (PKT_W'(chunk) << off);
          off <= off + OW'(chunk_len);
          i   <= i + 1'b1;
          if (i == n - 1'b1) state <= S_FIN;
        end
        S_FIN: begin
          nfl <= flits_for(int'(off) - HDR_W);
          pkt[HDR_W-1:0] <= make_header(cub, tag, flits_for(int'(off) - HDR_W),
                                        CNT_W'(n), wr ? CMD_WR : CMD_RD);
          k     <= '0;
          crc   <= '1;
          state <= S_SEND;
        end
        S_SEND: if (flit_ready) begin
          crc <= crc_nxt;
          k   <= k + 1'b1;
          if (flit_last) begin
            tag   <= tag + 1'b1;
            seq   <= seq + 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  property p_fits;
    @(posedge clk) disable iff (!rst_n) (state == S_SEND) |-> (nfl <= 4'(MAX_FLITS));
  endproperty
  assert property (p_fits);
endmodule
