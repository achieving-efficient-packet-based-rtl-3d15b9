// packet_decoder: off-chip end of the request link. It collects the flits of
// one SPMR request packet (the header's LNG field gives their number), checks
// the CRC-32 in the tail, and then takes the requests out one per cycle: from
// the header it knows how many there are and whether they are reads or writes;
// each request's ADDR field goes through the address decompressor (whose table
// is updated in packet order, mirroring the sender), followed by GRAN and, for
// writes, (GRAN+1) 8-byte data words. Decoded requests leave on a valid/ready
// stream towards the request queue. A packet whose CRC does not match is
// dropped whole and reported with a one-cycle crc_err pulse.
// Timing: one cycle per flit received, then one cycle per request handed on.
// Decoding requests one after another, rather than in parallel or while later
// flits still arrive, is this design's simplification.
module packet_decoder
  import spmr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flit_valid,
  output logic              flit_ready,
  input  logic [FLIT_W-1:0] flit_data,
  output logic              req_valid,
  input  logic              req_ready,
  output dec_req_t          req,
  output logic              crc_err
);
  localparam int unsigned OW = $clog2(PKT_W+1);

  typedef enum logic [1:0] {S_RECV, S_DEC} state_e;
  state_e state;

  logic [PKT_W-1:0] pkt;
  logic [3:0]       nfl, k;
  logic [31:0]      crc;
  logic [OW-1:0]    off;
  logic [CNT_W-1:0] cnt, i;
  logic             wr;

  // CRC over the arriving flit, CRC field zeroed when it is the last one
  logic [3:0]        lng_now;
  logic              last_now;
  logic [FLIT_W-1:0] fl_z;
  logic [31:0]       crc_nxt;
  logic [CNT_W-1:0]  cnt_now;
  always_comb begin
    cnt_now  = (k == 0) ? flit_data[H_CNT_LO +: CNT_W] : cnt;
    lng_now  = (k == 0) ? flit_data[H_LNG_LO +: 4] : nfl;
    if (lng_now == 0) lng_now = 4'd1;
    last_now = (k == lng_now - 1'b1);
    fl_z     = flit_data;
    if (last_now) fl_z[FLIT_W-32 +: 32] = '0;
    crc_nxt  = crc32_flit(crc, fl_z);
  end

  // request at the current offset
  logic [PKT_W-1:0]    rest;
  logic [5:0]          alen;
  logic [ADDR_W-1:0]   a;
  logic [GRAN_W-1:0]   g;
  logic [WDATA_W-1:0]  d;
  logic [10:0]         rlen;
  logic                step;

  assign rest = pkt >> off;
  assign step = (state == S_DEC) && req_ready;

  addr_decompressor u_decomp (
    .clk, .rst_n,
    .field     (rest[AF_MAX_W-1:0]),
    .commit    (step),
    .addr      (a),
    .field_len (alen)
  );

  always_comb begin
    logic [PKT_W-1:0] r2;
    r2 = rest >> alen;
    g  = r2[GRAN_W-1:0];
    d  = '0;
    rlen = 11'(alen) + 11'(GRAN_W);
    if (wr) begin
      for (int b = 0; b < WDATA_W / BEAT_W; b++)
        if (b <= int'(g)) d[b*BEAT_W +: BEAT_W] = r2[GRAN_W + b*BEAT_W +: BEAT_W];
      rlen = rlen + 11'((int'(g) + 1) * BEAT_W);
    end
  end

  assign flit_ready = (state == S_RECV);
  assign req_valid  = (state == S_DEC);
  assign req.wr     = wr;
  assign req.addr   = a;
  assign req.gran   = g;
  assign req.data   = d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RECV;
      pkt <= '0; nfl <= '0; k <= '0; crc <= '1;
      off <= '0; cnt <= '0; i <= '0; wr <= 1'b0;
      crc_err <= 1'b0;
    end else begin
      crc_err <= 1'b0;
      unique case (state)
        S_RECV: if (flit_valid) begin
          pkt[k*FLIT_W +: FLIT_W] <= flit_data;
          crc <= crc_nxt;
          nfl <= lng_now;
          if (k == 0) begin
            cnt <= flit_data[H_CNT_LO +: CNT_W];
            wr  <= (flit_data[H_CMD_LO +: 6] == CMD_WR);
          end
          if (last_now) begin
            k   <= '0;
            crc <= '1;
            off <= OW'(HDR_W);
            i   <= '0;
            if (crc_nxt == flit_data[FLIT_W-32 +: 32] && cnt_now != '0) begin
              state <= S_DEC;
            end else begin
              crc_err <= (crc_nxt != flit_data[FLIT_W-32 +: 32]);
            end
          end else begin
            k <= k + 1'b1;
          end
        end
        S_DEC: if (step) begin
          off <= off + OW'(rlen);
          i   <= i + 1'b1;
          if (i == cnt - 1'b1) state <= S_RECV;
        end
        default: state <= S_RECV;
      endcase
    end
  end
endmodule
