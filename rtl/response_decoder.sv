// response_decoder: on-chip end of the response link. It collects the flits
// of one SPMR response packet, checks the CRC-32 of the tail, and hands the
// data chunks it carries to the requester one per cycle. Each chunk is {data,
// GRAN}: GRAN+1 8-byte words of read data. Chunks arrive in the order the
// reads were packed, so the decoder matches them with the list of outstanding
// reads kept by the on-chip controller (id and size of each, oldest first):
// a request's data may be spread over several chunks and packets, and the
// chunk that completes it is flagged rsp_last and retires the list entry.
// A packet with a bad CRC is dropped and reported by a crc_err pulse.
module response_decoder
  import spmr_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               flit_valid,
  output logic               flit_ready,
  input  logic [FLIT_W-1:0]  flit_data,
  // oldest outstanding read
  input  logic               os_valid,
  output logic               os_pop,
  input  logic [ID_W-1:0]    os_id,
  input  logic [GRAN_W-1:0]  os_gran,
  // read data to the requester
  output logic               rsp_valid,
  input  logic               rsp_ready,
  output logic [ID_W-1:0]    rsp_id,
  output logic [WDATA_W-1:0] rsp_data,
  output logic [2:0]         rsp_gran,
  output logic               rsp_last,
  output logic               crc_err
);
  localparam int unsigned OW = $clog2(PKT_W+1);

  typedef enum logic [1:0] {S_RECV, S_DEC} state_e;
  state_e state;

  logic [PKT_W-1:0] pkt;
  logic [3:0]       nfl, k;
  logic [31:0]      crc;
  logic [OW-1:0]    off;
  logic [CNT_W-1:0] cnt, i;
  logic             started;
  logic [GRAN_W:0]  rem;

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

  logic [PKT_W-1:0] rest;
  logic [GRAN_W:0]  units, rem_now;
  logic             step;
  assign rest    = pkt >> off;
  assign units   = {1'b0, rest[GRAN_W-1:0]} + 1'b1;
  assign rem_now = started ? rem : ({1'b0, os_gran} + 1'b1);

  always_comb begin
    rsp_data = '0;
    for (int b = 0; b < WDATA_W / BEAT_W; b++)
      if (b < int'(units)) rsp_data[b*BEAT_W +: BEAT_W] = rest[GRAN_W + b*BEAT_W +: BEAT_W];
  end

  assign flit_ready = (state == S_RECV);
  assign rsp_valid  = (state == S_DEC) && os_valid;
  assign rsp_id     = os_id;
  assign rsp_gran   = rest[2:0];
  assign rsp_last   = (rem_now <= units);
  assign step       = rsp_valid && rsp_ready;
  assign os_pop     = step && rsp_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RECV;
      pkt <= '0; nfl <= '0; k <= '0; crc <= '1;
      off <= '0; cnt <= '0; i <= '0;
      started <= 1'b0; rem <= '0; crc_err <= 1'b0;
    end else begin
      crc_err <= 1'b0;
      unique case (state)
        S_RECV: if (flit_valid) begin
          pkt[k*FLIT_W +: FLIT_W] <= flit_data;
          crc <= crc_nxt;
          nfl <= lng_now;
          if (k == 0) cnt <= flit_data[H_CNT_LO +: CNT_W];
          if (last_now) begin
            k   <= '0;
            crc <= '1;
            off <= OW'(HDR_W);
            i   <= '0;
            if (crc_nxt == flit_data[FLIT_W-32 +: 32] && cnt_now != '0) state <= S_DEC;
            else crc_err <= (crc_nxt != flit_data[FLIT_W-32 +: 32]);
          end else begin
            k <= k + 1'b1;
          end
        end
        S_DEC: if (step) begin
          off <= off + OW'(GRAN_W) + OW'(units) * OW'(BEAT_W);
          i   <= i + 1'b1;
          if (rsp_last) started <= 1'b0;
          else begin
            started <= 1'b1;
            rem     <= rem_now - units;
          end
          if (i == cnt - 1'b1) state <= S_RECV;
        end
        default: state <= S_RECV;
      endcase
    end
  end
endmodule
