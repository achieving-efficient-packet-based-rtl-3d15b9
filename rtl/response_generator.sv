// response_generator: builds SPMR response packets in the off-chip controller.
// Read data returns from the DDRx interface as 8-byte beats, in the order the
// RD commands were issued. The generator groups the beats of each read request
// (its size comes from the command scheduler's descriptor) into chunks of at
// most 8 beats (64 B) and appends each chunk to the packet under construction
// as {data, GRAN}. Data of several requests thus shares one header and one
// tail. The packet is closed when another full chunk might not fit, when the
// count field is full, or when no returning data is pending (so the requester
// is never kept waiting for a packet to fill up). The requester matches chunks
// to its reads by order, so no per-request tag is sent.
// Flow control: rd_allow is high while every RD that could still return has a
// place in the beat FIFO; rd_issue counts RDs on their way.
// Timing: one beat taken per cycle, one cycle per chunk appended, one cycle to
// finish the header, then one flit per accepted cycle.
module response_generator
  import spmr_pkg::*;
#(
  parameter int unsigned BEAT_D = 16,
  parameter int unsigned DESC_D = 8,
  parameter logic [CUB_W-1:0] CUB = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              desc_valid,
  output logic              desc_ready,
  input  logic [GRAN_W-1:0] desc_gran,
  input  logic              rd_issue,
  output logic              rd_allow,
  input  logic              rdata_valid,
  input  logic [BEAT_W-1:0] rdata,
  output logic              flit_valid,
  input  logic              flit_ready,
  output logic [FLIT_W-1:0] flit_data,
  output logic              flit_last
);
  localparam int unsigned OW      = $clog2(PKT_W+1);
  localparam int unsigned BCW     = $clog2(BEAT_D+1);
  localparam int unsigned CHUNK_W = GRAN_W + WDATA_W;
  localparam int unsigned LIMIT   = PKT_W - TAIL_W - CHUNK_W;  // room for one more chunk

  typedef enum logic [1:0] {S_GATHER, S_APPEND, S_FIN, S_SEND} state_e;
  state_e state;

  // queues
  logic              dq_valid, dq_pop;
  logic [GRAN_W-1:0] dq_gran;
  logic              bq_valid, bq_pop;
  logic [BEAT_W-1:0] bq_data;
  logic [BCW-1:0]    bq_cnt, inflight;

  sync_fifo #(.W(GRAN_W), .DEPTH(DESC_D)) u_desc (
    .clk, .rst_n,
    .in_valid (desc_valid), .in_ready (desc_ready), .in_data (desc_gran),
    .out_valid (dq_valid), .out_ready (dq_pop), .out_data (dq_gran), .count ()
  );
  sync_fifo #(.W(BEAT_W), .DEPTH(BEAT_D)) u_beat (
    .clk, .rst_n,
    .in_valid (rdata_valid), .in_ready (), .in_data (rdata),
    .out_valid (bq_valid), .out_ready (bq_pop), .out_data (bq_data), .count (bq_cnt)
  );

  assign rd_allow = (32'(bq_cnt) + 32'(inflight)) < BEAT_D;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inflight <= '0;
    else        inflight <= inflight + BCW'(rd_issue) - BCW'(rdata_valid);
  end

  logic              have_req;
  logic [GRAN_W:0]   rem;       // units still to come for the current request
  logic [WDATA_W-1:0] chunk;
  logic [3:0]        nb;
  logic [PKT_W-1:0]  pkt;
  logic [OW-1:0]     off;
  logic [CNT_W-1:0]  cnt;
  logic [3:0]        nfl, k;
  logic [TAG_W-1:0]  tag;
  logic [2:0]        seq;
  logic [31:0]       crc;
  logic              idle_link;

  assign dq_pop    = (state == S_GATHER) && !have_req && (nb == 0);
  assign bq_pop    = (state == S_GATHER) && have_req && bq_valid;
  assign idle_link = (inflight == 0) && !bq_valid && !rdata_valid;

  logic [FLIT_W-1:0] fl_raw;
  logic [31:0]       crc_nxt;
  always_comb begin
    fl_raw    = pkt[k*FLIT_W +: FLIT_W];
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
      state <= S_GATHER;
      have_req <= 1'b0; rem <= '0; chunk <= '0; nb <= '0;
      pkt <= '0; off <= OW'(HDR_W); cnt <= '0; nfl <= '0; k <= '0;
      tag <= '0; seq <= '0; crc <= '1;
    end else begin
      unique case (state)
        S_GATHER: begin
          if (!have_req) begin
            if (dq_valid) begin
              have_req <= 1'b1;
              rem      <= {1'b0, dq_gran} + 1'b1;
            end else if (cnt != 0 && idle_link) begin
              state <= S_FIN;
            end
          end else if (bq_valid) begin
            chunk[nb*BEAT_W +: BEAT_W] <= bq_data;
            nb  <= nb + 1'b1;
            rem <= rem - 1'b1;
            if (nb == 4'd7 || rem == 1) state <= S_APPEND;
          end else if (nb == 0 && cnt != 0 && idle_link) begin
            state <= S_FIN;
          end
        end
        S_APPEND: begin
          pkt   <= pkt | (PKT_W'({chunk, GRAN_W'(nb - 1'b1)}) << off);
          off   <= off + OW'(GRAN_W) + OW'(nb) * OW'(BEAT_W);
          cnt   <= cnt + 1'b1;
          chunk <= '0;
          nb    <= '0;
          if (rem == 0) have_req <= 1'b0;
          if ((int'(off) + GRAN_W + int'(nb) * BEAT_W > LIMIT) || (cnt == {{(CNT_W-1){1'b1}}, 1'b0}))
            state <= S_FIN;
          else
            state <= S_GATHER;
        end
        S_FIN: begin
          nfl <= flits_for(int'(off) - HDR_W);
          pkt[HDR_W-1:0] <= make_header(CUB, tag, flits_for(int'(off) - HDR_W), cnt, CMD_RD_RS);
          k   <= '0;
          crc <= '1;
          state <= S_SEND;
        end
        S_SEND: if (flit_ready) begin
          crc <= crc_nxt;
          k   <= k + 1'b1;
          if (flit_last) begin
            tag   <= tag + 1'b1;
            seq   <= seq + 1'b1;
            pkt   <= '0;
            off   <= OW'(HDR_W);
            cnt   <= '0;
            state <= S_GATHER;
          end
        end
        default: state <= S_GATHER;
      endcase
    end
  end
endmodule
