// spmr_pkg: types, field positions and helper functions shared by both ends of
// a packet-based memory link that carries several requests per packet (SPMR,
// single packet / multiple requests).
//
// Packet framing. A packet is 1..MAX_FLITS flits of 128 bits, sent LSB first.
// Bits [63:0] of the first flit hold the universal header and bits [127:64] of
// the last flit hold the tail. The header keeps the HMC field positions
// (CUB, TAG, DLN, LNG, CMD); the old 34-bit ADRS range is no longer used for an
// address, because every request now carries its own ADDR and GRAN fields after
// the header. This design puts the number of requests (or response chunks) of
// the packet in header bits [29:24] and leaves the rest of that range zero.
// Between header and tail each request occupies, back to back with no padding:
//   request packet : ADDR field (compressed, see below), GRAN, write data
//   response packet: GRAN, read data
// GRAN counts 8-byte units minus one, so 9 bits cover 8 B (fine-grained sub-rank
// access) up to 4 KB (merged continuous requests).
//
// Compressed ADDR field (base number with difference, self-adaptive table):
//   hit : {diff[DIFF_W-1:0], idx[IDX_W-1:0], 1'b1}  address = table[idx] + diff
//   miss: {addr[ADDR_W-1:0], idx[IDX_W-1:0], 1'b0}  table[idx] is replaced
// diff is a signed byte difference. In both cases the used table entry is then
// set to the address just sent, so a stride keeps hitting one entry.
//
// The tail keeps the HMC CRC position [63:32] and a 3-bit sequence number at
// [18:16]; the CRC-32 (polynomial 0x04C11DB7) covers every flit of the packet
// with the CRC field read as zero.
package spmr_pkg;

  // ---- sizes ---------------------------------------------------------------
  localparam int unsigned ADDR_W    = 48;   // physical byte address
  localparam int unsigned GRAN_W    = 9;    // (#8-byte units - 1), 8 B .. 4 KB
  localparam int unsigned DIFF_W    = 9;    // signed difference in compressed ADDR
  localparam int unsigned TBL_N     = 4;    // base address table entries
  localparam int unsigned IDX_W     = 2;    // base number width
  localparam int unsigned FLIT_W    = 128;
  localparam int unsigned MAX_FLITS = 15;   // limit of the 4-bit LNG field
  localparam int unsigned PKT_W     = FLIT_W * MAX_FLITS;
  localparam int unsigned HDR_W     = 64;
  localparam int unsigned TAIL_W    = 64;
  localparam int unsigned LINK_W    = 32;   // link bus width
  localparam int unsigned CUB_W     = 3;
  localparam int unsigned TAG_W     = 9;
  localparam int unsigned CNT_W     = 6;    // requests per packet field
  localparam int unsigned WDATA_W   = 512;  // write data per request, <= 64 B
  localparam int unsigned BEAT_W    = 64;   // one x8 sub-rank burst (BL8) = 8 B
  localparam int unsigned ID_W      = 8;    // requester's transaction id

  localparam int unsigned AF_HIT_W  = 1 + IDX_W + DIFF_W;
  localparam int unsigned AF_MISS_W = 1 + IDX_W + ADDR_W;
  localparam int unsigned AF_MAX_W  = AF_MISS_W;

  // ---- HMC command codes used by this design --------------------------------
  localparam logic [5:0] CMD_RD    = 6'h30;
  localparam logic [5:0] CMD_WR    = 6'h08;
  localparam logic [5:0] CMD_RD_RS = 6'h38;

  // ---- header field positions (HMC request header layout) ------------------
  localparam int unsigned H_CMD_LO = 0;
  localparam int unsigned H_LNG_LO = 7;
  localparam int unsigned H_DLN_LO = 11;
  localparam int unsigned H_TAG_LO = 15;
  localparam int unsigned H_CNT_LO = 24;
  localparam int unsigned H_CUB_LO = 61;

  // one memory request as the requester hands it over
  typedef struct packed {
    logic [ID_W-1:0]    id;
    logic [CUB_W-1:0]   cub;
    logic               wr;
    logic [ADDR_W-1:0]  addr;
    logic [GRAN_W-1:0]  gran;
    logic [WDATA_W-1:0] data;
  } mem_req_t;

  // one request as decoded in the off-chip controller
  typedef struct packed {
    logic               wr;
    logic [ADDR_W-1:0]  addr;
    logic [GRAN_W-1:0]  gran;
    logic [WDATA_W-1:0] data;
  } dec_req_t;

  // DDR3 command codes towards the sub-ranked DDRx interface
  typedef enum logic [2:0] {
    DDR_NOP = 3'd0,
    DDR_ACT = 3'd1,
    DDR_PRE = 3'd2,
    DDR_RD  = 3'd3,
    DDR_WR  = 3'd4
  } ddr_cmd_e;

  function automatic logic [HDR_W-1:0] make_header(
      input logic [CUB_W-1:0] cub, input logic [TAG_W-1:0] tag,
      input logic [3:0] lng, input logic [CNT_W-1:0] cnt, input logic [5:0] cmd);
    logic [HDR_W-1:0] h;
    h = '0;
    h[H_CUB_LO +: CUB_W] = cub;
    h[H_CNT_LO +: CNT_W] = cnt;
    h[H_TAG_LO +: TAG_W] = tag;
    h[H_DLN_LO +: 4]     = lng;
    h[H_LNG_LO +: 4]     = lng;
    h[H_CMD_LO +: 6]     = cmd;
    return h;
  endfunction

  // CRC-32, MSB-first, over one flit
  function automatic logic [31:0] crc32_flit(input logic [31:0] crc_in,
                                             input logic [FLIT_W-1:0] d);
    logic [31:0] c;
    c = crc_in;
    for (int i = FLIT_W - 1; i >= 0; i--) begin
      if (c[31] ^ d[i]) c = (c << 1) ^ 32'h04C1_1DB7;
      else              c = c << 1;
    end
    return c;
  endfunction

  // bits a request occupies in a request packet before compression
  function automatic int unsigned req_bits_max(input logic wr, input logic [GRAN_W-1:0] gran);
    return AF_MAX_W + GRAN_W + (wr ? (int'(gran) + 1) * BEAT_W : 0);
  endfunction

  // flits needed for a payload of n bits between header and tail
  function automatic logic [3:0] flits_for(input int unsigned payload_bits);
    return 4'((HDR_W + payload_bits + TAIL_W + FLIT_W - 1) / FLIT_W);
  endfunction

endpackage
