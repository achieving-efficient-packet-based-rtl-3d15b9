// spmr_tb_pkg: reference models for the testbenches, written separately from
// the RTL: a bit-list packet builder and parser for request and response
// packets, a model of the self-adaptive base address table, and a bit-serial
// CRC-32. Bits are kept in a queue, bit 0 first, and cut into 128-bit flits.
package spmr_tb_pkg;
  import spmr_pkg::*;

  typedef logic [127:0] flit_t;
  typedef logic bitq_t [$];

  class RefTable;
    logic [ADDR_W-1:0] base [TBL_N];
    bit                valid [TBL_N];
    int                rr;
    function new();
      for (int i = 0; i < TBL_N; i++) begin base[i] = '0; valid[i] = 0; end
      rr = 0;
    endfunction
    // returns the ADDR field as bits (bit 0 first) and updates the table
    function void encode(input logic [ADDR_W-1:0] a, ref bitq_t q, output bit hit);
      longint signed d;
      int idx;
      hit = 0; idx = rr;
      for (int i = 0; i < TBL_N && !hit; i++) begin
        d = longint'(a) - longint'(base[i]);
        if (valid[i] && d >= -(1 << (DIFF_W - 1)) && d < (1 << (DIFF_W - 1))) begin
          hit = 1; idx = i;
        end
      end
      q.push_back(hit);
      for (int b = 0; b < IDX_W; b++) q.push_back(idx[b]);
      if (hit) begin
        d = longint'(a) - longint'(base[idx]);
        for (int b = 0; b < DIFF_W; b++) q.push_back(d[b]);
      end else begin
        for (int b = 0; b < ADDR_W; b++) q.push_back(a[b]);
        rr = (rr + 1) % TBL_N;
      end
      base[idx] = a; valid[idx] = 1;
    endfunction
  endclass

  function automatic void push_bits(ref bitq_t q, input logic [1023:0] v, input int n);
    for (int b = 0; b < n; b++) q.push_back(v[b]);
  endfunction

  function automatic logic [31:0] ref_crc(input flit_t f [$]);
    logic [31:0] c = 32'hFFFF_FFFF;
    for (int k = 0; k < f.size(); k++)
      for (int b = 127; b >= 0; b--) begin
        logic fb = c[31] ^ f[k][b];
        c = {c[30:0], 1'b0};
        if (fb) c = c ^ 32'h04C1_1DB7;
      end
    return c;
  endfunction

  // header + payload bits + tail -> flits with CRC
  function automatic void frame(input logic [CUB_W-1:0] cub, input int tag, input int seq,
                                input int cnt, input logic [5:0] cmd,
                                input bitq_t payload, output flit_t f [$]);
    bitq_t all;
    int nfl = (64 + payload.size() + 64 + 127) / 128;
    logic [63:0] h = '0;
    h[63:61] = cub; h[29:24] = 6'(cnt); h[23:15] = 9'(tag);
    h[14:11] = 4'(nfl); h[10:7] = 4'(nfl); h[5:0] = cmd;
    all = {};
    push_bits(all, 1024'(h), 64);
    foreach (payload[i]) all.push_back(payload[i]);
    while (all.size() < nfl * 128) all.push_back(1'b0);
    f = {};
    for (int k = 0; k < nfl; k++) begin
      flit_t x;
      for (int b = 0; b < 128; b++) x[b] = all[k*128 + b];
      f.push_back(x);
    end
    f[nfl-1][127:64] = '0;
    f[nfl-1][64+16 +: 3] = 3'(seq);
    f[nfl-1][127:96] = ref_crc(f);
  endfunction

  function automatic void build_req_packet(RefTable t, input logic [CUB_W-1:0] cub, input int tag,
                                           input int seq, input logic wr, input mem_req_t r [$],
                                           output flit_t f [$], output int hits);
    bitq_t p;
    bit h;
    p = {};
    hits = 0;
    foreach (r[i]) begin
      t.encode(r[i].addr, p, h);
      hits += h;
      push_bits(p, 1024'(r[i].gran), GRAN_W);
      if (wr) push_bits(p, 1024'(r[i].data), (int'(r[i].gran) + 1) * 64);
    end
    frame(cub, tag, seq, r.size(), wr ? CMD_WR : CMD_RD, p, f);
  endfunction

  // chunks: each is (units, data)
  function automatic void build_rsp_packet(input int tag, input int seq, input int units [$],
                                           input logic [511:0] data [$], output flit_t f [$]);
    bitq_t p;
    p = {};
    foreach (units[i]) begin
      push_bits(p, 1024'(units[i] - 1), GRAN_W);
      push_bits(p, 1024'(data[i]), units[i] * 64);
    end
    frame('0, tag, seq, units.size(), CMD_RD_RS, p, f);
  endfunction

  // parse a response packet into chunks; returns 0 if the CRC or framing is bad
  function automatic bit parse_rsp_packet(input flit_t f [$], output int units [$],
                                          output logic [511:0] data [$]);
    flit_t z [$];
    int off, cnt;
    bitq_t all;
    z = f;
    z[z.size()-1][127:96] = '0;
    if (ref_crc(z) != f[f.size()-1][127:96]) return 0;
    if (int'(f[0][10:7]) != f.size()) return 0;
    all = {};
    foreach (f[k]) for (int b = 0; b < 128; b++) all.push_back(f[k][b]);
    cnt = int'(f[0][29:24]);
    off = 64;
    units = {}; data = {};
    for (int i = 0; i < cnt; i++) begin
      int u = 0;
      logic [511:0] d = '0;
      for (int b = 0; b < GRAN_W; b++) u |= int'(all[off + b]) << b;
      u++;
      off += GRAN_W;
      for (int b = 0; b < u * 64; b++) d[b] = all[off + b];
      off += u * 64;
      units.push_back(u);
      data.push_back(d);
    end
    return 1;
  endfunction
endpackage
