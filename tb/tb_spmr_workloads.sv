// tb_spmr_workloads: runs synthetic request streams shaped like four classes
// of memory-intensive programs through the whole memory system at its default
// sizes, and measures what the SPMR packet format saves on them.
//   gups   : random 8-byte reads and writes all over a 1 GB table
//   graph  : a sequential scan of an edge list (8 B reads) mixed with random
//            8 B reads of vertex data, as in breadth-first search or pagerank
//   stream : the STREAM triad a[i] = b[i] + s*c[i] in 64-byte cache lines
//   merged : contiguous reads merged into large requests, sizes drawn from the
//            bins 8-64 B, 72-128 B, 136-512 B and 520-4096 B
// For every stream the test counts, on both links, the bits spent on packet
// headers and tails, on address fields, on GRAN fields and on data, and
// compares the header and tail bits with those of one-request-per-packet
// framing of the same traffic (one packet per request, one per 128 B of read
// data, 128 header and tail bits each). It also reports the address
// compression ratio (48 address bits per request against the ADDR field bits
// sent). Checks: every returned word against a reference memory, rsp_last,
// every write reaching the DRAM, no CRC or DRAM protocol error, fewer header
// and tail bits than one-request-per-packet framing on every stream, and a
// compression ratio above 1.5 on the streams with locality (graph, stream,
// merged). Reads and writes use disjoint address halves, because the design
// lets reads overtake buffered writes.
module tb_spmr_workloads;
  import spmr_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic               req_valid, req_ready;
  mem_req_t           req;
  logic               rsp_valid, rsp_ready, rsp_last;
  logic [ID_W-1:0]    rsp_id;
  logic [WDATA_W-1:0] rsp_data;
  logic [2:0]         rsp_gran;
  ddr_cmd_e           ddr_cmd;
  logic               ddr_rank;
  logic [2:0]         ddr_bank, ddr_subrank;
  logic [14:0]        ddr_row;
  logic [9:0]         ddr_col;
  logic [BEAT_W-1:0]  ddr_wdata, ddr_rdata;
  logic               ddr_rdata_valid;
  logic               req_link_busy, rsp_link_busy, addr_hit_pulse;
  logic               row_hit_pulse, row_conflict_pulse, crc_err;
  int                 dram_errors;

  spmr_mem_system dut (.*);

  dram_model u_dram (
    .clk, .rst_n, .cmd (ddr_cmd), .rank (ddr_rank), .bank (ddr_bank), .row (ddr_row),
    .col (ddr_col), .subrank (ddr_subrank), .wdata (ddr_wdata),
    .rvalid (ddr_rdata_valid), .rdata (ddr_rdata), .protocol_errors (dram_errors)
  );

  // ---------------------------------------------------------------- reference
  // Reads only touch never-written bytes, so the expected word is the DRAM
  // model's fill pattern.
  function automatic logic [BEAT_W-1:0] exp_word(input logic [ADDR_W-1:0] a);
    logic [28:0] k = a[31:3];
    return {k, 3'b101, k ^ 29'h1555_AAAA, 3'b010};
  endfunction

  logic [ADDR_W-1:0] exp_addr  [256];
  int                exp_units [256];
  int                got_units [256];
  logic              busy_id   [256];
  int                outstanding = 0;
  int                next_id = 0;
  int                wr_units_sent = 0, wr_units_seen = 0;

  // ------------------------------------------------------- per-stream tallies
  longint req_pkts, req_flits, n_req, n_rd, n_wr, n_hit, wr_units;
  longint rsp_pkts, rsp_flits, rsp_chunks, rd_units, spsr_rsp_pkts;

  task automatic clear_tallies();
    req_pkts = 0; req_flits = 0; n_req = 0; n_rd = 0; n_wr = 0; n_hit = 0; wr_units = 0;
    rsp_pkts = 0; rsp_flits = 0; rsp_chunks = 0; rd_units = 0; spsr_rsp_pkts = 0;
  endtask

  always @(posedge clk) if (rst_n) begin
    if (dut.u_pgen.flit_valid && dut.u_pgen.flit_ready) begin
      req_flits++;
      if (dut.u_pgen.flit_last) req_pkts++;
    end
    if (dut.rf_valid && dut.rf_ready) begin
      rsp_flits++;
      if (dut.rf_last) rsp_pkts++;
    end
    if (dut.iss_valid && dut.iss_ready) begin
      n_req++;
      if (dut.iss_wr) begin
        n_wr++;
        wr_units += longint'(dut.iss_gran) + 1;
      end else begin
        n_rd++;
        spsr_rsp_pkts += (longint'(dut.iss_gran) + 1 + 15) / 16;   // 128 B per packet
      end
    end
    if (addr_hit_pulse) n_hit++;
    if (ddr_cmd == DDR_WR) wr_units_seen++;
    if (crc_err) begin failures++; $display("FAIL crc error"); end
  end

  // ---------------------------------------------------------- response check
  logic stall_rsp = 1'b0;
  assign rsp_ready = !stall_rsp;
  always @(posedge clk) stall_rsp <= ($urandom_range(0, 7) == 0);

  always @(posedge clk) if (rst_n && rsp_valid && rsp_ready) begin
    int u;
    int id;
    logic ok;
    id = int'(rsp_id);
    u  = int'(rsp_gran) + 1;
    ok = busy_id[id];
    for (int b = 0; b < u; b++)
      if (rsp_data[b*BEAT_W +: BEAT_W] != exp_word(exp_addr[id] + ADDR_W'((got_units[id] + b) * 8)))
        ok = 1'b0;
    got_units[id] += u;
    if (rsp_last != (got_units[id] == exp_units[id])) ok = 1'b0;
    rsp_chunks++;
    rd_units += u;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL rsp id=%0d chunk of %0d units (got %0d of %0d)", id, u, got_units[id], exp_units[id]);
    end
    if (rsp_last) begin
      busy_id[id] = 1'b0;
      outstanding--;
    end
  end

  // ---------------------------------------------------------------- stimulus
  // reads go to byte addresses below 2 GB, writes to the upper 2 GB
  task automatic send(input logic wr, input logic [30:0] off, input int units);
    mem_req_t r;
    r = '0;
    r.wr   = wr;
    r.addr = {16'h0, wr, off[30:3], 3'b000};
    r.gran = GRAN_W'(units - 1);
    if (!wr) begin
      while (busy_id[next_id]) next_id = (next_id + 1) % 256;
      r.id = ID_W'(next_id);
      exp_addr[next_id]  = r.addr;
      exp_units[next_id] = units;
      got_units[next_id] = 0;
      busy_id[next_id]   = 1'b1;
      outstanding++;
      next_id = (next_id + 1) % 256;
    end else begin
      for (int b = 0; b < units; b++) r.data[b*BEAT_W +: BEAT_W] = {$urandom(), $urandom()};
      wr_units_sent += units;
    end
    @(negedge clk);
    req       = r;
    req_valid = 1'b1;
    #1;
    while (!req_ready) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    #1;
    req_valid = 1'b0;
  endtask

  task automatic wait_drain();
    int t = 0;
    while ((outstanding != 0 || wr_units_seen != wr_units_sent) && t < 200000) begin
      @(posedge clk);
      t++;
    end
    checks++;
    if (outstanding != 0 || wr_units_seen != wr_units_sent) begin
      failures++;
      $display("FAIL not drained: outstanding=%0d writes %0d/%0d", outstanding, wr_units_seen, wr_units_sent);
    end
  endtask

  // bit budget of one stream, printed and checked
  task automatic report(input string name, input bit locality);
    longint ht, addr_b, gran_b, data_b, total, spsr_ht, spsr_total;
    real    ratio;
    ht      = 128 * (req_pkts + rsp_pkts);
    addr_b  = n_hit * AF_HIT_W + (n_req - n_hit) * AF_MISS_W;
    gran_b  = GRAN_W * (n_req + rsp_chunks);
    data_b  = BEAT_W * (wr_units + rd_units);
    total   = FLIT_W * (req_flits + rsp_flits);
    spsr_ht = 128 * (n_req + spsr_rsp_pkts);
    spsr_total = spsr_ht + data_b;
    ratio   = (addr_b == 0) ? 0.0 : real'(ADDR_W * n_req) / real'(addr_b);
    $display("%-7s requests %0d (%0d rd, %0d wr) in %0d request packets, %0d response packets",
             name, n_req, n_rd, n_wr, req_pkts, rsp_pkts);
    $display("        SPMR bits: header+tail %0.1f%%  address %0.1f%%  gran %0.1f%%  data %0.1f%%  padding %0.1f%%",
             100.0 * ht / total, 100.0 * addr_b / total, 100.0 * gran_b / total,
             100.0 * data_b / total, 100.0 * (total - ht - addr_b - gran_b - data_b) / total);
    $display("        one request per packet: header+tail %0.1f%% of %0d bits; SPMR sends %0d bits; header+tail cut by %0.1f%%",
             100.0 * spsr_ht / spsr_total, spsr_total, total, 100.0 - 100.0 * ht / spsr_ht);
    $display("        address compression ratio %0.2f (table hits %0d of %0d)", ratio, n_hit, n_req);
    checks++;
    if (n_req == 0 || ht >= spsr_ht) begin
      failures++;
      $display("FAIL %s: header+tail bits %0d not below one-request-per-packet %0d", name, ht, spsr_ht);
    end
    checks++;
    if (addr_b + gran_b + data_b + ht > total) begin
      failures++;
      $display("FAIL %s: bit budget exceeds link bits", name);
    end
    if (locality) begin
      checks++;
      if (ratio <= 1.5) begin
        failures++;
        $display("FAIL %s: compression ratio %0.2f", name, ratio);
      end
    end
  endtask

  int unsigned bin_lo [4] = '{1, 9, 17, 65};
  int unsigned bin_hi [4] = '{8, 16, 64, 512};

  initial begin
    for (int i = 0; i < 256; i++) busy_id[i] = 1'b0;
    req_valid = 1'b0;
    req = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // gups: random 8-byte updates over 1 GB
    clear_tallies();
    for (int i = 0; i < 300; i++) begin
      logic [29:0] r;
      r = 30'($urandom());
      send(1'b0, {1'b0, r}, 1);
      r = 30'($urandom());
      send(1'b1, {1'b0, r}, 1);
    end
    wait_drain();
    report("gups", 1'b0);

    // graph: edge list scanned in order, vertex data read at random
    clear_tallies();
    for (int i = 0; i < 400; i++) begin
      send(1'b0, 31'h0100_0000 + 31'(i * 8), 1);
      if (i % 2 == 1) send(1'b0, {3'b010, 28'($urandom())}, 1);
    end
    wait_drain();
    report("graph", 1'b1);

    // stream triad on 64-byte lines
    clear_tallies();
    for (int i = 0; i < 200; i++) begin
      send(1'b0, 31'h1000_0000 + 31'(i * 64), 8);
      send(1'b0, 31'h2000_0000 + 31'(i * 64), 8);
      send(1'b1, 31'h3000_0000 + 31'(i * 64), 8);
    end
    wait_drain();
    report("stream", 1'b1);

    // merged contiguous reads of many sizes, walking through memory
    clear_tallies();
    begin
      logic [30:0] p;
      p = 31'h0400_0000;
      for (int i = 0; i < 120; i++) begin
        int b, u;
        b = $urandom_range(0, 3);
        u = $urandom_range(bin_lo[b], bin_hi[b]);
        send(1'b0, p, u);
        p = p + 31'(u * 8);
      end
    end
    wait_drain();
    report("merged", 1'b1);

    checks++;
    if (dram_errors != 0) begin failures++; $display("FAIL DRAM protocol errors %0d", dram_errors); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: outstanding=%0d writes %0d/%0d", outstanding, wr_units_seen, wr_units_sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
