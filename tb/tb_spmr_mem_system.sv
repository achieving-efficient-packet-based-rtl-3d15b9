// tb_spmr_mem_system: end-to-end test of the whole memory system at its
// default sizes. A behavioural DRAM (dram_model) sits on the DDRx ports. The
// test sends fine-grained reads (strided and scattered, two destination
// modules), fine-grained writes followed by reads of the same bytes, large
// merged reads up to 4 KB, and a burst that fills the read buffer, while the
// response side is randomly stalled. Every returned 8-byte word is compared
// with a reference memory kept by the test, and the rsp_last flag with the
// request size. It also counts how often each mechanism of the design was used
// (multi-request packets, address-table hits and misses, row hits and
// conflicts, multi-chunk and multi-request response packets, back-pressure of
// buffers, links and read-data space) and fails for any that never happened.
module tb_spmr_mem_system;
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
  logic [BEAT_W-1:0] ref_mem [logic [28:0]];
  function automatic logic [BEAT_W-1:0] default_word(input logic [28:0] a);
    return {a, 3'b101, a ^ 29'h1555_AAAA, 3'b010};
  endfunction
  function automatic logic [BEAT_W-1:0] exp_word(input logic [ADDR_W-1:0] a);
    logic [28:0] k = a[31:3];
    return ref_mem.exists(k) ? ref_mem[k] : default_word(k);
  endfunction

  logic [ADDR_W-1:0] exp_addr  [256];
  int                exp_units [256];
  int                got_units [256];
  logic              busy_id   [256];
  int                outstanding = 0;
  int                next_id = 0;
  int                wr_units_sent = 0, wr_units_seen = 0;

  // --------------------------------------------------------- mechanism counts
  int n_multi_pkt = 0, n_hit = 0, n_issue = 0, n_row_hit = 0, n_conflict = 0;
  int n_multi_chunk = 0, n_rsp_multi = 0, n_rd_stall = 0, n_buf_full = 0;
  int n_link_stall = 0, n_wr_pkt = 0, n_req_words = 0, n_rsp_words = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.b_valid && dut.b_ready && dut.b_n > 1) n_multi_pkt++;
    if (dut.b_valid && dut.b_ready && dut.b_wr) n_wr_pkt++;
    if (addr_hit_pulse) n_hit++;
    if (dut.iss_valid && dut.iss_ready) n_issue++;
    if (row_hit_pulse) n_row_hit++;
    if (row_conflict_pulse) n_conflict++;
    if (dut.rf_valid && dut.rf_ready && dut.rf_last && dut.u_rgen.cnt > 1) n_rsp_multi++;
    if (!dut.rd_allow && dut.q_valid) n_rd_stall++;
    if (req_valid && !req_ready) n_buf_full++;
    if (!dut.ql_rdy || !dut.rl_rdy) n_link_stall++;
    if (req_link_busy) n_req_words++;
    if (rsp_link_busy) n_rsp_words++;
    if (ddr_cmd == DDR_WR) wr_units_seen++;
    if (crc_err) begin failures++; $display("FAIL crc error"); end
  end

  // ---------------------------------------------------------- response check
  logic stall_rsp = 1'b0;
  logic hold_rsp  = 1'b0;   // long stall, to back the response link up
  assign rsp_ready = !stall_rsp && !hold_rsp;
  always @(posedge clk) stall_rsp <= ($urandom_range(0, 3) == 0);

  always @(posedge clk) if (rst_n && rsp_valid && rsp_ready) begin
    int u;
    int id;
    logic ok;
    id = int'(rsp_id);
    u  = int'(rsp_gran) + 1;
    ok = busy_id[id];
    for (int b = 0; b < u; b++) begin
      logic [BEAT_W-1:0] e;
      e = exp_word(exp_addr[id] + ADDR_W'((got_units[id] + b) * 8));
      if (rsp_data[b*BEAT_W +: BEAT_W] != e) ok = 1'b0;
    end
    got_units[id] += u;
    if (rsp_last != (got_units[id] == exp_units[id])) ok = 1'b0;
    if (got_units[id] > exp_units[id]) ok = 1'b0;
    if (!rsp_last) n_multi_chunk++;
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
  task automatic send(input logic wr, input logic [CUB_W-1:0] cub,
                      input logic [ADDR_W-1:0] addr, input int units);
    mem_req_t r;
    r = '0;
    r.wr   = wr;
    r.cub  = cub;
    r.addr = {addr[ADDR_W-1:3], 3'b000};
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
      for (int b = 0; b < units; b++) begin
        logic [BEAT_W-1:0] w = {$urandom(), $urandom()};
        r.data[b*BEAT_W +: BEAT_W] = w;
        ref_mem[(r.addr[31:3] + 29'(b))] = w;
      end
      wr_units_sent += units;
    end
    // drive at the falling edge, look at ready once it has settled
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
  endtask

  initial begin
    logic [ADDR_W-1:0] base, waddr [20];
    int                wun [20];
    for (int i = 0; i < 256; i++) busy_id[i] = 1'b0;
    req_valid = 1'b0;
    req = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // 1. fine-grained reads: a strided stream plus scattered ones, two modules
    base = {16'h1234, 32'h46E4_4BF0};
    for (int i = 0; i < 24; i++) begin
      send(1'b0, 3'd0, base + ADDR_W'(i * 64), 1);
      if (i % 3 == 0)
        send(1'b0, 3'd1, {16'h0, $urandom()}, $urandom_range(1, 8));
    end
    wait_drain();

    // 2. fine-grained writes, then reads of the same bytes
    for (int i = 0; i < 20; i++) begin
      waddr[i] = {16'h0, 8'h33, 12'h0, 12'(i * 72)};
      wun[i]   = $urandom_range(1, 8);
      send(1'b1, 3'd0, waddr[i], wun[i]);
    end
    wait_drain();
    for (int i = 0; i < 20; i++) send(1'b0, 3'd0, waddr[i], wun[i]);
    wait_drain();

    // 3. large merged reads: 512 B, 800 B and 4 KB
    send(1'b0, 3'd0, 48'h0000_0550_0000, 64);
    send(1'b0, 3'd0, 48'h0000_0660_1000, 100);
    hold_rsp = 1'b1;
    send(1'b0, 3'd0, 48'h0000_0770_0000, 512);
    repeat (3000) @(posedge clk);
    hold_rsp = 1'b0;
    wait_drain();

    // 4. a burst of reads to many banks and rows, faster than the link drains
    for (int i = 0; i < 60; i++)
      send(1'b0, 3'($urandom_range(0, 1)), {16'h0, 5'($urandom()), 27'($urandom())},
           $urandom_range(1, 8));
    wait_drain();

    checks++;
    if (outstanding != 0 || wr_units_seen != wr_units_sent) begin
      failures++;
      $display("FAIL not drained: outstanding=%0d", outstanding);
    end
    checks++;
    if (dram_errors != 0) begin failures++; $display("FAIL DRAM protocol errors %0d", dram_errors); end

    $display("mechanisms: multi-request packets=%0d write packets=%0d table hits=%0d of %0d",
             n_multi_pkt, n_wr_pkt, n_hit, n_issue);
    $display("            row hits=%0d row conflicts=%0d multi-chunk=%0d multi-chunk rsp packets=%0d",
             n_row_hit, n_conflict, n_multi_chunk, n_rsp_multi);
    $display("            read-space stalls=%0d buffer full=%0d link stalls=%0d words req/rsp=%0d/%0d",
             n_rd_stall, n_buf_full, n_link_stall, n_req_words, n_rsp_words);
    checks++; if (n_multi_pkt == 0)   begin failures++; $display("FAIL no multi-request packet"); end
    checks++; if (n_wr_pkt == 0)      begin failures++; $display("FAIL no write packet"); end
    checks++; if (n_hit == 0)         begin failures++; $display("FAIL no table hit"); end
    checks++; if (n_hit == n_issue)   begin failures++; $display("FAIL no table miss"); end
    checks++; if (n_row_hit == 0)     begin failures++; $display("FAIL no row hit"); end
    checks++; if (n_conflict == 0)    begin failures++; $display("FAIL no row conflict"); end
    checks++; if (n_multi_chunk == 0) begin failures++; $display("FAIL no multi-chunk read"); end
    checks++; if (n_rsp_multi == 0)   begin failures++; $display("FAIL no multi-chunk response packet"); end
    checks++; if (n_rd_stall == 0)    begin failures++; $display("FAIL no read-space stall"); end
    checks++; if (n_buf_full == 0)    begin failures++; $display("FAIL buffer never full"); end
    checks++; if (n_link_stall == 0)  begin failures++; $display("FAIL link never stalled"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog: outstanding=%0d writes %0d/%0d gen=%0d dec=%0d cmd=%0d rgen=%0d rdec=%0d",
             outstanding, wr_units_seen, wr_units_sent, dut.u_pgen.state, dut.u_pdec.state,
             dut.u_cmd.state, dut.u_rgen.state, dut.u_rdec.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
