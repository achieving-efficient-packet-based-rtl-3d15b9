// tb_packet_generator: gives the generator random batches of reads and writes
// (1..8 requests, addresses that partly follow strides so the base table both
// hits and misses), collects each packet's flits and compares them bit for
// bit with a packet built by the reference model (spmr_tb_pkg). It also checks
// the issue records, the flit_last flag, and the timing: first flit exactly
// n+2 cycles after a batch of n requests is taken, then one flit per cycle.
module tb_packet_generator;
  import spmr_pkg::*;
  import spmr_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int M = 8;
  logic batch_valid, batch_ready, batch_wr;
  logic [CUB_W-1:0] batch_cub;
  logic [$clog2(M+1)-1:0] batch_n;
  mem_req_t batch_req [M];
  logic issue_valid, issue_ready, issue_wr;
  logic [ID_W-1:0] issue_id;
  logic [GRAN_W-1:0] issue_gran;
  logic flit_valid, flit_ready, flit_last, addr_hit_pulse;
  logic [FLIT_W-1:0] flit_data;

  packet_generator #(.MAX_REQS(M)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  RefTable tbl = new();
  logic [ADDR_W-1:0] stream = 48'h1234_46E4_4BF0;

  initial begin
    batch_valid = 0; issue_ready = 1; flit_ready = 1;
    batch_wr = 0; batch_cub = '0; batch_n = '0;
    for (int j = 0; j < M; j++) batch_req[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 60; p++) begin
      mem_req_t r [$];
      flit_t exp [$];
      int n, hits, wait_cyc, nf, nid;
      logic wr;
      wr = ($urandom_range(0, 2) == 0);
      n  = $urandom_range(1, wr ? 3 : M);
      r  = {};
      for (int j = 0; j < n; j++) begin
        mem_req_t q = '0;
        q.id = ID_W'($urandom());
        q.wr = wr;
        q.gran = GRAN_W'(wr ? $urandom_range(0, 7) : $urandom_range(0, 511));
        if ($urandom_range(0, 2) != 0) begin
          stream = stream + ADDR_W'(64);
          q.addr = stream;
        end else q.addr = {$urandom(), 16'($urandom())};
        for (int b = 0; b < 16; b++) q.data[b*32 +: 32] = $urandom();
        r.push_back(q);
      end
      build_req_packet(tbl, 3'(p), p % 512, p % 8, wr, r, exp, hits);
      @(negedge clk);
      batch_valid = 1; batch_wr = wr; batch_cub = 3'(p); batch_n = 4'(n);
      for (int j = 0; j < M; j++) batch_req[j] = (j < n) ? r[j] : '0;
      #1;
      chk(batch_ready, "ready when idle");
      @(posedge clk);
      #1;
      batch_valid = 0;
      wait_cyc = 0; nid = 0;
      while (!flit_valid) begin
        if (issue_valid) begin
          chk(issue_id == r[nid].id && issue_gran == r[nid].gran && issue_wr == wr, "issue record");
          nid++;
        end
        @(posedge clk);
        #1;
        wait_cyc++;
      end
      chk(nid == n, "one issue record per request");
      chk(wait_cyc == n + 1, $sformatf("first flit after n+2 cycles (got %0d)", wait_cyc + 1));
      nf = 0;
      while (1) begin
        chk(flit_valid, "flits back to back");
        chk(nf < exp.size() && flit_data == exp[nf], $sformatf("flit %0d of packet %0d", nf, p));
        chk(flit_last == (nf == exp.size() - 1), "flit_last");
        nf++;
        if (flit_last) break;
        @(posedge clk);
        #1;
      end
      @(posedge clk);
      #1;
      chk(nf == exp.size(), "flit count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
