// tb_packet_decoder: feeds request packets built by the reference model
// (random reads and writes, strided and scattered addresses, so the base table
// hits and misses) flit by flit with random gaps, and compares every decoded
// request (type, full address, GRAN, write data) with what was packed. Some
// packets get one flipped bit: they must raise crc_err and yield no request,
// and the decoder must keep its table in step for the packets after them.
module tb_packet_decoder;
  import spmr_pkg::*;
  import spmr_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flit_valid, flit_ready, req_valid, req_ready, crc_err;
  logic [FLIT_W-1:0] flit_data;
  dec_req_t req;

  packet_decoder dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  RefTable tbl = new();
  logic [ADDR_W-1:0] stream = 48'h0000_46E4_4BF0;
  mem_req_t expq [$];
  int n_err = 0, n_bad = 0;

  always @(posedge clk) if (rst_n) begin
    if (crc_err) n_err++;
    if (req_valid && req_ready) begin
      mem_req_t e;
      logic [WDATA_W-1:0] m;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected request %h", req.addr); end
      else begin
        e = expq.pop_front();
        m = '0;
        for (int b = 0; b < 8; b++) if (b <= int'(e.gran)) m[b*64 +: 64] = '1;
        if (req.wr != e.wr || req.addr != e.addr || req.gran != e.gran ||
            (e.wr && req.data != (e.data & m))) begin
          failures++;
          $display("FAIL request: addr %h exp %h gran %0d exp %0d", req.addr, e.addr, req.gran, e.gran);
        end
      end
    end
  end

  initial begin
    flit_valid = 0; flit_data = '0; req_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int p = 0; p < 80; p++) begin
      mem_req_t r [$];
      flit_t f [$];
      int n, hits;
      logic wr, bad;
      RefTable scratch;
      wr  = ($urandom_range(0, 2) == 0);
      n   = $urandom_range(1, wr ? 3 : 8);
      bad = (p % 10 == 5);
      r = {};
      for (int j = 0; j < n; j++) begin
        mem_req_t q = '0;
        q.wr = wr;
        q.gran = GRAN_W'(wr ? $urandom_range(0, 7) : $urandom_range(0, 511));
        if ($urandom_range(0, 2) != 0) begin
          stream = stream + ADDR_W'($urandom_range(0, 4) * 32 - 64);
          q.addr = stream;
        end else q.addr = {$urandom(), 16'($urandom())};
        for (int b = 0; b < 16; b++) q.data[b*32 +: 32] = $urandom();
        r.push_back(q);
      end
      if (bad) begin
        scratch = new();
        build_req_packet(scratch, '0, p, p % 8, wr, r, f, hits);
        begin
          int fb = $urandom_range(64, 127);
          f[0][fb] = !f[0][fb];
        end
        n_bad++;
      end else begin
        build_req_packet(tbl, '0, p, p % 8, wr, r, f, hits);
        foreach (r[j]) expq.push_back(r[j]);
      end
      foreach (f[k]) begin
        @(negedge clk);
        flit_valid = ($urandom_range(0, 3) != 0);
        while (!flit_valid) begin
          @(negedge clk);
          flit_valid = ($urandom_range(0, 3) != 0);
        end
        flit_data = f[k];
        #1;
        while (!flit_ready) begin @(negedge clk); #1; end
        @(posedge clk);
        #1;
        flit_valid = 0;
      end
      req_ready = ($urandom_range(0, 1) == 0);
      repeat (12) begin @(negedge clk); req_ready = ($urandom_range(0, 3) != 0); end
      req_ready = 1;
    end
    repeat (50) @(posedge clk);
    chk(expq.size() == 0, "all requests decoded");
    chk(n_err == n_bad, "crc errors reported");
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
