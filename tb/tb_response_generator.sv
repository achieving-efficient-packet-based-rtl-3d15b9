// tb_response_generator: acts as command scheduler and DRAM around the
// response generator: it announces reads of random size (8 B to 4 KB), issues
// one RD per cycle while rd_allow is high and returns each beat a fixed
// latency later, and stalls the flit output at random. Every packet is parsed
// by the reference model (CRC, LNG, chunk fields). The chunks must carry the
// beats in order, never more than 8 per chunk, never spanning two requests,
// and must end every request exactly. It also checks that packets carry
// several chunks when data is plentiful and that the beat FIFO never overflows.
module tb_response_generator;
  import spmr_pkg::*;
  import spmr_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LAT = 6;
  logic desc_valid, desc_ready, rd_issue, rd_allow, rdata_valid;
  logic [GRAN_W-1:0] desc_gran;
  logic [BEAT_W-1:0] rdata;
  logic flit_valid, flit_ready, flit_last;
  logic [FLIT_W-1:0] flit_data;

  response_generator dut (.*);

  int req_units [$];        // announced requests, still to be matched
  int issue_left [$];       // units still to issue, per announced request
  logic [63:0] beats [$];   // every beat returned, in order
  int beat_ctr = 0;
  logic [LAT-1:0] pipe_v;
  logic [63:0] pipe_d [LAT];
  int n_multi = 0, n_pkts = 0, n_chunks = 0;

  // DRAM side: RD issue and fixed latency return
  always @(posedge clk) begin
    if (!rst_n) begin
      pipe_v <= '0;
      rdata_valid <= 0;
    end else begin
      logic [63:0] b;
      pipe_v <= {pipe_v[LAT-2:0], rd_issue};
      for (int i = LAT - 1; i > 0; i--) pipe_d[i] <= pipe_d[i-1];
      b = {32'(beat_ctr), $urandom()};
      pipe_d[0] <= b;
      if (rd_issue) begin beats.push_back(b); beat_ctr++; end
      rdata_valid <= pipe_v[LAT-1];
      rdata <= pipe_d[LAT-1];
      if (rdata_valid && dut.bq_cnt == dut.BEAT_D) begin failures++; $display("FAIL beat fifo overflow"); end
    end
  end
  always_comb rd_issue = rst_n && rd_allow && issue_left.size() > 0 && pend_issue;
  logic pend_issue;
  always @(negedge clk) pend_issue = ($urandom_range(0, 5) != 0);
  always @(posedge clk) if (rst_n && rd_issue) begin
    issue_left[0]--;
    if (issue_left[0] == 0) void'(issue_left.pop_front());
  end

  // flit side
  flit_t pk [$];
  int cur_req_left = 0;
  int beat_idx = 0;
  always @(negedge clk) flit_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n && flit_valid && flit_ready) begin
    pk.push_back(flit_data);
    if (flit_last) begin
      int u [$];
      logic [511:0] d [$];
      checks++;
      if (!parse_rsp_packet(pk, u, d)) begin failures++; $display("FAIL packet framing/CRC"); end
      n_pkts++;
      if (u.size() > 1) n_multi++;
      foreach (u[i]) begin
        n_chunks++;
        checks++;
        if (cur_req_left == 0) begin
          if (req_units.size() == 0) begin failures++; $display("FAIL chunk without request"); end
          else cur_req_left = req_units.pop_front();
        end
        if (u[i] > 8 || u[i] > cur_req_left) begin failures++; $display("FAIL chunk size %0d left %0d", u[i], cur_req_left); end
        cur_req_left -= u[i];
        for (int b = 0; b < u[i]; b++) begin
          if (beat_idx >= beats.size() || d[i][b*64 +: 64] != beats[beat_idx]) begin
            failures++; $display("FAIL beat %0d", beat_idx);
          end
          beat_idx++;
        end
      end
      pk = {};
    end
  end

  initial begin
    desc_valid = 0; desc_gran = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 120; i++) begin
      int g;
      g = ($urandom_range(0, 5) == 0) ? $urandom_range(0, 511) : $urandom_range(0, 7);
      @(negedge clk);
      desc_valid = 1; desc_gran = GRAN_W'(g);
      #1;
      while (!desc_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      req_units.push_back(g + 1);
      issue_left.push_back(g + 1);
      #1;
      desc_valid = 0;
      if (i % 30 == 29) repeat (400) @(posedge clk);
    end
    wait (issue_left.size() == 0);
    repeat (500) @(posedge clk);
    checks++;
    if (req_units.size() != 0 || cur_req_left != 0 || beat_idx != beats.size()) begin
      failures++; $display("FAIL incomplete: %0d requests, %0d of %0d beats", req_units.size(), beat_idx, beats.size());
    end
    checks++;
    if (n_multi == 0) begin failures++; $display("FAIL no multi-chunk packet"); end
    $display("packets=%0d chunks=%0d multi=%0d", n_pkts, n_chunks, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
