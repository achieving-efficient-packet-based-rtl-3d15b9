// tb_response_decoder: builds response packets with the reference model for a
// list of outstanding reads (random ids and sizes up to 4 KB), cutting each
// read into chunks of random size (1..8 beats) spread over packets of random
// fill, and feeds the flits with random gaps while the requester stalls at
// random. Every chunk must come out with the right id, GRAN and data, rsp_last
// exactly on a read's final chunk, and the outstanding entry retired with it.
// Some packets are corrupted first: they must raise crc_err and deliver
// nothing; the intact copy is sent afterwards.
module tb_response_decoder;
  import spmr_pkg::*;
  import spmr_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flit_valid, flit_ready, os_valid, os_pop, rsp_valid, rsp_ready, rsp_last, crc_err;
  logic [FLIT_W-1:0] flit_data;
  logic [ID_W-1:0] os_id, rsp_id;
  logic [GRAN_W-1:0] os_gran;
  logic [WDATA_W-1:0] rsp_data;
  logic [2:0] rsp_gran;

  response_decoder dut (.*);

  // outstanding-read list as the on-chip controller keeps it
  int os_q_id [$], os_q_units [$];
  assign os_valid = os_q_id.size() > 0;
  assign os_id    = os_valid ? ID_W'(os_q_id[0]) : '0;
  assign os_gran  = os_valid ? GRAN_W'(os_q_units[0] - 1) : '0;

  typedef struct { int id; int units; logic [511:0] d; logic last; } chunk_t;
  chunk_t expq [$];
  int n_err = 0, n_bad = 0, n_last = 0;

  always @(negedge clk) rsp_ready = ($urandom_range(0, 3) != 0);
  always @(posedge clk) if (rst_n) begin
    if (crc_err) n_err++;
    if (os_pop) begin
      void'(os_q_id.pop_front());
      void'(os_q_units.pop_front());
    end
    if (rsp_valid && rsp_ready) begin
      chunk_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL unexpected chunk"); end
      else begin
        e = expq.pop_front();
        if (int'(rsp_id) != e.id || int'(rsp_gran) + 1 != e.units || rsp_data != e.d || rsp_last != e.last) begin
          failures++; $display("FAIL chunk id %0d/%0d units %0d/%0d last %0d/%0d", rsp_id, e.id, rsp_gran + 1, e.units, rsp_last, e.last);
        end
        if (rsp_last) n_last++;
        checks++;
        if (os_pop != rsp_last) begin failures++; $display("FAIL os_pop"); end
      end
    end
  end

  task automatic send_packet(input flit_t f [$]);
    foreach (f[k]) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      flit_valid = 1; flit_data = f[k];
      #1;
      while (!flit_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1;
      flit_valid = 0;
    end
  endtask

  initial begin
    int cu [$];
    logic [511:0] cd [$];
    int bits, tag;
    flit_valid = 0; flit_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    cu = {}; cd = {}; bits = 0; tag = 0;
    for (int r = 0; r < 150; r++) begin
      int id, units, left;
      id = r % 256;
      units = ($urandom_range(0, 6) == 0) ? $urandom_range(1, 512) : $urandom_range(1, 8);
      os_q_id.push_back(id);
      os_q_units.push_back(units);
      left = units;
      while (left > 0) begin
        chunk_t c;
        int u;
        u = $urandom_range(1, left < 8 ? left : 8);
        c.id = id; c.units = u; c.last = (u == left);
        c.d = '0;
        for (int b = 0; b < u; b++) c.d[b*64 +: 64] = {$urandom(), $urandom()};
        left -= u;
        if (bits + 9 + u * 64 > 1792 || cu.size() == 62) begin
          flit_t f [$];
          build_rsp_packet(tag, tag % 8, cu, cd, f);
          tag++;
          if (tag % 9 == 4) begin
            flit_t g [$];
            int fb;
            g = f;
            fb = $urandom_range(0, 95);
            g[g.size()-1][fb] = !g[g.size()-1][fb];
            n_bad++;
            send_packet(g);
          end
          send_packet(f);
          cu = {}; cd = {}; bits = 0;
        end
        cu.push_back(u); cd.push_back(c.d); bits += 9 + u * 64;
        expq.push_back(c);
      end
    end
    if (cu.size() > 0) begin
      flit_t f [$];
      build_rsp_packet(tag, tag % 8, cu, cd, f);
      send_packet(f);
    end
    repeat (300) @(posedge clk);
    checks++;
    if (expq.size() != 0 || os_q_id.size() != 0 || n_last != 150) begin
      failures++; $display("FAIL leftover %0d chunks, %0d reads", expq.size(), os_q_id.size());
    end
    checks++;
    if (n_err != n_bad || n_bad == 0) begin failures++; $display("FAIL crc errors %0d of %0d", n_err, n_bad); end
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
