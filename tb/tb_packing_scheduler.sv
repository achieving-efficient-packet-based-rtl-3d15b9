// tb_packing_scheduler: presents random contents of the read and write buffers
// (few modules, addresses clustered in a few pages, random sizes) and checks
// the batch against a reference selection: the oldest entry of the chosen
// buffer first, then same-module entries of the leader's 4 KB page, then the
// other same-module entries, all in age order, skipping any that would
// overflow the packet and stopping at MAX_REQS. It checks that the pop mask
// names exactly the batch and only when batch_ready is high, and that the
// scheduler alternates between the buffers after each accepted batch.
module tb_packing_scheduler;
  import spmr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 16, M = 8;
  mem_req_t rd_ent [D], wr_ent [D], batch_req [M];
  logic [D-1:0] rd_valid, wr_valid, rd_pop, wr_pop;
  logic batch_valid, batch_ready, batch_wr;
  logic [CUB_W-1:0] batch_cub;
  logic [$clog2(M+1)-1:0] batch_n;

  packing_scheduler #(.DEPTH(D), .MAX_REQS(M)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int size_bits(input mem_req_t r);
    return 51 + 9 + (r.wr ? (int'(r.gran) + 1) * 64 : 0);
  endfunction

  int n_multi = 0, n_skip_page = 0, n_wr = 0;
  logic exp_wr_pref = 0;

  initial begin
    batch_ready = 0;
    for (int i = 0; i < D; i++) begin rd_ent[i] = '0; wr_ent[i] = '0; end
    rd_valid = '0; wr_valid = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int nr, nw, use_wr;
      mem_req_t e [D];
      logic [D-1:0] v, take;
      int sel [$];
      int bits;
      @(negedge clk);
      nr = $urandom_range(0, D); nw = $urandom_range(0, D);
      if (t % 7 == 0) nr = 0;
      rd_valid = '0; wr_valid = '0;
      for (int i = 0; i < D; i++) begin
        mem_req_t r = '0;
        r.id = 8'(i);
        r.cub = 3'($urandom_range(0, 1));
        r.addr = {34'h1, 2'($urandom_range(0, 2)), 12'($urandom())};
        r.gran = 9'($urandom_range(0, 7));
        rd_ent[i] = r;
        r.wr = 1;
        wr_ent[i] = r;
        rd_valid[i] = (i < nr);
        wr_valid[i] = (i < nw);
      end
      batch_ready = ($urandom_range(0, 1) == 1);
      #1;
      // reference
      use_wr = (nw > 0) && (nr == 0 || exp_wr_pref);
      for (int i = 0; i < D; i++) e[i] = use_wr ? wr_ent[i] : rd_ent[i];
      v = use_wr ? wr_valid : rd_valid;
      take = '0; bits = 0; sel = {};
      for (int pass = 0; pass < 2; pass++)
        for (int i = 0; i < D; i++) begin
          bit near;
          near = (e[i].addr[47:12] == e[0].addr[47:12]);
          if (v[i] && !take[i] && e[i].cub == e[0].cub && (near == (pass == 0)) &&
              sel.size() < M && bits + size_bits(e[i]) <= 1920 - 128) begin
            take[i] = 1; bits += size_bits(e[i]); sel.push_back(i);
            if (pass == 1 && sel.size() > 1) n_skip_page++;
          end
        end
      chk(batch_valid == (nr > 0 || nw > 0), "batch_valid");
      if (batch_valid) begin
        chk(batch_wr == use_wr, "buffer choice");
        chk(batch_cub == e[0].cub, "cub");
        chk(int'(batch_n) == sel.size(), $sformatf("batch size %0d/%0d", batch_n, sel.size()));
        foreach (sel[k]) chk(batch_req[k] == e[sel[k]], "batch order");
        chk((use_wr ? wr_pop : rd_pop) == (batch_ready ? take : '0), "pop mask");
        chk((use_wr ? rd_pop : wr_pop) == '0, "other buffer untouched");
        if (sel.size() > 1) n_multi++;
        if (use_wr) n_wr++;
        if (batch_ready) exp_wr_pref = !use_wr;
      end
      @(posedge clk);
    end
    chk(n_multi > 100 && n_skip_page > 10 && n_wr > 100, "coverage");
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
