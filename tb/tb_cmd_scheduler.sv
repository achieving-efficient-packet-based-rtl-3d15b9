// tb_cmd_scheduler: feeds decoded reads and writes (8 B to 4 KB, addresses
// that revisit open rows, hit other rows of open banks, and cross bank
// boundaries) and checks the command stream: every 8-byte unit gets exactly
// one RD or WR, in order, at the rank/bank/row/column/sub-rank the address
// map gives, with the right write data; each read is announced with its GRAN;
// no RD while rd_allow is low. Timing: the first column command after ACT
// comes exactly TRCD cycles later and ACT after PRE exactly TRP cycles later.
// The behavioural DRAM checks that no command hits a closed or wrong row.
module tb_cmd_scheduler;
  import spmr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int TRCD = 5, TRP = 4;
  logic req_valid, req_ready, desc_valid, desc_ready, rd_allow, rd_issue;
  dec_req_t req;
  logic [GRAN_W-1:0] desc_gran;
  ddr_cmd_e ddr_cmd;
  logic ddr_rank;
  logic [2:0] ddr_bank, ddr_subrank;
  logic [14:0] ddr_row;
  logic [9:0] ddr_col;
  logic [BEAT_W-1:0] ddr_wdata, rdata;
  logic row_hit_pulse, row_conflict_pulse, rvalid;
  int perr;

  cmd_scheduler #(.TRCD(TRCD), .TRP(TRP)) dut (.*);
  dram_model #(.CL(4)) u_dram (.clk, .rst_n, .cmd (ddr_cmd), .rank (ddr_rank), .bank (ddr_bank),
    .row (ddr_row), .col (ddr_col), .subrank (ddr_subrank), .wdata (ddr_wdata),
    .rvalid, .rdata, .protocol_errors (perr));

  typedef struct { logic wr; logic [ADDR_W-1:0] a; logic [63:0] d; } unit_t;
  unit_t exp_units [$];
  int exp_desc [$];
  int last_act = -100, last_pre = -100, cyc = 0, n_act = 0, n_pre = 0, n_first = 0;
  logic after_act = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (desc_valid && desc_ready) begin
      checks++;
      if (exp_desc.size() == 0 || exp_desc.pop_front() != int'(desc_gran)) begin
        failures++; $display("FAIL descriptor");
      end
    end
    case (ddr_cmd)
      DDR_ACT: begin
        checks++;
        if (last_pre >= 0 && cyc - last_pre != TRP && last_pre > last_act) begin
          failures++; $display("FAIL PRE->ACT %0d", cyc - last_pre);
        end
        last_act = cyc; after_act = 1; n_act++;
      end
      DDR_PRE: begin last_pre = cyc; n_pre++; end
      DDR_RD, DDR_WR: begin
        unit_t u;
        checks++;
        if (after_act) begin
          n_first++;
          if (cyc - last_act < TRCD || (ddr_cmd == DDR_WR && cyc - last_act != TRCD)) begin
            failures++; $display("FAIL ACT->col %0d (%s)", cyc - last_act, ddr_cmd.name());
          end
          after_act = 0;
        end
        if (ddr_cmd == DDR_RD && !rd_allow) begin failures++; $display("FAIL RD while not allowed"); end
        if (exp_units.size() == 0) begin failures++; $display("FAIL extra column command"); end
        else begin
          u = exp_units.pop_front();
          if ((ddr_cmd == DDR_WR) != u.wr || ddr_subrank != u.a[5:3] || ddr_col != {u.a[12:6], 3'b0} ||
              ddr_bank != u.a[15:13] || ddr_rank != u.a[16] || ddr_row != u.a[31:17] ||
              (u.wr && ddr_wdata != u.d)) begin
            failures++; $display("FAIL column command for %h", u.a);
          end
        end
      end
      default: ;
    endcase
  end

  always @(negedge clk) begin
    rd_allow   = ($urandom_range(0, 4) != 0);
    desc_ready = ($urandom_range(0, 4) != 0);
  end

  initial begin
    logic [ADDR_W-1:0] a;
    req_valid = 0; req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      dec_req_t r;
      int sel;
      r = '0;
      r.wr = ($urandom_range(0, 2) == 0);
      sel = $urandom_range(0, 9);
      r.gran = GRAN_W'(r.wr ? $urandom_range(0, 7) : (sel == 0 ? $urandom_range(0, 511) : $urandom_range(0, 7)));
      // few rows and banks so that hits, misses and conflicts all occur
      a = '0;
      a[31:17] = 15'($urandom_range(0, 2));
      a[16:13] = 4'($urandom_range(0, 3));
      a[12:3]  = 10'($urandom());
      r.addr = a;
      for (int b = 0; b < 16; b++) r.data[b*32 +: 32] = $urandom();
      for (int u = 0; u <= int'(r.gran); u++) begin
        unit_t x;
        x.wr = r.wr;
        x.a  = r.addr + ADDR_W'(u * 8);
        x.d  = r.data[(u % 8) * 64 +: 64];
        exp_units.push_back(x);
      end
      if (!r.wr) exp_desc.push_back(int'(r.gran));
      @(negedge clk);
      req = r; req_valid = 1;
      #1;
      while (!req_ready) begin @(negedge clk); #1; end
      @(posedge clk);
      #1;
      req_valid = 0;
    end
    repeat (2000) @(posedge clk);
    checks++;
    if (exp_units.size() != 0 || exp_desc.size() != 0) begin failures++; $display("FAIL missing commands"); end
    checks++;
    if (perr != 0 || n_pre == 0 || n_act == 0 || n_first == 0) begin
      failures++; $display("FAIL dram protocol %0d pre %0d act %0d", perr, n_pre, n_act);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
