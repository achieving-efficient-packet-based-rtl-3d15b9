// tb_addr_compressor: runs a stream of addresses (ascending and descending
// strides, repeats and random jumps) through the compressor and compares the
// hit flag, base number, field bits and field length with the reference base
// table model, including its self-adaptive update and round-robin replacement.
// It also checks a worked example of the compression scheme: after
// 0x46e44bf0 is installed, 0x46e44ba8 hits the same entry with difference -0x48.
module tb_addr_compressor;
  import spmr_pkg::*;
  import spmr_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [ADDR_W-1:0] addr;
  logic commit, hit;
  logic [IDX_W-1:0] idx;
  logic [AF_MAX_W-1:0] field;
  logic [5:0] field_len;

  addr_compressor dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  RefTable tbl = new();
  int n_hit = 0, n_miss = 0;

  task automatic step(input logic [ADDR_W-1:0] a);
    bitq_t q;
    bit h;
    logic [AF_MAX_W-1:0] ef;
    @(negedge clk);
    addr = a; commit = 1;
    #1;
    q = {};
    tbl.encode(a, q, h);
    ef = '0;
    foreach (q[i]) ef[i] = q[i];
    chk(hit == h && field_len == 6'(q.size()) && field == ef,
        $sformatf("addr %h: hit %0d/%0d len %0d/%0d", a, hit, h, field_len, q.size()));
    if (h) n_hit++; else n_miss++;
    @(posedge clk);
    #1;
    commit = 0;
  endtask

  initial begin
    logic [ADDR_W-1:0] s1, s2;
    int sel;
    addr = '0; commit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // worked example
    step(48'h0000_46E4_4BF0);
    @(negedge clk);
    addr = 48'h0000_46E4_4BA8;
    #1;
    chk(hit && idx == 0 && field[1 +: IDX_W] == 0 && field[3 +: DIFF_W] == 9'h1B8, "worked example: diff -0x48");
    step(48'h0000_46E4_4BA8);
    s1 = 48'h0000_1000_0000; s2 = 48'h0000_2000_8000;
    for (int i = 0; i < 3000; i++) begin
      sel = $urandom_range(0, 5);
      case (sel)
        0, 1: begin s1 += 64; step(s1); end
        2:    begin s2 -= 8 * $urandom_range(1, 20); step(s2); end
        3:    step(s1);
        default: step({$urandom(), 16'($urandom())});
      endcase
    end
    chk(n_hit > 100 && n_miss > 100, "both hits and misses");
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
