// tb_addr_decompressor: encodes an address stream with the reference base
// table model (hits with positive and negative differences, misses that
// replace entries), gives each field to the decompressor and checks that the
// full address and the field length come back, i.e. that its table follows
// the sender's table update for update.
module tb_addr_decompressor;
  import spmr_pkg::*;
  import spmr_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [AF_MAX_W-1:0] field;
  logic commit;
  logic [ADDR_W-1:0] addr;
  logic [5:0] field_len;

  addr_decompressor dut (.*);

  RefTable tbl = new();
  int n_hit = 0;

  task automatic step(input logic [ADDR_W-1:0] a);
    bitq_t q;
    bit h;
    @(negedge clk);
    q = {};
    tbl.encode(a, q, h);
    n_hit += h;
    field = '0;
    foreach (q[i]) field[i] = q[i];
    commit = 1;
    #1;
    checks++;
    if (addr != a || field_len != 6'(q.size())) begin
      failures++;
      $display("FAIL addr %h got %h", a, addr);
    end
    @(posedge clk);
    #1;
    commit = 0;
  endtask

  initial begin
    logic [ADDR_W-1:0] s1, s2;
    int sel;
    field = '0; commit = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    s1 = 48'h0000_46E4_4BF0; s2 = 48'h7000_0000_0000;
    for (int i = 0; i < 3000; i++) begin
      sel = $urandom_range(0, 4);
      case (sel)
        0, 1: begin s1 += 8 * $urandom_range(0, 31); step(s1); end
        2:    begin s2 -= 8 * $urandom_range(1, 31); step(s2); end
        default: step({$urandom(), 16'($urandom())});
      endcase
    end
    checks++;
    if (n_hit < 100) begin failures++; $display("FAIL too few hits"); end
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
