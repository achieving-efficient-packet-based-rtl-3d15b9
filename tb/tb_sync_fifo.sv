// tb_sync_fifo: drives the FIFO with random pushes and pops, compares every
// word popped with a queue kept by the test, and checks count, the full
// condition (in_ready low at DEPTH entries) and the one-cycle write-to-read
// latency of the first word.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 16, D = 8;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  logic [W-1:0] model [$];
  int n_full = 0;

  sync_fifo #(.W(W), .DEPTH(D)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!out_valid && count == 0, "empty after reset");
    in_valid = 1; in_data = 16'hBEEF;
    @(negedge clk);
    in_valid = 0;
    chk(out_valid && out_data == 16'hBEEF && count == 1, "first word after one cycle");
    model.push_back(16'hBEEF);
    for (int cyc = 0; cyc < 2000; cyc++) begin
      logic pu, po;
      in_valid  = ($urandom_range(0, 99) < (cyc < 1000 ? 70 : 30));
      out_ready = ($urandom_range(0, 99) < (cyc < 1000 ? 30 : 70));
      in_data   = W'($urandom());
      #1;
      pu = in_valid && in_ready;
      po = out_valid && out_ready;
      if (count == D) begin
        n_full++;
        chk(in_ready == out_ready, "in_ready when full");
      end
      if (po) begin
        chk(model.size() > 0 && out_data == model[0], "pop data");
        if (model.size() > 0) void'(model.pop_front());
      end
      if (pu) model.push_back(in_data);
      @(negedge clk);
      chk(int'(count) == model.size(), "count");
    end
    chk(n_full > 0, "full reached");
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
