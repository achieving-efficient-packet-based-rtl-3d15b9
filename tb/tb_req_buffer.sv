// tb_req_buffer: fills the collapsing request buffer, removes random subsets
// of entries (while new ones arrive) and checks after every cycle that the
// survivors keep their age order, the new entry lands behind them, the valid
// vector is a thermometer of count, and in_ready drops at DEPTH entries.
module tb_req_buffer;
  import spmr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 8;
  logic in_valid, in_ready;
  mem_req_t in_req;
  mem_req_t ent [D];
  logic [D-1:0] ent_valid, pop_mask;
  logic [$clog2(D+1)-1:0] count;
  logic [ID_W-1:0] model [$];
  int n_full = 0;

  req_buffer #(.DEPTH(D)) dut (.*);

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in_valid = 0; pop_mask = '0; in_req = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      logic [ID_W-1:0] nm [$];
      @(negedge clk);
      in_valid   = ($urandom_range(0, 99) < 60);
      in_req     = '0;
      in_req.id  = ID_W'(cyc);
      in_req.addr = ADDR_W'($urandom());
      pop_mask   = '0;
      if ($urandom_range(0, 3) == 0)
        for (int i = 0; i < D; i++) pop_mask[i] = ent_valid[i] && ($urandom_range(0, 2) == 0);
      #1;
      if (count == D) begin n_full++; chk(!in_ready, "not ready when full"); end
      nm = {};
      for (int i = 0; i < model.size(); i++) if (!pop_mask[i]) nm.push_back(model[i]);
      if (in_valid && in_ready) nm.push_back(ID_W'(cyc));
      model = nm;
      @(posedge clk);
      #1;
      chk(int'(count) == model.size(), "count");
      for (int i = 0; i < D; i++) begin
        chk(ent_valid[i] == (i < model.size()), "thermometer valid");
        if (i < model.size()) chk(ent[i].id == model[i], "age order");
      end
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
