// tb_serdes_tx: sends random flits through the transmitter with random
// link_rdy, rebuilds them from the 32-bit words on the link and compares. It
// checks the rate: a flit takes exactly four word cycles and consecutive flits
// follow without a gap while link_rdy stays high; no flit starts while
// link_rdy is low.
module tb_serdes_tx;
  import spmr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic flit_valid, flit_ready, link_rdy, link_valid;
  logic [FLIT_W-1:0] flit_data;
  logic [LINK_W-1:0] link_data;

  serdes_tx dut (.*);

  logic [FLIT_W-1:0] sent [$];
  logic [FLIT_W-1:0] acc;
  int wc = 0, nrecv = 0, run = 0, max_run = 0;

  always @(posedge clk) if (rst_n) begin
    if (flit_valid && flit_ready) begin
      checks++;
      if (!link_rdy) begin failures++; $display("FAIL started while not ready"); end
      sent.push_back(flit_data);
    end
    if (link_valid) begin
      acc = {link_data, acc[FLIT_W-1:LINK_W]};
      wc++;
      run++;
      if (run > max_run) max_run = run;
      if (wc == 4) begin
        wc = 0;
        nrecv++;
        checks++;
        if (sent.size() == 0 || sent.pop_front() != acc) begin failures++; $display("FAIL flit data"); end
      end
    end else begin
      run = 0;
      checks++;
      if (wc != 0) begin failures++; $display("FAIL gap inside a flit"); end
    end
  end

  initial begin
    flit_valid = 0; flit_data = '0; link_rdy = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // phase 1: always ready, continuous flits -> 4 words per flit, no gaps
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      if (!flit_valid || flit_ready) begin end
      flit_valid = 1;
      flit_data = {$urandom(), $urandom(), $urandom(), $urandom()};
      #1;
      while (!flit_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk) flit_valid = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (max_run < 1000) begin failures++; $display("FAIL not back to back: %0d", max_run); end
    // phase 2: random ready
    fork
      forever begin @(negedge clk); link_rdy = ($urandom_range(0, 2) != 0); end
    join_none
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      flit_valid = ($urandom_range(0, 3) != 0);
      flit_data = {$urandom(), $urandom(), $urandom(), $urandom()};
      #1;
      if (flit_valid) begin
        while (!flit_ready) begin @(negedge clk); #1; end
        @(posedge clk);
      end
    end
    @(negedge clk) flit_valid = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (sent.size() != 0) begin failures++; $display("FAIL flits lost"); end
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
