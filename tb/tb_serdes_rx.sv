// tb_serdes_rx: drives 32-bit link words (four per flit, with random gaps
// between words) into the receiver, honouring link_rdy before each flit as a
// transmitter would, while the consumer pops flits at a random rate. Every flit
// must come out intact and in order; the FIFO must never lose one even while
// the consumer stalls long enough for link_rdy to drop.
module tb_serdes_rx;
  import spmr_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic link_valid, link_rdy, flit_valid, flit_ready;
  logic [LINK_W-1:0] link_data;
  logic [FLIT_W-1:0] flit_data;

  serdes_rx #(.FIFO_D(6)) dut (.*);

  logic [FLIT_W-1:0] sent [$];
  int n_notrdy = 0;
  logic stall = 0;

  always @(posedge clk) if (rst_n) begin
    if (!link_rdy) n_notrdy++;
    if (flit_valid && flit_ready) begin
      checks++;
      if (sent.size() == 0 || sent[0] != flit_data) begin failures++; $display("FAIL flit %0t %h exp %h n=%0d", $time, flit_data, sent[0], sent.size()); end
      if (sent.size() != 0) void'(sent.pop_front());
    end
  end
  int cyc = 0;
  always @(negedge clk) begin
    cyc++;
    stall = (cyc % 400) < 100;
    flit_ready = !stall && ($urandom_range(0, 2) != 0);
  end

  // clocked transmitter: starts a flit only while link_rdy is high and no word
  // is on the link, then sends its four words with random idle cycles between
  int nsent = 0, widx = 0;
  logic active = 0;
  logic [FLIT_W-1:0] cur;
  always @(posedge clk) begin
    if (!rst_n) begin
      link_valid <= 0;
      link_data  <= '0;
    end else begin
      if (!active && !link_valid && link_rdy && nsent < 400) begin
        cur = {$urandom(), $urandom(), $urandom(), $urandom()};
        sent.push_back(cur);
        nsent++;
        active = 1;
        widx = 0;
      end
      if (active && $urandom_range(0, 3) != 0) begin
        link_valid <= 1;
        link_data  <= cur[widx*32 +: 32];
        widx++;
        if (widx == 4) active = 0;
      end else begin
        link_valid <= 0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (nsent == 400);
    repeat (600) @(posedge clk);
    checks++;
    if (sent.size() != 0 || n_notrdy == 0) begin failures++; $display("FAIL lost %0d / never full", sent.size()); end
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
