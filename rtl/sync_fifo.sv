// sync_fifo: single-clock first-in first-out queue with valid/ready handshakes.
// It serves as the request queue of the off-chip controller (decoded requests
// wait here for the command scheduler) and as the small bookkeeping queues of
// both controllers. Storage is a register array with wrapping read and write
// pointers; a write and a read may happen in the same cycle, also when full.
// in_ready is low only when full; out_valid is high whenever an entry is held.
// count reports the occupancy. Data appears at the output one cycle after it
// was written. Depth and width are parameters of this design (any depth >= 2).
module sync_fifo #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  logic [W-1:0]               in_data,
  output logic                       out_valid,
  input  logic                       out_ready,
  output logic [W-1:0]               out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign out_valid = (count != 0);
  assign in_ready  = (count < CW'(DEPTH)) || out_ready;
  assign do_push   = in_valid && in_ready;
  assign do_pop    = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [PW-1:0] nxt(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_push) wp <= nxt(wp);
      if (do_pop)  rp <= nxt(rp);
      count <= count + CW'(do_push) - CW'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= in_data;
  end

  property p_no_overflow;
    @(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH);
  endproperty
  assert property (p_no_overflow);
endmodule
