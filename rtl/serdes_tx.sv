// serdes_tx: transmit side of one direction of the link between the on-chip
// and the off-chip controller. A 128-bit flit is cut into LINK_W-bit words,
// least significant word first, one word per cycle with link_valid high
// (LINK_W = 32 gives four cycles per flit, back to back for consecutive flits).
// A new flit is only started while the receiver signals link_rdy, its promise
// that it can hold one more whole flit. The electrical serialiser and the clock
// recovery of a real SerDes lie below this word interface and are not modelled.
module serdes_tx
  import spmr_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              flit_valid,
  output logic              flit_ready,
  input  logic [FLIT_W-1:0] flit_data,
  input  logic              link_rdy,
  output logic              link_valid,
  output logic [LINK_W-1:0] link_data
);
  localparam int unsigned NW = FLIT_W / LINK_W;

  logic [FLIT_W-1:0]      sh;
  logic [$clog2(NW+1)-1:0] left;

  assign flit_ready = link_rdy && (left == 0 || left == 1);
  assign link_valid = (left != 0);
  assign link_data  = sh[LINK_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      left <= '0;
    end else if (flit_valid && flit_ready) begin
      sh   <= flit_data;
      left <= ($clog2(NW+1))'(NW);
    end else if (left != 0) begin
      sh   <= sh >> LINK_W;
      left <= left - 1'b1;
    end
  end
endmodule
