// serdes_rx: receive side of one link direction. LINK_W-bit words arriving with
// link_valid are gathered, least significant word first, into 128-bit flits,
// which wait in a FIFO of FIFO_D flits for the packet decoder (valid/ready).
// link_rdy tells the transmitter it may start another flit: it is high while at
// least two FIFO places are free, one for the flit possibly still on the way.
// Word alignment is assumed from reset on; there is no link training.
module serdes_rx
  import spmr_pkg::*;
#(
  parameter int unsigned FIFO_D = 2 * MAX_FLITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_valid,
  input  logic [LINK_W-1:0] link_data,
  output logic              link_rdy,
  output logic              flit_valid,
  input  logic              flit_ready,
  output logic [FLIT_W-1:0] flit_data
);
  localparam int unsigned NW = FLIT_W / LINK_W;
  localparam int unsigned CW = $clog2(FIFO_D+1);

  logic [FLIT_W-1:0]     acc;
  logic [$clog2(NW)-1:0] wcnt;
  logic                  push;
  logic [FLIT_W-1:0]     full_flit;
  logic [CW-1:0]         cnt;

  assign full_flit = {link_data, acc[FLIT_W-1:LINK_W]};
  assign push      = link_valid && (wcnt == ($clog2(NW))'(NW - 1));
  assign link_rdy  = (32'(cnt) + 32'd2 <= FIFO_D);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      wcnt <= '0;
    end else if (link_valid) begin
      acc  <= full_flit;
      wcnt <= wcnt + 1'b1;
    end
  end

  sync_fifo #(.W(FLIT_W), .DEPTH(FIFO_D)) u_fifo (
    .clk, .rst_n,
    .in_valid  (push),
    .in_ready  (),
    .in_data   (full_flit),
    .out_valid (flit_valid),
    .out_ready (flit_ready),
    .out_data  (flit_data),
    .count     (cnt)
  );
endmodule
