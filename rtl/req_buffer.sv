// req_buffer: read buffer or write buffer of the on-chip controller.
// Requests wait here until the packing scheduler takes them. Unlike a FIFO the
// scheduler may remove any subset of the held entries at once (pop_mask), so
// the buffer is a collapsing queue: entry 0 is always the oldest, and after a
// removal the survivors slide down keeping their age order. A new request is
// appended behind the survivors in the same cycle. ent_valid is a thermometer
// code (entries 0..count-1 valid). Removal and insertion take effect at the
// next clock edge. The depth is this design's choice; the document gives none.
module req_buffer
  import spmr_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  output logic                       in_ready,
  input  mem_req_t                   in_req,
  output mem_req_t                   ent      [DEPTH],
  output logic [DEPTH-1:0]           ent_valid,
  output logic [$clog2(DEPTH+1)-1:0] count,
  input  logic [DEPTH-1:0]           pop_mask
);
  localparam int unsigned CW = $clog2(DEPTH+1);

  mem_req_t      q [DEPTH];
  logic [CW-1:0] cnt;

  assign count    = cnt;
  assign in_ready = (cnt < CW'(DEPTH));

  always_comb begin
    for (int i = 0; i < DEPTH; i++) begin
      ent[i]       = q[i];
      ent_valid[i] = (CW'(i) < cnt);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
    end else begin
      automatic int unsigned k = 0;
      for (int i = 0; i < DEPTH; i++) begin
        if ((CW'(i) < cnt) && !pop_mask[i]) begin
          q[k] <= q[i];
          k++;
        end
      end
      if (in_valid && in_ready) begin
        q[k] <= in_req;
        k++;
      end
      cnt <= CW'(k);
    end
  end

  property p_pop_only_valid;
    @(posedge clk) disable iff (!rst_n) (pop_mask & ~ent_valid) == '0;
  endproperty
  assert property (p_pop_only_valid);
endmodule
