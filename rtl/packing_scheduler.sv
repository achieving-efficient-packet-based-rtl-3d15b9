// packing_scheduler: chooses which buffered requests travel together in one
// request packet. A packet may only hold requests of one type (all reads or
// all writes) that go to the same memory module (same CUB), so the scheduler
// works on one buffer at a time, alternating between the read and the write
// buffer when both hold requests. The oldest entry of the chosen buffer leads
// the batch. Further entries with the leader's CUB are added in two passes:
// first those in the leader's 4 KB page (likely to share address bits, so they
// compress well), then the rest, each pass in age order. A request is skipped
// if its uncompressed size would overflow the largest packet; the batch stops
// at MAX_REQS requests. The choice is combinational; when the packet generator
// accepts the batch (batch_valid && batch_ready) the same cycle's pop masks
// remove the chosen entries from their buffer.
// Same-module/same-type batching and preferring similar addresses follow the
// document; the page test, the alternation and the size rule are this design's.
module packing_scheduler
  import spmr_pkg::*;
#(
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned MAX_REQS = 8,
  parameter int unsigned PAGE_LSB = 12
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  mem_req_t                      rd_ent    [DEPTH],
  input  logic [DEPTH-1:0]              rd_valid,
  input  mem_req_t                      wr_ent    [DEPTH],
  input  logic [DEPTH-1:0]              wr_valid,
  output logic [DEPTH-1:0]              rd_pop,
  output logic [DEPTH-1:0]              wr_pop,
  output logic                          batch_valid,
  input  logic                          batch_ready,
  output logic                          batch_wr,
  output logic [CUB_W-1:0]              batch_cub,
  output logic [$clog2(MAX_REQS+1)-1:0] batch_n,
  output mem_req_t                      batch_req [MAX_REQS]
);
  localparam int unsigned NW     = $clog2(MAX_REQS+1);
  localparam int unsigned BUDGET = PKT_W - HDR_W - TAIL_W;

  logic     prefer_wr;   // round-robin between buffers
  logic     use_wr;
  mem_req_t ent [DEPTH];
  logic [DEPTH-1:0] vld, take;

  always_comb begin
    use_wr = wr_valid[0] && (!rd_valid[0] || prefer_wr);
    for (int i = 0; i < DEPTH; i++) ent[i] = use_wr ? wr_ent[i] : rd_ent[i];
    vld = use_wr ? wr_valid : rd_valid;
  end

  always_comb begin
    automatic int unsigned n    = 0;
    automatic int unsigned bits = 0;
    take = '0;
    for (int i = 0; i < MAX_REQS; i++) batch_req[i] = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < DEPTH; i++) begin
        automatic logic near = (ent[i].addr[ADDR_W-1:PAGE_LSB] == ent[0].addr[ADDR_W-1:PAGE_LSB]);
        automatic int unsigned rb = req_bits_max(ent[i].wr, ent[i].gran);
        if (vld[i] && !take[i] && (ent[i].cub == ent[0].cub) &&
            ((pass == 0) == near) && (n < MAX_REQS) && (bits + rb <= BUDGET)) begin
          take[i] = 1'b1;
          batch_req[n[$clog2(MAX_REQS)-1:0]] = ent[i];
          bits += rb;
          n++;
        end
      end
    end
    batch_n     = NW'(n);
    batch_valid = vld[0];
    batch_wr    = use_wr;
    batch_cub   = ent[0].cub;
    rd_pop = (batch_valid && batch_ready && !use_wr) ? take : '0;
    wr_pop = (batch_valid && batch_ready &&  use_wr) ? take : '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           prefer_wr <= 1'b0;
    else if (batch_valid && batch_ready)  prefer_wr <= !use_wr;
  end
endmodule
