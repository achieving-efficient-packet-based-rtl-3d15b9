// addr_compressor: sender half of the base-number-with-difference address
// compression. A table of TBL_N full addresses is searched for an entry within
// a signed DIFF_W-bit byte difference of the request address. On a hit the
// ADDR field is {diff, base number, 1}; on a miss it is {full address, base
// number, 0} and that table entry (chosen round-robin) takes the new address,
// which is also how the receiver's copy of the table learns it. The table is
// self-adaptive: the entry used is always overwritten with the address just
// sent, so an ascending or descending stream keeps using one entry.
// Lookup is combinational; the table changes at the clock edge where commit is
// high, so one address per cycle can be compressed. Reset empties the table.
module addr_compressor
  import spmr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ADDR_W-1:0]   addr,
  input  logic                commit,
  output logic                hit,
  output logic [IDX_W-1:0]    idx,
  output logic [AF_MAX_W-1:0] field,
  output logic [5:0]          field_len
);
  logic [ADDR_W-1:0] base  [TBL_N];
  logic [TBL_N-1:0]  bval;
  logic [IDX_W-1:0]  rr;

  always_comb begin
    logic [ADDR_W-1:0] d;
    logic [ADDR_W-1:0] dsel;
    hit  = 1'b0;
    idx  = rr;
    dsel = '0;
    for (int i = TBL_N - 1; i >= 0; i--) begin
      d = addr - base[i];
      // fits in DIFF_W signed bits when all bits from the sign bit up are equal
      if (bval[i] && ((d[ADDR_W-1:DIFF_W-1] == '0) || (d[ADDR_W-1:DIFF_W-1] == '1))) begin
        hit  = 1'b1;
        idx  = IDX_W'(i);
        dsel = d;
      end
    end
    field = '0;
    if (hit) begin
      field[0]                   = 1'b1;
      field[1 +: IDX_W]          = idx;
      field[1 + IDX_W +: DIFF_W] = dsel[DIFF_W-1:0];
      field_len                  = 6'(AF_HIT_W);
    end else begin
      field[0]                   = 1'b0;
      field[1 +: IDX_W]          = idx;
      field[1 + IDX_W +: ADDR_W] = addr;
      field_len                  = 6'(AF_MISS_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bval <= '0;
      rr   <= '0;
      for (int i = 0; i < TBL_N; i++) base[i] <= '0;
    end else if (commit) begin
      base[idx] <= addr;
      bval[idx] <= 1'b1;
      if (!hit) rr <= rr + 1'b1;
    end
  end
endmodule
