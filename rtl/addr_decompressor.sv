// addr_decompressor: receiver half of the base-number-with-difference address
// compression. It keeps the same table as the sender and applies the same
// updates in the same order, so both copies stay equal without extra messages.
// Given the low bits of a received ADDR field it returns the full address and
// the field's length (combinational). At the clock edge where commit is high
// the entry named in the field is set to the restored address: a miss field
// installs a new base, a hit field moves the base along (self-adaptive).
module addr_decompressor
  import spmr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic [AF_MAX_W-1:0] field,
  input  logic                commit,
  output logic [ADDR_W-1:0]   addr,
  output logic [5:0]          field_len
);
  logic [ADDR_W-1:0] base [TBL_N];
  logic [IDX_W-1:0]  idx;

  always_comb begin
    idx = field[1 +: IDX_W];
    if (field[0]) begin
      addr      = base[idx] + {{(ADDR_W-DIFF_W){field[1+IDX_W+DIFF_W-1]}}, field[1+IDX_W +: DIFF_W]};
      field_len = 6'(AF_HIT_W);
    end else begin
      addr      = field[1 + IDX_W +: ADDR_W];
      field_len = 6'(AF_MISS_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < TBL_N; i++) base[i] <= '0;
    end else if (commit) begin
      base[idx] <= addr;
    end
  end
endmodule
