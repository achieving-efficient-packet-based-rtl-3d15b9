// cmd_scheduler: command scheduler of the off-chip controller. It takes decoded
// requests in order from the request queue and turns each into DDR3 commands
// for sub-ranked memory built from x8 devices, where one x8 sub-rank returns
// 8 bytes per BL8 burst. A request of GRAN+1 8-byte units becomes GRAN+1 RD or
// WR commands, one per cycle, each aimed at one sub-rank. Before a column
// command the addressed bank must hold the addressed row: an open different
// row is first closed (PRE, then TRP cycles before ACT) and a closed bank is
// opened (ACT, then TRCD cycles before the first RD/WR). Rows stay open after
// use (open-page policy), so later units of a large merged request hit the
// open row.
// Address map (byte address): [5:3] sub-rank, [12:6] burst within the row
// (column = burst*8), [15:13] bank, [16] rank, [31:17] row; higher bits select
// no DRAM and are ignored by this one-channel controller.
// A read request is announced on desc_* (its GRAN) when it is accepted, so the
// response generator knows how many data beats belong to it; RD commands wait
// while rd_allow is low (no room for the returning data). rd_issue marks each
// RD. The command set, address map, page policy and the two timing limits are
// this design's choices; refresh and the remaining DDR3 limits are not handled.
module cmd_scheduler
  import spmr_pkg::*;
#(
  parameter int unsigned TRCD = 9,   // DDR3-1333 CL9 speed bin, in DRAM clocks
  parameter int unsigned TRP  = 9
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_valid,
  output logic                req_ready,
  input  dec_req_t            req,
  output logic                desc_valid,
  input  logic                desc_ready,
  output logic [GRAN_W-1:0]   desc_gran,
  input  logic                rd_allow,
  output logic                rd_issue,
  output ddr_cmd_e            ddr_cmd,
  output logic                ddr_rank,
  output logic [2:0]          ddr_bank,
  output logic [14:0]         ddr_row,
  output logic [9:0]          ddr_col,
  output logic [2:0]          ddr_subrank,
  output logic [BEAT_W-1:0]   ddr_wdata,
  output logic                row_hit_pulse,
  output logic                row_conflict_pulse
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WAIT} state_e;
  state_e state;

  logic [ADDR_W-1:0]  a;
  logic [GRAN_W-1:0]  left, unit;
  logic               wr;
  logic [WDATA_W-1:0] data;
  logic [15:0]        open_b;
  logic [14:0]        open_row [16];
  logic [7:0]         wcnt;

  logic [3:0]  rb;
  logic [14:0] row;
  logic        is_open, is_hit, can_col;

  assign rb       = {a[16], a[15:13]};
  assign row      = a[31:17];
  assign is_open  = open_b[rb];
  assign is_hit   = is_open && (open_row[rb] == row);
  assign can_col  = wr || rd_allow;

  assign req_ready  = (state == S_IDLE) && (req.wr || desc_ready);
  assign desc_valid = (state == S_IDLE) && req_valid && !req.wr;
  assign desc_gran  = req.gran;

  always_comb begin
    ddr_cmd            = DDR_NOP;
    ddr_rank           = a[16];
    ddr_bank           = a[15:13];
    ddr_row            = row;
    ddr_col            = {a[12:6], 3'b000};
    ddr_subrank        = a[5:3];
    ddr_wdata          = data[unit[2:0]*BEAT_W +: BEAT_W];
    row_hit_pulse      = 1'b0;
    row_conflict_pulse = 1'b0;
    if (state == S_RUN) begin
      if (is_hit) begin
        if (can_col) begin
          ddr_cmd       = wr ? DDR_WR : DDR_RD;
          row_hit_pulse = 1'b1;
        end
      end else if (is_open) begin
        ddr_cmd            = DDR_PRE;
        row_conflict_pulse = 1'b1;
      end else begin
        ddr_cmd = DDR_ACT;
      end
    end
  end
  assign rd_issue = (ddr_cmd == DDR_RD);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      a      <= '0;
      left   <= '0;
      unit   <= '0;
      wr     <= 1'b0;
      data   <= '0;
      open_b <= '0;
      wcnt   <= '0;
      for (int i = 0; i < 16; i++) open_row[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req_valid && req_ready) begin
          a     <= req.addr;
          left  <= req.gran;
          unit  <= '0;
          wr    <= req.wr;
          data  <= req.data;
          state <= S_RUN;
        end
        S_RUN: begin
          unique case (ddr_cmd)
            DDR_RD, DDR_WR: begin
              a    <= a + ADDR_W'(8);
              unit <= unit + 1'b1;
              left <= left - 1'b1;
              if (left == '0) state <= S_IDLE;
            end
            DDR_PRE: begin
              open_b[rb] <= 1'b0;
              wcnt       <= 8'(TRP - 1);
              state      <= S_WAIT;
            end
            DDR_ACT: begin
              open_b[rb]   <= 1'b1;
              open_row[rb] <= row;
              wcnt         <= 8'(TRCD - 1);
              state        <= S_WAIT;
            end
            default: ;
          endcase
        end
        S_WAIT: begin
          wcnt <= wcnt - 1'b1;
          if (wcnt <= 8'd1) state <= S_RUN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  property p_trcd;
    @(posedge clk) disable iff (!rst_n) (ddr_cmd == DDR_ACT) |=> (ddr_cmd == DDR_NOP) [*(TRCD-1)];
  endproperty
  assert property (p_trcd);
endmodule
