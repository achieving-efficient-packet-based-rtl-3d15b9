// dram_model: behavioural stand-in for the DDRx interface and the sub-ranked
// DDR3 devices behind it, for simulation only. It accepts the command
// scheduler's commands, keeps the data of every WR in a sparse array indexed by
// {row, rank, bank, column burst, sub-rank} (which equals byte address bits
// [31:3] under the controller's address map), and answers each RD with one
// 64-bit beat CL cycles later. A location never written returns
// default_word(address bits [31:3]). It also checks that column commands only
// target an open row and that ACT respects the precharge state.
module dram_model
  import spmr_pkg::*;
#(
  parameter int unsigned CL = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ddr_cmd_e          cmd,
  input  logic              rank,
  input  logic [2:0]        bank,
  input  logic [14:0]       row,
  input  logic [9:0]        col,
  input  logic [2:0]        subrank,
  input  logic [BEAT_W-1:0] wdata,
  output logic              rvalid,
  output logic [BEAT_W-1:0] rdata,
  output int                protocol_errors
);
  logic [BEAT_W-1:0] mem [logic [28:0]];
  logic [15:0]       open_b;
  logic [14:0]       open_row [16];
  logic              pv [CL];
  logic [BEAT_W-1:0] pd [CL];

  function automatic logic [BEAT_W-1:0] default_word(input logic [28:0] a);
    return {a, 3'b101, a ^ 29'h1555_AAAA, 3'b010};
  endfunction

  logic [28:0] key;
  assign key = {row, rank, bank, col[9:3], subrank};
  assign rvalid = pv[CL-1];
  assign rdata  = pd[CL-1];

  // sparse storage of written data
  always @(posedge clk) if (rst_n && cmd == DDR_WR) mem[key] = wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      open_b <= '0;
      protocol_errors <= 0;
      for (int i = 0; i < CL; i++) begin pv[i] <= 1'b0; pd[i] <= '0; end
      for (int i = 0; i < 16; i++) open_row[i] <= '0;
    end else begin
      for (int i = CL - 1; i > 0; i--) begin pv[i] <= pv[i-1]; pd[i] <= pd[i-1]; end
      pv[0] <= 1'b0;
      pd[0] <= '0;
      unique case (cmd)
        DDR_ACT: begin
          if (open_b[{rank, bank}]) protocol_errors <= protocol_errors + 1;
          open_b[{rank, bank}]   <= 1'b1;
          open_row[{rank, bank}] <= row;
        end
        DDR_PRE: open_b[{rank, bank}] <= 1'b0;
        DDR_RD, DDR_WR: begin
          if (!open_b[{rank, bank}] || open_row[{rank, bank}] != row)
            protocol_errors <= protocol_errors + 1;
          if (cmd == DDR_RD) begin
            pv[0] <= 1'b1;
            pd[0] <= mem.exists(key) ? mem[key] : default_word(key);
          end
        end
        default: ;
      endcase
    end
  end
endmodule
