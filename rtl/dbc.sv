// dbc: Data Bus Controller, the 32-bit path between the host and the
// register files.
//
// STORE writes one 32-bit part (word) of register &dst in every register file
// that holds slice `slice` of a value, so that all copies stay equal: with
// independent cores every file holds slice 0 and one STORE reaches all of
// them; with chained cores the file of the i-th core of each group holds
// slice i. LOAD reads word `word` of register &src from the file of core
// `slice` (the cores of group 0) and presents it on dout, with dout_valid,
// in the next cycle. The controller issues STORE and LOAD only while the
// MALU cores are idle. The document names the controller and the STORE/LOAD
// instructions; the slice addressing is this design's choice.
module dbc
  import cp_pkg::*;
#(
  parameter int unsigned NCORE = ALPHA,
  parameter int unsigned W     = SLICE_W,
  parameter int unsigned AW    = RF_AW,
  localparam int unsigned CIW  = (NCORE > 1) ? $clog2(NCORE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  input  logic             is_load,
  input  logic [2:0]       slice,
  input  logic [2:0]       word,
  input  logic [AW-1:0]    addr,
  input  logic [31:0]      wdata,
  input  logic [2:0]       core_slice [NCORE],
  output logic [NCORE-1:0] rf_we,
  output logic [AW-1:0]    rf_waddr,
  output logic [W-1:0]     rf_wdata,
  output logic [W-1:0]     rf_wmask,
  output logic             rd_en,
  output logic [CIW-1:0]   rd_rf,
  output logic [AW-1:0]    rd_addr,
  input  logic [W-1:0]     rd_data [NCORE],
  output logic [31:0]      dout,
  output logic             dout_valid
);

  localparam int unsigned WX = ((W + 31) / 32) * 32 + 32;

  logic [WX-1:0] wide_data, wide_mask, rd_wide;

  assign wide_data = WX'(wdata) << (32 * word);
  assign wide_mask = WX'(32'hFFFF_FFFF) << (32 * word);
  assign rf_wdata  = wide_data[W-1:0];
  assign rf_wmask  = wide_mask[W-1:0];
  assign rf_waddr  = addr;

  always_comb begin
    for (int k = 0; k < NCORE; k++)
      rf_we[k] = req && !is_load && (core_slice[k] == slice);
  end

  assign rd_en   = req && is_load;
  assign rd_rf   = CIW'(slice);
  assign rd_addr = addr;
  assign rd_wide = WX'(rd_data[rd_rf]) >> (32 * word);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= rd_en;
      if (rd_en) dout <= rd_wide[31:0];
    end
  end

  a_slice_range: assert property (@(posedge clk) disable iff (!rst_n)
    rd_en |-> 32'(slice) < NCORE);

endmodule
