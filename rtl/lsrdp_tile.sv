// One tile of the datapath array: an ORN, the PE below it and the tile's
// configuration chain segment.
//
// The ORN picks the PE's three operands from its N_ORN_IN inputs or from
// the tile's immediate register; the PE computes and registers its two
// outputs. The tile's configuration word, shifted in through the serial
// chain, is laid out from bit 0 upwards as
//   [SEL_W*3-1:0]          ORN selects, output j at bits j*SEL_W
//   [SEL_W*3 +: 2]         PE structure mode
//   [SEL_W*3 + 2]          ADD/SUB select (adder PEs)
//   [SEL_W*3 + 3 +: 64]    immediate register
// so a tile has TILE_CFG_W = 3*SEL_W + 67 configuration bits. Pairing one
// ORN with one PE follows the architecture (one ORN per column in each row);
// the field order is this design's choice.
module lsrdp_tile
  import lsrdp_pkg::*;
#(
  parameter int unsigned N_ORN_IN = 26,
  parameter int unsigned SEL_W    = 5,
  parameter bit          IS_MUL   = 1'b0,
  localparam int unsigned TILE_CFG_W = 3 * SEL_W + PE_CFG_W
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cfg_en,
  input  logic  cfg_sin,
  output logic  cfg_sout,
  input  word_t orn_in [N_ORN_IN],
  output word_t out0,
  output word_t out1
);

  logic [TILE_CFG_W-1:0] cfg_q;
  logic [SEL_W-1:0]      sel [3];
  pe_cfg_t               pe_cfg;
  word_t                 opnd [3];

  cfg_chain_seg #(.W(TILE_CFG_W)) u_cfg (
    .clk, .rst_n, .en(cfg_en), .sin(cfg_sin), .sout(cfg_sout), .q(cfg_q)
  );

  always_comb begin
    for (int j = 0; j < 3; j++) sel[j] = cfg_q[j*SEL_W +: SEL_W];
    pe_cfg = pe_cfg_t'(cfg_q[3*SEL_W +: PE_CFG_W]);
  end

  lsrdp_orn #(.N_IN(N_ORN_IN), .N_OUT(3), .SEL_W(SEL_W)) u_orn (
    .in_data(orn_in), .imm(pe_cfg.imm), .sel(sel), .out_data(opnd)
  );

  lsrdp_pe #(.IS_MUL(IS_MUL)) u_pe (
    .clk, .rst_n, .mode(pe_cfg.mode), .sub(pe_cfg.sub),
    .in0(opnd[0]), .in1(opnd[1]), .in2(opnd[2]),
    .out0, .out1
  );

endmodule
