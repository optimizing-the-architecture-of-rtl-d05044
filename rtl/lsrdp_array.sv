// Large-scale reconfigurable datapath (LSRDP): the accelerator core.
//
// A pipelined array of H rows by W columns of PEs computes a data flow graph
// (DFG) of 64-bit floating point ADD, SUB and MUL operations. Data enter at
// N_IN input ports along the top, flow strictly downward one row per clock,
// and leave at N_OUT output ports along the bottom. PE (r,c) is a multiplier
// when r+c is odd and an adder/subtractor otherwise (checkerboard). Above
// every PE sits an ORN cross-bar choosing its three operands: in row 0 from
// the N_IN input ports, in row r > 0 from the two outputs of the PEs in
// columns c-MCL .. c+MCL of row r-1 (ORN input 2*k + m is output m of column
// c-MCL+k; columns outside the array read as zero). A further cross-bar
// registers the N_OUT output ports, each choosing one of the 2*W outputs of
// the last row (code 2*c + m; larger codes give zero).
//
// Timing: a vector presented at in_data with in_valid appears on out_data
// with out_valid exactly H+1 clocks later; a new vector can be accepted every
// clock. The datapath has no stall: the schedule is fixed by the mapping.
//
// Configuration: one bit-serial chain, one bit per clock while cfg_en is
// high, first bit sent ends in chain bit 0. The chain image is CFG_BITS
// long: tile (r,c) occupies bits [(r*W+c)*TILE_CFG_W +: TILE_CFG_W] (see
// lsrdp_tile for the fields) and the output cross-bar the top N_OUT*OSEL_W
// bits, output port o at o*OSEL_W. cfg_out is the bit leaving the chain.
//
// The defaults are the medium configuration (32 x 16 PEs, 19 inputs, 12
// outputs, 26-input ORNs, i.e. MCL = 6). Array, checkerboard, ORN sizing,
// port counts, one-directional flow, immediate registers and serial chain
// follow the architecture; the select encodings, chain order, registered
// output cross-bar, one clock per row and the valid pipeline are this
// design's choices.
module lsrdp_array
  import lsrdp_pkg::*;
#(
  parameter int unsigned W     = 32,
  parameter int unsigned H     = 16,
  parameter int unsigned MCL   = 6,
  parameter int unsigned N_IN  = 19,
  parameter int unsigned N_OUT = 12,
  localparam int unsigned N_ORN_IN   = 2 * (2 * MCL + 1),
  localparam int unsigned MAX_ORN_IN = (N_ORN_IN > N_IN) ? N_ORN_IN : N_IN,
  localparam int unsigned SEL_W      = $clog2(MAX_ORN_IN + 2),
  localparam int unsigned TILE_CFG_W = 3 * SEL_W + PE_CFG_W,
  localparam int unsigned OSEL_W     = $clog2(2 * W + 1),
  localparam int unsigned OUT_CFG_W  = N_OUT * OSEL_W,
  localparam int unsigned CFG_BITS   = W * H * TILE_CFG_W + OUT_CFG_W
) (
  input  logic  clk,
  input  logic  rst_n,
  // serial configuration chain
  input  logic  cfg_en,
  input  logic  cfg_in,
  output logic  cfg_out,
  // data ports
  input  logic  in_valid,
  input  word_t in_data [N_IN],
  output logic  out_valid,
  output word_t out_data [N_OUT]
);

  // PE outputs, row-major: pe_out[r][c][m]
  word_t pe_out [H][W][2];
  // chain links: link[i] is the serial input of tile i (row-major);
  // link[W*H] is the serial input of the last tile, fed by the output cross-bar.
  logic  link [W*H+1];

  for (genvar r = 0; r < H; r++) begin : g_row
    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int unsigned IDX = r * W + c;
      localparam int unsigned NI  = (r == 0) ? N_IN : N_ORN_IN;
      word_t orn_in [NI];

      if (r == 0) begin : g_in
        always_comb for (int k = 0; k < N_IN; k++) orn_in[k] = in_data[k];
      end else begin : g_mid
        always_comb begin
          for (int k = 0; k < 2 * MCL + 1; k++) begin
            int src;
            src = c - int'(MCL) + k;
            if (src >= 0 && src < int'(W)) begin
              orn_in[2*k]   = pe_out[r-1][src][0];
              orn_in[2*k+1] = pe_out[r-1][src][1];
            end else begin
              orn_in[2*k]   = '0;
              orn_in[2*k+1] = '0;
            end
          end
        end
      end

      lsrdp_tile #(
        .N_ORN_IN(NI), .SEL_W(SEL_W), .IS_MUL(((r + c) % 2) == 1)
      ) u_tile (
        .clk, .rst_n, .cfg_en,
        .cfg_sin(link[IDX + 1]), .cfg_sout(link[IDX]),
        .orn_in(orn_in),
        .out0(pe_out[r][c][0]), .out1(pe_out[r][c][1])
      );
    end
  end

  assign cfg_out = link[0];

  // Output cross-bar, registered, with its own chain segment at the chain head.
  logic [OUT_CFG_W-1:0] ocfg;
  logic [OSEL_W-1:0]    osel [N_OUT];
  word_t                last_row [2*W];
  word_t                oxb [N_OUT];

  cfg_chain_seg #(.W(OUT_CFG_W)) u_ocfg (
    .clk, .rst_n, .en(cfg_en), .sin(cfg_in), .sout(link[W*H]), .q(ocfg)
  );

  always_comb begin
    for (int o = 0; o < N_OUT; o++) osel[o] = ocfg[o*OSEL_W +: OSEL_W];
    for (int c = 0; c < W; c++) begin
      last_row[2*c]   = pe_out[H-1][c][0];
      last_row[2*c+1] = pe_out[H-1][c][1];
    end
  end

  lsrdp_orn #(.N_IN(2 * W), .N_OUT(N_OUT), .SEL_W(OSEL_W)) u_out_orn (
    .in_data(last_row), .imm('0), .sel(osel), .out_data(oxb)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int o = 0; o < N_OUT; o++) out_data[o] <= '0;
    else        for (int o = 0; o < N_OUT; o++) out_data[o] <= oxb[o];
  end

  // Valid tag travelling with the data: H PE rows plus the output register.
  logic [H:0] vpipe;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[H-1:0], in_valid};
  end
  assign out_valid = vpipe[H];

endmodule
