// Accelerator subsystem: DMA engine, scratchpad memory and reconfigurable
// datapath array, as attached to a general purpose host processor.
//
// The host processor and main memory are outside this module: the host
// drives the control ports below, main memory answers the m_* port. A
// typical use is
//   1. shift the configuration bit-stream of a mapped data flow graph into
//      the array (cfg_en/cfg_in, one bit per clock, CFG_BITS bits);
//   2. DMA the operand vectors from main memory into the SPM input banks
//      (dma_dir = 0);
//   3. run_start: the SPM streams run_len vectors through the array, one per
//      clock, and collects the results in its output banks (H+1 clocks of
//      pipeline latency plus two for the SPM read and write);
//   4. DMA the results from the SPM output banks back to main memory
//      (dma_dir = 1).
// The DMA engine is the only master of the SPM host port.
//
// The parts and their connections (memory - DMA - SPM - datapath, host in
// control) follow the system architecture; the control ports and protocols
// are this design's choices. Defaults are the medium configuration.
module sfq_rdp_top
  import lsrdp_pkg::*;
#(
  parameter int unsigned W         = 32,
  parameter int unsigned H         = 16,
  parameter int unsigned MCL       = 6,
  parameter int unsigned N_IN      = 19,
  parameter int unsigned N_OUT     = 12,
  parameter int unsigned SPM_DEPTH = 256,
  parameter int unsigned MEM_AW    = 32,
  localparam int unsigned SPM_AW   = $clog2(N_IN + N_OUT) + $clog2(SPM_DEPTH),
  localparam int unsigned RUN_W    = $clog2(SPM_DEPTH) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration chain
  input  logic              cfg_en,
  input  logic              cfg_in,
  output logic              cfg_out,
  // DMA control
  input  logic              dma_start,
  input  logic              dma_dir,
  input  logic [MEM_AW-1:0] dma_mem_addr,
  input  logic [SPM_AW-1:0] dma_spm_addr,
  input  logic [15:0]       dma_len,
  output logic              dma_busy,
  output logic              dma_done,
  // datapath run control
  input  logic              run_start,
  input  logic [RUN_W-1:0]  run_len,
  output logic              run_busy,
  output logic              run_done,
  // main memory
  output logic              m_req,
  output logic              m_we,
  output logic [MEM_AW-1:0] m_addr,
  output word_t             m_wdata,
  input  logic              m_gnt,
  input  logic              m_rvalid,
  input  word_t             m_rdata
);

  logic              s_en, s_we, s_rvalid;
  logic [SPM_AW-1:0] s_addr;
  word_t             s_wdata, s_rdata;
  logic              a_in_valid, a_out_valid;
  word_t             a_in_data [N_IN];
  word_t             a_out_data[N_OUT];

  lsrdp_dma #(.MEM_AW(MEM_AW), .SPM_AW(SPM_AW), .LEN_W(16)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dir(dma_dir), .mem_addr(dma_mem_addr),
    .spm_addr(dma_spm_addr), .len(dma_len), .busy(dma_busy), .done(dma_done),
    .m_req, .m_we, .m_addr, .m_wdata, .m_gnt, .m_rvalid, .m_rdata,
    .s_en, .s_we, .s_addr, .s_wdata, .s_rvalid, .s_rdata
  );

  lsrdp_spm #(.N_IN(N_IN), .N_OUT(N_OUT), .DEPTH(SPM_DEPTH)) u_spm (
    .clk, .rst_n,
    .h_en(s_en), .h_we(s_we), .h_addr(s_addr), .h_wdata(s_wdata),
    .h_rdata(s_rdata), .h_rvalid(s_rvalid),
    .run_start, .run_len, .run_busy, .run_done,
    .arr_in_valid(a_in_valid), .arr_in_data(a_in_data),
    .arr_out_valid(a_out_valid), .arr_out_data(a_out_data)
  );

  lsrdp_array #(.W(W), .H(H), .MCL(MCL), .N_IN(N_IN), .N_OUT(N_OUT)) u_array (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out,
    .in_valid(a_in_valid), .in_data(a_in_data),
    .out_valid(a_out_valid), .out_data(a_out_data)
  );

endmodule
