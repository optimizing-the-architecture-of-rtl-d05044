// Scratchpad memory (SPM) between the DMA engine and the datapath array.
//
// The SPM is organised as one bank per datapath port: N_IN input banks
// feed the N_IN input ports and N_OUT output banks collect the N_OUT output
// ports, DEPTH 64-bit words each. One vector (one word of every input bank at
// the same offset) is streamed into the array per clock, and every valid
// output vector is written at the next free offset of the output banks.
//
// Host side (used by the DMA engine): h_addr = {bank, offset}, banks
// 0..N_IN-1 are the input banks, N_IN..N_IN+N_OUT-1 the output banks. A
// write (h_en & h_we) goes to an input bank; writes to output banks are
// ignored. A read returns h_rdata with h_rvalid one clock after h_en.
//
// Stream side: run_start with run_len = n streams offsets 0..n-1 to the
// array (arr_in_valid/arr_in_data, registered, one clock after the read) and
// stores the first n valid output vectors at offsets 0..n-1. run_busy is
// high from run_start until the last output vector is stored; run_done
// pulses for one clock then. run_start while busy is ignored.
//
// That the SPM sits between the DMA, the host processor and the datapath is
// from the system architecture; its size, banking and both protocols are this
// design's choices.
module lsrdp_spm
  import lsrdp_pkg::*;
#(
  parameter int unsigned N_IN   = 19,
  parameter int unsigned N_OUT  = 12,
  parameter int unsigned DEPTH  = 256,
  localparam int unsigned OFF_W  = $clog2(DEPTH),
  localparam int unsigned BANK_W = $clog2(N_IN + N_OUT),
  localparam int unsigned AW     = BANK_W + OFF_W
) (
  input  logic             clk,
  input  logic             rst_n,
  // host port
  input  logic             h_en,
  input  logic             h_we,
  input  logic [AW-1:0]    h_addr,
  input  word_t            h_wdata,
  output word_t            h_rdata,
  output logic             h_rvalid,
  // stream control
  input  logic             run_start,
  input  logic [OFF_W:0]   run_len,
  output logic             run_busy,
  output logic             run_done,
  // datapath ports
  output logic             arr_in_valid,
  output word_t            arr_in_data [N_IN],
  input  logic             arr_out_valid,
  input  word_t            arr_out_data[N_OUT]
);

  word_t in_mem  [N_IN][DEPTH];
  word_t out_mem [N_OUT][DEPTH];

  logic [BANK_W-1:0] h_bank;
  logic [OFF_W-1:0]  h_off;
  assign h_bank = h_addr[AW-1:OFF_W];
  assign h_off  = h_addr[OFF_W-1:0];

  // Host port.
  always_ff @(posedge clk) begin
    if (h_en && h_we && int'(h_bank) < int'(N_IN)) in_mem[h_bank][h_off] <= h_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_rvalid <= 1'b0;
      h_rdata  <= '0;
    end else begin
      h_rvalid <= h_en && !h_we;
      if (h_en && !h_we) begin
        if (int'(h_bank) < int'(N_IN))              h_rdata <= in_mem[h_bank][h_off];
        else if (int'(h_bank) < int'(N_IN + N_OUT)) h_rdata <= out_mem[int'(h_bank) - int'(N_IN)][h_off];
        else                                        h_rdata <= '0;
      end
    end
  end

  // Stream side.
  logic [OFF_W:0] len_q, rd_cnt, wr_cnt;
  logic           issuing;

  assign issuing = run_busy && (rd_cnt != len_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_busy     <= 1'b0;
      run_done     <= 1'b0;
      len_q        <= '0;
      rd_cnt       <= '0;
      wr_cnt       <= '0;
      arr_in_valid <= 1'b0;
    end else begin
      run_done     <= 1'b0;
      arr_in_valid <= issuing;
      if (!run_busy) begin
        if (run_start) begin
          len_q  <= run_len;
          rd_cnt <= '0;
          wr_cnt <= '0;
          if (run_len == '0) run_done <= 1'b1;
          else               run_busy <= 1'b1;
        end
      end else begin
        if (issuing) rd_cnt <= rd_cnt + 1'b1;
        if (arr_out_valid && wr_cnt != len_q) begin
          wr_cnt <= wr_cnt + 1'b1;
          if (wr_cnt + 1'b1 == len_q) begin
            run_busy <= 1'b0;
            run_done <= 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (issuing)
      for (int b = 0; b < N_IN; b++) arr_in_data[b] <= in_mem[b][rd_cnt[OFF_W-1:0]];
    if (run_busy && arr_out_valid && wr_cnt != len_q)
      for (int b = 0; b < N_OUT; b++) out_mem[b][wr_cnt[OFF_W-1:0]] <= arr_out_data[b];
  end

  a_len_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               run_start && !run_busy |-> 32'(run_len) <= DEPTH);

endmodule
