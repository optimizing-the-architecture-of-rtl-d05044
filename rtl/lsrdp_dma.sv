// DMA engine moving 64-bit words between main memory and the scratchpad.
//
// dma_start with dir = 0 copies len words from main memory (word address
// mem_addr upwards) into the SPM (address spm_addr upwards); dir = 1 copies
// from the SPM to main memory. One word is moved at a time:
//   memory read : m_req/m_we=0/m_addr held until m_gnt; the data arrive with
//                 m_rvalid (any later clock); the word is then written to
//                 the SPM host port.
//   memory write: the word is first read from the SPM (s_rvalid one clock
//                 after s_en), then m_req/m_we=1 held until m_gnt.
// busy is high from start until the last word has moved; done pulses for one
// clock then. A start while busy is ignored; len = 0 finishes at once.
//
// The DMA block between main memory and the SPM is part of the system
// architecture; its registers, bus protocol and one-word-at-a-time operation
// are this design's choices.
module lsrdp_dma
  import lsrdp_pkg::*;
#(
  parameter int unsigned MEM_AW = 32,
  parameter int unsigned SPM_AW = 13,
  parameter int unsigned LEN_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  // control
  input  logic              start,
  input  logic              dir,
  input  logic [MEM_AW-1:0] mem_addr,
  input  logic [SPM_AW-1:0] spm_addr,
  input  logic [LEN_W-1:0]  len,
  output logic              busy,
  output logic              done,
  // main memory master
  output logic              m_req,
  output logic              m_we,
  output logic [MEM_AW-1:0] m_addr,
  output word_t             m_wdata,
  input  logic              m_gnt,
  input  logic              m_rvalid,
  input  word_t             m_rdata,
  // SPM host port master
  output logic              s_en,
  output logic              s_we,
  output logic [SPM_AW-1:0] s_addr,
  output word_t             s_wdata,
  input  logic              s_rvalid,
  input  word_t             s_rdata
);

  typedef enum logic [2:0] {
    S_IDLE, S_MRD_REQ, S_MRD_WAIT, S_SRD, S_SRD_WAIT, S_MWR_REQ
  } state_e;

  state_e            state;
  logic [MEM_AW-1:0] maddr_q;
  logic [SPM_AW-1:0] saddr_q;
  logic [LEN_W-1:0]  left_q;
  word_t             buf_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      maddr_q <= '0;
      saddr_q <= '0;
      left_q  <= '0;
      buf_q   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          maddr_q <= mem_addr;
          saddr_q <= spm_addr;
          left_q  <= len;
          if (len == '0) done  <= 1'b1;
          else           state <= dir ? S_SRD : S_MRD_REQ;
        end
        S_MRD_REQ:  if (m_gnt) state <= S_MRD_WAIT;
        S_MRD_WAIT: if (m_rvalid) begin
          // the SPM write happens in this clock (s_en below)
          maddr_q <= maddr_q + 1'b1;
          saddr_q <= saddr_q + 1'b1;
          left_q  <= left_q - 1'b1;
          if (left_q == LEN_W'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_MRD_REQ;
          end
        end
        S_SRD:      state <= S_SRD_WAIT;
        S_SRD_WAIT: if (s_rvalid) begin
          buf_q <= s_rdata;
          state <= S_MWR_REQ;
        end
        S_MWR_REQ:  if (m_gnt) begin
          maddr_q <= maddr_q + 1'b1;
          saddr_q <= saddr_q + 1'b1;
          left_q  <= left_q - 1'b1;
          if (left_q == LEN_W'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            state <= S_SRD;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy    = (state != S_IDLE);
  assign m_req   = (state == S_MRD_REQ) || (state == S_MWR_REQ);
  assign m_we    = (state == S_MWR_REQ);
  assign m_addr  = maddr_q;
  assign m_wdata = buf_q;
  assign s_en    = (state == S_SRD) || (state == S_MRD_WAIT && m_rvalid);
  assign s_we    = (state == S_MRD_WAIT);
  assign s_addr  = saddr_q;
  assign s_wdata = m_rdata;

  // A memory request stays up, with a stable address, until it is granted.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               m_req && !m_gnt |=> m_req && $stable(m_addr) && $stable(m_we));

endmodule
