// Processing element (PE) of the reconfigurable datapath.
//
// A PE holds one functional unit (FU) and a transfer unit (T). IS_MUL picks
// the FU: a floating point multiplier (1) or adder/subtractor (0); the array
// places them as a checkerboard. The 2-bit structure mode sets what the two
// outputs carry (see lsrdp_pkg::pe_mode_e):
//   FU   : out0 = FU(in0, in1)          out1 = 0
//   T    : out0 = 0                     out1 = in2
//   FU+T : out0 = FU(in0, in1)          out1 = in2
//   T+T  : out0 = in0                   out1 = in2
// The transfer paths let a value skip rows without using a FU. Both outputs
// are registered, so every PE (FU or transfer) has a latency of exactly one
// clock and values from different rows stay aligned in the pipeline.
// The FU kinds, checkerboard, the four structures, three inputs and two
// outputs follow the architecture; which input feeds which transfer, zero on
// unused outputs and the one-cycle latency are this design's choices.
module lsrdp_pe
  import lsrdp_pkg::*;
#(
  parameter bit IS_MUL = 1'b0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  pe_mode_e mode,
  input  logic    sub,     // adder PEs only; unused in a multiplier PE
  input  word_t   in0,
  input  word_t   in1,
  input  word_t   in2,
  output word_t   out0,
  output word_t   out1
);

  word_t fu_y;

  if (IS_MUL) begin : g_mul
    fp_mul u_fu (.a(in0), .b(in1), .y(fu_y));
  end else begin : g_add
    fp_add u_fu (.a(in0), .b(in1), .sub(sub), .y(fu_y));
  end

  word_t nxt0, nxt1;

  always_comb begin
    unique case (mode)
      PE_FU:   begin nxt0 = fu_y; nxt1 = '0;  end
      PE_T:    begin nxt0 = '0;   nxt1 = in2; end
      PE_FU_T: begin nxt0 = fu_y; nxt1 = in2; end
      PE_T_T:  begin nxt0 = in0;  nxt1 = in2; end
      default: begin nxt0 = '0;   nxt1 = '0;  end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out0 <= '0;
      out1 <= '0;
    end else begin
      out0 <= nxt0;
      out1 <= nxt1;
    end
  end

endmodule
