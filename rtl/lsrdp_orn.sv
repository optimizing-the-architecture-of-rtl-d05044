// Operand routing network (ORN): a one-directional cross-bar switch.
//
// Each of the N_OUT outputs independently selects one of the N_IN data
// inputs by its SEL_W-bit select code: code k < N_IN takes in_data[k], code
// N_IN takes the local immediate register (imm), and any larger code gives
// zero. Between two PE rows there is one ORN per column; its N_IN inputs are
// the two outputs of each PE within MCL columns of it in the row above,
// N_IN = 2*(2*MCL+1), and its three outputs are the three operand inputs of
// the PE below. The same cross-bar also connects the input ports to the first
// row and the last row to the output ports. Combinational; the selects come
// from the configuration chain.
//
// The cross-bar structure, the 2*(2*MCL+1) input count and the three outputs
// follow the architecture. Routing the immediate register through a select
// code and the zero code are this design's choices.
module lsrdp_orn
  import lsrdp_pkg::*;
#(
  parameter int unsigned N_IN  = 26,
  parameter int unsigned N_OUT = 3,
  parameter int unsigned SEL_W = $clog2(N_IN + 2)
) (
  input  word_t             in_data [N_IN],
  input  word_t             imm,
  input  logic [SEL_W-1:0]  sel     [N_OUT],
  output word_t             out_data[N_OUT]
);

  initial begin
    assert ((1 << SEL_W) >= N_IN + 1)
      else $error("lsrdp_orn: SEL_W=%0d too narrow for %0d inputs", SEL_W, N_IN);
  end

  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      if (int'(sel[o]) < N_IN)       out_data[o] = in_data[sel[o][IW-1:0]];
      else if (int'(sel[o]) == N_IN) out_data[o] = imm;
      else                           out_data[o] = '0;
    end
  end

endmodule
