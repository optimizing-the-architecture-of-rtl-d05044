// Shared types and constants of the reconfigurable datapath (LSRDP).
//
// The datapath is a two-dimensional array of processing elements (PEs)
// operating on 64-bit IEEE-754 double precision numbers. Each PE holds one
// functional unit (an adder/subtractor or a multiplier, laid out as a
// checkerboard) and a transfer unit, and is configured into one of four
// structures: FU, T, FU+T or T+T. Those four structures, the 64-bit data, the
// per-PE 64-bit immediate register and the bit-serial configuration chain
// follow the architecture description. The numeric encoding of the mode, the
// extra ADD/SUB bit and the field order inside a tile's configuration word are
// choices of this implementation and are documented below.
package lsrdp_pkg;

  localparam int unsigned DATA_W = 64;   // 64-bit floating point operands
  typedef logic [DATA_W-1:0] word_t;

  // PE structure (2 configuration bits per PE).
  //   PE_FU  : out0 = FU(in0, in1), out1 = 0
  //   PE_T   : out0 = 0,            out1 = in2
  //   PE_FU_T: out0 = FU(in0, in1), out1 = in2
  //   PE_T_T : out0 = in0,          out1 = in2
  typedef enum logic [1:0] {
    PE_FU   = 2'd0,
    PE_T    = 2'd1,
    PE_FU_T = 2'd2,
    PE_T_T  = 2'd3
  } pe_mode_e;

  // Per-PE configuration held in the serial chain (besides the ORN selects).
  typedef struct packed {
    word_t    imm;   // immediate register, selectable as an operand by the ORN
    logic     sub;   // adder PEs only: 1 = in0 - in1, 0 = in0 + in1
    pe_mode_e mode;
  } pe_cfg_t;

  localparam int unsigned PE_CFG_W = $bits(pe_cfg_t);  // 67

  // Canonical quiet NaN returned by invalid operations.
  localparam word_t FP_QNAN = 64'h7FF8_0000_0000_0000;

  // Number of ORN data inputs for a maximum connection length MCL:
  // two PE outputs from each of the 2*MCL+1 columns in reach.
  function automatic int unsigned orn_inputs(int unsigned mcl);
    return 2 * (2 * mcl + 1);
  endfunction

endpackage
