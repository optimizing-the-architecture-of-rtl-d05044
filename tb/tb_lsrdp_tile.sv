// Self-checking test of lsrdp_tile (26-input ORN, adder PE and multiplier
// PE): random configuration words are shifted in serially, then random
// operands are applied and both PE outputs are checked one clock later
// against a model of the select codes (input, immediate, zero) and the
// structure modes. The serial output must replay each word shifted in.
module tb_lsrdp_tile;
  import lsrdp_pkg::*;
  localparam int unsigned NI = 26, SEL_W = 5, TILE = 3 * SEL_W + 67;

  logic  clk = 0, rst_n = 0, cfg_en = 0, cfg_sin = 0, sout_a, sout_m;
  word_t orn_in [NI];
  word_t a0, a1, m0, m1;
  int    checks = 0, failures = 0;

  lsrdp_tile #(.N_ORN_IN(NI), .SEL_W(SEL_W), .IS_MUL(1'b0)) dut_a (
    .clk, .rst_n, .cfg_en, .cfg_sin, .cfg_sout(sout_a), .orn_in, .out0(a0), .out1(a1));
  lsrdp_tile #(.N_ORN_IN(NI), .SEL_W(SEL_W), .IS_MUL(1'b1)) dut_m (
    .clk, .rst_n, .cfg_en, .cfg_sin, .cfg_sout(sout_m), .orn_in, .out0(m0), .out1(m1));

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t pick(int unsigned code, word_t imm);
    if (code < NI) return orn_in[code];
    if (code == NI) return imm;
    return '0;
  endfunction

  initial begin
    logic [TILE-1:0] cfg, prev;
    int unsigned     s[3];
    pe_mode_e        mode;
    logic            sub;
    word_t           imm, x, y, z, ea0, ea1, em0, em1;
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    prev = '0;
    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < 3; j++) s[j] = ($urandom % 4 == 0) ? NI + ($urandom % 6) : $urandom % NI;
      mode = pe_mode_e'($urandom % 4);
      sub  = 1'($urandom);
      imm  = $realtobits(real'(int'($urandom % 1000) - 500) / 8.0);
      cfg  = {imm, sub, mode, SEL_W'(s[2]), SEL_W'(s[1]), SEL_W'(s[0])};
      for (int i = 0; i < TILE; i++) begin
        @(negedge clk);
        chk(sout_a == prev[i] && sout_m == prev[i], "serial out replays previous word");
        cfg_en = 1; cfg_sin = cfg[i];
      end
      @(negedge clk);
      cfg_en = 0;
      prev = cfg;
      for (int k = 0; k < NI; k++) orn_in[k] = $realtobits(real'(int'($urandom % 100000) - 50000) / 64.0);
      x = pick(s[0], imm); y = pick(s[1], imm); z = pick(s[2], imm);
      case (mode)
        PE_FU:   begin ea0 = $realtobits(sub ? $bitstoreal(x) - $bitstoreal(y) : $bitstoreal(x) + $bitstoreal(y)); ea1 = '0; end
        PE_T:    begin ea0 = '0; ea1 = z; end
        PE_FU_T: begin ea0 = $realtobits(sub ? $bitstoreal(x) - $bitstoreal(y) : $bitstoreal(x) + $bitstoreal(y)); ea1 = z; end
        default: begin ea0 = x; ea1 = z; end
      endcase
      em0 = (mode == PE_FU || mode == PE_FU_T) ? $realtobits($bitstoreal(x) * $bitstoreal(y)) : ea0;
      em1 = ea1;
      @(negedge clk);
      chk(a0 == ea0 && a1 == ea1, $sformatf("adder tile mode %0d sel %0d/%0d/%0d", mode, s[0], s[1], s[2]));
      chk(m0 == em0 && m1 == em1, $sformatf("multiplier tile mode %0d", mode));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
