// Self-checking test of lsrdp_pe, both kinds (adder/subtractor and
// multiplier): all four structures, ADD and SUB, one clock of latency, and
// back-to-back operands every clock.
module tb_lsrdp_pe;
  import lsrdp_pkg::*;

  logic     clk = 0, rst_n = 0;
  pe_mode_e mode;
  logic     sub;
  word_t    in0, in1, in2;
  word_t    a_out0, a_out1, m_out0, m_out1;
  int       checks = 0, failures = 0;

  lsrdp_pe #(.IS_MUL(1'b0)) dut_add (.clk, .rst_n, .mode, .sub, .in0, .in1, .in2, .out0(a_out0), .out1(a_out1));
  lsrdp_pe #(.IS_MUL(1'b1)) dut_mul (.clk, .rst_n, .mode, .sub, .in0, .in1, .in2, .out0(m_out0), .out1(m_out1));

  always #5 clk = ~clk;

  task automatic chk(word_t got, word_t exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t ea0, ea1, em0, em1;
    real   x, y;
    mode = PE_FU; sub = 0; in0 = '0; in1 = '0; in2 = '0;
    @(negedge clk);
    chk(a_out0, '0, "reset out0");
    chk(m_out1, '0, "reset out1");
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      x = real'($urandom % 20000) / 64.0 - 150.0;
      y = real'($urandom % 20000) / 32.0 - 300.0;
      mode = pe_mode_e'(t % 4);
      sub  = 1'(t / 4);
      in0  = $realtobits(x);
      in1  = $realtobits(y);
      in2  = {$urandom, $urandom};
      case (mode)
        PE_FU:   begin ea0 = $realtobits(sub ? x - y : x + y); ea1 = '0;  em0 = $realtobits(x * y); em1 = '0;  end
        PE_T:    begin ea0 = '0;  ea1 = in2; em0 = '0;  em1 = in2; end
        PE_FU_T: begin ea0 = $realtobits(sub ? x - y : x + y); ea1 = in2; em0 = $realtobits(x * y); em1 = in2; end
        default: begin ea0 = in0; ea1 = in2; em0 = in0; em1 = in2; end
      endcase
      @(posedge clk);
      #1;
      chk(a_out0, ea0, $sformatf("add pe out0 mode %0d", mode));
      chk(a_out1, ea1, "add pe out1");
      chk(m_out0, em0, $sformatf("mul pe out0 mode %0d", mode));
      chk(m_out1, em1, "mul pe out1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
