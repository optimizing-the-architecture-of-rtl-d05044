// Self-checking test of lsrdp_orn with the medium-size 26-input, 3-output
// cross-bar: every select code of every output, including the immediate
// code (N_IN) and the zero codes above it, with random data.
module tb_lsrdp_orn;
  import lsrdp_pkg::*;
  localparam int unsigned N_IN = 26, N_OUT = 3, SEL_W = 5;

  word_t            in_data [N_IN];
  word_t            imm;
  logic [SEL_W-1:0] sel [N_OUT];
  word_t            out_data[N_OUT];
  int               checks = 0, failures = 0;

  lsrdp_orn #(.N_IN(N_IN), .N_OUT(N_OUT), .SEL_W(SEL_W)) dut (.in_data, .imm, .sel, .out_data);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t e;
    for (int t = 0; t < 20; t++) begin
      for (int k = 0; k < N_IN; k++) in_data[k] = {$urandom, $urandom};
      imm = {$urandom, $urandom};
      for (int code = 0; code < (1 << SEL_W); code++) begin
        for (int o = 0; o < N_OUT; o++) sel[o] = SEL_W'((code + 7 * o) % (1 << SEL_W));
        #1;
        for (int o = 0; o < N_OUT; o++) begin
          int c;
          c = (code + 7 * o) % (1 << SEL_W);
          e = (c < N_IN) ? in_data[c] : (c == N_IN) ? imm : 64'd0;
          checks++;
          if (out_data[o] !== e) begin
            failures++;
            $display("FAIL out %0d code %0d: %h expected %h", o, c, out_data[o], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
