// Self-checking test of cfg_chain_seg: reset clears the segment, bits shift
// in only while en is high, after W shifts the first bit sent sits in q[0]
// and sout, and bits leave in the order they entered.
module tb_cfg_chain_seg;
  localparam int unsigned W = 12;
  logic         clk = 0, rst_n = 0, en = 0, sin = 0, sout;
  logic [W-1:0] q, img;
  int           checks = 0, failures = 0;

  cfg_chain_seg #(.W(W)) dut (.clk, .rst_n, .en, .sin, .sout, .q);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    chk(q == '0, "reset value");
    rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      img = W'($urandom);
      for (int i = 0; i < W; i++) begin
        @(negedge clk); en = 1; sin = img[i];
      end
      @(negedge clk); en = 0;
      chk(q == img, $sformatf("parallel image %h vs %h", q, img));
      chk(sout == img[0], "sout is bit 0");
      repeat (3) @(negedge clk);
      chk(q == img, "holds while en is low");
      // shift out: bits appear at sout in the order they went in
      for (int i = 0; i < W; i++) begin
        chk(sout == img[i], $sformatf("serial out bit %0d", i));
        en = 1; sin = 0;
        @(negedge clk);
      end
      en = 0;
      chk(q == '0, "emptied");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
