// Self-checking test of lsrdp_dma with a main memory model that grants after
// a random wait and returns read data a random number of clocks later, and an
// SPM model with a one-clock read. Copies memory -> SPM and SPM -> memory,
// checks every word, that nothing outside the block is touched, the busy/done
// timing and a zero-length command.
module tb_lsrdp_dma;
  import lsrdp_pkg::*;
  localparam int unsigned MEM_AW = 16, SPM_AW = 8, LEN_W = 16;

  logic              clk = 0, rst_n = 0;
  logic              start = 0, dir = 0, busy, done;
  logic [MEM_AW-1:0] mem_addr = '0;
  logic [SPM_AW-1:0] spm_addr = '0;
  logic [LEN_W-1:0]  len = '0;
  logic              m_req, m_we, m_gnt, m_rvalid;
  logic [MEM_AW-1:0] m_addr;
  word_t             m_wdata, m_rdata;
  logic              s_en, s_we, s_rvalid;
  logic [SPM_AW-1:0] s_addr;
  word_t             s_wdata, s_rdata;
  int                checks = 0, failures = 0;

  lsrdp_dma #(.MEM_AW(MEM_AW), .SPM_AW(SPM_AW), .LEN_W(LEN_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // main memory model
  word_t mem [1024];
  word_t spm [256];
  int    wait_g = 0, wait_r = -1;
  logic [MEM_AW-1:0] raddr;
  always @(posedge clk) begin
    m_gnt    <= 0;
    m_rvalid <= 0;
    // read data come one to three clocks after the grant
    if (wait_r == 0) begin m_rvalid <= 1; m_rdata <= mem[raddr]; wait_r = -1; end
    else if (wait_r > 0) wait_r--;
    if (m_req && !m_gnt) begin
      if (wait_g == 0) begin
        m_gnt <= 1;
        wait_g = $urandom % 3;
        if (m_we) mem[m_addr] = m_wdata;
        else begin raddr = m_addr; wait_r = $urandom % 3; end
      end else wait_g--;
    end
  end
  // SPM model
  always @(posedge clk) begin
    s_rvalid <= s_en && !s_we;
    if (s_en && s_we) spm[s_addr] <= s_wdata;
    if (s_en && !s_we) s_rdata <= spm[s_addr];
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmd(logic d, int ma, int sa, int n);
    @(negedge clk);
    start = 1; dir = d; mem_addr = MEM_AW'(ma); spm_addr = SPM_AW'(sa); len = LEN_W'(n);
    @(negedge clk);
    start = 0;
    if (n > 0) chk(busy, "busy after start");
    while (!done) @(negedge clk);
    chk(!busy || n == 0, "done ends busy");
  endtask

  initial begin
    word_t mem0 [1024];
    word_t spm0 [256];
    for (int i = 0; i < 1024; i++) mem[i] = {$urandom, $urandom};
    for (int i = 0; i < 256; i++) spm[i] = {$urandom, $urandom};
    m_rdata = '0; s_rdata = '0; m_gnt = 0; m_rvalid = 0; s_rvalid = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    mem0 = mem; spm0 = spm;
    cmd(1'b0, 100, 20, 37);   // memory -> SPM
    for (int i = 0; i < 256; i++)
      chk(spm[i] == ((i >= 20 && i < 57) ? mem0[100 + i - 20] : spm0[i]), $sformatf("spm word %0d", i));
    spm0 = spm;
    cmd(1'b1, 500, 30, 25);   // SPM -> memory
    for (int i = 0; i < 1024; i++)
      chk(mem[i] == ((i >= 500 && i < 525) ? spm0[30 + i - 500] : mem0[i]), $sformatf("mem word %0d", i));
    mem0 = mem;
    cmd(1'b0, 0, 0, 0);       // nothing moves
    chk(mem == mem0 && spm == spm0, "zero-length command moves nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
