// End-to-end test of sfq_rdp_top at its default size (32 x 16 PEs, MCL 6, 19 inputs, 12 outputs, 256-word SPM banks).
//
// A behavioural main memory (random grant and read delays) holds the input
// vectors. The test then does what a host processor would: DMA the operand
// vectors into the SPM input banks, shift in the configuration bit-stream of
// two hand-mapped data flow graphs (a 1-D heat stencil
// r = u1 + k*((u0 + u2) + (-2)*u1) and a difference e = (u3 - u4) +/- 1),
// stream the vectors through the array, DMA the results back to main memory
// and compare them bit-exactly with the same operations in the simulator's
// double arithmetic. It then reconfigures the array (new k, SUB instead of
// ADD) and repeats. Counted mechanisms, each of which must occur: DMA in both
// directions, configuration load, reconfiguration, all four PE structures,
// immediate operands, subtraction and back-to-back streaming; the streaming
// run must take exactly NVEC + H + 3 clocks.
module tb_sfq_rdp_top_full;
  import lsrdp_pkg::*;

  localparam int unsigned W = 32, H = 16, MCL = 6, N_IN = 19, N_OUT = 12;
  localparam int unsigned SPM_DEPTH = 256, MEM_AW = 32;
  localparam int unsigned NORN   = 2 * (2 * MCL + 1);
  localparam int unsigned SEL_W  = $clog2(((NORN > N_IN) ? NORN : N_IN) + 2);
  localparam int unsigned TILE   = 3 * SEL_W + 2 + 1 + 64;
  localparam int unsigned OSEL_W = $clog2(2 * W + 1);
  localparam int unsigned CFG_BITS = W * H * TILE + N_OUT * OSEL_W;
  localparam int unsigned ZERO   = (1 << SEL_W) - 1;
  localparam int unsigned OFF_W  = $clog2(SPM_DEPTH);
  localparam int unsigned SPM_AW = $clog2(N_IN + N_OUT) + OFF_W;
  localparam int unsigned NVEC   = 64;
  localparam int unsigned IN_BASE = 0, OUT_BASE = 4096;

  logic              clk = 0, rst_n = 0;
  logic              cfg_en = 0, cfg_in = 0, cfg_out;
  logic              dma_start = 0, dma_dir = 0, dma_busy, dma_done;
  logic [MEM_AW-1:0] dma_mem_addr = '0;
  logic [SPM_AW-1:0] dma_spm_addr = '0;
  logic [15:0]       dma_len = '0;
  logic              run_start = 0, run_busy, run_done;
  logic [OFF_W:0]    run_len = '0;
  logic              m_req, m_we, m_gnt, m_rvalid;
  logic [MEM_AW-1:0] m_addr;
  word_t             m_wdata, m_rdata;
  int                checks = 0, failures = 0, cycle = 0;

  sfq_rdp_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ---------------- main memory model ----------------
  word_t mem [8192];
  int    wait_g = 0, wait_r = -1;
  logic [MEM_AW-1:0] raddr;
  always @(posedge clk) begin
    m_gnt    <= 0;
    m_rvalid <= 0;
    if (wait_r == 0) begin m_rvalid <= 1; m_rdata <= mem[raddr[12:0]]; wait_r = -1; end
    else if (wait_r > 0) wait_r--;
    if (m_req && !m_gnt) begin
      if (wait_g == 0) begin
        m_gnt <= 1;
        wait_g = $urandom % 2;
        if (m_we) mem[m_addr[12:0]] = m_wdata;
        else begin raddr = m_addr; wait_r = $urandom % 2; end
      end else wait_g--;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_mode[4], n_sub, n_imm, n_cfg, n_reconf, n_dma_in, n_dma_out, n_stream;

  // ---------------- configuration image ----------------
  logic [CFG_BITS-1:0] img;

  function automatic int unsigned up(int src, int c, int m);
    return 2 * (src - c + MCL) + m;
  endfunction

  task automatic set_tile(int r, int c, int unsigned s0, int unsigned s1, int unsigned s2,
                          pe_mode_e mode, logic sub, word_t imm);
    int unsigned b;
    b = (r * W + c) * TILE;
    img[b +: SEL_W]            = SEL_W'(s0);
    img[b + SEL_W +: SEL_W]    = SEL_W'(s1);
    img[b + 2*SEL_W +: SEL_W]  = SEL_W'(s2);
    img[b + 3*SEL_W +: 2]      = mode;
    img[b + 3*SEL_W + 2]       = sub;
    img[b + 3*SEL_W + 3 +: 64] = imm;
    n_mode[mode]++;
    if (sub) n_sub++;
  endtask

  task automatic set_out(int o, int unsigned code);
    img[W * H * TILE + o * OSEL_W +: OSEL_W] = OSEL_W'(code);
  endtask

  task automatic build(real k, logic sub2);
    img = '0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        set_tile(r, c, ZERO, ZERO, ZERO, PE_T, 1'b0, '0);
    for (int m = 0; m < 4; m++) n_mode[m] = 0;
    n_sub = 0;
    set_tile(0, 0, 0, 2, 1, PE_FU_T, 1'b0, '0);
    set_tile(0, 1, 1, N_IN, ZERO, PE_FU, 1'b0, $realtobits(-2.0));
    set_tile(1, 1, up(0,1,0), up(1,1,0), up(0,1,1), PE_FU_T, 1'b0, '0);
    set_tile(2, 1, up(1,1,0), NORN, up(1,1,1), PE_FU_T, 1'b0, $realtobits(k));
    set_tile(3, 1, up(1,1,0), up(1,1,1), ZERO, PE_FU, 1'b0, '0);
    for (int r = 4; r < H; r++) set_tile(r, 1, up(1,1,0), ZERO, ZERO, PE_T_T, 1'b0, '0);
    set_tile(0, 6, N_IN - 2, N_IN - 1, ZERO, PE_FU, 1'b1, '0);
    set_tile(1, 4, up(6,4,0), ZERO, ZERO, PE_T_T, 1'b0, '0);
    set_tile(2, 4, up(4,4,0), NORN, ZERO, PE_FU, sub2, $realtobits(1.0));
    set_tile(3, 4, ZERO, ZERO, up(4,4,0), PE_T, 1'b0, '0);
    for (int r = 4; r < H; r++) set_tile(r, 4, ZERO, ZERO, up(4,4,1), PE_T, 1'b0, '0);
    n_imm += 3;
    set_out(0, 2 * 1 + 0);
    set_out(1, 2 * 4 + 1);
    for (int o = 2; o < N_OUT; o++) set_out(o, (o % 2 == 0) ? 2 * (W - 1) : (1 << OSEL_W) - 1);
  endtask

  task automatic load_cfg(output logic [CFG_BITS-1:0] shifted_out);
    for (int i = 0; i < CFG_BITS; i++) begin
      @(negedge clk);
      shifted_out[i] = cfg_out;
      cfg_en = 1; cfg_in = img[i];
    end
    @(negedge clk);
    cfg_en = 0;
    n_cfg++;
  endtask

  task automatic dma(logic dir, int maddr, int bank, int n);
    @(negedge clk);
    dma_start = 1; dma_dir = dir; dma_mem_addr = MEM_AW'(maddr);
    dma_spm_addr = {($clog2(N_IN + N_OUT))'(bank), OFF_W'(0)}; dma_len = 16'(n);
    @(negedge clk);
    dma_start = 0;
    while (!dma_done) @(negedge clk);
    if (dir) n_dma_out++; else n_dma_in++;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pass(real k, logic sub2);
    int t0;
    // operands into main memory, then into the SPM input banks
    for (int p = 0; p < N_IN; p++)
      for (int v = 0; v < NVEC; v++)
        mem[IN_BASE + p * NVEC + v] = $realtobits(real'(int'($urandom % 4000) - 2000) / 16.0 + 0.001 * real'(v));
    for (int p = 0; p < N_IN; p++) dma(1'b0, IN_BASE + p * NVEC, p, NVEC);
    // stream
    @(negedge clk);
    run_start = 1; run_len = (OFF_W+1)'(NVEC); t0 = cycle;
    @(negedge clk);
    run_start = 0;
    while (!run_done) begin @(posedge clk); #1; end
    chk(cycle - t0 == NVEC + H + 3, $sformatf("run took %0d clocks, expected %0d", cycle - t0, NVEC + H + 3));
    n_stream++;
    // results back to main memory
    for (int o = 0; o < N_OUT; o++) dma(1'b1, OUT_BASE + o * NVEC, N_IN + o, NVEC);
    for (int v = 0; v < NVEC; v++) begin
      real u0, u1, u2, u3, u4, a, t, s, p, r, d, e;
      u0 = $bitstoreal(mem[IN_BASE + 0 * NVEC + v]);
      u1 = $bitstoreal(mem[IN_BASE + 1 * NVEC + v]);
      u2 = $bitstoreal(mem[IN_BASE + 2 * NVEC + v]);
      u3 = $bitstoreal(mem[IN_BASE + (N_IN - 2) * NVEC + v]);
      u4 = $bitstoreal(mem[IN_BASE + (N_IN - 1) * NVEC + v]);
      a = u0 + u2; t = u1 * -2.0; s = a + t; p = s * k; r = p + u1;
      d = u3 - u4; e = sub2 ? d - 1.0 : d + 1.0;
      chk(mem[OUT_BASE + v] == $realtobits(r), $sformatf("heat result %0d: %h vs %h", v, mem[OUT_BASE + v], $realtobits(r)));
      chk(mem[OUT_BASE + NVEC + v] == $realtobits(e), $sformatf("difference result %0d", v));
      for (int o = 2; o < N_OUT; o++) chk(mem[OUT_BASE + o * NVEC + v] == '0, "unused output is zero");
    end
  endtask

  initial begin
    logic [CFG_BITS-1:0] first, back;
    n_sub = 0; n_imm = 0; n_cfg = 0; n_reconf = 0; n_dma_in = 0; n_dma_out = 0; n_stream = 0;
    m_rdata = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    build(0.25, 1'b0);
    first = img;
    load_cfg(back);
    pass(0.25, 1'b0);
    build(-1.5, 1'b1);
    load_cfg(back);
    n_reconf++;
    chk(back == first, "configuration chain replays the previous bit-stream");
    pass(-1.5, 1'b1);
    for (int m = 0; m < 4; m++) chk(n_mode[m] > 0, $sformatf("PE structure %0d used", m));
    chk(n_sub > 0, "subtraction used");
    chk(n_imm > 0, "immediate operands used");
    chk(n_cfg == 2 && n_reconf == 1, "configuration and reconfiguration");
    chk(n_dma_in == 2 * N_IN && n_dma_out == 2 * N_OUT, "DMA in both directions");
    chk(n_stream == 2, "streaming runs");
    $display("config loads %0d (reconfigurations %0d), DMA in/out %0d/%0d, runs %0d, FU/T/FU+T/T+T tiles %0d/%0d/%0d/%0d, config bits %0d",
             n_cfg, n_reconf, n_dma_in, n_dma_out, n_stream, n_mode[0], n_mode[1], n_mode[2], n_mode[3], CFG_BITS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
