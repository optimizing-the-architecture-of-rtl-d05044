// Benchmark-kernel test of lsrdp_array at its default (medium) size.
//
// Four update kernels of the kind the array is meant for are mapped by hand
// side by side in one configuration and streamed together, 64 vectors:
//   heat      (columns 0-1)  r = u1 + k*((u0 + u2) + (-2)*u1)
//   Poisson   (columns 8-10) r = 0.25*((n + s) + (e + w)) - c*f
//   vibration (columns 16-19) r = v*((u0 + u2) + (-2)*u1) + ((u1 + u1) - w)
//   ERI step  (columns 24-29) r = (PA*x0 + WP*x1) + hz*(x2 - rz*x3)
// Their 18 operands use input ports 0..17 and results leave at output ports
// 0..3; each result is compared bit-exactly with the same operation order in
// the simulator's double arithmetic, and must appear H+1 clocks after its
// operands.
module tb_lsrdp_workloads;
  import lsrdp_pkg::*;

  localparam int unsigned W = 32, H = 16, MCL = 6, N_IN = 19, N_OUT = 12;
  localparam int unsigned NORN   = 2 * (2 * MCL + 1);
  localparam int unsigned SEL_W  = $clog2(((NORN > N_IN) ? NORN : N_IN) + 2);
  localparam int unsigned TILE   = 3 * SEL_W + 2 + 1 + 64;
  localparam int unsigned OSEL_W = $clog2(2 * W + 1);
  localparam int unsigned CFG_BITS = W * H * TILE + N_OUT * OSEL_W;
  localparam int unsigned ZERO   = (1 << SEL_W) - 1;
  localparam int unsigned NVEC   = 64;
  localparam real K = 0.125, CF = 0.0625, V = 0.3, RZ = 0.75, HZ = 1.5;

  logic  clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic  in_valid = 0, out_valid;
  word_t in_data [N_IN];
  word_t out_data[N_OUT];
  int    checks = 0, failures = 0, cycle = 0;

  lsrdp_array dut (.clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .in_valid, .in_data, .out_valid, .out_data);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [CFG_BITS-1:0] img;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic int unsigned up(int src, int c, int m);
    return 2 * (src - c + MCL) + m;
  endfunction

  task automatic tile(int r, int c, int unsigned s0, int unsigned s1, int unsigned s2,
                      pe_mode_e mode, logic sub, word_t imm);
    int unsigned b;
    b = (r * W + c) * TILE;
    img[b +: SEL_W]            = SEL_W'(s0);
    img[b + SEL_W +: SEL_W]    = SEL_W'(s1);
    img[b + 2*SEL_W +: SEL_W]  = SEL_W'(s2);
    img[b + 3*SEL_W +: 2]      = mode;
    img[b + 3*SEL_W + 2]       = sub;
    img[b + 3*SEL_W + 3 +: 64] = imm;
  endtask

  // carries out0 of (r0-1, c) down to the last row
  task automatic carry(int r0, int c);
    for (int r = r0; r < H; r++) tile(r, c, up(c, c, 0), ZERO, ZERO, PE_T_T, 1'b0, '0);
  endtask

  task automatic build();
    img = '0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) tile(r, c, ZERO, ZERO, ZERO, PE_T, 1'b0, '0);
    // heat: ports 0..2
    tile(0, 0, 0, 2, 1, PE_FU_T, 0, '0);
    tile(0, 1, 1, N_IN, ZERO, PE_FU, 0, $realtobits(-2.0));
    tile(1, 1, up(0,1,0), up(1,1,0), up(0,1,1), PE_FU_T, 0, '0);
    tile(2, 1, up(1,1,0), NORN, up(1,1,1), PE_FU_T, 0, $realtobits(K));
    tile(3, 1, up(1,1,0), up(1,1,1), ZERO, PE_FU, 0, '0);
    carry(4, 1);
    // Poisson: ports 3..7 = n, s, e, w, f
    tile(0, 8, 3, 4, ZERO, PE_FU, 0, '0);
    tile(0, 10, 5, 6, ZERO, PE_FU, 0, '0);
    tile(0, 9, 7, N_IN, ZERO, PE_FU, 0, $realtobits(CF));
    tile(1, 9, up(8,9,0), up(10,9,0), up(9,9,0), PE_FU_T, 0, '0);
    tile(2, 9, up(9,9,0), NORN, up(9,9,1), PE_FU_T, 0, $realtobits(0.25));
    tile(3, 9, up(9,9,0), up(9,9,1), ZERO, PE_FU, 1, '0);
    carry(4, 9);
    // vibration: ports 8..11 = u0, u1, u2, w
    tile(0, 16, 8, 10, ZERO, PE_FU, 0, '0);
    tile(0, 17, 9, N_IN, 11, PE_FU_T, 0, $realtobits(-2.0));
    tile(0, 18, 9, 9, ZERO, PE_FU, 0, '0);
    tile(1, 17, up(16,17,0), up(17,17,0), ZERO, PE_FU, 0, '0);
    tile(1, 19, up(18,19,0), up(17,19,1), ZERO, PE_FU, 1, '0);
    tile(2, 17, up(17,17,0), NORN, ZERO, PE_FU, 0, $realtobits(V));
    tile(2, 19, ZERO, ZERO, up(19,19,0), PE_T, 0, '0);
    tile(3, 17, up(17,17,0), up(19,17,1), ZERO, PE_FU, 0, '0);
    carry(4, 17);
    // ERI recursion step: ports 12..17 = PA, WP, x0, x1, x2, x3
    tile(0, 25, 12, 14, ZERO, PE_FU, 0, '0);
    tile(0, 27, 13, 15, ZERO, PE_FU, 0, '0);
    tile(0, 29, 17, N_IN, 16, PE_FU_T, 0, $realtobits(RZ));
    tile(1, 25, up(25,25,0), up(27,25,0), ZERO, PE_FU, 0, '0);
    tile(1, 29, up(29,29,1), up(29,29,0), ZERO, PE_FU, 1, '0);
    tile(2, 25, ZERO, ZERO, up(25,25,0), PE_T, 0, '0);
    tile(2, 29, up(29,29,0), NORN, ZERO, PE_FU, 0, $realtobits(HZ));
    tile(3, 27, up(25,27,1), up(29,27,0), ZERO, PE_FU, 0, '0);
    carry(4, 27);
    // outputs
    img[W*H*TILE + 0*OSEL_W +: OSEL_W] = OSEL_W'(2 * 1);
    img[W*H*TILE + 1*OSEL_W +: OSEL_W] = OSEL_W'(2 * 9);
    img[W*H*TILE + 2*OSEL_W +: OSEL_W] = OSEL_W'(2 * 17);
    img[W*H*TILE + 3*OSEL_W +: OSEL_W] = OSEL_W'(2 * 27);
    for (int o = 4; o < N_OUT; o++) img[W*H*TILE + o*OSEL_W +: OSEL_W] = '1;
  endtask

  real u [NVEC][N_IN];
  int  t_in [NVEC];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int got;
    for (int p = 0; p < N_IN; p++) in_data[p] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    build();
    for (int i = 0; i < CFG_BITS; i++) begin
      @(negedge clk); cfg_en = 1; cfg_in = img[i];
    end
    @(negedge clk); cfg_en = 0;
    got = 0;
    fork
      for (int v = 0; v < NVEC; v++) begin
        @(negedge clk);
        in_valid = 1;
        for (int p = 0; p < N_IN; p++) begin
          u[v][p] = real'(int'($urandom % 20000) - 10000) / 256.0 + 0.0001 * real'(p + 1);
          in_data[p] = $realtobits(u[v][p]);
        end
        t_in[v] = cycle;
        if (v == NVEC - 1) begin @(negedge clk); in_valid = 0; end
      end
      while (got < NVEC) begin
        @(posedge clk); #1;
        if (out_valid) begin
          real e_heat, e_poi, e_vib, e_eri;
          real a, t, s, b, q, g, d;
          // heat
          a = u[got][0] + u[got][2]; t = u[got][1] * -2.0; s = a + t;
          e_heat = s * K + u[got][1];
          // Poisson
          a = u[got][3] + u[got][4]; b = u[got][5] + u[got][6]; t = u[got][7] * CF;
          s = a + b; e_poi = s * 0.25 - t;
          // vibration
          a = u[got][8] + u[got][10]; t = u[got][9] * -2.0; q = u[got][9] + u[got][9];
          s = a + t; g = q - u[got][11]; e_vib = s * V + g;
          // ERI
          a = u[got][12] * u[got][14]; b = u[got][13] * u[got][15]; t = u[got][17] * RZ;
          s = a + b; d = u[got][16] - t; e_eri = s + d * HZ;
          chk(out_data[0] == $realtobits(e_heat), $sformatf("heat %0d", got));
          chk(out_data[1] == $realtobits(e_poi),  $sformatf("Poisson %0d", got));
          chk(out_data[2] == $realtobits(e_vib),  $sformatf("vibration %0d", got));
          chk(out_data[3] == $realtobits(e_eri),  $sformatf("ERI %0d", got));
          chk(cycle - t_in[got] == H + 1, "latency");
          got++;
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
