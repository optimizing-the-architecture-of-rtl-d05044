// Self-checking test of lsrdp_array at a reduced size (8 x 5 PEs, MCL 2,
// 6 inputs, 4 outputs). Two small data flow graphs are mapped by hand and
// shifted in through the serial chain:
//   1-D heat stencil  r = u1 + k*((u0 + u2) + (-2)*u1)   (columns 0..1)
//   difference        e = (u3 - u4) +/- 1                (columns 6 -> 4)
// using every PE structure (FU, T, FU+T, T+T), ADD, SUB, MUL, immediate
// operands, a connection of the full MCL length, and zero codes. Vectors are
// streamed one per clock; every result is compared bit-exactly with the same
// operation order done in the simulator's double arithmetic, and must leave
// exactly H+1 clocks after it entered. The array is then reconfigured with a
// new k and SUB instead of ADD, while the chain's output must replay the
// first bit-stream bit by bit.
module tb_lsrdp_array;
  import lsrdp_pkg::*;

  localparam int unsigned W = 8, H = 5, MCL = 2, N_IN = 6, N_OUT = 4;
  localparam int unsigned NORN  = 2 * (2 * MCL + 1);
  localparam int unsigned SEL_W = $clog2(((NORN > N_IN) ? NORN : N_IN) + 2);
  localparam int unsigned TILE  = 3 * SEL_W + 2 + 1 + 64;
  localparam int unsigned OSEL_W = $clog2(2 * W + 1);
  localparam int unsigned CFG_BITS = W * H * TILE + N_OUT * OSEL_W;
  localparam int unsigned ZERO  = (1 << SEL_W) - 1;
  localparam int unsigned NVEC  = 40;

  logic  clk = 0, rst_n = 0, cfg_en = 0, cfg_in = 0, cfg_out;
  logic  in_valid = 0, out_valid;
  word_t in_data [N_IN];
  word_t out_data[N_OUT];
  int    checks = 0, failures = 0;
  int    cycle = 0;

  lsrdp_array #(.W(W), .H(H), .MCL(MCL), .N_IN(N_IN), .N_OUT(N_OUT)) dut (
    .clk, .rst_n, .cfg_en, .cfg_in, .cfg_out, .in_valid, .in_data, .out_valid, .out_data
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  logic [CFG_BITS-1:0] img;
  int n_mode[4], n_sub, n_imm, n_reconf, n_stream;

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // ORN code of output m of column src in the row above, seen from column c
  function automatic int unsigned up(int src, int c, int m);
    return 2 * (src - c + MCL) + m;
  endfunction

  task automatic set_tile(int r, int c, int unsigned s0, int unsigned s1, int unsigned s2,
                          pe_mode_e mode, logic sub, word_t imm);
    int unsigned b;
    b = (r * W + c) * TILE;
    img[b +: SEL_W]           = SEL_W'(s0);
    img[b + SEL_W +: SEL_W]   = SEL_W'(s1);
    img[b + 2*SEL_W +: SEL_W] = SEL_W'(s2);
    img[b + 3*SEL_W +: 2]     = mode;
    img[b + 3*SEL_W + 2]      = sub;
    img[b + 3*SEL_W + 3 +: 64] = imm;
    n_mode[mode]++;
    if (sub) n_sub++;
  endtask

  task automatic set_out(int o, int unsigned code);
    img[W * H * TILE + o * OSEL_W +: OSEL_W] = OSEL_W'(code);
  endtask

  // Builds the configuration for coefficient k; sub2 chooses e = d - 1.
  task automatic build(real k, logic sub2);
    img = '0;
    // every unused tile: all selects zero-code, structure T
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        set_tile(r, c, ZERO, ZERO, ZERO, PE_T, 1'b0, '0);
    for (int m = 0; m < 4; m++) n_mode[m] = 0;
    n_sub = 0;
    // heat stencil
    set_tile(0, 0, 0, 2, 1, PE_FU_T, 1'b0, '0);                       // a = u0+u2, pass u1
    set_tile(0, 1, 1, N_IN, ZERO, PE_FU, 1'b0, $realtobits(-2.0));     // t = u1*(-2)
    set_tile(1, 1, up(0,1,0), up(1,1,0), up(0,1,1), PE_FU_T, 1'b0, '0); // s = a+t, pass u1
    set_tile(2, 1, up(1,1,0), NORN, up(1,1,1), PE_FU_T, 1'b0, $realtobits(k)); // p = s*k
    set_tile(3, 1, up(1,1,0), up(1,1,1), ZERO, PE_FU, 1'b0, '0);      // r = p+u1
    for (int r = 4; r < H; r++)
      set_tile(r, 1, up(1,1,0), ZERO, ZERO, PE_T_T, 1'b0, '0);       // carry r down
    // difference
    set_tile(0, 6, N_IN - 2, N_IN - 1, ZERO, PE_FU, 1'b1, '0);        // d = u3-u4
    set_tile(1, 4, up(6,4,0), ZERO, ZERO, PE_T_T, 1'b0, '0);          // longest hop
    set_tile(2, 4, up(4,4,0), NORN, ZERO, PE_FU, sub2, $realtobits(1.0));
    set_tile(3, 4, ZERO, ZERO, up(4,4,0), PE_T, 1'b0, '0);
    for (int r = 4; r < H; r++)
      set_tile(r, 4, ZERO, ZERO, up(4,4,1), PE_T, 1'b0, '0);
    n_imm += 3;
    set_out(0, 2 * 1 + 0);
    set_out(1, 2 * 4 + 1);
    set_out(2, 2 * 0 + 1);          // an idle PE: zero
    set_out(3, (1 << OSEL_W) - 1);  // zero code
  endtask

  // Shifts img in; returns the bits that left the chain meanwhile.
  task automatic load(output logic [CFG_BITS-1:0] shifted_out);
    for (int i = 0; i < CFG_BITS; i++) begin
      @(negedge clk);
      shifted_out[i] = cfg_out;
      cfg_en = 1; cfg_in = img[i];
    end
    @(negedge clk);
    cfg_en = 0;
  endtask

  real   u [NVEC][N_IN];
  int    t_in [NVEC];

  task automatic run(real k, logic sub2);
    int got;
    got = 0;
    fork
      begin
        for (int v = 0; v < NVEC; v++) begin
          @(negedge clk);
          in_valid = 1;
          for (int p = 0; p < N_IN; p++) begin
            u[v][p] = real'(int'($urandom % 4000) - 2000) / 16.0 + 0.001 * real'(v);
            in_data[p] = $realtobits(u[v][p]);
          end
          t_in[v] = cycle;
          n_stream++;
        end
        @(negedge clk);
        in_valid = 0;
      end
      begin
        while (got < NVEC) begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            real a, t, s, p, r, d, e;
            a = u[got][0] + u[got][2];
            t = u[got][1] * -2.0;
            s = a + t;
            p = s * k;
            r = p + u[got][1];
            d = u[got][N_IN-2] - u[got][N_IN-1];
            e = sub2 ? d - 1.0 : d + 1.0;
            chk(out_data[0] == $realtobits(r), $sformatf("heat vec %0d: %h vs %h", got, out_data[0], $realtobits(r)));
            chk(out_data[1] == $realtobits(e), $sformatf("diff vec %0d", got));
            chk(out_data[2] == '0 && out_data[3] == '0, "idle outputs are zero");
            chk(cycle - t_in[got] == H + 1, $sformatf("latency %0d", cycle - t_in[got]));
            got++;
          end
        end
      end
    join
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CFG_BITS-1:0] first, back;
    for (int p = 0; p < N_IN; p++) in_data[p] = '0;
    n_imm = 0; n_reconf = 0; n_stream = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    build(0.25, 1'b0);
    first = img;
    load(back);
    run(0.25, 1'b0);
    // reconfigure: old bit-stream must come out of the chain in order
    build(-1.5, 1'b1);
    load(back);
    n_reconf++;
    chk(back == first, "chain replays the previous bit-stream");
    run(-1.5, 1'b1);
    // every mechanism must have happened
    for (int m = 0; m < 4; m++) chk(n_mode[m] > 0, $sformatf("structure %0d used", m));
    chk(n_sub > 0 && n_imm > 0 && n_reconf > 0 && n_stream == 2 * NVEC, "sub, immediate, reconfiguration, streaming");
    $display("structures FU/T/FU+T/T+T tiles: %0d/%0d/%0d/%0d, reconfigurations %0d, vectors %0d",
             n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_reconf, n_stream);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
