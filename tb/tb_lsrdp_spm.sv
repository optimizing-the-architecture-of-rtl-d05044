// Self-checking test of lsrdp_spm (3 input banks, 2 output banks, 16 words):
// host writes and reads of every bank, ignored writes to output banks, a
// streaming run through a stand-in datapath with a fixed latency (one vector
// per clock in and out, results kept at offsets 0..n-1), an empty run, and
// the read-back of the results through the host port.
module tb_lsrdp_spm;
  import lsrdp_pkg::*;
  localparam int unsigned N_IN = 3, N_OUT = 2, DEPTH = 16, LAT = 4;
  localparam int unsigned OFF_W = 4, BANK_W = 3, AW = 7;

  logic            clk = 0, rst_n = 0;
  logic            h_en = 0, h_we = 0, h_rvalid;
  logic [AW-1:0]   h_addr = '0;
  word_t           h_wdata = '0, h_rdata;
  logic            run_start = 0, run_busy, run_done;
  logic [OFF_W:0]  run_len = '0;
  logic            arr_in_valid, arr_out_valid;
  word_t           arr_in_data [N_IN];
  word_t           arr_out_data[N_OUT];
  int              checks = 0, failures = 0, cycle = 0;

  lsrdp_spm #(.N_IN(N_IN), .N_OUT(N_OUT), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // stand-in datapath: out0 = in0 ^ in1, out1 = in2 + 1, LAT clocks later
  logic  vq [LAT];
  word_t dq [LAT][N_OUT];
  always @(posedge clk) begin
    vq[0] <= arr_in_valid;
    dq[0][0] <= arr_in_data[0] ^ arr_in_data[1];
    dq[0][1] <= arr_in_data[2] + 1;
    for (int i = 1; i < LAT; i++) begin vq[i] <= vq[i-1]; dq[i] <= dq[i-1]; end
  end
  assign arr_out_valid = vq[LAT-1] && rst_n;
  assign arr_out_data  = dq[LAT-1];

  task automatic chk(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic hwrite(int bank, int off, word_t d);
    @(negedge clk); h_en = 1; h_we = 1; h_addr = {BANK_W'(bank), OFF_W'(off)}; h_wdata = d;
    @(negedge clk); h_en = 0; h_we = 0;
  endtask

  task automatic hread(int bank, int off, output word_t d);
    @(negedge clk); h_en = 1; h_we = 0; h_addr = {BANK_W'(bank), OFF_W'(off)};
    @(negedge clk); h_en = 0;
    chk(h_rvalid, "read data valid one clock later");
    d = h_rdata;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t mem [N_IN][DEPTH];

  initial begin
    word_t d;
    int    t0, nin, n;
    for (int i = 0; i < LAT; i++) vq[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < N_IN; b++)
      for (int o = 0; o < DEPTH; o++) begin
        mem[b][o] = {$urandom, $urandom};
        hwrite(b, o, mem[b][o]);
      end
    for (int b = 0; b < N_IN; b++)
      for (int o = 0; o < DEPTH; o += 3) begin
        hread(b, o, d);
        chk(d == mem[b][o], $sformatf("host read bank %0d off %0d", b, o));
      end
    // streaming run of 10 vectors
    n = 10;
    @(negedge clk); run_start = 1; run_len = (OFF_W+1)'(n); t0 = cycle;
    @(negedge clk); run_start = 0;
    chk(run_busy, "busy after start");
    nin = 0;
    while (!run_done) begin
      @(posedge clk); #1;
      if (arr_in_valid) begin
        chk(arr_in_data[0] == mem[0][nin] && arr_in_data[1] == mem[1][nin] && arr_in_data[2] == mem[2][nin],
            $sformatf("vector %0d streamed", nin));
        nin++;
      end
    end
    chk(nin == n, "all vectors streamed");
    // start at t0, first vector at t0+2, then n vectors, LAT latency, done 1 later
    chk(cycle - t0 == n + LAT + 2, $sformatf("run took %0d clocks", cycle - t0));
    @(posedge clk); #1;
    chk(!run_busy && !run_done, "idle after done");
    // a write to an output bank is ignored
    hwrite(N_IN, 0, 64'hDEAD);
    for (int v = 0; v < n; v++) begin
      hread(N_IN, v, d);
      chk(d == (mem[0][v] ^ mem[1][v]), $sformatf("output bank 0 offset %0d", v));
      hread(N_IN + 1, v, d);
      chk(d == mem[2][v] + 1, $sformatf("output bank 1 offset %0d", v));
    end
    // empty run finishes at once
    @(negedge clk); run_start = 1; run_len = '0;
    @(negedge clk); run_start = 0;
    chk(run_done && !run_busy, "empty run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
