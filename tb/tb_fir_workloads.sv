// tb_fir_workloads: FIR filter and db2 wavelet workloads on the 8x8 array at
// its default size.
//
// Mapping (transposed-form FIR along the top row): every top-row CFU computes
// CU = In3 * CER0 + In0, i.e. it adds its tap's product to the partial sum
// arriving from the West and passes the result East through CU_reg. The
// sample stream is fed to all top-row CFUs from the North DMA at once; lanes
// of columns past a RAI element get it one beat later per RAI element, which
// makes up for the extra register that element puts in the partial-sum path.
// Tap k sits in CFU column 7-k, so up to 8 taps fit in one row. The second
// row receives the same samples one cycle later through GPR1/Out2 of the row
// above and runs a second filter on them, which gives the low-pass and
// high-pass halves of a db2 wavelet stage at once (decimated by 2 here).
// Results leave the East edge and are captured by the output DMA.
// Checked: every output against a direct-form FIR computed here, and the
// throughput: N outputs must take N plus a fixed pipeline latency (at most 16)
// cycles of execution.
module tb_fir_workloads;
  import syscore_pkg::*;
  localparam int R = 8, W = 22, NB = 2, NCOL = 8, CHAIN = 10, AW = 8;
  localparam int N = 200;   // samples per run

  logic clk = 0, rst_n = 0;
  logic row_on_we, cmd_valid, cmd_ready, cmd_coeff_sel, array_busy;
  logic [R-1:0] row_on_in;
  mode_e cmd_mode;
  logic [15:0] cmd_cycles;
  logic wdma_wr_en, wdma_start, wdma_busy;
  logic [AW-1:0] wdma_wr_addr, wdma_base;
  logic [3:0] wdma_wr_lane;
  logic [W-1:0] wdma_wr_data;
  logic [AW:0] wdma_len;
  logic ndma_wr_en, ndma_start, ndma_busy;
  logic [AW-1:0] ndma_wr_addr, ndma_base;
  logic [4:0] ndma_wr_lane;
  logic [W-1:0] ndma_wr_data;
  logic [AW:0] ndma_len;
  logic odma_start, odma_busy, odma_done;
  logic [AW-1:0] odma_base, odma_rd_addr;
  logic [AW:0] odma_len;
  logic [3:0] odma_rd_lane;
  logic [W-1:0] odma_rd_data;
  logic [NB-1:0][1:0][W-1:0] north_out;

  int checks = 0, failures = 0;

  syscore_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  function automatic logic [W-1:0] cw(int op, int a, int b, int c, int r0, int r1,
                                       int o0, int o1, int o2);
    return W'(op | (a << 3) | (b << 6) | (c << 9) | (r0 << 12) | (r1 << 14)
              | (o0 << 16) | (o1 << 18) | (o2 << 20));
  endfunction
  function automatic logic [W-1:0] rcw(int s0, int s1, int s2, int s3, int s4, int s5);
    return W'(s0 | (s1 << 2) | (s2 << 4) | (s3 << 6) | (s4 << 8) | (s5 << 11));
  endfunction
  function automatic int dly(int c);       // registers in front of column c
    return c + (c + 2) / 4;
  endfunction
  function automatic int rais_before(int c);
    return (c + 2) / 4;
  endfunction
  function automatic int east_pos(int c);
    return CHAIN - 1 - dly(c);
  endfunction
  function automatic int ncfu(int c, int k);
    return 10 * (c / 4) + 2 * (c % 4) + k;
  endfunction

  task automatic wput(int addr, int lane, logic [W-1:0] d);
    wdma_wr_en = 1; wdma_wr_addr = AW'(addr); wdma_wr_lane = 4'(lane); wdma_wr_data = d;
    tick(); wdma_wr_en = 0;
  endtask
  task automatic nput(int addr, int lane, logic [W-1:0] d);
    ndma_wr_en = 1; ndma_wr_addr = AW'(addr); ndma_wr_lane = 5'(lane); ndma_wr_data = d;
    tick(); ndma_wr_en = 0;
  endtask
  task automatic oget(int addr, int lane, output logic [W-1:0] v);
    odma_rd_addr = AW'(addr); odma_rd_lane = 4'(lane); tick(); v = odma_rd_data;
  endtask

  int exec_cycles;
  always @(posedge clk) if (array_busy && !dut.config_en && !dut.flush_en) exec_cycles++;

  task automatic issue(mode_e m, int cycles, int wbase, int wlen, int nbase, int nlen,
                       int obase, int olen);
    while (!cmd_ready) tick();
    cmd_valid = 1; cmd_mode = m; cmd_cycles = 16'(cycles); cmd_coeff_sel = 0;
    wdma_start = (wlen != 0); wdma_base = AW'(wbase); wdma_len = (AW + 1)'(wlen);
    ndma_start = (nlen != 0); ndma_base = AW'(nbase); ndma_len = (AW + 1)'(nlen);
    odma_start = (olen != 0); odma_base = AW'(obase); odma_len = (AW + 1)'(olen);
    tick();
    cmd_valid = 0; wdma_start = 0; ndma_start = 0; odma_start = 0;
    while (array_busy || odma_busy) tick();
  endtask

  // Configure rows 0 and 1 as FIRs with taps g0 (row 0) and g1 (row 1).
  task automatic configure_fir(int g0 [8], int g1 [8]);
    logic [W-1:0] word;
    // MAD: A = In3 (sample), B = CER0 (tap), C = In0 (partial sum);
    // GPR1 <- In3 and Out2 = GPR1 hand the samples to the row below.
    word = cw(3, 3, 4, 0, 2, 1, 0, 3, 2);
    for (int t = 0; t < CHAIN; t++) begin
      for (int c = 0; c < NCOL; c++) nput(t, ncfu(c, 0), word);
      for (int b = 0; b < NB; b++) nput(t, 10 * b + 8, rcw(0, 0, 0, 0, 2, 6));  // O4 <- I2
    end
    // tap k of a row goes to column 7-k
    for (int t = 0; t < CHAIN; t++)
      for (int r = 0; r < R; r++) begin
        logic [W-1:0] v = '0;
        for (int c = 0; c < NCOL; c++)
          if (east_pos(c) == t) v = (r == 0) ? W'(g0[7 - c]) : (r == 1) ? W'(g1[7 - c]) : '0;
        wput(t, 2 * r, v);
      end
    issue(MODE_CONFIG, CHAIN + 1, 0, CHAIN, 0, CHAIN, 0, 0);
  endtask

  // Stream N samples, capture both rows, compare. dec = 2 checks every other output.
  task automatic run_fir(string tag, int g0 [8], int g1 [8], int dec);
    int x [N];
    logic [W-1:0] y;
    longint e;
    int T;
    for (int n = 0; n < N; n++) x[n] = int'($urandom_range(0, 1000)) - 500;
    // beat j of column c carries x[j - rais_before(c)]
    for (int j = 0; j < N + 2; j++)
      for (int c = 0; c < NCOL; c++)
        nput(16 + j, ncfu(c, 1), (j - rais_before(c) >= 0 && j - rais_before(c) < N)
                                   ? W'(x[j - rais_before(c)]) : '0);
    T = N + 6;
    exec_cycles = 0;
    issue(MODE_EXEC, T, 0, 0, 16, N + 2, 16, T);
    checks++;
    if (exec_cycles - N > 16) begin
      failures++;
      $display("FAIL %s: %0d cycles for %0d samples", tag, exec_cycles, N);
    end
    $display("  %-22s %0d samples in %0d execution cycles", tag, N, exec_cycles);
    // y0[n] is captured in beat n+4, y1[n] (one cycle later) in beat n+5
    for (int n = 0; n < N; n += dec) begin
      e = 0;
      for (int k = 0; k < 8; k++) if (n - k >= 0) e += longint'(g0[k]) * longint'(x[n-k]);
      oget(16 + n + 4, 0, y);
      check({tag, " row 0"}, y, W'(e));
      e = 0;
      for (int k = 0; k < 8; k++) if (n - k >= 0) e += longint'(g1[k]) * longint'(x[n-k]);
      oget(16 + n + 5, 2, y);
      check({tag, " row 1"}, y, W'(e));
    end
  endtask

  initial begin
    int g0 [8], g1 [8];
    row_on_we = 0; row_on_in = '1; cmd_valid = 0; cmd_mode = MODE_IDLE; cmd_cycles = 0;
    cmd_coeff_sel = 0;
    wdma_wr_en = 0; wdma_wr_addr = 0; wdma_wr_lane = 0; wdma_wr_data = 0;
    wdma_start = 0; wdma_base = 0; wdma_len = 0;
    ndma_wr_en = 0; ndma_wr_addr = 0; ndma_wr_lane = 0; ndma_wr_data = 0;
    ndma_start = 0; ndma_base = 0; ndma_len = 0;
    odma_start = 0; odma_base = 0; odma_len = 0; odma_rd_addr = 0; odma_rd_lane = 0;
    #12 rst_n = 1; @(posedge clk); #1;

    // 5-tap FIR (row 0) and a second 5-tap FIR (row 1)
    for (int k = 0; k < 8; k++) begin
      g0[k] = (k < 5) ? int'($urandom_range(0, 200)) - 100 : 0;
      g1[k] = (k < 5) ? int'($urandom_range(0, 200)) - 100 : 0;
    end
    configure_fir(g0, g1);
    run_fir("FIR 5 taps", g0, g1, 1);

    // 8-tap FIR, the longest that fits one row
    for (int k = 0; k < 8; k++) begin
      g0[k] = int'($urandom_range(0, 200)) - 100;
      g1[k] = int'($urandom_range(0, 200)) - 100;
    end
    configure_fir(g0, g1);
    run_fir("FIR 8 taps", g0, g1, 1);

    // db2 analysis stage: low-pass and high-pass filters scaled by 2^11,
    // h = 0.4830, 0.8365, 0.2241, -0.1294; g[k] = (-1)^k h[3-k]
    g0 = '{989, 1713, 459, -265, 0, 0, 0, 0};
    g1 = '{-265, -459, 1713, -989, 0, 0, 0, 0};
    configure_fir(g0, g1);
    run_fir("db2 wavelet", g0, g1, 2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
