// tb_syscore_top: end-to-end testbench of the 8x8 SYSCORE array at its
// default size, driven only through the DMA buffers and mode commands.
//
// Phase 1  coefficient cascade (MULC in every CFU): configuration words are
//          shifted down the columns from the North DMA while coefficients are
//          shifted along the rows from the West DMA. A stream of samples then
//          passes every CFU of a row, each multiplying by its coefficient;
//          the output DMA captures the East edge. The RAI column of the first
//          block also carries row 7's partial product up to the North output.
// Phase 2  8x8 matrix multiply, output stationary, with A crossing each RAI
//          column on a cross route; results are flushed out of the East edge.
// Phase 3  the same product with row 3 powered off during execution: rows
//          0-2 still compute, row 3 keeps its cleared accumulator and the rows
//          below it receive no B operands.
// Expected values are computed here. Latencies follow from the pipeline:
// 10 registers per row (8 CFUs, 2 RAI elements). Each mechanism (configuration
// shift, coefficient load, execution, flush, power off, RAI cross route, RAI
// vertical route, DMA transfers) is counted, and one that never happened is
// a failure.
module tb_syscore_top;
  import syscore_pkg::*;
  localparam int R = 8, W = 22, NB = 2, K = 8;
  localparam int NCOL = 4 * NB;     // CFU columns
  localparam int CHAIN = NCOL + NB; // registers along a row
  localparam int AW = 8;

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
  int n_cfg_cycles = 0, n_coeff_loads = 0, n_exec_cycles = 0, n_flush_cycles = 0;
  int n_off_cycles = 0, n_cross = 0, n_vertical = 0, n_odma_done = 0;

  syscore_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) begin
    if (dut.config_en) n_cfg_cycles++;
    if (dut.config_en && dut.g_blk[0].u_block.cfu_i[0][0][0] != '0) n_coeff_loads++;
    if (array_busy && !dut.config_en && !dut.flush_en) n_exec_cycles++;
    if (dut.flush_en) n_flush_cycles++;
    if (array_busy && dut.row_en != '1) n_off_cycles++;
    if (odma_done) n_odma_done++;
    if (array_busy && !dut.config_en && !dut.flush_en
        && dut.g_blk[1].u_block.g_row[0].u_rai.cfg.o4 == 3'd3
        && dut.g_blk[1].u_block.rai_i[0][3] != '0) n_cross++;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask
  task automatic check_count(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
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

  // registers in front of CFU column c along a row
  function automatic int dly(int c);
    return c + (c + 2) / 4;
  endfunction
  // position of CFU column c in the flush / coefficient chain, counted from East
  function automatic int east_pos(int c);
    return CHAIN - 1 - dly(c);
  endfunction

  task automatic wput(int addr, int lane, logic [W-1:0] d);
    wdma_wr_en = 1; wdma_wr_addr = AW'(addr); wdma_wr_lane = 4'(lane); wdma_wr_data = d;
    tick(); wdma_wr_en = 0;
  endtask
  task automatic nput(int addr, int lane, logic [W-1:0] d);
    ndma_wr_en = 1; ndma_wr_addr = AW'(addr); ndma_wr_lane = 5'(lane); ndma_wr_data = d;
    tick(); ndma_wr_en = 0;
  endtask
  // North DMA lane of CFU column c, port In(2+k); of the RAI column of block b
  function automatic int ncfu(int c, int k);
    return 10 * (c / 4) + 2 * (c % 4) + k;
  endfunction
  function automatic int nrai(int b);
    return 10 * b + 8;
  endfunction

  // Start a mode command together with the DMAs (len 0 = not started).
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

  task automatic oget(int addr, int lane, output logic [W-1:0] v);
    odma_rd_addr = AW'(addr); odma_rd_lane = 4'(lane); tick(); v = odma_rd_data;
  endtask

  // Write one configuration pass into the DMA buffers at base 0:
  // North beats 0..CHAIN-1 (bottom row last-but-...), West beats = coefficients.
  task automatic load_config(logic [W-1:0] cfu_word [R][NCOL], logic [W-1:0] rai_word [R][NB],
                             logic [W-1:0] coef [R][NCOL]);
    // CHAIN shift cycles: the column chain is R long, so the first CHAIN-R
    // beats fall off the bottom; beat CHAIN-1-r ends in row r.
    for (int t = 0; t < CHAIN; t++) begin
      int r = CHAIN - 1 - t;
      for (int c = 0; c < NCOL; c++) nput(t, ncfu(c, 0), (r < R) ? cfu_word[r][c] : '0);
      for (int b = 0; b < NB; b++)  nput(t, nrai(b), (r < R) ? rai_word[r][b] : '0);
    end
    // row chain: beat t ends at chain position (from East) t
    for (int rr = 0; rr < R; rr++)
      for (int t = 0; t < CHAIN; t++) begin
        logic [W-1:0] v = '0;
        for (int c = 0; c < NCOL; c++) if (east_pos(c) == t) v = coef[rr][c];
        wput(t, 2 * rr, v);
      end
  endtask

  logic [W-1:0] cfu_word [R][NCOL];
  logic [W-1:0] rai_word [R][NB];
  logic [W-1:0] coef [R][NCOL];
  int a [R][K];
  int b [K][NCOL];

  task automatic run_matmul(logic [R-1:0] exec_mask, string tag);
    longint cexp [R][NCOL];
    logic [W-1:0] v;
    int T;
    T = K + R + CHAIN + 2;
    for (int r = 0; r < R; r++) for (int c = 0; c < NCOL; c++) begin
      cexp[r][c] = 0;
      if (r < 3 || exec_mask == '1)
        for (int k = 0; k < K; k++) cexp[r][c] += longint'(a[r][k]) * longint'(b[k][c]);
    end
    // operand beats at base 64: A[r][k] in beat k+r, B[k][c] in beat k+dly(c)
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++) wput(64 + t, 2 * r, (t - r >= 0 && t - r < K) ? W'(a[r][t-r]) : '0);
      for (int c = 0; c < NCOL; c++)
        nput(64 + t, ncfu(c, 1), (t - dly(c) >= 0 && t - dly(c) < K) ? W'(b[t-dly(c)][c]) : '0);
    end
    row_on_we = 1; row_on_in = exec_mask; tick(); row_on_we = 0;
    issue(MODE_EXEC, T + 1, 64, T, 64, T, 0, 0);
    row_on_we = 1; row_on_in = '1; tick(); row_on_we = 0;
    issue(MODE_FLUSH, CHAIN, 0, 0, 0, 0, 128, CHAIN);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < NCOL; c++) begin
        oget(128 + east_pos(c), 2 * r, v);
        check({tag, " C[r][c]"}, v, W'(cexp[r][c]));
      end
  endtask

  initial begin
    logic [W-1:0] x [24];
    logic [W-1:0] v;
    logic [W-1:0] up_seq [64];
    row_on_we = 0; row_on_in = '1; cmd_valid = 0; cmd_mode = MODE_IDLE; cmd_cycles = 0;
    cmd_coeff_sel = 0;
    wdma_wr_en = 0; wdma_wr_addr = 0; wdma_wr_lane = 0; wdma_wr_data = 0;
    wdma_start = 0; wdma_base = 0; wdma_len = 0;
    ndma_wr_en = 0; ndma_wr_addr = 0; ndma_wr_lane = 0; ndma_wr_data = 0;
    ndma_start = 0; ndma_base = 0; ndma_len = 0;
    odma_start = 0; odma_base = 0; odma_len = 0; odma_rd_addr = 0; odma_rd_lane = 0;
    #12 rst_n = 1; @(posedge clk); #1;

    // ---------------- Phase 1: coefficient cascade ----------------
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < NCOL; c++) begin
        cfu_word[r][c] = cw(2, 0, 4, 0, 2, 2, 0, 3, 3);   // CU = In0 * CER0, Out0 = CU_reg
        coef[r][c] = W'(int'($urandom_range(1, 3)) * (($urandom_range(0, 1) != 0) ? 1 : -1));
      end
      rai_word[r][0] = rcw(0, 0, (r == R - 1) ? 2 : 0, 0, 2, 6);  // O4 <- I2; O2 up the column
      rai_word[r][1] = rcw(0, 0, 0, 0, 2, 6);
    end
    load_config(cfu_word, rai_word, coef);
    issue(MODE_CONFIG, CHAIN + 1, 0, CHAIN, 0, CHAIN, 0, 0);
    for (int i = 0; i < 24; i++) begin
      x[i] = (i < 16) ? W'(int'($urandom_range(0, 2000)) - 1000) : '0;
      for (int r = 0; r < R; r++) wput(32 + i, 2 * r, (r == 0 || r == R - 1) ? x[i] : W'(r * 10 + i));
    end
    // run: beat i reaches the array at active edge i+2, leaves the last CFU
    // CHAIN edges later; the output DMA captures from the first active edge.
    fork
      issue(MODE_EXEC, 24 + CHAIN + 1, 32, 24, 0, 0, 0, 24 + CHAIN + 1);
      begin
        @(posedge clk);
        for (int t = 0; t < 64; t++) begin
          #2 up_seq[t] = north_out[0][0];
          if (north_out[0][0] != '0) n_vertical++;
          @(posedge clk);
        end
      end
    join
    for (int i = 0; i < 16; i++) begin
      longint p0, p1;
      logic [W-1:0] y;
      p0 = longint'(signed'(x[i]));
      for (int c = 0; c < NCOL; c++) p0 = longint'(signed'(W'(p0 * longint'(signed'(coef[0][c])))));
      oget(i + 1 + CHAIN, 0, y);
      check("cascade row 0", y, W'(p0));
      p1 = longint'(signed'(x[i]));
      for (int c = 0; c < NCOL; c++) p1 = longint'(signed'(W'(p1 * longint'(signed'(coef[R-1][c])))));
      oget(i + 1 + CHAIN, 2 * (R - 1), y);
      check("cascade row 7", y, W'(p1));
      // vertical route: beat i enters at active edge i+2, then CFU1 and R RAI elements
      p1 = longint'(signed'(x[i]));
      for (int c = 0; c < 2; c++) p1 = longint'(signed'(W'(p1 * longint'(signed'(coef[R-1][c])))));
      check("RAI route to North edge", up_seq[i + 3 + R], W'(p1));
    end

    // ---------------- Phase 2: 8x8 matrix multiply ----------------
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < NCOL; c++) begin
        cfu_word[r][c] = (c % 4 == 1) ? cw(3, 0, 3, 7, 0, 1, 3, 1, 2)  // A leaves on Out1
                                      : cw(3, 0, 3, 7, 0, 1, 1, 3, 2);
        coef[r][c] = '0;
      end
      for (int bb = 0; bb < NB; bb++) rai_word[r][bb] = rcw(0, 0, 0, 0, 3, 6);  // O4 <- I3
    end
    load_config(cfu_word, rai_word, coef);
    issue(MODE_CONFIG, CHAIN + 1, 0, CHAIN, 0, CHAIN, 0, 0);
    for (int r = 0; r < R; r++) for (int k = 0; k < K; k++) a[r][k] = int'($urandom_range(0, 2000)) - 1000;
    for (int k = 0; k < K; k++) for (int c = 0; c < NCOL; c++) b[k][c] = int'($urandom_range(0, 2000)) - 1000;
    run_matmul('1, "matmul");

    // ---------------- Phase 3: row 3 powered off ----------------
    run_matmul(8'b1111_0111, "row3 off");

    $display("Mechanisms exercised:");
    check_count("configuration cycles", n_cfg_cycles);
    check_count("coefficient loads (row 0)", n_coeff_loads);
    check_count("execution cycles", n_exec_cycles);
    check_count("flush cycles", n_flush_cycles);
    check_count("row power-off cycles", n_off_cycles);
    check_count("RAI cross-route transfers", n_cross);
    check_count("RAI vertical transfers", n_vertical);
    check_count("output DMA captures", n_odma_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
