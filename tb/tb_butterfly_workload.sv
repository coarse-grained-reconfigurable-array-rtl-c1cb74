// tb_butterfly_workload: radix-2 butterfly stages through the RAI column,
// on the 8x8 array at its default size.
//
// Each row of the array carries one element of a vector stream x (one vector
// per cycle, element r on West lane 2r). Two butterfly stages follow, each
// in one block:
//   stage 1, block 0, partner rows at distance 1, pairs (0,1) (2,3) (4,5) (6,7)
//   stage 2, block 1, partner rows at distance 2, pairs (0,2) (1,3) (4,6) (5,7)
// For a pair (u row p, l row q = p + d) a stage computes
//   y[p] = x[p] + w[q] * x[q],   y[q] = x[p] - w[q] * x[q]
// with a real weight w[q] held in CER0 of the first CFU of row q in that
// block. The RAI column swaps the pair: the upper row's value goes down on
// O0/O1 and the lower row's product goes up on O2/O3. Every RAI hop is a
// register, so the partner arrives later than the row's own value:
//   stage 1: one cycle later; the CFU after the RAI keeps the early operand
//            in GPR0 for one cycle.
//   stage 2: two cycles later; the CFU before the RAI sends an early copy
//            (GPR0, Out0 -> I2) that is routed to the partner and a copy one
//            cycle later (CU_reg = 0 + GPR0, Out1 -> I3) that the row keeps,
//            and GPR0 of the CFU after the RAI absorbs the last cycle.
// Stage 2 at distance 2 needs both down lanes and both up lanes of the
// column segment between the two rows of each half, which is what the column
// offers; a distance-4 stage would need four lanes per direction and does not
// fit one pass. The check compares every output element against the same
// butterflies computed here, with random weights and with all weights 1 (a
// 4-point Walsh-Hadamard transform on each half), checks the latency and that
// one vector per cycle goes through.
module tb_butterfly_workload;
  import syscore_pkg::*;
  localparam int R = 8, W = 22, NB = 2;
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

  syscore_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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



  localparam int NV = 64;           // vectors per run
  localparam int LAT = 14;          // West beat k reaches the output capture at k + LAT

  logic [W-1:0] cfu_word [R][NCOL];
  logic [W-1:0] rai_word [R][NB];
  logic [W-1:0] coef [R][NCOL];
  int exec_cycles;
  always @(posedge clk) if (array_busy && !dut.config_en && !dut.flush_en) exec_cycles++;

  // Column words of the two stages. Stage 1 rows: upper = even row.
  // Stage 2 rows: upper = row bit 1 clear.
  task automatic configure(int w1 [R], int w2 [R]);
    for (int r = 0; r < R; r++) begin
      bit up1 = (r % 2 == 0);
      bit up2 = ((r / 2) % 2 == 0);
      bit first2 = (r % 2 == 0);    // first row of its stage-2 pair group
      for (int c = 0; c < NCOL; c++) coef[r][c] = '0;
      // stage 1, block 0
      cfu_word[r][0] = up1 ? cw(7, 0, 0, 0, 0, 2, 1, 3, 3)     // GPR0 <- In0, Out0 = GPR0
                           : cw(2, 0, 4, 0, 2, 2, 0, 3, 3);    // In0 * CER0
      coef[r][0] = up1 ? '0 : W'(w1[r]);
      cfu_word[r][1] = cw(7, 0, 0, 0, 0, 2, 1, 3, 3);          // one-cycle pass
      rai_word[r][0] = up1 ? rcw(0, 0, 0, 0, 2, 0)             // O0 <- I2, O4 <- I2, O5 <- I0
                           : rcw(0, 0, 2, 0, 4, 2);            // O2 <- I2, O4 <- I4, O5 <- I2
      cfu_word[r][2] = up1 ? cw(0, 4, 1, 0, 0, 2, 0, 3, 3)     // GPR0 + In1, GPR0 <- In0
                           : cw(1, 0, 6, 0, 1, 2, 0, 3, 3);    // In0 - GPR0, GPR0 <- In1
      cfu_word[r][3] = cw(7, 0, 0, 0, 0, 2, 1, 3, 3);
      // stage 2, block 1
      cfu_word[r][4] = up2 ? cw(7, 0, 0, 0, 0, 2, 1, 3, 3)
                           : cw(2, 0, 4, 0, 2, 2, 0, 3, 3);
      coef[r][4] = up2 ? '0 : W'(w2[r]);
      // Out0 = GPR0 (early copy), Out1 = CU_reg = 0 + GPR0 (one cycle later)
      cfu_word[r][5] = cw(0, 6, 6, 0, 0, 2, 1, 0, 3);
      if (up2 && first2)        rai_word[r][1] = rcw(0, 0, 0, 0, 3, 0);  // O0<-I2 O4<-I3 O5<-I0
      else if (up2)             rai_word[r][1] = rcw(2, 0, 0, 0, 3, 1);  // O0<-I4 O1<-I2 O2<-I0 O4<-I3 O5<-I1
      else if (first2)          rai_word[r][1] = rcw(0, 3, 2, 1, 4, 3);  // O1<-I5 O2<-I2 O3<-I1 O4<-I4 O5<-I3
      else                      rai_word[r][1] = rcw(0, 0, 0, 2, 5, 3);  // O3<-I2 O4<-I5 O5<-I3
      cfu_word[r][6] = up2 ? cw(0, 4, 1, 0, 0, 2, 0, 3, 3)
                           : cw(1, 0, 6, 0, 1, 2, 0, 3, 3);
      cfu_word[r][7] = cw(7, 0, 0, 0, 0, 2, 1, 3, 3);
    end
    load_config(cfu_word, rai_word, coef);
    issue(MODE_CONFIG, CHAIN + 1, 0, CHAIN, 0, CHAIN, 0, 0);
  endtask

  function automatic void butterflies(int x [R], int w1 [R], int w2 [R], output int z [R]);
    int y [R];
    for (int p = 0; p < R; p += 2) begin
      y[p]     = x[p] + w1[p + 1] * x[p + 1];
      y[p + 1] = x[p] - w1[p + 1] * x[p + 1];
    end
    for (int p = 0; p < R; p++)
      if ((p / 2) % 2 == 0) begin
        z[p]     = y[p] + w2[p + 2] * y[p + 2];
        z[p + 2] = y[p] - w2[p + 2] * y[p + 2];
      end
  endfunction

  task automatic run(string tag, int w1 [R], int w2 [R]);
    int x [NV][R];
    int z [R];
    int T, lat;
    logic [W-1:0] v;
    bit ok;
    for (int n = 0; n < NV; n++)
      for (int r = 0; r < R; r++) begin
        x[n][r] = int'($urandom_range(0, 4094)) - 2047;
        wput(64 + n, 2 * r, W'(x[n][r]));
      end
    configure(w1, w2);
    T = NV + LAT;
    exec_cycles = 0;
    issue(MODE_EXEC, T, 64, NV, 0, 0, 0, T);
    checks++;
    if (exec_cycles > NV + LAT) begin
      failures++;
      $display("FAIL %s: %0d cycles for %0d vectors", tag, exec_cycles, NV);
    end
    // latency: first offset at which vector 0 appears on every row
    lat = -1;
    for (int l = 0; l < 2 * LAT && lat < 0; l++) begin
      butterflies(x[0], w1, w2, z);
      ok = 1;
      for (int r = 0; r < R; r++) begin
        oget(l, 2 * r, v);
        if (v !== W'(z[r])) ok = 0;
      end
      if (ok) lat = l;
    end
    checks++;
    if (lat != LAT) begin
      failures++;
      $display("FAIL %s: latency %0d, expected %0d", tag, lat, LAT);
    end
    $display("  %-16s %0d vectors, latency %0d, %0d execution cycles", tag, NV, lat, exec_cycles);
    for (int n = 0; n < NV; n++) begin
      butterflies(x[n], w1, w2, z);
      for (int r = 0; r < R; r++) begin
        oget(LAT + n, 2 * r, v);
        check({tag, $sformatf(" vector %0d row %0d", n, r)}, v, W'(z[r]));
      end
    end
  endtask

  initial begin
    int w1 [R], w2 [R];
    row_on_we = 0; row_on_in = '1; cmd_valid = 0; cmd_mode = MODE_IDLE; cmd_cycles = 0;
    cmd_coeff_sel = 0;
    wdma_wr_en = 0; wdma_wr_addr = 0; wdma_wr_lane = 0; wdma_wr_data = 0;
    wdma_start = 0; wdma_base = 0; wdma_len = 0;
    ndma_wr_en = 0; ndma_wr_addr = 0; ndma_wr_lane = 0; ndma_wr_data = 0;
    ndma_start = 0; ndma_base = 0; ndma_len = 0;
    odma_start = 0; odma_base = 0; odma_len = 0; odma_rd_addr = 0; odma_rd_lane = 0;
    #12 rst_n = 1; @(posedge clk); #1;

    // all weights 1: a 4-point Walsh-Hadamard transform on each half
    for (int r = 0; r < R; r++) begin w1[r] = 1; w2[r] = 1; end
    run("unit weights", w1, w2);
    // random real weights; |w| <= 15 keeps two stages inside 22 bits
    for (int r = 0; r < R; r++) begin
      w1[r] = int'($urandom_range(0, 30)) - 15;
      w2[r] = int'($urandom_range(0, 30)) - 15;
    end
    run("random weights", w1, w2);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
