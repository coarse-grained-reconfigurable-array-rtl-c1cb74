// tb_dft_workload: 8-point DFT by correlation on the 8x8 array at its
// default size.
//
// The DFT of a real 8-sample block is two matrix-vector products, with the
// cosine and the sine matrices. The array runs them as output-stationary
// matrix products: A = the 8x8 cosine (then sine) matrix, scaled by 2^7 and
// rounded (the largest scale for which an 8-term sum of 12-bit samples stays
// inside the 22-bit accumulator), flows East along the rows; B = eight different sample blocks, one
// per CFU column, flows South. CFU (k, j) accumulates bin k of block j with
// MAD A=In0 B=In3 C=CU_reg; a flush then drains the 64 results into the
// output DMA. Expected values are the same integer sums computed here from
// the rounded coefficients, and the real and imaginary parts are also
// compared against a floating-point DFT to within the rounding error.
module tb_dft_workload;
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


  logic [W-1:0] cfu_word [R][NCOL];
  logic [W-1:0] rai_word [R][NB];
  logic [W-1:0] coef [R][NCOL];
  int a [R][K];
  int b [K][NCOL];
  longint res [R][NCOL];

  // C = a * b through the array; results into res
  task automatic run_product();
    logic [W-1:0] v;
    int T;
    T = K + R + CHAIN + 2;
    for (int t = 0; t < T; t++) begin
      for (int r = 0; r < R; r++) wput(64 + t, 2 * r, (t - r >= 0 && t - r < K) ? W'(a[r][t-r]) : '0);
      for (int c = 0; c < NCOL; c++)
        nput(64 + t, ncfu(c, 1), (t - dly(c) >= 0 && t - dly(c) < K) ? W'(b[t-dly(c)][c]) : '0);
    end
    load_config(cfu_word, rai_word, coef);
    issue(MODE_CONFIG, CHAIN + 1, 0, CHAIN, 0, CHAIN, 0, 0);
    issue(MODE_EXEC, T + 1, 64, T, 64, T, 0, 0);
    issue(MODE_FLUSH, CHAIN, 0, 0, 0, 0, 128, CHAIN);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < NCOL; c++) begin
        oget(128 + east_pos(c), 2 * r, v);
        res[r][c] = longint'(signed'(v));
      end
  endtask

  initial begin
    longint re [R][NCOL];
    real ref_re, ref_im, scale;
    row_on_we = 0; row_on_in = '1; cmd_valid = 0; cmd_mode = MODE_IDLE; cmd_cycles = 0;
    cmd_coeff_sel = 0;
    wdma_wr_en = 0; wdma_wr_addr = 0; wdma_wr_lane = 0; wdma_wr_data = 0;
    wdma_start = 0; wdma_base = 0; wdma_len = 0;
    ndma_wr_en = 0; ndma_wr_addr = 0; ndma_wr_lane = 0; ndma_wr_data = 0;
    ndma_start = 0; ndma_base = 0; ndma_len = 0;
    odma_start = 0; odma_base = 0; odma_len = 0; odma_rd_addr = 0; odma_rd_lane = 0;
    #12 rst_n = 1; @(posedge clk); #1;

    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < NCOL; c++) begin
        cfu_word[r][c] = cw(3, 0, 3, 7, 0, 1, 1, 3, 2);   // MAD In0*In3 + CU_reg
        coef[r][c] = '0;
      end
      for (int bb = 0; bb < NB; bb++) rai_word[r][bb] = rcw(0, 0, 0, 0, 2, 6);  // O4 <- I2
    end
    // eight sample blocks of 12-bit samples, one per column
    for (int n = 0; n < K; n++)
      for (int c = 0; c < NCOL; c++) b[n][c] = int'($urandom_range(0, 4094)) - 2047;
    scale = 128.0;

    for (int part = 0; part < 2; part++) begin
      for (int k = 0; k < R; k++)
        for (int n = 0; n < K; n++)
          a[k][n] = (part == 0) ? int'($rtoi($floor(scale * $cos(6.283185307179586 * k * n / 8.0) + 0.5)))
                                : int'($rtoi($floor(-scale * $sin(6.283185307179586 * k * n / 8.0) + 0.5)));
      run_product();
      for (int k = 0; k < R; k++)
        for (int c = 0; c < NCOL; c++) begin
          longint e;
          e = 0;
          for (int n = 0; n < K; n++) e += longint'(a[k][n]) * longint'(b[n][c]);
          check(part == 0 ? "DFT real part" : "DFT imaginary part", W'(res[k][c]), W'(e));
          if (part == 0) re[k][c] = res[k][c];
          else begin
            // against a floating-point DFT: error below 8 * 2047 * 0.5 / 128 + 1
            ref_re = 0.0; ref_im = 0.0;
            for (int n = 0; n < K; n++) begin
              ref_re += b[n][c] * $cos(6.283185307179586 * k * n / 8.0);
              ref_im -= b[n][c] * $sin(6.283185307179586 * k * n / 8.0);
            end
            checks++;
            if ((re[k][c] / scale - ref_re) > 65.0 || (ref_re - re[k][c] / scale) > 65.0 ||
                (res[k][c] / scale - ref_im) > 65.0 || (ref_im - res[k][c] / scale) > 65.0) begin
              failures++;
              $display("FAIL bin %0d block %0d: %f %fj vs %f %fj", k, c,
                       re[k][c] / scale, res[k][c] / scale, ref_re, ref_im);
            end
          end
        end
    end
    $display("  8-point DFT of %0d blocks: 2 products of %0d execution cycles each", NCOL,
             K + R + CHAIN + 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
