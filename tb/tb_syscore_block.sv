// tb_syscore_block: self-checking testbench for one 8x4 array block.
//
// Drives the block's edge ports directly, cycle by cycle.
// 1. Output-stationary matrix multiply C = A(8xK) * B(Kx4): every CFU is
//    configured as a multiply-accumulate of In0 (row of A, moving East) and
//    In3 (column of B, moving South). Configuration words shift down the CFU
//    and RAI columns. A crosses the RAI column on a cross route (CFU1 Out1 ->
//    RAI I3 -> O4). Results are flushed out of the East edge and compared with
//    a product computed here. The number of cycles each phase takes is fixed
//    by the array's pipeline and checked through the position of each result.
// 2. RAI vertical routes: a stream entering row 0 is sent down the RAI column
//    to row 7 and out of its East edge; a stream entering row 7 is sent up the
//    RAI column to the North output. Both latencies are checked.
module tb_syscore_block;
  localparam int R = 8, W = 22, K = 6;

  logic clk = 0, rst_n = 0;
  logic [R-1:0] row_en;
  logic config_en, flush_en, coeff_sel;
  logic [R-1:0][1:0][W-1:0] west_in, east_out;
  logic [3:0][1:0][W-1:0] north_cfu;
  logic [1:0][W-1:0] north_rai, north_out;
  int checks = 0, failures = 0;

  syscore_block #(.ROWS(R), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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

  // Configuration pass: cfu_word[r][c] and rai_word[r], bottom row first.
  task automatic configure(logic [W-1:0] cfu_word [R][4], logic [W-1:0] rai_word [R]);
    config_en = 1; flush_en = 0;
    for (int t = 0; t < R; t++) begin
      for (int c = 0; c < 4; c++) north_cfu[c][0] = cfu_word[R-1-t][c];
      north_rai[0] = rai_word[R-1-t];
      tick();
    end
    config_en = 0; north_cfu = '0; north_rai = '0; west_in = '0;
  endtask

  function automatic int dly(int c);   // registers in front of column c
    return c + (c >= 2 ? 1 : 0);
  endfunction

  initial begin
    logic [W-1:0] cfu_word [R][4];
    logic [W-1:0] rai_word [R];
    int a [R][K];
    int b [K][4];
    longint cexp [R][4];
    logic [W-1:0] got [R][5];
    logic [W-1:0] seq_dn [64];
    logic [W-1:0] seq_up [64];

    row_en = '0; config_en = 0; flush_en = 0; coeff_sel = 0;
    west_in = '0; north_cfu = '0; north_rai = '0;
    #12 rst_n = 1; @(posedge clk); #1;
    row_en = '1;

    // ---------------- matrix multiply ----------------
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < 4; c++)
        // MAD A=In0 B=In3 C=CU_reg; GPR0<-In0, GPR1<-In3; Out0=GPR0, Out1=0, Out2=GPR1
        cfu_word[r][c] = (c == 1) ? cw(3, 0, 3, 7, 0, 1, 3, 1, 2)   // A leaves on Out1
                                  : cw(3, 0, 3, 7, 0, 1, 1, 3, 2);
      rai_word[r] = rcw(0, 0, 0, 0, 3, 6);   // O4 <- I3 (cross route)
    end
    configure(cfu_word, rai_word);

    for (int r = 0; r < R; r++) for (int k = 0; k < K; k++) a[r][k] = int'($urandom_range(0, 200)) - 100;
    for (int k = 0; k < K; k++) for (int c = 0; c < 4; c++) b[k][c] = int'($urandom_range(0, 200)) - 100;
    for (int r = 0; r < R; r++) for (int c = 0; c < 4; c++) begin
      cexp[r][c] = 0;
      for (int k = 0; k < K; k++) cexp[r][c] += longint'(a[r][k]) * longint'(b[k][c]);
    end

    // execution: A[r][k] at West In0 of row r in cycle k+r,
    //            B[k][c] at North In3 of column c in cycle k+dly(c)
    for (int t = 0; t < K + R + 5; t++) begin
      west_in = '0; north_cfu = '0;
      for (int r = 0; r < R; r++)
        if (t - r >= 0 && t - r < K) west_in[r][0] = W'(a[r][t-r]);
      for (int c = 0; c < 4; c++)
        if (t - dly(c) >= 0 && t - dly(c) < K) north_cfu[c][1] = W'(b[t-dly(c)][c]);
      tick();
    end
    west_in = '0; north_cfu = '0;

    // flush: East edge shows CFU3, CFU2, RAI, CFU1, CFU0 in turn
    flush_en = 1; #1;
    for (int f = 0; f < 5; f++) begin
      for (int r = 0; r < R; r++) got[r][f] = east_out[r][0];
      tick();
    end
    flush_en = 0;
    for (int r = 0; r < R; r++) begin
      check("C[r][3]", got[r][0], W'(cexp[r][3]));
      check("C[r][2]", got[r][1], W'(cexp[r][2]));
      check("RAI slot", got[r][2], '0);
      check("C[r][1]", got[r][3], W'(cexp[r][1]));
      check("C[r][0]", got[r][4], W'(cexp[r][0]));
    end

    // ---------------- RAI vertical routes ----------------
    for (int r = 0; r < R; r++) begin
      for (int c = 0; c < 4; c++) cfu_word[r][c] = cw(7, 0, 0, 0, 0, 2, 1, 3, 3); // pass In0 via GPR0
      if (r == 0)          rai_word[r] = rcw(0, 0, 0, 0, 2, 6);  // O0 <- I2, O2 <- I0
      else if (r == R - 1) rai_word[r] = rcw(0, 0, 2, 0, 4, 6);  // O2 <- I2, O4 <- I4
      else                 rai_word[r] = rcw(2, 0, 0, 0, 6, 6);  // O0 <- I4, O2 <- I0
    end
    configure(cfu_word, rai_word);
    for (int t = 0; t < 64; t++) begin
      west_in = '0;
      if (t < 16) begin
        west_in[0][0]   = W'(1000 + t);
        west_in[R-1][0] = W'(2000 + t);
      end
      #1;
      seq_dn[t] = east_out[R-1][0];
      seq_up[t] = north_out[0];
      tick();
    end
    // down: CFU0, CFU1, RAI rows 0..R-1, CFU2, CFU3 = R + 4 registers
    for (int t = 0; t < 16; t++) check("RAI down route", seq_dn[t + R + 4], W'(1000 + t));
    // up: CFU0, CFU1, RAI rows R-1..0 = R + 2 registers
    for (int t = 0; t < 16; t++) check("RAI up route", seq_up[t + R + 2], W'(2000 + t));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
