// tb_cfu: self-checking testbench for one CFU.
//
// Loads configuration words and coefficients through the configuration
// path, then runs the aggregation functions used by the seizure-detection
// feature extraction (SQACC, CRCOR, MADDC, MULC) and the plain operations
// (ADD, SUB, MSU), GPR forwarding, flush and power off. Expected values are
// computed here with 64-bit integer arithmetic and wrapped to 22 bits. Each
// operation has a latency of one cycle, which is checked by sampling the
// output exactly one edge after the operands are applied.
module tb_cfu;
  localparam int W = 22;

  logic clk = 0, rst_n = 0;
  logic global_en, config_en, flush_en, coeff_sel;
  logic [W-1:0] in0, in1, in2, in3, out0, out1, out2;
  int checks = 0, failures = 0;

  cfu #(.DATA_W(W), .FRAC_W(0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] wrap(longint v);
    return v[W-1:0];
  endfunction
  function automatic longint sx(logic [W-1:0] v);
    return longint'(signed'(v));
  endfunction

  // Build a configuration word from its fields (bit positions of the map).
  function automatic logic [W-1:0] cw(int op, int a, int b, int c, int r0, int r1,
                                       int o0, int o1, int o2);
    int v;
    v = op | (a << 3) | (b << 6) | (c << 9) | (r0 << 12) | (r1 << 14)
        | (o0 << 16) | (o1 << 18) | (o2 << 20);
    return W'(v);
  endfunction

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

  task automatic configure(logic [W-1:0] word, logic [W-1:0] c0, logic [W-1:0] c1);
    global_en = 1; config_en = 1; flush_en = 0;
    in2 = word; in0 = c0; coeff_sel = 0; tick();
    check("cfg shown on out1", out1, word);
    check("cer0 shown on out0", out0, c0);
    in0 = c1; coeff_sel = 1; tick();
    check("cer1 shown on out0", out0, c1);
    config_en = 0; coeff_sel = 0; in0 = 0; in1 = 0; in2 = 0; in3 = 0; #1;
  endtask

  // op codes and selector codes
  localparam int ADD = 0, SUB = 1, MUL = 2, MAD = 3, MSU = 4;

  initial begin
    longint acc;
    logic [W-1:0] x, y, c0, c1;
    global_en = 0; config_en = 0; flush_en = 0; coeff_sel = 0;
    in0 = 0; in1 = 0; in2 = 0; in3 = 0;
    #12 rst_n = 1; @(posedge clk); #1;
    check("reset out0", out0, '0);

    // ---- SQACC: CU = In0*In0 + CU_reg
    c0 = W'(17); c1 = W'(-5);
    configure(cw(MAD, 0, 0, 7, 2, 2, 0, 0, 0), c0, c1);
    check("cu_reg cleared by config", out0, '0);
    acc = 0;
    for (int k = 0; k < 20; k++) begin
      x = W'($urandom_range(0, 4000)) - W'(2000);
      in0 = x; tick();
      acc += sx(x) * sx(x);
      check("SQACC", out0, wrap(acc));
    end

    // ---- CRCOR: CU = In0*In2 + CU_reg
    configure(cw(MAD, 0, 2, 7, 2, 2, 0, 0, 0), c0, c1);
    acc = 0;
    for (int k = 0; k < 20; k++) begin
      x = W'($urandom_range(0, 2000)) - W'(1000);
      y = W'($urandom_range(0, 2000)) - W'(1000);
      in0 = x; in2 = y; tick();
      acc += sx(x) * sx(y);
      check("CRCOR", out0, wrap(acc));
    end

    // ---- MADDC: CU = In0*CER1 + In1 (constant coefficient, variable output)
    configure(cw(MAD, 0, 5, 1, 2, 2, 0, 0, 0), c0, c1);
    for (int k = 0; k < 10; k++) begin
      x = W'($urandom); y = W'($urandom);
      in0 = x; in1 = y; tick();
      check("MADDC", out0, wrap(sx(x) * sx(c1) + sx(y)));
    end

    // ---- MULC: CU = In0*CER0
    configure(cw(MUL, 0, 4, 0, 2, 2, 0, 0, 0), c0, c1);
    for (int k = 0; k < 10; k++) begin
      x = W'($urandom);
      in0 = x; tick();
      check("MULC", out0, wrap(sx(x) * sx(c0)));
    end

    // ---- ADD / SUB / MSU with GPR forwarding on out1/out2
    // GPR0 <- In1, GPR1 <- In3, out1 = GPR0, out2 = GPR1
    configure(cw(ADD, 1, 3, 0, 1, 1, 0, 1, 2), c0, c1);
    for (int k = 0; k < 8; k++) begin
      x = W'($urandom); y = W'($urandom);
      in1 = x; in3 = y; tick();
      check("ADD", out0, wrap(sx(x) + sx(y)));
      check("GPR0 forward", out1, x);
      check("GPR1 forward", out2, y);
    end
    configure(cw(SUB, 2, 0, 0, 0, 0, 0, 0, 0), c0, c1);
    for (int k = 0; k < 8; k++) begin
      x = W'($urandom); y = W'($urandom);
      in2 = x; in0 = y; tick();
      check("SUB", out0, wrap(sx(x) - sx(y)));
    end
    // MSU: CU = In3 - In0*In1, GPR operands: A = GPR0 (loaded from In0)
    configure(cw(MSU, 0, 1, 3, 2, 2, 0, 0, 0), c0, c1);
    for (int k = 0; k < 8; k++) begin
      x = W'($urandom); y = W'($urandom);
      in0 = x; in1 = y; in3 = W'(1000); tick();
      check("MSU", out0, wrap(1000 - sx(x) * sx(y)));
    end
    // MAD with a GPR operand: CU = GPR0 * CER0 + CU_reg, GPR0 <- In0
    configure(cw(MAD, 4, 4, 7, 0, 2, 0, 1, 0), c0, c1);
    acc = 0;
    x = 0;
    for (int k = 0; k < 8; k++) begin
      acc += sx(x) * sx(c0);      // uses GPR0 value before this edge
      y = W'($urandom_range(0, 100));
      in0 = y; tick();
      check("MAD GPR*CER0 acc", out0, wrap(acc));
      check("GPR0 loads In0", out1, y);
      x = y;
    end

    // ---- flush: out0 = CU_reg, CU_reg <- In0
    flush_en = 1; #1;
    check("flush shows CU_reg", out0, wrap(acc));
    in0 = W'(123); tick();
    check("flush shifts In0", out0, W'(123));
    in0 = W'(77); tick();
    check("flush shifts In0 again", out0, W'(77));
    flush_en = 0;

    // ---- power off: outputs zero, state held
    configure(cw(MAD, 0, 0, 7, 2, 2, 0, 0, 0), c0, c1);
    in0 = W'(3); tick();
    check("acc before off", out0, W'(9));
    global_en = 0; in0 = W'(100); #1;
    check("off out0", out0, '0);
    check("off out1", out1, '0);
    tick(); tick();
    global_en = 1; in0 = 0; #1;
    check("state held while off", out0, W'(9));
    tick();
    check("acc resumes", out0, W'(9));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
