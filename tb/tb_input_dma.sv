// tb_input_dma: self-checking testbench for the input DMA.
//
// Fills the buffer with a known pattern through the host write port, starts
// two streams (one from a non-zero base) and checks every lane of every beat
// against the pattern, the one-cycle start latency, the busy length, that the
// lanes read zero when idle and that a start while busy is ignored.
module tb_input_dma;
  localparam int W = 22, L = 4, D = 32, AW = 5;

  logic clk = 0, rst_n = 0;
  logic wr_en, start, busy;
  logic [AW-1:0] wr_addr, base;
  logic [1:0] wr_lane;
  logic [W-1:0] wr_data;
  logic [AW:0] len;
  logic [L-1:0][W-1:0] lanes;
  int checks = 0, failures = 0;

  input_dma #(.LANES(L), .DATA_W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pat(int a, int l);
    return W'(a * 1000 + l * 7 + 3);
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

  task automatic run_stream(int b, int n);
    int busy_cycles;
    base = AW'(b); len = (AW + 1)'(n); start = 1; tick(); start = 0;
    busy_cycles = 0;
    for (int k = 0; k < n; k++) begin
      if (busy) busy_cycles++;
      // a start while busy must be ignored
      if (k == 1) begin base = '0; len = 3; start = 1; end
      tick(); start = 0;
      for (int l = 0; l < L; l++) check("beat", lanes[l], pat(b + k, l));
    end
    checks++;
    if (busy_cycles != n) begin
      failures++; $display("FAIL busy cycles %0d expected %0d", busy_cycles, n);
    end
    tick();
    for (int l = 0; l < L; l++) check("idle lanes zero", lanes[l], '0);
  endtask

  initial begin
    wr_en = 0; start = 0; wr_addr = 0; wr_lane = 0; wr_data = 0; base = 0; len = 0;
    #12 rst_n = 1; @(posedge clk); #1;
    for (int a = 0; a < D; a++)
      for (int l = 0; l < L; l++) begin
        wr_en = 1; wr_addr = AW'(a); wr_lane = 2'(l); wr_data = pat(a, l); tick();
      end
    wr_en = 0;
    for (int l = 0; l < L; l++) check("lanes zero before start", lanes[l], '0);
    run_stream(0, 8);
    run_stream(13, 11);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
