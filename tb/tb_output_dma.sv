// tb_output_dma: self-checking testbench for the output DMA.
//
// Drives a known sequence on the lanes, captures a window of it at a
// non-zero base and reads every word back through the registered read port.
// Checks that capture starts one cycle after start, that busy lasts len
// cycles, that done pulses once and that words outside the window are not
// written.
module tb_output_dma;
  localparam int W = 22, L = 4, D = 32, AW = 5;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [AW-1:0] base, rd_addr;
  logic [AW:0] len;
  logic [1:0] rd_lane;
  logic [W-1:0] rd_data;
  logic [L-1:0][W-1:0] lanes;
  int checks = 0, failures = 0;
  int t = 0;

  output_dma #(.LANES(L), .DATA_W(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pat(int k, int l);
    return W'(k * 100 + l + 1);
  endfunction

  // lanes carry pat(t, l) during cycle t
  always @(posedge clk) begin
    #2 t++;
    for (int l = 0; l < L; l++) lanes[l] = pat(t, l);
  end

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk); #3;
  endtask

  task automatic read_word(int a, int l, output logic [W-1:0] v);
    rd_addr = AW'(a); rd_lane = 2'(l); tick(); v = rd_data;
  endtask

  initial begin
    int t0, busy_cycles, dones;
    logic [W-1:0] v;
    start = 0; base = 0; len = 0; rd_addr = 0; rd_lane = 0;
    for (int l = 0; l < L; l++) lanes[l] = pat(0, l);
    #12 rst_n = 1;
    tick();
    // fill a marker word just below the window by a first capture
    base = 4; len = 1; start = 1; t0 = t; tick(); start = 0;
    tick(); tick();
    // main capture: 9 beats at base 5
    base = 5; len = 9; start = 1; t0 = t; tick(); start = 0;
    busy_cycles = 0; dones = 0;
    for (int k = 0; k < 12; k++) begin
      if (busy) busy_cycles++;
      if (done) dones++;
      tick();
    end
    checks++;
    if (busy_cycles != 9 || dones != 1) begin
      failures++;
      $display("FAIL busy %0d done %0d", busy_cycles, dones);
    end
    // captured beat k = lanes during cycle t0+1+k
    for (int k = 0; k < 9; k++)
      for (int l = 0; l < L; l++) begin
        read_word(5 + k, l, v);
        check("captured beat", v, pat(t0 + 1 + k, l));
      end
    read_word(4, 2, v);
    check("word before window untouched", v, pat(t0 - 2, 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
