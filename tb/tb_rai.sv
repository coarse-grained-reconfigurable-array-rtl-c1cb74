// tb_rai: self-checking testbench for one RAI element.
//
// Loads configuration words through I4, then for every legal source of every
// output drives random data and checks that the output carries the selected
// input one cycle later. Also checks the West-to-East forwarding used in
// configuration and flush modes, the configuration word on O0 while
// configuring, and that outputs are zero with global_en low.
module tb_rai;
  localparam int W = 22;

  logic clk = 0, rst_n = 0;
  logic global_en, config_en, flush_en;
  logic [5:0][W-1:0] i, o;
  int checks = 0, failures = 0;

  rai #(.DATA_W(W)) dut (.*);

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

  function automatic logic [15:0] rcw(int s0, int s1, int s2, int s3, int s4, int s5);
    return 16'(s0 | (s1 << 2) | (s2 << 4) | (s3 << 6) | (s4 << 8) | (s5 << 11));
  endfunction

  task automatic configure(logic [15:0] word);
    global_en = 1; config_en = 1; flush_en = 0;
    i = '0; i[4] = W'(word); tick();
    check("cfg on O0 while configuring", o[0], W'(word));
    config_en = 0; i = '0; #1;
  endtask

  task automatic randomize_inputs();
    for (int k = 0; k < 6; k++) i[k] = W'($urandom);
  endtask

  initial begin
    logic [5:0][W-1:0] prev;
    global_en = 0; config_en = 0; flush_en = 0; i = '0;
    #12 rst_n = 1; @(posedge clk); #1;

    // Sweep the four codes of O0-O3 and the six codes of O4/O5.
    for (int s = 0; s < 6; s++) begin
      configure(rcw(s % 4, (s + 1) % 4, s % 4, (s + 3) % 4, s, 5 - s));
      for (int n = 0; n < 4; n++) begin
        randomize_inputs(); prev = i; tick();
        check("O0 <- I2..I5", o[0], prev[2 + s % 4]);
        check("O1 <- I2..I5", o[1], prev[2 + (s + 1) % 4]);
        check("O2 <- I0..I3", o[2], prev[s % 4]);
        check("O3 <- I0..I3", o[3], prev[(s + 3) % 4]);
        check("O4 <- I0..I5", o[4], prev[s]);
        check("O5 <- I0..I5", o[5], prev[5 - s]);
      end
    end
    // Codes 6 and 7 of O4/O5 give zero.
    configure(rcw(0, 0, 0, 0, 6, 7));
    randomize_inputs(); tick();
    check("O4 code 6", o[4], '0);
    check("O5 code 7", o[5], '0);

    // Cross route used to swap lanes: O4 <- I3, O5 <- I2.
    configure(rcw(0, 0, 0, 0, 3, 2));
    randomize_inputs(); prev = i; tick();
    check("swap O4", o[4], prev[3]);
    check("swap O5", o[5], prev[2]);

    // Flush forwards West to East regardless of configuration.
    flush_en = 1;
    randomize_inputs(); prev = i; tick();
    check("flush O4 <- I2", o[4], prev[2]);
    check("flush O5 <- I3", o[5], prev[3]);
    flush_en = 0;

    // Power off: outputs zero, then state returns.
    randomize_inputs(); prev = i; tick();
    global_en = 0; #1;
    check("off O4", o[4], '0);
    check("off O5", o[5], '0);
    randomize_inputs(); tick();
    global_en = 1; #1;
    check("held O4", o[4], prev[3]);
    check("held O5", o[5], prev[2]);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
