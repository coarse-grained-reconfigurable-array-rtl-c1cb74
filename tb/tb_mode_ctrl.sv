// tb_mode_ctrl: self-checking testbench for the mode controller.
//
// Issues configuration, execution and flush commands of various lengths and
// checks, cycle by cycle, the control signal values of each mode, that a
// mode lasts exactly the commanded number of cycles, that the array is held
// (all Global_en low) while idle, that the row power mask gates Global_en row
// by row, and that commands are refused while one is running.
module tb_mode_ctrl;
  import syscore_pkg::*;
  localparam int R = 8, CW = 16;

  logic clk = 0, rst_n = 0;
  logic row_on_we, cmd_valid, cmd_ready, cmd_coeff_sel;
  logic [R-1:0] row_on_in, row_en;
  mode_e cmd_mode;
  logic [CW-1:0] cmd_cycles;
  logic config_en, flush_en, coeff_sel, busy;
  int checks = 0, failures = 0;

  mode_ctrl #(.ROWS(R), .CW(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic tick();
    @(posedge clk); #1;
  endtask

  task automatic run(mode_e m, int n, logic sel, logic [R-1:0] mask);
    cmd_valid = 1; cmd_mode = m; cmd_cycles = CW'(n); cmd_coeff_sel = sel;
    check("ready before command", cmd_ready, 1);
    tick();
    cmd_valid = 1; cmd_mode = MODE_EXEC; cmd_cycles = 5;  // must be ignored
    for (int k = 0; k < n; k++) begin
      check("busy", busy, 1);
      check("ready low while busy", cmd_ready, 0);
      check("config_en", config_en, m == MODE_CONFIG);
      check("flush_en", flush_en, m == MODE_FLUSH);
      check("coeff_sel", coeff_sel, sel);
      check("row_en = mask", row_en, mask);
      tick();
      cmd_valid = 0;
    end
    check("idle after n cycles", busy, 0);
    check("rows held when idle", row_en, 0);
    check("config_en idle", config_en, 0);
    check("flush_en idle", flush_en, 0);
  endtask

  initial begin
    row_on_we = 0; row_on_in = '0; cmd_valid = 0; cmd_mode = MODE_IDLE;
    cmd_cycles = 0; cmd_coeff_sel = 0;
    #12 rst_n = 1; @(posedge clk); #1;
    check("idle after reset", busy, 0);
    run(MODE_CONFIG, 9, 1'b0, '1);
    run(MODE_CONFIG, 3, 1'b1, '1);
    run(MODE_EXEC, 17, 1'b0, '1);
    row_on_we = 1; row_on_in = 8'b1111_0111; tick(); row_on_we = 0;
    run(MODE_EXEC, 6, 1'b0, 8'b1111_0111);
    run(MODE_FLUSH, 10, 1'b0, 8'b1111_0111);
    // a zero-length command and an idle command are not accepted
    cmd_valid = 1; cmd_mode = MODE_FLUSH; cmd_cycles = 0; tick();
    check("zero-length refused", busy, 0);
    cmd_mode = MODE_IDLE; cmd_cycles = 4; tick();
    check("idle command refused", busy, 0);
    cmd_valid = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
