// mode_ctrl: drives the array's mode control signals.
//
// The array runs in one of four modes: configuration (Config_en high),
// execution (both low), flush (Flush_en high) and power off (Global_en low).
// The first three apply to the whole array; power off is chosen row by row.
// This controller turns host commands into those signals. The host writes a
// row power mask (row_on) and issues a command {mode, cycles, coeff_sel} when
// cmd_ready is high. The controller then holds that mode for exactly `cycles`
// clock edges, starting with the edge after the one that accepted the
// command, and returns to idle. While idle every row's Global_en is low, so the
// array holds its state between commands; while a command runs, Global_en of
// row r is row_on[r].
// The modes and their control signal values are the published SYSCORE architecture's. The command
// interface, the cycle counter and holding the array while idle are this
// design's choices, standing in for the host processor's direct control.
module mode_ctrl
  import syscore_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned CW   = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // row power mask
  input  logic            row_on_we,
  input  logic [ROWS-1:0] row_on_in,
  // command
  input  logic            cmd_valid,
  output logic            cmd_ready,
  input  mode_e           cmd_mode,
  input  logic [CW-1:0]   cmd_cycles,
  input  logic            cmd_coeff_sel,
  // array control
  output logic            config_en,
  output logic            flush_en,
  output logic            coeff_sel,
  output logic [ROWS-1:0] row_en,
  output logic            busy
);

  mode_e           mode_q;
  logic [CW-1:0]   cnt;
  logic [ROWS-1:0] row_on;
  logic            sel_q;

  assign cmd_ready = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row_on <= '1;
    end else if (row_on_we) begin
      row_on <= row_on_in;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      mode_q <= MODE_IDLE;
      cnt    <= '0;
      sel_q  <= 1'b0;
    end else if (busy) begin
      cnt  <= cnt - 1'b1;
      if (cnt == 1) begin
        busy   <= 1'b0;
        mode_q <= MODE_IDLE;
      end
    end else if (cmd_valid && cmd_mode != MODE_IDLE && cmd_cycles != 0) begin
      busy   <= 1'b1;
      mode_q <= cmd_mode;
      cnt    <= cmd_cycles;
      sel_q  <= cmd_coeff_sel;
    end
  end

  assign config_en = busy && (mode_q == MODE_CONFIG);
  assign flush_en  = busy && (mode_q == MODE_FLUSH);
  assign coeff_sel = sel_q;
  assign row_en    = busy ? row_on : '0;

  // Configuration and flush are exclusive modes.
  a_modes_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(config_en && flush_en));

endmodule
