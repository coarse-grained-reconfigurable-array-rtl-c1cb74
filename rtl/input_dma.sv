// input_dma: streams data from a local buffer into one edge of the array.
//
// The array has two of these, one on the West edge (two lanes per row) and
// one on the North edge (two lanes per CFU column and two for the RAI
// column). The buffer holds DEPTH beats; a beat is one DATA_W word per lane,
// and each lane is a separate memory. The host fills the buffer one word at
// a time (wr_en, wr_addr, wr_lane, wr_data). A stream command (start with
// base and len) then plays beats base .. base+len-1 onto the lanes, one beat
// per clock cycle. When no stream is running the lanes carry zero, which the
// array's shift chains rely on.
// Timing: start is sampled at clock edge e0; beat k is on the lanes from edge
// e0+1+k until the next edge. busy is high from e0 until the last beat has
// been issued. A start while busy is ignored; len = 0 does nothing.
// That DMAs inject data from the West and North follows the published
// architecture; the local buffer, its size and the command interface are this
// design's own.
module input_dma
  import syscore_pkg::*;
#(
  parameter int unsigned LANES  = 16,
  parameter int unsigned DATA_W = DATA_W_DEF,
  parameter int unsigned DEPTH  = 256,
  localparam int unsigned AW    = $clog2(DEPTH),
  localparam int unsigned LW    = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host write port
  input  logic                         wr_en,
  input  logic [AW-1:0]                wr_addr,
  input  logic [LW-1:0]                wr_lane,
  input  logic [DATA_W-1:0]            wr_data,
  // stream command
  input  logic                         start,
  input  logic [AW-1:0]                base,
  input  logic [AW:0]                  len,
  output logic                         busy,
  // edge lanes
  output logic [LANES-1:0][DATA_W-1:0] lanes
);

  logic [AW-1:0] ptr;
  logic [AW:0]   remaining;

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [DATA_W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (wr_en && wr_lane == LW'(l)) mem[wr_addr] <= wr_data;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)    lanes[l] <= '0;
      else if (busy) lanes[l] <= mem[ptr];
      else           lanes[l] <= '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      ptr       <= '0;
      remaining <= '0;
    end else if (busy) begin
      ptr       <= ptr + 1'b1;
      remaining <= remaining - 1'b1;
      busy      <= (remaining != 1);
    end else if (start && len != 0) begin
      busy      <= 1'b1;
      ptr       <= base;
      remaining <= len;
    end
  end

endmodule
