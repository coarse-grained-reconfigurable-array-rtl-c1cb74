// output_dma: collects the words leaving the East edge of the array.
//
// Each lane is one East output port (Out0 and Out1 of the last CFU of every
// row). A capture command (start with base and len) writes the lanes into
// beats base .. base+len-1 of a local buffer, one beat per clock cycle. The
// host reads the buffer one word at a time; rd_data is registered and is
// valid the cycle after rd_addr/rd_lane are applied.
// Timing: start is sampled at edge e0; the lanes present during the cycle
// before edge e0+1+k are written to beat base+k. busy is high from e0 until the
// last beat is written; done pulses for one cycle after that.
// That a DMA collects the array's output is the published SYSCORE architecture's; the buffer and
// command interface are this design's own.
module output_dma
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
  input  logic [LANES-1:0][DATA_W-1:0] lanes,
  input  logic                         start,
  input  logic [AW-1:0]                base,
  input  logic [AW:0]                  len,
  output logic                         busy,
  output logic                         done,
  // host read port
  input  logic [AW-1:0]                rd_addr,
  input  logic [LW-1:0]                rd_lane,
  output logic [DATA_W-1:0]            rd_data
);

  logic [AW-1:0]     ptr;
  logic [AW:0]       remaining;
  logic [DATA_W-1:0] rd_word [LANES];

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [DATA_W-1:0] mem [DEPTH];

    always_ff @(posedge clk) begin
      if (busy) mem[ptr] <= lanes[l];
      rd_word[l] <= mem[rd_addr];
    end
  end

  logic [LW-1:0] rd_lane_q;
  always_ff @(posedge clk) rd_lane_q <= rd_lane;
  assign rd_data = rd_word[rd_lane_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      ptr       <= '0;
      remaining <= '0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        ptr       <= ptr + 1'b1;
        remaining <= remaining - 1'b1;
        busy      <= (remaining != 1);
        done      <= (remaining == 1);
      end else if (start && len != 0) begin
        busy      <= 1'b1;
        ptr       <= base;
        remaining <= len;
      end
    end
  end

endmodule
