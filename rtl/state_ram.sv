// state_ram: on-chip memory for the modal state arrays u and uPrev.
//
// One word per mode holds both values, {u[n], u[n-1]}, so that a single
// read gives a mode everything it needs and a single write stores its new
// state. Keeping the state on chip (block RAM or LUT RAM) while the
// coefficients live in external memory follows the design this processor
// reproduces; merging the two arrays into one word, and the port layout,
// are this design's own choice.
//
// Interface: simple dual port. Read: rd_en/rd_addr sampled on a clock edge,
// rd_data valid after that edge (one cycle latency, as a block RAM).
// Write: wr_en/wr_addr/wr_data written on the clock edge. A read and a
// write to the same address in the same cycle return the old word; the
// processor never does this, since a mode is written back only after it
// has left the pipeline it was read into.
module state_ram
  import modal_pkg::*;
#(
  parameter int unsigned DEPTH = 30000,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  output mode_state_t       rd_data,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  mode_state_t       wr_data
);

  mode_state_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
    if (wr_en) mem[wr_addr] <= wr_data;
  end

endmodule
