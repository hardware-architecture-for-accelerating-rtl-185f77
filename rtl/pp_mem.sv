// pp_mem: ping-pong pair of inter-stage memories (MemT, MemX, MemRC, MemIX).
//
// Two memories of DEPTH 64-bit words. While one is in write mode (filled by
// the stage before) the other is in read mode (read by the stage after); the
// global controller swaps them with sel after each frame: sel = 0 puts
// memory 1 in write mode and memory 2 in read mode. The 2:1 multiplexers and
// demultiplexers of the design are the port steering below. Each memory has
// two ports (a and b) that, as with the UltraRAM blocks the design targets,
// either both write or both read in a given frame, so a stage moves two words
// per cycle: the write side stores up to two words, the read side fetches two
// words with one cycle of read latency. Reads of the memory in write mode are
// not possible, by construction. No reset: the contents are data.
module pp_mem
  import fp_pkg::*;
#(
  parameter int unsigned DEPTH = 2048 * 256,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          sel,
  // write side
  input  logic          wa_en,
  input  logic [AW-1:0] wa_addr,
  input  cplx_t         wa_data,
  input  logic          wb_en,
  input  logic [AW-1:0] wb_addr,
  input  cplx_t         wb_data,
  // read side
  input  logic [AW-1:0] ra_addr,
  input  logic [AW-1:0] rb_addr,
  output cplx_t         ra_data,
  output cplx_t         rb_data
);
  cplx_t mem1 [DEPTH];
  cplx_t mem2 [DEPTH];

  always_ff @(posedge clk) begin
    if (!sel) begin
      if (wa_en) mem1[wa_addr] <= wa_data;
      if (wb_en) mem1[wb_addr] <= wb_data;
      ra_data <= mem2[ra_addr];
      rb_data <= mem2[rb_addr];
    end else begin
      if (wa_en) mem2[wa_addr] <= wa_data;
      if (wb_en) mem2[wb_addr] <= wb_data;
      ra_data <= mem1[ra_addr];
      rb_data <= mem1[rb_addr];
    end
  end

  a_no_collision: assert property (@(posedge clk) (wa_en && wb_en) |-> (wa_addr != wb_addr));
endmodule
