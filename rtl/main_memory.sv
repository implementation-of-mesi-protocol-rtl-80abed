// main_memory -- the 32-byte main memory shared by the caches.
//
// One access per clock: a write (mem_wrt) stores mem_wdata at mem_add on the
// rising edge; a read (mem_read) returns the byte at mem_add on mem_rdata one
// clock later, where it stays until the next read. A read and a write in the
// same cycle are not allowed. While the active-low reset rst_n is low the
// array is loaded with INIT, the way the document loads its initial values
// during reset.
//
// The size (32 bytes, 5 address bits, 8-bit data) is the document's; the
// one-cycle read latency, the registered read port and the reset load of the
// memory are this design's own choices, as the document gives no timing.
module main_memory
  import mesi_pkg::*;
#(
  parameter mem_image_t INIT = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  mem_read,
  input  logic  mem_wrt,
  input  addr_t mem_add,
  input  data_t mem_wdata,
  output data_t mem_rdata
);

  data_t mem_q [MEM_DEPTH];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < MEM_DEPTH; i++) mem_q[i] <= INIT[i];
      mem_rdata <= '0;
    end else begin
      if (mem_wrt) mem_q[mem_add] <= mem_wdata;
      if (mem_read) mem_rdata <= mem_q[mem_add];
    end
  end

  a_one_access : assert property (@(posedge clk) disable iff (!rst_n) !(mem_read && mem_wrt))
    else $error("main_memory: read and write in the same cycle");

endmodule
