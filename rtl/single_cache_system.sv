// single_cache_system -- one processor's write-back cache wired to its 32-byte
// main memory (the cache/memory pair of the single-processor design).
//
// The CPU drives the cache through the ports of wb_cache; the cache alone
// talks to main_memory over cac_mem_read/cac_mem_wrt/cac_mem_add/cac_mem_data
// and reads mem_cac_data back one clock after a read. CACHE_INIT and MEM_INIT
// are the contents loaded while rst_n is low. The connection follows the
// document's architectural view of cache and main memory.
module single_cache_system
  import mesi_pkg::*;
#(
  parameter sc_image_t  CACHE_INIT = SC_EMPTY_IMAGE,
  parameter mem_image_t MEM_INIT   = '0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  cpu_cac_read,
  input  logic  cpu_cac_wrt,
  input  addr_t cpu_cac_add,
  input  data_t cpu_cac_data,
  output logic  cac_cpu_hit,
  output logic  cac_cpu_miss,
  output data_t cac_cpu_data
);

  logic  cac_mem_read, cac_mem_wrt;
  addr_t cac_mem_add;
  data_t cac_mem_data, mem_cac_data;

  wb_cache #(.INIT(CACHE_INIT)) u_cache (
    .clk, .rst_n,
    .cpu_cac_read, .cpu_cac_wrt, .cpu_cac_add, .cpu_cac_data,
    .cac_cpu_hit, .cac_cpu_miss, .cac_cpu_data,
    .cac_mem_read, .cac_mem_wrt, .cac_mem_add, .cac_mem_data, .mem_cac_data
  );

  main_memory #(.INIT(MEM_INIT)) u_mem (
    .clk, .rst_n,
    .mem_read  (cac_mem_read),
    .mem_wrt   (cac_mem_wrt),
    .mem_add   (cac_mem_add),
    .mem_wdata (cac_mem_data),
    .mem_rdata (mem_cac_data)
  );

endmodule
