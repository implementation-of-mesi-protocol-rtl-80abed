// mesi_system -- shared-memory multiprocessor memory system kept coherent by
// the MESI protocol: NUM_CACHES (three) private 8-byte direct-mapped caches,
// one central coherence controller and a 32-byte main memory.
//
// Each processor k drives its cache through the per-cache CPU ports
// (index k of every array port): cpu_cac_read/cpu_cac_wrt with cpu_cac_add
// and cpu_cac_data, answered by cac_cpu_miss (the access missed) and
// cac_cpu_hit (the access is complete; for a read cac_cpu_data holds the
// byte). The caches only hold lines; the controller serves their requests
// one at a time over the coherence bus: it looks the address up in the
// requesting cache, then in the other caches in turn, then in memory, and
// applies the MESI transitions (see mesi_controller). snp_hit/snp_miss show,
// per cache, the outcome of each look-up the controller makes in a cache on
// behalf of another one. CACHE_INIT and MEM_INIT are loaded while rst_n is
// low.
//
// The three caches, the single controller between caches and memory, and
// the memory size are the document's; the packaging of the ports as arrays
// is this design's own.
module mesi_system
  import mesi_pkg::*;
#(
  parameter int          NUM_CACHES = 3,
  parameter mesi_image_t [NUM_CACHES-1:0] CACHE_INIT = {NUM_CACHES{MESI_EMPTY_IMAGE}},
  parameter mem_image_t  MEM_INIT   = '0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic   [NUM_CACHES-1:0] cpu_cac_read,
  input  logic   [NUM_CACHES-1:0] cpu_cac_wrt,
  input  addr_t  [NUM_CACHES-1:0] cpu_cac_add,
  input  data_t  [NUM_CACHES-1:0] cpu_cac_data,
  output logic   [NUM_CACHES-1:0] cac_cpu_hit,
  output logic   [NUM_CACHES-1:0] cac_cpu_miss,
  output data_t  [NUM_CACHES-1:0] cac_cpu_data,
  output logic   [NUM_CACHES-1:0] snp_hit,
  output logic   [NUM_CACHES-1:0] snp_miss
);

  logic       [NUM_CACHES-1:0] req_valid, req_write, bus_match, upd_en, rsp_hit, rsp_miss;
  addr_t      [NUM_CACHES-1:0] req_add;
  data_t      [NUM_CACHES-1:0] req_data;
  mesi_line_t [NUM_CACHES-1:0] bus_line, upd_line;
  index_t bus_index;
  tag_t   bus_tag;
  data_t  rsp_data;
  logic   mem_read, mem_wrt;
  addr_t  mem_add;
  data_t  mem_wdata, mem_rdata;

  for (genvar k = 0; k < NUM_CACHES; k++) begin : g_cache
    mesi_cache #(.INIT(CACHE_INIT[k])) u_cache (
      .clk, .rst_n,
      .cpu_cac_read (cpu_cac_read[k]),
      .cpu_cac_wrt  (cpu_cac_wrt[k]),
      .cpu_cac_add  (cpu_cac_add[k]),
      .cpu_cac_data (cpu_cac_data[k]),
      .cac_cpu_hit  (cac_cpu_hit[k]),
      .cac_cpu_miss (cac_cpu_miss[k]),
      .cac_cpu_data (cac_cpu_data[k]),
      .req_valid    (req_valid[k]),
      .req_write    (req_write[k]),
      .req_add      (req_add[k]),
      .req_data     (req_data[k]),
      .bus_index,
      .bus_tag,
      .bus_line     (bus_line[k]),
      .bus_match    (bus_match[k]),
      .upd_en       (upd_en[k]),
      .upd_line     (upd_line[k]),
      .rsp_hit      (rsp_hit[k]),
      .rsp_miss     (rsp_miss[k]),
      .rsp_data
    );
  end

  mesi_controller #(.NUM_CACHES(NUM_CACHES)) u_ctrl (
    .clk, .rst_n,
    .req_valid, .req_write, .req_add, .req_data,
    .bus_index, .bus_tag, .bus_line, .bus_match,
    .upd_en, .upd_line, .rsp_hit, .rsp_miss, .rsp_data,
    .snp_hit, .snp_miss,
    .mem_read, .mem_wrt, .mem_add, .mem_wdata, .mem_rdata
  );

  main_memory #(.INIT(MEM_INIT)) u_mem (
    .clk, .rst_n, .mem_read, .mem_wrt, .mem_add, .mem_wdata, .mem_rdata
  );

endmodule
