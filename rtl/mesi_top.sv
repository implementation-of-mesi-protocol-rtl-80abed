// mesi_top -- top level holding the document's two designs side by side, each
// with its own ports and its own 32-byte main memory:
//   * mp_*  : the three-processor MESI system (mesi_system), index k of each
//             array port belongs to processor k (A=0, B=1, C=2);
//   * sc_*  : the single-processor write-back cache with its memory
//             (single_cache_system).
// Both share clk and the active-low reset rst_n; at reset all cache lines are
// invalid and the memories hold zeros. The processors themselves are not
// part of the design: their request and response signals are the ports.
module mesi_top
  import mesi_pkg::*;
#(
  parameter int NUM_CACHES = 3
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // three-processor MESI system
  input  logic   [NUM_CACHES-1:0] mp_cpu_cac_read,
  input  logic   [NUM_CACHES-1:0] mp_cpu_cac_wrt,
  input  addr_t  [NUM_CACHES-1:0] mp_cpu_cac_add,
  input  data_t  [NUM_CACHES-1:0] mp_cpu_cac_data,
  output logic   [NUM_CACHES-1:0] mp_cac_cpu_hit,
  output logic   [NUM_CACHES-1:0] mp_cac_cpu_miss,
  output data_t  [NUM_CACHES-1:0] mp_cac_cpu_data,
  output logic   [NUM_CACHES-1:0] mp_snp_hit,
  output logic   [NUM_CACHES-1:0] mp_snp_miss,
  // single-processor write-back cache
  input  logic                    sc_cpu_cac_read,
  input  logic                    sc_cpu_cac_wrt,
  input  addr_t                   sc_cpu_cac_add,
  input  data_t                   sc_cpu_cac_data,
  output logic                    sc_cac_cpu_hit,
  output logic                    sc_cac_cpu_miss,
  output data_t                   sc_cac_cpu_data
);

  mesi_system #(.NUM_CACHES(NUM_CACHES)) u_mp (
    .clk, .rst_n,
    .cpu_cac_read (mp_cpu_cac_read),
    .cpu_cac_wrt  (mp_cpu_cac_wrt),
    .cpu_cac_add  (mp_cpu_cac_add),
    .cpu_cac_data (mp_cpu_cac_data),
    .cac_cpu_hit  (mp_cac_cpu_hit),
    .cac_cpu_miss (mp_cac_cpu_miss),
    .cac_cpu_data (mp_cac_cpu_data),
    .snp_hit      (mp_snp_hit),
    .snp_miss     (mp_snp_miss)
  );

  single_cache_system u_sc (
    .clk, .rst_n,
    .cpu_cac_read (sc_cpu_cac_read),
    .cpu_cac_wrt  (sc_cpu_cac_wrt),
    .cpu_cac_add  (sc_cpu_cac_add),
    .cpu_cac_data (sc_cpu_cac_data),
    .cac_cpu_hit  (sc_cac_cpu_hit),
    .cac_cpu_miss (sc_cac_cpu_miss),
    .cac_cpu_data (sc_cac_cpu_data)
  );

endmodule
